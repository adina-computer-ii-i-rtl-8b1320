// au_bus_if: the shared-memory window of one slave processor AU ((a,b)).
//
// An AU has a 64 KB byte address space of 16-bit halfwords. The lower 32 KB
// are its own CMOS and EPROM memory; the upper 32 KB reach shared memory:
// 16 KB the common memory of its submaster and 16 KB the buffer memory.
// The buffer half is split between the AU's two buses: the row bus to a
// memory row of board b and the column bus to a memory column of board a,
// each 16 blocks x 256 halfwords = 8 KB. The sizes follow the trial
// machine; the layout below is this design's choice:
//   0x8000-0xBFFF common memory    halfword address = addr[13:1]
//   0xC000-0xDFFF row bus          block = addr[12:9], word = addr[8:1]
//   0xE000-0xFFFF column bus       block = addr[12:9], word = addr[8:1]
// Addresses below 0x8000 are not claimed (sel = 0). Broadcast writes along
// the memory row or column are chosen by the AU's P1 bits 4 and 0
// (row_bcast, col_bcast), not by the address.
//
// Timing: the AU holds req, we, addr and wdata until ready. ready is low
// while the target is not open to this AU (its lines closed, or the board
// or the common memory turned to someone else): the AU waits. An access is
// taken at the clock edge with req and ready; a read's data come with
// rvalid in the next cycle.
module au_bus_if
  import adina_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // AU bus
  input  logic    req,
  input  logic    we,
  input  logic [15:0] addr,
  input  word_t   wdata,
  input  logic    row_bcast,
  input  logic    col_bcast,
  output logic    sel,
  output logic    ready,
  output word_t   rdata,
  output logic    rvalid,
  // row bus, to board b
  output bm_req_t row_req,
  input  logic    row_open,
  input  word_t   row_rdata,
  // column bus, to board a
  output bm_req_t col_req,
  input  logic    col_open,
  input  word_t   col_rdata,
  // common memory of SU ((b))
  output cm_req_t cm_req,
  input  logic    cm_grant,
  input  word_t   cm_rdata
);

  typedef enum logic [1:0] {T_CM, T_ROW, T_COL} target_e;

  target_e target, target_q;
  logic    go;

  assign sel = req && addr[15];

  always_comb begin
    if (!addr[14])     target = T_CM;
    else if (!addr[13]) target = T_ROW;
    else               target = T_COL;
  end

  always_comb begin
    unique case (target)
      T_CM:    ready = cm_grant;
      T_ROW:   ready = row_open;
      default: ready = col_open;
    endcase
  end

  assign go = sel && ready;

  always_comb begin
    row_req       = '0;
    row_req.en    = go && target == T_ROW;
    row_req.we    = we;
    row_req.bcast = row_bcast;
    row_req.blk   = 8'(addr[12:9]);
    row_req.addr  = addr[8:1];
    row_req.wdata = wdata;

    col_req       = '0;
    col_req.en    = go && target == T_COL;
    col_req.we    = we;
    col_req.bcast = col_bcast;
    col_req.blk   = 8'(addr[12:9]);
    col_req.addr  = addr[8:1];
    col_req.wdata = wdata;

    cm_req        = '0;
    cm_req.en     = go && target == T_CM;
    cm_req.we     = we;
    cm_req.addr   = addr[13:1];
    cm_req.wdata  = wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid   <= 1'b0;
      target_q <= T_CM;
    end else begin
      rvalid   <= go && !we;
      target_q <= target;
    end
  end

  always_comb begin
    unique case (target_q)
      T_CM:    rdata = cm_rdata;
      T_ROW:   rdata = row_rdata;
      default: rdata = col_rdata;
    endcase
  end

  // addr[0] selects a byte; accesses are halfword-wide.
  a_align: assert property (@(posedge clk) disable iff (!rst_n) sel |-> !addr[0])
    else $error("odd byte address on the AU bus");

endmodule
