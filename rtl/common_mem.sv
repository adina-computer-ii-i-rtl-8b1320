// common_mem: the common memory of submaster ((k)), shared with its AUs.
//
// 16 KB (8K halfwords) of the submaster's memory can also be reached by the
// N slaves ((j,k)), j = 0..N-1, one at a time, when the submaster allows it:
// the SU puts the code '1j' on its port P0 bits 4..0 (bit 4 = 1 opens, bits
// 3..0 name the AU). The lines of ((j,k)) are then switched to this memory
// and the AU is told so on its P0 bit 7 (grant). When its transfer is done
// the AU raises its P0 bit 2 (end), which reaches the SU's P0 bit 7.
// The select code and the grant/end signalling follow the trial machine.
// This design's own choices: the grant is registered (it follows the SU's
// code one clock later); while any AU holds the memory, or a grant is
// changing, the SU's own accesses wait (su_ready low); the memory is a
// single-port array.
//
// Timing: an access is taken at the clock edge; read data appear on rdata,
// shared by the SU and all AUs, in the next cycle.
module common_mem
  import adina_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = CM_DEPTH,
  localparam int unsigned SW   = $clog2(N)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [SW:0] su_sel,     // SU P0: {open, AU number}
  input  cm_req_t   su_req,
  output logic      su_ready,
  output logic      su_done,      // to SU P0 bit 7
  input  cm_req_t   au_req  [N],  // from the AUs' common-memory windows
  input  logic      au_end  [N],  // AU P0 bit 2
  output logic      au_grant[N],  // AU P0 bit 7
  output word_t     rdata
);

  word_t       mem [DEPTH];
  logic        open_q;
  logic [SW-1:0] who_q;
  cm_req_t     req;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      open_q <= 1'b0;
      who_q  <= '0;
    end else begin
      open_q <= su_sel[SW];
      who_q  <= su_sel[SW-1:0];
    end
  end

  always_comb begin
    for (int n = 0; n < N; n++) au_grant[n] = open_q && (who_q == SW'(n));
  end

  assign su_ready = !open_q && !su_sel[SW];
  assign su_done  = open_q && au_end[who_q];

  always_comb begin
    if (open_q) req = au_req[who_q];
    else        req = su_ready ? su_req : '0;
  end

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[req.addr[$clog2(DEPTH)-1:0]] <= req.wdata;
      else        rdata <= mem[req.addr[$clog2(DEPTH)-1:0]];
    end
  end

endmodule
