// bm_block: one buffer memory block (i,j)_k of 256 halfwords.
//
// The block is two 256 x 8 static RAM chips side by side, one for the high
// and one for the low byte of a halfword, sharing address and control. The
// controls are the chips' own, active low: CS_n selects the block, R/W_n
// chooses read (1) or write (0), OD_n disables the data output. The block
// does not know which bus drives it; the board in front of it selects the
// lines from the left (row side) or from the bottom (column side).
//
// Timing: the chips are asynchronous SRAMs; here they are clocked. A write
// is taken at the rising clock edge with CS_n = 0 and R/W_n = 0. A read with
// CS_n = 0 and R/W_n = 1 presents its word on dout after that edge, for as
// long as OD_n is low; with OD_n high dout is 0, so the outputs of all the
// blocks on a bus can be ORed together like an open bus. Contents are not
// initialised, as in the real parts.
module bm_block
  import adina_pkg::*;
#(
  parameter int unsigned DEPTH = BLK_DEPTH
) (
  input  logic                     clk,
  input  logic                     cs_n,
  input  logic                     od_n,
  input  logic                     rw_n,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t                    din,
  output word_t                    dout
);

  logic [7:0] chip_hi [DEPTH];
  logic [7:0] chip_lo [DEPTH];
  word_t      q;

  always_ff @(posedge clk) begin
    if (!cs_n) begin
      if (!rw_n) begin
        chip_hi[addr] <= din[15:8];
        chip_lo[addr] <= din[7:0];
      end else begin
        q <= {chip_hi[addr], chip_lo[addr]};
      end
    end
  end

  assign dout = od_n ? '0 : q;

endmodule
