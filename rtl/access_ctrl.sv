// access_ctrl: the access-competition logic of buffer memory board k.
//
// Board k is shared by two groups of N processors: the row AUs ((j,k)) and
// the column AUs ((k,i)). Submaster ((k)) lets them take turns:
//   i)   each row AU opens its horizontal lines, writes its memory row, then
//        raises its row end signal (P1 bit 6), closing its lines. When all
//        have ended, the SU sees the row total end (the AND of all).
//   ii)  the SU answers with its row acknowledge. It reaches every row AU
//        (their P1 bit 7) and every column AU (their P1 bit 1, "go"); the
//        board now takes its lines from the bottom, and each column AU opens
//        its vertical lines by lowering its column end signal (P1 bit 2).
//   iii) the column AUs work, then raise their column end signals; the SU
//        sees the column total end (AND of all).
//   iv)  the SU answers with its column acknowledge, to every column AU (P1
//        bit 3) and every row AU (P1 bit 5, "go"); the board turns back to
//        the row buses and the cycle repeats.
// The sequence and the signal bits follow the trial machine; the hardware
// here is this design's simplest form of it: two AND trees, plain fan-out
// wires and one flip-flop, sel_col, that turns the board only when the SU
// acknowledges and every line of the side being left is closed, so the two
// sides never drive a block at once.
//
// Interface: end inputs are 1 when an AU's lines on this board are closed.
// row_open/col_open tell each AU's bus interface that its lines reach the
// blocks now. All signals are positive logic (the original lines are
// active low). Timing: sel_col changes at the clock edge after the
// acknowledge; totals, acknowledges and opens are combinational.
module access_ctrl #(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst_n,
  // from the row AUs ((j,k)) and column AUs ((k,i))
  input  logic row_end   [N],
  input  logic col_end   [N],
  // from submaster ((k))
  input  logic su_row_ack,
  input  logic su_col_ack,
  // to submaster ((k))
  output logic su_row_total,
  output logic su_col_total,
  // to the AUs' P1 inputs
  output logic row_ack,      // row AUs, P1 bit 7
  output logic row_go,       // row AUs, P1 bit 5
  output logic col_ack,      // column AUs, P1 bit 3
  output logic col_go,       // column AUs, P1 bit 1
  // to the board and the AU bus interfaces
  output logic sel_col,
  output logic row_open  [N],
  output logic col_open  [N]
);

  always_comb begin
    su_row_total = 1'b1;
    su_col_total = 1'b1;
    for (int n = 0; n < N; n++) begin
      su_row_total &= row_end[n];
      su_col_total &= col_end[n];
    end
  end

  assign row_ack = su_row_ack;
  assign col_go  = su_row_ack;
  assign col_ack = su_col_ack;
  assign row_go  = su_col_ack;

  always_ff @(posedge clk) begin
    if (!rst_n)                                       sel_col <= 1'b0;
    else if (!sel_col && su_row_ack && su_row_total)  sel_col <= 1'b1;
    else if ( sel_col && su_col_ack && su_col_total)  sel_col <= 1'b0;
  end

  always_comb begin
    for (int n = 0; n < N; n++) begin
      row_open[n] = !sel_col && !row_end[n];
      col_open[n] =  sel_col && !col_end[n];
    end
  end

  // The SU acknowledges a phase only after seeing its total end.
  a_row_ack: assert property (@(posedge clk) disable iff (!rst_n)
                              su_row_ack && !sel_col |-> su_row_total)
    else $error("row acknowledge before all row AUs ended");
  a_col_ack: assert property (@(posedge clk) disable iff (!rst_n)
                              su_col_ack && sel_col |-> su_col_total)
    else $error("column acknowledge before all column AUs ended");

endmodule
