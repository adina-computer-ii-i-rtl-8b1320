// tb_access_ctrl: self-checking test of the board access-competition logic
// (N = 4). Walks the four-step cycle several times: row AUs open and end one
// by one, the total end appears only when the last one ends, the SU's
// acknowledge turns the board to the column side one clock later and is
// passed to the row AUs (ack) and column AUs (go); then the same for the
// column side. Also checks that a premature acknowledge does not turn the
// board, and that opens follow each AU's own end signal.
module tb_access_ctrl;
  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic row_end [N], col_end [N];
  logic su_row_ack, su_col_ack;
  logic su_row_total, su_col_total;
  logic row_ack, row_go, col_ack, col_go;
  logic sel_col;
  logic row_open [N], col_open [N];
  int checks = 0, failures = 0;
  int turns = 0;

  access_ctrl #(.N(N)) dut (.*);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; su_row_ack = 0; su_col_ack = 0;
    for (int n = 0; n < N; n++) begin row_end[n] = 1; col_end[n] = 1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset: row side", sel_col, 0);
    for (int round = 0; round < 3; round++) begin
      // i) row AUs open
      for (int n = 0; n < N; n++) row_end[n] = 0;
      #1;
      for (int n = 0; n < N; n++) begin
        check("row open", row_open[n], 1);
        check("col closed", col_open[n], 0);
      end
      check("no row total", su_row_total, 0);
      // end one by one
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        row_end[n] = 1;
        #1;
        check("own line closes", row_open[n], 0);
        check("total only at last", su_row_total, n == N - 1);
      end
      // column AUs try to open early: nothing reaches the board
      for (int n = 0; n < N; n++) col_end[n] = 0;
      #1;
      for (int n = 0; n < N; n++) check("col waits for turn", col_open[n], 0);
      // ii) SU acknowledges
      @(negedge clk);
      su_row_ack = 1;
      #1;
      check("ack to row AUs", row_ack, 1);
      check("go to column AUs", col_go, 1);
      check("not yet turned", sel_col, 0);
      @(negedge clk);
      check("turned to column side", sel_col, 1);
      if (sel_col) turns++;
      su_row_ack = 0;
      #1;
      for (int n = 0; n < N; n++) check("col open", col_open[n], 1);
      // iii) column AUs end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        col_end[n] = 1;
        #1;
        check("col total only at last", su_col_total, n == N - 1);
      end
      // iv) SU acknowledges
      @(negedge clk);
      su_col_ack = 1;
      #1;
      check("ack to column AUs", col_ack, 1);
      check("go to row AUs", row_go, 1);
      @(negedge clk);
      check("turned back to row side", sel_col, 0);
      if (!sel_col) turns++;
      su_col_ack = 0;
    end
    check("six turns", turns == 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
