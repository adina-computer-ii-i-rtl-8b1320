// tb_bm_board: self-checking test of a buffer memory board (N = 4).
// Row phase: each row bus j writes every block (i,j) with a value naming
// i, j and the word; one bus then broadcasts along its memory row. Column
// phase: each column bus i reads every block (i,j) and must see what the
// row side wrote, one cycle after the read. A column broadcast is written
// and read back from the row side. Also checks that the bus of the side
// not selected reaches no block.
module tb_bm_board;
  import adina_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    sel_col;
  bm_req_t row_req [N], col_req [N];
  word_t   row_rdata [N], col_rdata [N];
  int checks = 0, failures = 0;
  word_t model [N][N][8];

  bm_board #(.N(N)) dut (.*);

  function automatic word_t val(int i, int j, int w, int s);
    return word_t'((s << 12) | (i << 8) | (j << 4) | w);
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    for (int n = 0; n < N; n++) begin
      row_req[n] = '0;
      col_req[n] = '0;
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
    idle();
    sel_col = 0;
    // row phase: bus j writes block (i,j), words 0..7
    for (int i = 0; i < N; i++)
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        for (int j = 0; j < N; j++) begin
          row_req[j] = '{en: 1, we: 1, bcast: 0, blk: 8'(i), addr: 8'(w), wdata: val(i, j, w, 1)};
          model[i][j][w] = val(i, j, w, 1);
        end
        // the column side is not selected: its writes go nowhere
        for (int c = 0; c < N; c++)
          col_req[c] = '{en: 1, we: 1, bcast: 1, blk: 0, addr: 8'(w), wdata: 16'hBAD0};
      end
    // row broadcast by bus 2 at word 5
    @(negedge clk);
    idle();
    row_req[2] = '{en: 1, we: 1, bcast: 1, blk: 0, addr: 8'd5, wdata: 16'hB0C2};
    for (int i = 0; i < N; i++) model[i][2][5] = 16'hB0C2;
    @(negedge clk);
    idle();
    sel_col = 1;
    // column phase: bus i reads block (i,j) word w
    for (int j = 0; j < N; j++)
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++)
          col_req[i] = '{en: 1, we: 0, bcast: 0, blk: 8'(j), addr: 8'(w), wdata: 0};
        // row side reads must not reach the blocks
        for (int r = 0; r < N; r++)
          row_req[r] = '{en: 1, we: 0, bcast: 0, blk: 8'(r), addr: 8'(w), wdata: 0};
        @(negedge clk);
        idle();
        for (int i = 0; i < N; i++) begin
          check($sformatf("col %0d blk %0d w %0d", i, j, w), col_rdata[i], model[i][j][w]);
          check("row bus silent", row_rdata[i], '0);
        end
      end
    // column broadcast by bus 1 at word 6
    @(negedge clk);
    col_req[1] = '{en: 1, we: 1, bcast: 1, blk: 0, addr: 8'd6, wdata: 16'hC011};
    for (int j = 0; j < N; j++) model[1][j][6] = 16'hC011;
    @(negedge clk);
    idle();
    sel_col = 0;
    for (int i = 0; i < N; i++)
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        for (int j = 0; j < N; j++)
          row_req[j] = '{en: 1, we: 0, bcast: 0, blk: 8'(i), addr: 8'(w), wdata: 0};
        @(negedge clk);
        idle();
        for (int j = 0; j < N; j++)
          check($sformatf("row %0d blk %0d w %0d", j, i, w), row_rdata[j], model[i][j][w]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
