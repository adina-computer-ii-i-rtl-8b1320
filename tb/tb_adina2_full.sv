// tb_adina2_full: the end-to-end test of tb_adina2_top at the full size,
// N = 16 (256 AUs, 16 boards of 256 blocks), with the fabric at its defaults.
//
// The bench plays all N^2 slave processors and the N submasters. It runs
// the all-to-all exchange in which every AU sends one datum to every other
// AU through a mediating AU:
//   A  row side:    every AU ((j,k)) writes word m of block (i,j)_k with
//                   D(j,k,i,m), for all i, m;
//   B1 column side: every AU ((k,l)) reads all words of blocks (l,j)_k;
//   B2 row side:    it writes word j of block (m,k)_l with what it read
//                   from word m of block (l,j)_k;
//   C  column side: every AU ((l,m)) reads word j of block (m,k)_l and
//                   must find D(j,k,l,m), the datum AU ((j,k)) addressed
//                   to it.
// Between the phases the AUs end their side and the SUs acknowledge, so
// every board turns. Each phase must take exactly N^2 cycles. Then a
// column broadcast and a row broadcast are written and read back from the
// other side, an AU that touches a closed side is made to wait, and a
// submaster hands its common memory to one AU and takes it back. Each of
// these mechanisms is counted and must have happened.
module tb_adina2_full;
  import adina_pkg::*;
  localparam int N = 16;
  localparam int SW = $clog2(N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic        au_req      [N][N];
  logic        au_we       [N][N];
  logic [15:0] au_addr     [N][N];
  word_t       au_wdata    [N][N];
  logic        au_sel      [N][N];
  logic        au_ready    [N][N];
  word_t       au_rdata    [N][N];
  logic        au_rvalid   [N][N];
  logic [7:0]  au_p1_out   [N][N];
  logic [7:0]  au_p1_in    [N][N];
  logic        au_p0_end   [N][N];
  logic        au_p0_grant [N][N];
  logic [7:0]  su_p1_out   [N];
  logic [7:0]  su_p1_in    [N];
  logic [SW:0] su_p0_sel   [N];
  logic        su_p0_done  [N];
  logic        su_cm_req   [N];
  logic        su_cm_we    [N];
  logic [CM_AW-1:0] su_cm_addr [N];
  word_t       su_cm_wdata [N];
  logic        su_cm_ready [N];
  word_t       su_cm_rdata [N];

  adina2_top dut (.*);

  int checks = 0, failures = 0;
  int n_turn_col = 0, n_turn_row = 0, n_wait = 0, n_row_bcast = 0, n_col_bcast = 0;
  int n_cm_grant = 0, n_su_wait = 0, n_relayed = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  word_t priv [N][N][N][N];   // mediator's private copy [k][l][j][m]

  function automatic word_t D(int w, int k, int l, int m);
    return word_t'(((((w * N + k) * N + l) * N + m) * 16'h0F3B) ^ 16'h5A5A);
  endfunction

  function automatic logic [15:0] a_row(int blk, int w);
    return 16'hC000 | 16'(blk << 9) | 16'(w << 1);
  endfunction
  function automatic logic [15:0] a_col(int blk, int w);
    return 16'hE000 | 16'(blk << 9) | 16'(w << 1);
  endfunction
  function automatic logic [15:0] a_cm(int w);
    return 16'h8000 | 16'(w << 1);
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  task automatic idle_all();
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        au_req[a][b] = 0; au_we[a][b] = 0; au_addr[a][b] = 0; au_wdata[a][b] = 0;
      end
  endtask

  task automatic set_row_end(logic v);
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) au_p1_out[a][b][P1_ROW_END] = v;
  endtask
  task automatic set_col_end(logic v);
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) au_p1_out[a][b][P1_COL_END] = v;
  endtask

  // Steps i)->ii): all row AUs have ended; SUs acknowledge; column AUs open.
  task automatic turn_to_col();
    set_row_end(1);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check("row total end at SU", su_p1_in[k][7], 1);
      su_p1_out[k][6] = 1;
    end
    #1;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        check("row ack at AU", au_p1_in[a][b][P1_ROW_ACK], 1);
        check("go at column AU", au_p1_in[a][b][P1_COL_GO], 1);
      end
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      su_p1_out[k][6] = 0;
      check("board turned to column side", dut.sel_col[k], 1);
      if (dut.sel_col[k]) n_turn_col++;
    end
    set_col_end(0);
  endtask

  // Steps iii)->iv): all column AUs have ended; SUs acknowledge; rows open.
  task automatic turn_to_row();
    set_col_end(1);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check("column total end at SU", su_p1_in[k][3], 1);
      su_p1_out[k][2] = 1;
    end
    #1;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        check("column ack at AU", au_p1_in[a][b][P1_COL_ACK], 1);
        check("go at row AU", au_p1_in[a][b][P1_ROW_GO], 1);
      end
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      su_p1_out[k][2] = 0;
      check("board turned to row side", dut.sel_col[k], 0);
      if (!dut.sel_col[k]) n_turn_row++;
    end
    set_row_end(0);
  endtask

  initial begin
    #(64'd10 * (64'd40 * N * N * N + 64'd20000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    rst_n = 0;
    idle_all();
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        au_p1_out[a][b] = 8'b0100_0100;   // both sides closed
        au_p0_end[a][b] = 0;
      end
    for (int k = 0; k < N; k++) begin
      su_p1_out[k] = 0; su_p0_sel[k] = 0;
      su_cm_req[k] = 0; su_cm_we[k] = 0; su_cm_addr[k] = 0; su_cm_wdata[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_row_end(0);

    // An AU touching the column side during the row phase waits.
    @(negedge clk);
    au_req[0][0] = 1; au_we[0][0] = 1; au_addr[0][0] = a_col(0, 0); au_wdata[0][0] = 16'hDEAD;
    for (int c = 0; c < 3; c++) begin
      #1 check("closed side: not ready", au_ready[0][0], 0);
      if (!au_ready[0][0]) n_wait++;
      @(negedge clk);
    end
    idle_all();

    // Phase A: write rows.
    t0 = cyc;
    for (int t = 0; t < N * N; t++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          au_req[a][b] = 1; au_we[a][b] = 1;
          au_addr[a][b]  = a_row(t / N, t % N);
          au_wdata[a][b] = D(a, b, t / N, t % N);
        end
      #1;
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          check("phase A ready", au_ready[a][b], 1);
    end
    @(negedge clk);
    idle_all();
    check("phase A takes N^2 cycles", 16'(cyc - t0 - 1), 16'(N * N));

    turn_to_col();

    // Phase B1: mediators read memory columns.
    t0 = cyc;
    for (int t = 0; t <= N * N; t++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          if (t > 0) begin
            check("B1 rvalid", au_rvalid[a][b], 1);
            priv[a][b][(t - 1) / N][(t - 1) % N] = au_rdata[a][b];
          end
          au_req[a][b] = t < N * N; au_we[a][b] = 0;
          au_addr[a][b] = a_col(t / N, t % N);
        end
      #1;
      if (t < N * N)
        for (int a = 0; a < N; a++)
          for (int b = 0; b < N; b++)
            check("phase B1 ready", au_ready[a][b], 1);
    end
    idle_all();
    check("phase B1 takes N^2 cycles", 16'(cyc - t0 - 1), 16'(N * N));

    turn_to_row();

    // Phase B2: mediators write regrouped tuples along memory rows.
    t0 = cyc;
    for (int t = 0; t < N * N; t++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          int m, j;
          m = t / N; j = t % N;
          au_req[a][b] = 1; au_we[a][b] = 1;
          au_addr[a][b]  = a_row(m, j);
          au_wdata[a][b] = priv[a][b][j][m];
        end
    end
    @(negedge clk);
    idle_all();
    check("phase B2 takes N^2 cycles", 16'(cyc - t0 - 1), 16'(N * N));

    turn_to_col();

    // Phase C: every AU reads what every AU sent it.
    t0 = cyc;
    for (int t = 0; t <= N * N; t++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          if (t > 0) begin
            int k, j;
            k = (t - 1) / N; j = (t - 1) % N;
            check($sformatf("AU((%0d,%0d)) got datum of AU((%0d,%0d))", a, b, j, k),
                  au_rdata[a][b], D(j, k, a, b));
            if (au_rdata[a][b] == D(j, k, a, b)) n_relayed++;
          end
          au_req[a][b] = t < N * N; au_we[a][b] = 0;
          au_addr[a][b] = a_col(t / N, t % N);
        end
    end
    idle_all();
    check("phase C takes N^2 cycles", 16'(cyc - t0 - 1), 16'(N * N));

    // Column broadcast by AU ((1,2)) along memory column 2 of board 1.
    @(negedge clk);
    au_p1_out[1][2][P1_COL_BCAST] = 1;
    au_req[1][2] = 1; au_we[1][2] = 1; au_addr[1][2] = a_col(0, 200); au_wdata[1][2] = 16'hC0B1;
    @(negedge clk);
    idle_all();
    au_p1_out[1][2][P1_COL_BCAST] = 0;
    n_col_bcast++;

    turn_to_row();

    // Row AUs ((j,1)) find it in block (2,j)_1; AU ((3,0)) broadcasts a row.
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      au_req[j][1] = 1; au_we[j][1] = 0; au_addr[j][1] = a_row(2, 200);
      @(negedge clk);
      idle_all();
      check($sformatf("column broadcast seen by AU((%0d,1))", j), au_rdata[j][1], 16'hC0B1);
    end
    @(negedge clk);
    au_p1_out[3][0][P1_ROW_BCAST] = 1;
    au_req[3][0] = 1; au_we[3][0] = 1; au_addr[3][0] = a_row(0, 201); au_wdata[3][0] = 16'hB0B2;
    @(negedge clk);
    idle_all();
    au_p1_out[3][0][P1_ROW_BCAST] = 0;
    n_row_bcast++;

    turn_to_col();

    // Column AUs ((0,i)) find it in block (i,3)_0.
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      au_req[0][i] = 1; au_we[0][i] = 0; au_addr[0][i] = a_col(3, 201);
      @(negedge clk);
      idle_all();
      check($sformatf("row broadcast seen by AU((0,%0d))", i), au_rdata[0][i], 16'hB0B2);
    end

    // Common memory of SU ((1)): fill, hand to AU ((2,1)), take back.
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      su_cm_req[1] = 1; su_cm_we[1] = 1; su_cm_addr[1] = 13'(w); su_cm_wdata[1] = 16'(16'h7700 + w);
      #1 check("SU owns its common memory", su_cm_ready[1], 1);
    end
    @(negedge clk);
    su_cm_req[1] = 0;
    su_p0_sel[1] = {1'b1, SW'(2)};
    @(negedge clk);
    check("grant to AU((2,1))", au_p0_grant[2][1], 1);
    check("no grant to AU((3,1))", au_p0_grant[3][1], 0);
    if (au_p0_grant[2][1]) n_cm_grant++;
    // the SU waits while the AU holds it
    su_cm_req[1] = 1; su_cm_we[1] = 0; su_cm_addr[1] = 0;
    #1 check("SU waits", su_cm_ready[1], 0);
    if (!su_cm_ready[1]) n_su_wait++;
    // another AU of the same SU waits too
    au_req[3][1] = 1; au_we[3][1] = 1; au_addr[3][1] = a_cm(0); au_wdata[3][1] = 16'hBAD3;
    #1 check("ungranted AU waits", au_ready[3][1], 0);
    if (!au_ready[3][1]) n_wait++;
    for (int w = 0; w < 8; w++) begin
      au_req[2][1] = 1; au_we[2][1] = 0; au_addr[2][1] = a_cm(w);
      @(negedge clk);
      au_req[2][1] = 0;
      check("AU reads SU's data", au_rdata[2][1], 16'(16'h7700 + w));
    end
    for (int w = 0; w < 8; w++) begin
      au_req[2][1] = 1; au_we[2][1] = 1; au_addr[2][1] = a_cm(100 + w); au_wdata[2][1] = 16'(16'h2100 + w);
      @(negedge clk);
    end
    idle_all();
    su_cm_req[1] = 0;
    au_p0_end[2][1] = 1;
    #1 check("AU's end reaches the SU", su_p0_done[1], 1);
    @(negedge clk);
    au_p0_end[2][1] = 0;
    su_p0_sel[1] = 0;
    @(negedge clk);
    check("memory back with the SU", su_cm_ready[1], 1);
    for (int w = 0; w < 8; w++) begin
      su_cm_req[1] = 1; su_cm_we[1] = 0; su_cm_addr[1] = 13'(100 + w);
      @(negedge clk);
      su_cm_req[1] = 0;
      check("SU reads AU's results", su_cm_rdata[1], 16'(16'h2100 + w));
    end
    su_cm_req[1] = 1; su_cm_we[1] = 0; su_cm_addr[1] = 0;
    @(negedge clk);
    su_cm_req[1] = 0;
    check("waiting AU wrote nothing", su_cm_rdata[1], 16'h7700);

    count("board turned to column side", n_turn_col);
    count("board turned to row side", n_turn_row);
    count("AU waited on a closed target", n_wait);
    count("row broadcast", n_row_bcast);
    count("column broadcast", n_col_bcast);
    count("common memory granted to an AU", n_cm_grant);
    count("SU waited for its common memory", n_su_wait);
    count("datum relayed through a mediator", n_relayed);
    check("all N^4 data relayed", 16'(n_relayed == N * N * N * N), 16'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
