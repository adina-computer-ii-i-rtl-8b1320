// tb_matmul: the matrix product of the evaluation (two matrices of order
// N^2) run on the fabric with N = 4, so of order 16.
//
// AU ((j,k)) holds row p = j*N + k of A; AU ((l,m)) holds column q = l*N + m
// of B. A block holds half a vector (N^2/2 words), so every column goes in
// two halves. For every (l, m) and half:
//   1 column side: ((l,m)) broadcasts its half column along its memory
//     column, into blocks (m,k)_l for all k;
//   2 row side:    every mediator ((k,l)) reads it from block (m,k)_l;
//   3 column side: it broadcasts it along its memory column on board k,
//     into blocks (l,j)_k for all j;
//   4 row side:    every AU ((j,k)) reads it from block (l,j)_k and adds
//     the partial scalar product to C[p][q].
// The bench computes each AU's arithmetic in 16-bit integers and checks the
// result against a product it computes directly from A and B. Every phase
// must take N^2/2 cycles; broadcasts and board turns are counted.
module tb_matmul;
  import adina_pkg::*;
  localparam int N = 4;
  localparam int SW = $clog2(N);
  localparam int M = N * N;     // matrix order
  localparam int H = M / 2;     // words per half vector

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

  adina2_top #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_turn_col = 0, n_turn_row = 0, n_wait = 0, n_row_bcast = 0, n_col_bcast = 0;
  int n_cm_grant = 0, n_su_wait = 0, n_relayed = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;


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


  word_t A [M][M], B [M][M], C [M][M], Cref [M][M];
  word_t medi [N][N][H];        // mediator copy, [k][l][w]
  int n_phase_ok = 0;

  task automatic run_phase(int kind, int l, int m, int h);
    // kind 1..4 as in the header; one access per active AU per cycle
    longint t0;
    t0 = cyc;
    for (int w = 0; w <= H; w++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          if (w > 0 && kind == 2 && b == l)
            medi[a][l][w - 1] = au_rdata[a][b];
          if (w > 0 && kind == 4) begin
            int p;
            p = a * N + b;
            C[p][l * N + m] = C[p][l * N + m] + A[p][h * H + w - 1] * au_rdata[a][b];
          end
          au_req[a][b] = 0; au_we[a][b] = 0;
          au_p1_out[a][b][P1_COL_BCAST] = 0;
          if (w < H) begin
            unique case (kind)
              1: if (a == l && b == m) begin
                   au_req[a][b] = 1; au_we[a][b] = 1; au_p1_out[a][b][P1_COL_BCAST] = 1;
                   au_addr[a][b] = a_col(0, w); au_wdata[a][b] = B[h * H + w][l * N + m];
                 end
              2: if (b == l) begin
                   au_req[a][b] = 1; au_addr[a][b] = a_row(m, w);
                 end
              3: if (b == l) begin
                   au_req[a][b] = 1; au_we[a][b] = 1; au_p1_out[a][b][P1_COL_BCAST] = 1;
                   au_addr[a][b] = a_col(0, w); au_wdata[a][b] = medi[a][l][w];
                 end
              default: begin
                   au_req[a][b] = 1; au_addr[a][b] = a_row(l, w);
                 end
            endcase
          end
        end
      #1;
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          if (au_req[a][b]) check("phase access ready", au_ready[a][b], 1);
    end
    idle_all();
    if (kind == 1) n_col_bcast++;
    if (kind == 3) n_col_bcast += N;
    checks++;
    if (cyc - t0 - 1 == H) n_phase_ok++;
    else begin
      failures++;
      $display("FAIL phase %0d took %0d cycles, expected %0d", kind, cyc - t0 - 1, H);
    end
  endtask

  initial begin
    #(64'd10 * 64'd200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    idle_all();
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        au_p1_out[a][b] = 8'b0100_0100;
        au_p0_end[a][b] = 0;
      end
    for (int k = 0; k < N; k++) begin
      su_p1_out[k] = 0; su_p0_sel[k] = 0;
      su_cm_req[k] = 0; su_cm_we[k] = 0; su_cm_addr[k] = 0; su_cm_wdata[k] = 0;
    end
    for (int p = 0; p < M; p++)
      for (int q = 0; q < M; q++) begin
        A[p][q] = word_t'($urandom_range(0, 99));
        B[p][q] = word_t'($urandom_range(0, 99));
        C[p][q] = 0;
      end
    for (int p = 0; p < M; p++)
      for (int q = 0; q < M; q++) begin
        Cref[p][q] = 0;
        for (int r = 0; r < M; r++) Cref[p][q] = Cref[p][q] + A[p][r] * B[r][q];
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_row_end(0);
    turn_to_col();
    for (int l = 0; l < N; l++)
      for (int m = 0; m < N; m++)
        for (int h = 0; h < 2; h++) begin
          run_phase(1, l, m, h);
          turn_to_row();
          run_phase(2, l, m, h);
          turn_to_col();
          run_phase(3, l, m, h);
          turn_to_row();
          run_phase(4, l, m, h);
          turn_to_col();
        end
    for (int p = 0; p < M; p++)
      for (int q = 0; q < M; q++)
        check($sformatf("C[%0d][%0d]", p, q), C[p][q], Cref[p][q]);
    count("board turned to column side", n_turn_col);
    count("board turned to row side", n_turn_row);
    count("column broadcast", n_col_bcast);
    count("phase at one access per cycle", n_phase_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
