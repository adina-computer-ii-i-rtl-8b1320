// tb_heat2d: the explicit scheme for 2-D heat conduction of the evaluation,
// U' = U + lambda (D1 + D2) U, on an N^2 x N^2 lattice with N = 4 (16 x 16).
//
// The AUs form a one-dimensional array twice: AU ((a,b)) is number
// p = a*N + b, and holds lattice row y = p (its "memory row") and lattice
// column x = p (its "memory column") in private memory. Rows and columns
// are exchanged through the buffer memory and mediators:
//   rows -> columns: ((j,k)) writes tuple i of its row into (i,j)_k; the
//     mediator ((k,l)) gathers word m of (l,j)_k over j and writes that
//     tuple into (m,k)_l; ((l,m)) reads (m,k)_l over k;
//   columns -> rows: the same path backwards.
// Each exchange is four phases of N^2 accesses, alternately on the row and
// the column side. One time step: columns from rows, D2 along each column,
// D2 back to rows, then U' along each row. The bench does the AUs'
// arithmetic in 16-bit integers (lambda = 1/8, zero boundary values) and
// checks the lattice after two steps against a direct computation. Every
// phase must take N^2 cycles.
module tb_heat2d;
  import adina_pkg::*;
  localparam int N = 4;
  localparam int SW = $clog2(N);
  localparam int M = N * N;     // lattice points per line
  localparam int STEPS = 2;

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
  int n_turn_col = 0, n_turn_row = 0;
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



  word_t row  [N][N][M];        // memory row of AU [a][b]: lattice row y = a*N+b
  word_t col  [N][N][M];        // memory column: lattice column x = a*N+b
  word_t med  [N][N][N][N];     // mediator buffer [k][l][j][m]
  word_t uref [M][M], unext [M][M];   // [y][x]
  int n_phase_ok = 0;

  // kind: 0 rows->blocks, 1 mediator gathers (column side), 2 mediator
  // scatters (row side), 3 blocks->columns; 4..7 the reverse path.
  task automatic phase(int kind);
    longint t0;
    t0 = cyc;
    for (int t = 0; t <= M; t++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          if (t > 0) begin
            int u, v;
            u = (t - 1) / N; v = (t - 1) % N;
            unique case (kind)
              1: med[a][b][u][v] = au_rdata[a][b];
              3: col[a][b][v * N + u] = au_rdata[a][b];
              5: med[a][b][v][u] = au_rdata[a][b];
              7: row[a][b][u * N + v] = au_rdata[a][b];
              default: ;
            endcase
          end
          au_req[a][b] = t < M;
          au_we[a][b]  = kind inside {0, 2, 4, 6};
          if (t < M) begin
            int u, v;
            u = t / N; v = t % N;
            unique case (kind)
              0: begin au_addr[a][b] = a_row(u, v); au_wdata[a][b] = row[a][b][u * N + v]; end
              1: au_addr[a][b] = a_col(u, v);
              2: begin au_addr[a][b] = a_row(u, v); au_wdata[a][b] = med[a][b][v][u]; end
              3: au_addr[a][b] = a_col(u, v);
              4: begin au_addr[a][b] = a_col(u, v); au_wdata[a][b] = col[a][b][v * N + u]; end
              5: au_addr[a][b] = a_row(u, v);
              6: begin au_addr[a][b] = a_col(u, v); au_wdata[a][b] = med[a][b][u][v]; end
              default: au_addr[a][b] = a_row(u, v);
            endcase
          end
        end
    end
    idle_all();
    checks++;
    if (cyc - t0 - 1 == M) n_phase_ok++;
    else begin
      failures++;
      $display("FAIL phase %0d took %0d cycles", kind, cyc - t0 - 1);
    end
  endtask

  function automatic word_t lap(word_t l, word_t c, word_t r);
    return word_t'(l - 2 * c + r);
  endfunction

  function automatic word_t at(int y, int x);
    if (x < 0 || y < 0 || x >= M || y >= M) return '0;
    return uref[y][x];
  endfunction

  initial begin
    #(64'd10 * 64'd100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d1 [N][N][M];
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
    for (int y = 0; y < M; y++)
      for (int x = 0; x < M; x++) uref[y][x] = word_t'($urandom_range(0, 4000));
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        for (int x = 0; x < M; x++) row[a][b][x] = uref[a * N + b][x];
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_row_end(0);
    for (int s = 0; s < STEPS; s++) begin
      // rows -> columns
      phase(0); turn_to_col(); phase(1); turn_to_row(); phase(2); turn_to_col(); phase(3);
      // D2 along each column, then columns -> rows
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          word_t c [M];
          c = col[a][b];
          for (int y = 0; y < M; y++)
            col[a][b][y] = lap(y > 0 ? c[y - 1] : '0, c[y], y < M - 1 ? c[y + 1] : '0);
        end
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) d1[a][b] = row[a][b];
      phase(4); turn_to_row(); phase(5); turn_to_col(); phase(6); turn_to_row(); phase(7);
      // row now holds D2 U; d1 holds U
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          for (int x = 0; x < M; x++) begin
            word_t u, dd;
            u  = d1[a][b][x];
            dd = word_t'(lap(x > 0 ? d1[a][b][x - 1] : '0, u, x < M - 1 ? d1[a][b][x + 1] : '0)
                         + row[a][b][x]);
            row[a][b][x] = word_t'(u + 16'($signed(dd) >>> 3));
          end
      for (int y = 0; y < M; y++)
        for (int x = 0; x < M; x++) begin
          word_t d;
          d = word_t'(at(y, x + 1) + at(y, x - 1) + at(y + 1, x) + at(y - 1, x) - 4 * at(y, x));
          unext[y][x] = word_t'(uref[y][x] + 16'($signed(d) >>> 3));
        end
      uref = unext;
    end
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        for (int x = 0; x < M; x++)
          check($sformatf("U(y=%0d,x=%0d)", a * N + b, x), row[a][b][x], uref[a * N + b][x]);
    count("board turned to column side", n_turn_col);
    count("board turned to row side", n_turn_row);
    count("phase at one access per cycle", n_phase_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
