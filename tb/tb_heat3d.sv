// tb_heat3d: the explicit scheme for 3-D heat conduction of the evaluation,
// U' = U + lambda (D1 + D2 + D3) U, on an N x N x N lattice with N = 4.
//
// The same blocks serve three "positions". In position a, block (x,y)_z
// holds lattice point (i,j,k) = (x,y,z): an AU's memory row is an i-line,
// its memory column a j-line. In position c, block (x,y)_z holds point
// (y,z,x): memory rows are k-lines, memory columns i-lines. Positions keep
// their data in different words m of the blocks. One time step:
//   row side:    read U (a, m=0) along i, write D1 U (a, m=1)
//   column side: read U (a, m=0) along j, write D2 U (a, m=2);
//                write the i-line of U read before into (c, m=3)
//   row side:    read U (c, m=3) along k, write D3 U (c, m=4);
//                read D1 U, D2 U (a, m=1,2) along i
//   column side: read D3 U (c, m=4) along i
//   row side:    write U' (a, m=0)
// The bench does each AU's arithmetic in 16-bit integers (lambda = 1/8,
// zero boundary values) and checks the lattice after two steps against the
// scheme computed directly on a 3-D array. Every line access must take N
// cycles.
module tb_heat3d;
  import adina_pkg::*;
  localparam int N = 4;
  localparam int SW = $clog2(N);
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


  // per-AU private lines: [line][a][b][x]
  localparam int L_UI = 0, L_D1 = 1, L_UJ = 2, L_D2J = 3, L_UK = 4, L_D3K = 5,
                 L_D3I = 6, L_D1I = 7, L_D2I = 8, L_NEW = 9;
  word_t lines [10][N][N][N];
  word_t uref  [N][N][N], unext [N][N][N];
  int n_line_ok = 0;

  function automatic word_t lap(word_t l, word_t c, word_t r);
    return word_t'(l - 2 * c + r);
  endfunction

  // every AU moves one line of N words: read (we = 0) or write (we = 1)
  task automatic move(bit col, bit we, int m, int id);
    longint t0;
    t0 = cyc;
    for (int x = 0; x <= N; x++) begin
      @(negedge clk);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          if (x > 0 && !we) lines[id][a][b][x - 1] = au_rdata[a][b];
          au_req[a][b]   = x < N;
          au_we[a][b]    = we;
          au_addr[a][b]  = col ? a_col(x, m) : a_row(x, m);
          au_wdata[a][b] = (x < N) ? lines[id][a][b][x] : '0;
        end
    end
    idle_all();
    checks++;
    if (cyc - t0 - 1 == N) n_line_ok++;
    else begin
      failures++;
      $display("FAIL line move took %0d cycles", cyc - t0 - 1);
    end
  endtask

  task automatic lap_line(int src, int dst);
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        for (int x = 0; x < N; x++)
          lines[dst][a][b][x] = lap(x > 0 ? lines[src][a][b][x - 1] : '0, lines[src][a][b][x],
                                    x < N - 1 ? lines[src][a][b][x + 1] : '0);
  endtask

  function automatic word_t at(int i, int j, int k);
    if (i < 0 || j < 0 || k < 0 || i >= N || j >= N || k >= N) return '0;
    return uref[i][j][k];
  endfunction

  initial begin
    #(64'd10 * 64'd100000);
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
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++) uref[i][j][k] = word_t'($urandom_range(0, 4000));
    // AU ((a,b)) starts with its i-line U(x, a, b) in position a, m = 0
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        for (int x = 0; x < N; x++) lines[L_NEW][a][b][x] = uref[x][a][b];
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_row_end(0);
    move(0, 1, 0, L_NEW);
    for (int s = 0; s < STEPS; s++) begin
      // row side: i-lines in position a
      move(0, 0, 0, L_UI);
      lap_line(L_UI, L_D1);
      move(0, 1, 1, L_D1);
      turn_to_col();
      // column side: j-lines in position a; i-lines into position c
      move(1, 0, 0, L_UJ);
      lap_line(L_UJ, L_D2J);
      move(1, 1, 2, L_D2J);
      move(1, 1, 3, L_UI);
      turn_to_row();
      // row side: k-lines in position c
      move(0, 0, 3, L_UK);
      lap_line(L_UK, L_D3K);
      move(0, 1, 4, L_D3K);
      move(0, 0, 1, L_D1I);
      move(0, 0, 2, L_D2I);
      turn_to_col();
      // column side: D3 back as i-lines
      move(1, 0, 4, L_D3I);
      turn_to_row();
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          for (int x = 0; x < N; x++)
            lines[L_NEW][a][b][x] = word_t'(lines[L_UI][a][b][x] +
              16'($signed(16'(lines[L_D1I][a][b][x] + lines[L_D2I][a][b][x] + lines[L_D3I][a][b][x])) >>> 3));
      move(0, 1, 0, L_NEW);
      // reference step on the 3-D array
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          for (int k = 0; k < N; k++) begin
            word_t d;
            d = word_t'(at(i+1,j,k) + at(i-1,j,k) + at(i,j+1,k) + at(i,j-1,k)
                        + at(i,j,k+1) + at(i,j,k-1) - 6 * at(i,j,k));
            unext[i][j][k] = word_t'(uref[i][j][k] + 16'($signed(d) >>> 3));
          end
      uref = unext;
    end
    move(0, 0, 0, L_UI);
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        for (int x = 0; x < N; x++)
          check($sformatf("U(%0d,%0d,%0d)", x, a, b), lines[L_UI][a][b][x], uref[x][a][b]);
    count("board turned to column side", n_turn_col);
    count("board turned to row side", n_turn_row);
    count("line moved at one word per cycle", n_line_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
