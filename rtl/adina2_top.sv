// adina2_top: the shared-memory fabric of the ADINA II array computer.
//
// N^2 slave processors AU ((a,b)), a, b = 0..N-1, N submasters SU ((k)) and
// N buffer memory boards k, each of N x N blocks (i,j)_k. Block (i,j)_k is
// shared by exactly two processors, by the rule
//        ((j,k)) - (i,j)_k - ((k,i)) :
// AU ((a,b)) reaches a memory row of board b (row bus a) and a memory
// column of board a (column bus b). Any two AUs can exchange data through
// one mediating AU: ((j,k)) -> (l,j)_k -> ((k,l)) -> (m,k)_l -> ((l,m)).
// Each board has its access-competition logic, driven by SU ((k)), that
// turns it between its row side and its column side; each SU has a common
// memory it opens to one of its AUs ((j,k)) at a time.
//
// The processors themselves (and the master, and its DMA channels to the
// SUs) are off-the-shelf minicomputers and are outside this module: their
// buses and port bits are the ports here. Array index [a][b] is AU ((a,b));
// index [k] is SU ((k)) and board k.
//   AU bus      au_req/we/addr/wdata in, au_sel/ready/rdata/rvalid out
//               (see au_bus_if for the address map and timing)
//   AU port P1  au_p1_out bits 0,2,4,6 in (col bcast, col end, row bcast,
//               row end); au_p1_in bits 1,3,5,7 out (col go, col ack,
//               row go, row ack), bits 0,2,4,6 read 0
//   AU port P0  au_p0_end (bit 2) in, au_p0_grant (bit 7) out
//   SU port P1  su_p1_out bit 6 row acknowledge, bit 2 column acknowledge;
//               su_p1_in bit 7 row total end, bit 3 column total end
//   SU port P0  su_p0_sel = bits 4..0 ('1j' opens the common memory to
//               ((j,k))), su_p0_done = bit 7
//   SU memory   su_cm_* : the SU's accesses to its common memory
// The fabric is synchronous to clk with a synchronous active-low reset.
// The structure, the sharing rule and the port bits follow the trial
// machine; the bit assignment of the SU's P1 outputs and inputs is this
// design's choice.
module adina2_top
  import adina_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic        clk,
  input  logic        rst_n,
  // slave processors
  input  logic        au_req      [N][N],
  input  logic        au_we       [N][N],
  input  logic [15:0] au_addr     [N][N],
  input  word_t       au_wdata    [N][N],
  output logic        au_sel      [N][N],
  output logic        au_ready    [N][N],
  output word_t       au_rdata    [N][N],
  output logic        au_rvalid   [N][N],
  input  logic [7:0]  au_p1_out   [N][N],
  output logic [7:0]  au_p1_in    [N][N],
  input  logic        au_p0_end   [N][N],
  output logic        au_p0_grant [N][N],
  // submasters
  input  logic [7:0]  su_p1_out   [N],
  output logic [7:0]  su_p1_in    [N],
  input  logic [SW:0] su_p0_sel   [N],
  output logic        su_p0_done  [N],
  input  logic        su_cm_req   [N],
  input  logic        su_cm_we    [N],
  input  logic [CM_AW-1:0] su_cm_addr [N],
  input  word_t       su_cm_wdata [N],
  output logic        su_cm_ready [N],
  output word_t       su_cm_rdata [N]
);

  // Per board k, bus n.
  bm_req_t row_req   [N][N];
  bm_req_t col_req   [N][N];
  word_t   row_rdata [N][N];
  word_t   col_rdata [N][N];
  logic    row_end   [N][N];
  logic    col_end   [N][N];
  logic    row_open  [N][N];
  logic    col_open  [N][N];
  logic    sel_col   [N];
  logic    row_ack [N], row_go [N], col_ack [N], col_go [N];
  logic    row_total [N], col_total [N];
  // Per SU k, AU slot j.
  cm_req_t cm_req    [N][N];
  logic    cm_grant  [N][N];
  logic    cm_end    [N][N];
  word_t   cm_rdata  [N];

  for (genvar k = 0; k < N; k++) begin : g_board
    access_ctrl #(.N(N)) u_ctrl (
      .clk          (clk),
      .rst_n        (rst_n),
      .row_end      (row_end[k]),
      .col_end      (col_end[k]),
      .su_row_ack   (su_p1_out[k][6]),
      .su_col_ack   (su_p1_out[k][2]),
      .su_row_total (row_total[k]),
      .su_col_total (col_total[k]),
      .row_ack      (row_ack[k]),
      .row_go       (row_go[k]),
      .col_ack      (col_ack[k]),
      .col_go       (col_go[k]),
      .sel_col      (sel_col[k]),
      .row_open     (row_open[k]),
      .col_open     (col_open[k])
    );

    bm_board #(.N(N)) u_board (
      .clk       (clk),
      .sel_col   (sel_col[k]),
      .row_req   (row_req[k]),
      .col_req   (col_req[k]),
      .row_rdata (row_rdata[k]),
      .col_rdata (col_rdata[k])
    );

    common_mem #(.N(N)) u_cm (
      .clk      (clk),
      .rst_n    (rst_n),
      .su_sel   (su_p0_sel[k]),
      .su_req   ('{en: su_cm_req[k], we: su_cm_we[k], addr: su_cm_addr[k], wdata: su_cm_wdata[k]}),
      .su_ready (su_cm_ready[k]),
      .su_done  (su_p0_done[k]),
      .au_req   (cm_req[k]),
      .au_end   (cm_end[k]),
      .au_grant (cm_grant[k]),
      .rdata    (cm_rdata[k])
    );

    assign su_cm_rdata[k] = cm_rdata[k];
    assign su_p1_in[k]    = {row_total[k], 3'b000, col_total[k], 3'b000};
  end

  // AU ((a,b)): row bus a of board b, column bus b of board a, slot a of SU b.
  for (genvar a = 0; a < N; a++) begin : g_a
    for (genvar b = 0; b < N; b++) begin : g_b
      au_bus_if u_if (
        .clk       (clk),
        .rst_n     (rst_n),
        .req       (au_req[a][b]),
        .we        (au_we[a][b]),
        .addr      (au_addr[a][b]),
        .wdata     (au_wdata[a][b]),
        .row_bcast (au_p1_out[a][b][P1_ROW_BCAST]),
        .col_bcast (au_p1_out[a][b][P1_COL_BCAST]),
        .sel       (au_sel[a][b]),
        .ready     (au_ready[a][b]),
        .rdata     (au_rdata[a][b]),
        .rvalid    (au_rvalid[a][b]),
        .row_req   (row_req[b][a]),
        .row_open  (row_open[b][a]),
        .row_rdata (row_rdata[b][a]),
        .col_req   (col_req[a][b]),
        .col_open  (col_open[a][b]),
        .col_rdata (col_rdata[a][b]),
        .cm_req    (cm_req[b][a]),
        .cm_grant  (cm_grant[b][a]),
        .cm_rdata  (cm_rdata[b])
      );

      assign row_end[b][a] = au_p1_out[a][b][P1_ROW_END];
      assign col_end[a][b] = au_p1_out[a][b][P1_COL_END];
      assign cm_end[b][a]  = au_p0_end[a][b];
      assign au_p0_grant[a][b] = cm_grant[b][a];

      always_comb begin
        au_p1_in[a][b]               = '0;
        au_p1_in[a][b][P1_ROW_ACK]   = row_ack[b];
        au_p1_in[a][b][P1_ROW_GO]    = row_go[b];
        au_p1_in[a][b][P1_COL_ACK]   = col_ack[a];
        au_p1_in[a][b][P1_COL_GO]    = col_go[a];
      end
    end
  end

endmodule
