// bm_board: buffer memory board k, an N x N array of blocks (i,j)_k.
//
// Row bus j belongs to processor ((j,k)) and reaches the blocks (i,j)_k,
// i = 0..N-1 (a memory row). Column bus i belongs to processor ((k,i)) and
// reaches the blocks (i,j)_k, j = 0..N-1 (a memory column). So every block
// is shared by exactly two processors, and a word written from one side is
// read from the other: this is how data move between the AU ((j,k)) and
// the AU ((k,i)), and how a memory row written in one direction of a lattice
// is read back as a memory column in another.
//
// At any time every block takes the lines from one side only, chosen for the
// whole board by sel_col (0: row buses, "left" lines; 1: column buses,
// "bottom" lines). On a bus, blk picks the block along it; a write with bcast
// set goes to every block along the bus at the same address (broadcast).
//
// Timing: a request is taken at the clock edge; read data appear on the
// bus's rdata in the next cycle (rdata is 0 on a bus that did not read).
// Data of all the blocks along a bus are ORed, as on a shared bus.
// The trial machine packs the board as 4 x 4 real boards of 4 x 4 blocks;
// that packing has no logical effect and is not modelled.
module bm_board
  import adina_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic    clk,
  input  logic    sel_col,
  input  bm_req_t row_req   [N],
  input  bm_req_t col_req   [N],
  output word_t   row_rdata [N],
  output word_t   col_rdata [N]
);

  logic  cs      [N][N];
  logic  rw_n    [N][N];
  logic  rd_q    [N][N];
  logic [BLK_AW-1:0] addr [N][N];
  word_t din     [N][N];
  word_t dout    [N][N];
  logic  sel_col_q;

  // Line select and block decode for block (i,j).
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        if (!sel_col) begin
          cs[i][j]   = row_req[j].en &&
                       (row_req[j].blk == 8'(i) || (row_req[j].bcast && row_req[j].we));
          rw_n[i][j] = !row_req[j].we;
          addr[i][j] = row_req[j].addr;
          din[i][j]  = row_req[j].wdata;
        end else begin
          cs[i][j]   = col_req[i].en &&
                       (col_req[i].blk == 8'(j) || (col_req[i].bcast && col_req[i].we));
          rw_n[i][j] = !col_req[i].we;
          addr[i][j] = col_req[i].addr;
          din[i][j]  = col_req[i].wdata;
        end
      end
    end
  end

  // Output enable: a block drives its bus in the cycle after it was read.
  always_ff @(posedge clk) begin
    sel_col_q <= sel_col;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        rd_q[i][j] <= cs[i][j] && rw_n[i][j];
  end

  for (genvar gi = 0; gi < N; gi++) begin : g_i
    for (genvar gj = 0; gj < N; gj++) begin : g_j
      bm_block u_blk (
        .clk  (clk),
        .cs_n (!cs[gi][gj]),
        .od_n (!rd_q[gi][gj]),
        .rw_n (rw_n[gi][gj]),
        .addr (addr[gi][gj]),
        .din  (din[gi][gj]),
        .dout (dout[gi][gj])
      );
    end
  end

  always_comb begin
    for (int n = 0; n < N; n++) begin
      row_rdata[n] = '0;
      col_rdata[n] = '0;
    end
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        if (sel_col_q) col_rdata[i] = col_rdata[i] | dout[i][j];
        else           row_rdata[j] = row_rdata[j] | dout[i][j];
      end
    end
  end

endmodule
