// adina_pkg: constants and bus types shared by the ADINA II interconnect.
//
// The machine is a square array of N x N slave processors (AUs), N submasters
// (SUs) and N buffer memory boards of N x N blocks each. A block holds 256
// halfwords (16 bits), the width of the 16-bit minicomputers the machine is
// built from. The sizes N = 16, 256 halfwords per block and 16 KB of common
// memory per submaster are the trial machine's; the bus encodings in the
// structs below are this design's own.
package adina_pkg;

  localparam int unsigned WORD_W    = 16;   // halfword
  localparam int unsigned BLK_DEPTH = 256;  // halfwords per buffer memory block
  localparam int unsigned BLK_AW    = 8;    // address bits inside a block
  localparam int unsigned CM_DEPTH  = 8192; // 16 KB common memory = 8K halfwords
  localparam int unsigned CM_AW     = 13;

  typedef logic [WORD_W-1:0] word_t;

  // One access presented on a row or column bus of a buffer memory board.
  // blk selects the block along the bus; bcast writes every block along it.
  typedef struct packed {
    logic              en;
    logic              we;
    logic              bcast;
    logic [7:0]        blk;    // block index along the bus (low $clog2(N) bits used)
    logic [BLK_AW-1:0] addr;
    word_t             wdata;
  } bm_req_t;

  // One access to a common memory.
  typedef struct packed {
    logic             en;
    logic             we;
    logic [CM_AW-1:0] addr;
    word_t            wdata;
  } cm_req_t;

  // Port P1 of an AU, bit by bit. Bits 7..4 serve the AU's row-side role on
  // one board, bits 3..0 its column-side role on another board. Positive
  // logic here; the original lines are active low.
  localparam int unsigned P1_COL_BCAST = 0; // out: broadcast along memory column
  localparam int unsigned P1_COL_GO    = 1; // in : row phase done, column side may open
  localparam int unsigned P1_COL_END   = 2; // out: column lines closed / end of column phase
  localparam int unsigned P1_COL_ACK   = 3; // in : SU received the column total end
  localparam int unsigned P1_ROW_BCAST = 4; // out: broadcast along memory row
  localparam int unsigned P1_ROW_GO    = 5; // in : column phase done, row side may open
  localparam int unsigned P1_ROW_END   = 6; // out: row lines closed / end of row phase
  localparam int unsigned P1_ROW_ACK   = 7; // in : SU received the row total end

endpackage
