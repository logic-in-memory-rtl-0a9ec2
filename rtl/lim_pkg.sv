// lim_pkg: types and constants shared by the Logic-In-Memory (LIM) cell planes.
//
// Cells exchange "words". Following the architecture, a word carries five
// fields: TAG (operation type), TCA (address of the cell that originated the
// word), WA (word address inside a memory plane), DATA and DEST (address of
// the destination cell). Cell addresses are absolute (row, column), row 0 is
// the north edge and column 0 the west edge. Neighbours are also named by a
// two-bit relative code numbered clockwise from east: 00 east, 01 south,
// 10 west, 11 north, as the architecture specifies.
//
// Field widths, the tag encoding and the XY routing rule are this design's
// own choices: the architecture names the fields but gives no widths.
// Coordinates are 3 bits wide so that a 4x4 grid and an external host
// placed one column east of the grid (column COLS) can all be addressed.
package lim_pkg;

  localparam int unsigned DATA_W  = 8;  // width of DATA
  localparam int unsigned WA_W    = 2;  // memory plane has 2**WA_W words
  localparam int unsigned COORD_W = 3;  // width of one coordinate

  // Memory map shared by both algorithms.
  localparam logic [WA_W-1:0] WA_DATA   = 2'd0;  // the cell's data value
  localparam logic [WA_W-1:0] WA_CONF   = 2'd1;  // configuration word (sort)
  localparam logic [WA_W-1:0] WA_RESULT = 2'd2;  // filter result

  typedef enum logic [2:0] {
    TAG_LOCAL_WR = 3'd0,  // logic writes its own memory plane
    TAG_LOCAL_RD = 3'd1,  // logic reads its own memory plane
    TAG_TOC_WR   = 3'd2,  // toc-toc write of an adjacent cell's memory
    TAG_TOC_RD   = 3'd3,  // toc-toc read of an adjacent cell's memory
    TAG_REM_WR   = 3'd4,  // remote write of any cell's memory
    TAG_REM_RD   = 3'd5,  // remote read of any cell's memory
    TAG_LOGIC    = 3'd6,  // logic-logic transfer to an adjacent logic plane
    TAG_RESP     = 3'd7   // read data returning to the requester
  } tag_t;

  // Algorithm implemented by the logic planes of a grid.
  typedef enum logic {ALGO_SORT, ALGO_FILTER} algo_t;

  // Relative neighbour codes, also used as port indices.
  typedef enum logic [1:0] {
    DIR_E = 2'b00,
    DIR_S = 2'b01,
    DIR_W = 2'b10,
    DIR_N = 2'b11
  } dir_t;

  typedef struct packed {
    logic [COORD_W-1:0] row;
    logic [COORD_W-1:0] col;
  } cell_addr_t;

  typedef struct packed {
    tag_t             tag;
    cell_addr_t       tca;
    logic [WA_W-1:0]  wa;
    logic [DATA_W-1:0] data;
    cell_addr_t       dest;
  } word_t;

  // One direction of a cell-to-cell link. The receiver answers with a
  // separate nack bit when it cannot take the word in that cycle.
  typedef struct packed {
    logic  valid;
    word_t word;
  } link_t;

  // Dimension-ordered routing: first along the column (north/south) until
  // the row matches, then along the row (east/west). Going row-first keeps
  // every route inside the grid, including the one to a host that sits
  // just east of the row-0 edge.
  function automatic dir_t xy_dir(cell_addr_t here, cell_addr_t there);
    if (there.row > here.row)      return DIR_S;
    else if (there.row < here.row) return DIR_N;
    else if (there.col > here.col) return DIR_E;
    else                           return DIR_W;
  endfunction

  // Absolute address of the neighbour in direction d.
  function automatic cell_addr_t neighbour_addr(cell_addr_t here, dir_t d);
    cell_addr_t a;
    a = here;
    case (d)
      DIR_E: a.col = here.col + 1'b1;
      DIR_S: a.row = here.row + 1'b1;
      DIR_W: a.col = here.col - 1'b1;
      default: a.row = here.row - 1'b1;
    endcase
    return a;
  endfunction

  // The port on which a word sent towards d arrives at the neighbour.
  function automatic dir_t opposite(dir_t d);
    return dir_t'(d ^ 2'b10);
  endfunction

endpackage
