// lim_grid: a ROWS x COLS mesh of LIM cells (4 x 4 by default).
//
// Each cell is linked to its north, east, south and west neighbours; there
// are no global wires apart from clock, reset and the start pulse. All
// cells of one grid run the same algorithm (ALGO).
//
// A host reaches the grid through one port, the east link of the cell in
// row 0, column COLS-1. The host has the address (row 0, column COLS):
// it sends remote read/write words with that TCA and gets the read replies
// back on the same port, routed like any other word. This host port, and
// that the other edge links are left unconnected (nothing arrives, and a
// word sent off the edge is dropped), are this design's choices; the
// architecture does not say how data enter the array.
//
// done_o is high when every cell's logic plane has finished; swap_o has
// one bit per cell (index row*COLS+col) that pulses when that cell swaps.
module lim_grid
  import lim_pkg::*;
#(
  parameter algo_t       ALGO         = ALGO_SORT,
  parameter int unsigned ROWS         = 4,
  parameter int unsigned COLS         = 4,
  parameter int unsigned PHASE_CYCLES = 32,
  parameter int unsigned ROUNDS       = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  // host port
  input  link_t                host_in_i,
  output logic                 host_in_nack_o,
  output link_t                host_out_o,
  input  logic                 host_out_nack_i,
  // status
  output logic [ROWS*COLS-1:0] swap_o,
  output logic                 done_o
);

  link_t out_l    [ROWS][COLS][4];
  logic  out_nack [ROWS][COLS][4];
  link_t in_l     [ROWS][COLS][4];
  logic  in_nack  [ROWS][COLS][4];
  logic [ROWS*COLS-1:0] done;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      for (genvar d = 0; d < 4; d++) begin : g_dir
        // neighbour in direction d (0 E, 1 S, 2 W, 3 N)
        localparam int NR = r + ((d == 1) ? 1 : 0) - ((d == 3) ? 1 : 0);
        localparam int NC = c + ((d == 0) ? 1 : 0) - ((d == 2) ? 1 : 0);
        localparam int OD = d ^ 2;
        if (NR >= 0 && NR < ROWS && NC >= 0 && NC < COLS) begin : g_link
          assign in_l[r][c][d]     = out_l[NR][NC][OD];
          assign out_nack[r][c][d] = in_nack[NR][NC][OD];
        end else if (r == 0 && c == COLS - 1 && d == 0) begin : g_host
          assign in_l[r][c][d]     = host_in_i;
          assign out_nack[r][c][d] = host_out_nack_i;
        end else begin : g_edge
          assign in_l[r][c][d]     = '0;
          assign out_nack[r][c][d] = 1'b0;
        end
      end

      lim_cell #(
        .ALGO(ALGO), .ROWS(ROWS), .COLS(COLS),
        .PHASE_CYCLES(PHASE_CYCLES), .ROUNDS(ROUNDS)
      ) u_cell (
        .clk, .rst_n,
        .my_addr('{row: COORD_W'(r), col: COORD_W'(c)}),
        .start_i,
        .nb_in_i(in_l[r][c]),
        .nb_in_nack_o(in_nack[r][c]),
        .nb_out_o(out_l[r][c]),
        .nb_out_nack_i(out_nack[r][c]),
        .swap_o(swap_o[r*COLS+c]),
        .done_o(done[r*COLS+c])
      );
    end
  end

  assign host_out_o     = out_l[0][COLS-1][0];
  assign host_in_nack_o = in_nack[0][COLS-1][0];
  assign done_o         = &done;

  initial begin
    assert (COLS < 2**COORD_W && ROWS <= 2**COORD_W)
      else $error("grid too large for COORD_W-bit addresses");
  end

endmodule
