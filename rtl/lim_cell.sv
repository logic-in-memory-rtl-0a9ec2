// lim_cell: one processing element of the Logic-In-Memory grid.
//
// A cell stacks three planes: a memory plane that stores a few words, a
// routing plane that talks to the four neighbour cells, and a logic plane
// built for one algorithm. The ALGO parameter selects the logic plane:
// the odd-even sort (ALGO_SORT) or the binomial filter (ALGO_FILTER). The
// routing and memory planes are the same for both, as in the architecture.
//
// Interface: the cell's absolute address, a start pulse shared by the
// whole grid, four neighbour links (word + valid out, nack back) indexed
// by the relative code 0 E, 1 S, 2 W, 3 N, and done/swap status.
// Timing is that of the planes; see their headers.
module lim_cell
  import lim_pkg::*;
#(
  parameter algo_t       ALGO         = ALGO_SORT,
  parameter int unsigned ROWS         = 4,
  parameter int unsigned COLS         = 4,
  parameter int unsigned PHASE_CYCLES = 32,
  parameter int unsigned ROUNDS       = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cell_addr_t my_addr,
  input  logic       start_i,
  input  link_t      nb_in_i      [4],
  output logic       nb_in_nack_o [4],
  output link_t      nb_out_o     [4],
  input  logic       nb_out_nack_i[4],
  output logic       swap_o,
  output logic       done_o
);

  link_t             lreq, lout;
  logic              lreq_nack;
  logic              mem_we;
  logic [WA_W-1:0]   mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  lim_memory_plane u_mem (
    .clk, .rst_n,
    .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  lim_routing_plane u_route (
    .clk, .rst_n, .my_addr,
    .lreq_i(lreq), .lreq_nack_o(lreq_nack), .lout_o(lout),
    .nb_in_i, .nb_in_nack_o, .nb_out_o, .nb_out_nack_i,
    .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
    .mem_rdata_i(mem_rdata)
  );

  if (ALGO == ALGO_SORT) begin : g_sort
    lim_oddeven_logic #(.PHASE_CYCLES(PHASE_CYCLES), .ROUNDS(ROUNDS)) u_logic (
      .clk, .rst_n, .my_addr, .start_i,
      .req_o(lreq), .req_nack_i(lreq_nack), .in_i(lout),
      .swap_o, .done_o
    );
  end else begin : g_filter
    lim_binomial_logic #(.ROWS(ROWS), .COLS(COLS)) u_logic (
      .clk, .rst_n, .my_addr, .start_i,
      .req_o(lreq), .req_nack_i(lreq_nack), .in_i(lout),
      .done_o
    );
    assign swap_o = 1'b0;
  end

endmodule
