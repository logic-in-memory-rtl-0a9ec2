// lim_top: the Logic-In-Memory design with both of its algorithms and the
// NanoMagnet Logic adder model, side by side.
//
// The architecture is a grid of identical cells, each with a memory plane,
// a routing plane and a logic plane; only the logic plane changes with the
// algorithm. This top holds two such grids, 4 x 4 cells each by default:
//   * u_sort   - logic planes for the odd-even transposition sort;
//   * u_filter - logic planes for the 3x3 binomial filter;
// and, independent of them, u_rca, the RTL model of the 4-bit NML ripple
// carry adder (one register per clock zone, majority-voter gates).
//
// Each grid has its own host port (the east link of its row-0, column
// COLS-1 cell; the host has address row 0, column COLS), its own start
// pulse and done flag. Data are loaded and read back through the host port
// with remote write/read words. Timing: see lim_grid and nml_rca.
module lim_top
  import lim_pkg::*;
#(
  parameter int unsigned ROWS         = 4,
  parameter int unsigned COLS         = 4,
  parameter int unsigned PHASE_CYCLES = 32,
  parameter int unsigned ROUNDS       = 8,
  parameter int unsigned RCA_N        = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // odd-even sort grid
  input  logic                 sort_start_i,
  input  link_t                sort_host_in_i,
  output logic                 sort_host_in_nack_o,
  output link_t                sort_host_out_o,
  input  logic                 sort_host_out_nack_i,
  output logic [ROWS*COLS-1:0] sort_swap_o,
  output logic                 sort_done_o,
  // binomial filter grid
  input  logic                 filt_start_i,
  input  link_t                filt_host_in_i,
  output logic                 filt_host_in_nack_o,
  output link_t                filt_host_out_o,
  input  logic                 filt_host_out_nack_i,
  output logic                 filt_done_o,
  // NML ripple carry adder
  input  logic [RCA_N-1:0]     rca_a_i,
  input  logic [RCA_N-1:0]     rca_b_i,
  input  logic                 rca_cin_i,
  output logic [RCA_N-1:0]     rca_s_o,
  output logic                 rca_cout_o
);

  lim_grid #(
    .ALGO(ALGO_SORT), .ROWS(ROWS), .COLS(COLS),
    .PHASE_CYCLES(PHASE_CYCLES), .ROUNDS(ROUNDS)
  ) u_sort (
    .clk, .rst_n, .start_i(sort_start_i),
    .host_in_i(sort_host_in_i), .host_in_nack_o(sort_host_in_nack_o),
    .host_out_o(sort_host_out_o), .host_out_nack_i(sort_host_out_nack_i),
    .swap_o(sort_swap_o), .done_o(sort_done_o)
  );

  logic [ROWS*COLS-1:0] filt_swap_unused;

  lim_grid #(
    .ALGO(ALGO_FILTER), .ROWS(ROWS), .COLS(COLS),
    .PHASE_CYCLES(PHASE_CYCLES), .ROUNDS(ROUNDS)
  ) u_filter (
    .clk, .rst_n, .start_i(filt_start_i),
    .host_in_i(filt_host_in_i), .host_in_nack_o(filt_host_in_nack_o),
    .host_out_o(filt_host_out_o), .host_out_nack_i(filt_host_out_nack_i),
    .swap_o(filt_swap_unused), .done_o(filt_done_o)
  );

  nml_rca #(.N(RCA_N)) u_rca (
    .clk, .a(rca_a_i), .b(rca_b_i), .cin(rca_cin_i),
    .s(rca_s_o), .cout(rca_cout_o)
  );

endmodule
