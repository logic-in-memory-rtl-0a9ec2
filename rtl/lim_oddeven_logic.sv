// lim_oddeven_logic: logic plane of a LIM cell for the odd-even
// (transposition) sort.
//
// The numbers to sort are spread one per cell along a chain of adjacent
// cells. In an even phase every even cell of the chain compares its own
// number with that of the next cell and, if they are out of order, the two
// are swapped; odd cells stay in stand-by. In an odd phase the roles are
// exchanged. After ROUNDS rounds of one even and one odd phase (2*ROUNDS
// phases, enough for 2*ROUNDS numbers) the chain is sorted in ascending
// order and the plane stops.
//
// The plane follows the pseudo-code of the architecture: read the
// configuration word, read the local data, read the adjacent cell's data
// (toc-toc read), compare, exchange if needed (local write of the
// neighbour's number, toc-toc write of the own number), stand by until the
// next phase. Its datapath is the one of the block diagram: local read,
// toc-toc read and configuration word registers, a comparator built as a
// subtractor, a multiplexer choosing the data to write, an FSM, a phase
// counter that switches between operating and stand-by mode and a 3-bit
// round counter that stops the execution.
//
// Configuration word (memory word WA_CONF), this design's own encoding:
//   bit 0    cell position in the chain is odd
//   bit 1    the cell has a next cell in the chain
//   bits 3:2 relative code (E=0, S=1, W=2, N=3) of the next cell
// The cell's number is memory word WA_DATA.
//
// Timing: start_i (one cycle) starts all cells together; every phase lasts
// PHASE_CYCLES cycles, counted from start_i, so cells stay in step without
// talking to each other. PHASE_CYCLES must cover the configuration read and
// one compare-and-swap; 32 is this design's choice (the architecture gives
// no phase length). done_o rises 2*ROUNDS*PHASE_CYCLES cycles after start_i.
module lim_oddeven_logic
  import lim_pkg::*;
#(
  parameter int unsigned PHASE_CYCLES = 32,
  parameter int unsigned ROUNDS       = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cell_addr_t my_addr,
  input  logic       start_i,
  // to / from the routing plane
  output link_t      req_o,
  input  logic       req_nack_i,
  input  link_t      in_i,
  // status
  output logic       swap_o,   // pulse: this cell exchanged its number
  output logic       done_o
);

  localparam int RW = (ROUNDS > 1) ? $clog2(ROUNDS) : 1;
  localparam int PW = $clog2(PHASE_CYCLES);

  typedef enum logic [3:0] {
    S_IDLE, S_CONF_RQ, S_CONF_WT, S_PHASE, S_LRD_RQ, S_LRD_WT, S_NRD_RQ,
    S_NRD_WT, S_CMP, S_LWR_RQ, S_NWR_RQ, S_STANDBY, S_DONE
  } state_t;

  typedef struct packed {
    logic [DATA_W-1:4] unused;
    dir_t              next_dir;
    logic              has_next;
    logic              odd;
  } conf_t;

  state_t            state_q;
  conf_t             conf_q;       // configuration word register
  logic [DATA_W-1:0] local_q;      // local read register (a)
  logic [DATA_W-1:0] toc_q;        // toc-toc read register (b)
  logic [PW-1:0]     phase_cnt_q;  // operating / stand-by counter
  logic [RW-1:0]     round_q;      // 3-bit counter: stops the execution
  logic              phase_odd_q;
  logic              running_q;
  logic              swap_q;

  // Comparator: a > b exactly when b - a borrows.
  logic [DATA_W:0] diff;
  logic            a_gt_b;
  assign diff   = {1'b0, toc_q} - {1'b0, local_q};
  assign a_gt_b = diff[DATA_W];

  logic phase_end;
  assign phase_end = running_q && (phase_cnt_q == PW'(PHASE_CYCLES - 1));

  logic       active;
  cell_addr_t next_addr;
  assign active    = conf_q.has_next && (conf_q.odd == phase_odd_q);
  assign next_addr = neighbour_addr(my_addr, conf_q.next_dir);

  logic resp_in;
  assign resp_in = in_i.valid && (in_i.word.tag == TAG_RESP);

  // request word for the current state
  always_comb begin
    req_o.valid     = 1'b0;
    req_o.word.tag  = TAG_LOCAL_RD;
    req_o.word.tca  = my_addr;
    req_o.word.wa   = WA_DATA;
    req_o.word.data = '0;
    req_o.word.dest = my_addr;
    unique case (state_q)
      S_CONF_RQ: begin
        req_o.valid   = 1'b1;
        req_o.word.wa = WA_CONF;
      end
      S_LRD_RQ: req_o.valid = 1'b1;
      S_NRD_RQ: begin
        req_o.valid     = 1'b1;
        req_o.word.tag  = TAG_TOC_RD;
        req_o.word.dest = next_addr;
      end
      S_LWR_RQ: begin
        req_o.valid     = 1'b1;
        req_o.word.tag  = TAG_LOCAL_WR;
        req_o.word.data = toc_q;    // multiplexer input b
      end
      S_NWR_RQ: begin
        req_o.valid     = 1'b1;
        req_o.word.tag  = TAG_TOC_WR;
        req_o.word.data = local_q;  // multiplexer input a
        req_o.word.dest = next_addr;
      end
      default: ;
    endcase
  end

  logic taken;
  assign taken = req_o.valid && !req_nack_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      conf_q      <= '0;
      local_q     <= '0;
      toc_q       <= '0;
      phase_cnt_q <= '0;
      round_q     <= '0;
      phase_odd_q <= 1'b0;
      running_q   <= 1'b0;
      swap_q      <= 1'b0;
    end else begin
      swap_q <= 1'b0;
      if (running_q) begin
        phase_cnt_q <= phase_end ? '0 : phase_cnt_q + 1'b1;
      end
      unique case (state_q)
        S_IDLE, S_DONE: if (start_i) begin
          state_q     <= S_CONF_RQ;
          running_q   <= 1'b1;
          phase_cnt_q <= '0;
          round_q     <= '0;
          phase_odd_q <= 1'b0;
        end
        S_CONF_RQ: if (taken) state_q <= S_CONF_WT;
        S_CONF_WT: if (resp_in) begin
          conf_q  <= conf_t'(in_i.word.data);
          state_q <= S_PHASE;
        end
        S_PHASE:   state_q <= active ? S_LRD_RQ : S_STANDBY;
        S_LRD_RQ:  if (taken) state_q <= S_LRD_WT;
        S_LRD_WT:  if (resp_in) begin
          local_q <= in_i.word.data;
          state_q <= S_NRD_RQ;
        end
        S_NRD_RQ:  if (taken) state_q <= S_NRD_WT;
        S_NRD_WT:  if (resp_in) begin
          toc_q   <= in_i.word.data;
          state_q <= S_CMP;
        end
        S_CMP:     state_q <= a_gt_b ? S_LWR_RQ : S_STANDBY;
        S_LWR_RQ:  if (taken) state_q <= S_NWR_RQ;
        S_NWR_RQ:  if (taken) begin
          swap_q  <= 1'b1;
          state_q <= S_STANDBY;
        end
        default: ;  // S_STANDBY: wait for the end of the phase
      endcase
      // End of a phase: move to the other parity, or stop.
      if (phase_end) begin
        phase_odd_q <= !phase_odd_q;
        if (phase_odd_q) round_q <= round_q + 1'b1;
        if (phase_odd_q && round_q == RW'(ROUNDS - 1)) begin
          state_q   <= S_DONE;
          running_q <= 1'b0;
        end else begin
          state_q <= S_PHASE;
        end
      end
    end
  end

  assign swap_o = swap_q;
  assign done_o = (state_q == S_DONE);

  // Every compare-and-swap has to finish inside its phase.
  a_phase_long_enough: assert property (@(posedge clk) disable iff (!rst_n)
      phase_end |-> state_q == S_STANDBY);

endmodule
