// lim_binomial_logic: logic plane of a LIM cell for the 3x3 binomial filter.
//
// Every cell holds one pixel (memory word WA_DATA). After start_i the
// plane reads its own pixel and the pixels of its eight neighbours, forms
// the binomial-weighted sum
//     4*centre + 2*(east + south + west + north) + (the four diagonals)
// and writes sum/16 (a right shift by 4, the weights add up to 16) to
// memory word WA_RESULT. The pixel itself is left untouched, so the result
// does not depend on the order in which cells finish.
//
// This follows the architecture's pseudo-code (read local data, read the
// eight neighbours, sum and divide by 16, write to local memory) and its
// block diagram: a local read register, an adder with a sum register, a
// multiplexer choosing what is added, and an FSM that receives the cell's
// own column and row address. The weights, the choice of operations and
// the border rule are this design's reading: the four edge neighbours are
// read with toc-toc reads, the diagonal ones, which are not adjacent, with
// remote reads routed through the grid; a neighbour outside the grid is
// replaced by the centre pixel.
//
// Timing: one read request at a time; done_o rises once the result write
// has been accepted by the routing plane and stays high until the next
// start_i.
module lim_binomial_logic
  import lim_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cell_addr_t my_addr,   // local row and column address
  input  logic       start_i,
  output link_t      req_o,
  input  logic       req_nack_i,
  input  link_t      in_i,
  output logic       done_o
);

  localparam int SUM_W = DATA_W + 4;

  typedef enum logic [2:0] {
    S_IDLE, S_LRD_RQ, S_LRD_WT, S_NEXT, S_NRD_RQ, S_NRD_WT, S_WR_RQ, S_DONE
  } state_t;

  state_t            state_q;
  logic [2:0]        k_q;          // neighbour index: 0-3 edges, 4-7 corners
  logic [DATA_W-1:0] local_q;      // local read register
  logic [SUM_W-1:0]  sum_q;        // sum register

  // Neighbour k: 0 E, 1 S, 2 W, 3 N, 4 NE, 5 SE, 6 SW, 7 NW.
  logic signed [COORD_W+1:0] drow, dcol;
  always_comb begin
    drow = '0;
    dcol = '0;
    unique case (k_q)
      3'd0: dcol = 1;
      3'd1: drow = 1;
      3'd2: dcol = -1;
      3'd3: drow = -1;
      3'd4: begin drow = -1; dcol = 1;  end
      3'd5: begin drow = 1;  dcol = 1;  end
      3'd6: begin drow = 1;  dcol = -1; end
      default: begin drow = -1; dcol = -1; end
    endcase
  end

  logic signed [COORD_W+1:0] nrow, ncol;
  logic                      n_inside;
  cell_addr_t                n_addr;
  assign nrow     = $signed({2'b00, my_addr.row}) + drow;
  assign ncol     = $signed({2'b00, my_addr.col}) + dcol;
  assign n_inside = (nrow >= 0) && (nrow < $signed((COORD_W+2)'(ROWS)))
                 && (ncol >= 0) && (ncol < $signed((COORD_W+2)'(COLS)));
  assign n_addr   = '{row: nrow[COORD_W-1:0], col: ncol[COORD_W-1:0]};

  logic resp_in;
  assign resp_in = in_i.valid && (in_i.word.tag == TAG_RESP);

  // Multiplexer: the pixel added is the one just read, or the centre pixel
  // for a neighbour outside the grid. Edge neighbours weigh 2, corners 1.
  logic [DATA_W-1:0] pix;
  logic [SUM_W-1:0]  addend;
  assign pix    = (state_q == S_NRD_WT) ? in_i.word.data : local_q;
  assign addend = k_q[2] ? SUM_W'(pix) : (SUM_W'(pix) << 1);

  always_comb begin
    req_o.valid     = 1'b0;
    req_o.word.tag  = TAG_LOCAL_RD;
    req_o.word.tca  = my_addr;
    req_o.word.wa   = WA_DATA;
    req_o.word.data = '0;
    req_o.word.dest = my_addr;
    unique case (state_q)
      S_LRD_RQ: req_o.valid = 1'b1;
      S_NRD_RQ: begin
        req_o.valid     = 1'b1;
        req_o.word.tag  = k_q[2] ? TAG_REM_RD : TAG_TOC_RD;
        req_o.word.dest = n_addr;
      end
      S_WR_RQ: begin
        req_o.valid     = 1'b1;
        req_o.word.tag  = TAG_LOCAL_WR;
        req_o.word.wa   = WA_RESULT;
        req_o.word.data = sum_q[SUM_W-1:4];  // divide by 16
      end
      default: ;
    endcase
  end

  logic taken;
  assign taken = req_o.valid && !req_nack_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      k_q     <= '0;
      local_q <= '0;
      sum_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: if (start_i) state_q <= S_LRD_RQ;
        S_LRD_RQ: if (taken) state_q <= S_LRD_WT;
        S_LRD_WT: if (resp_in) begin
          local_q <= in_i.word.data;
          sum_q   <= SUM_W'(in_i.word.data) << 2;
          k_q     <= '0;
          state_q <= S_NEXT;
        end
        S_NEXT: begin
          if (n_inside) begin
            state_q <= S_NRD_RQ;
          end else begin
            sum_q <= sum_q + addend;
            k_q   <= k_q + 1'b1;
            if (k_q == 3'd7) state_q <= S_WR_RQ;
          end
        end
        S_NRD_RQ: if (taken) state_q <= S_NRD_WT;
        S_NRD_WT: if (resp_in) begin
          sum_q   <= sum_q + addend;
          k_q     <= k_q + 1'b1;
          state_q <= (k_q == 3'd7) ? S_WR_RQ : S_NEXT;
        end
        default: if (taken) state_q <= S_DONE;  // S_WR_RQ
      endcase
    end
  end

  assign done_o = (state_q == S_DONE);

endmodule
