// lim_routing_plane: the routing plane of one LIM cell.
//
// The routing plane moves words between the cell's own logic plane, its
// memory plane and the four neighbour cells. As in the architecture it has
// one controlling FSM and four regions:
//   1. input interface  - five request sources: the logic plane and the
//                         north, west, south and east neighbours;
//   2. priority manager - when the FSM is free it grants one source, the
//                         logic first, then north, west, south, east; every
//                         other source that presented a word gets its nack
//                         bit and must present the same word again;
//   3. selection unit   - the word is latched into the TAG/TCA/WA/DATA/DEST
//                         registers and decoded into an action: write the
//                         memory, read the memory and reply (through the
//                         memory data register MDR and a tag generator that
//                         makes the reply word), hand the word to the logic
//                         plane, or forward it;
//   4. output interface - one output register per neighbour direction for
//                         requests and one for replies, plus the delivery
//                         port to the logic plane.
//
// Operations (TAG): local read/write come from the own logic plane; toc-toc
// read/write are executed by the first neighbour that receives them;
// remote read/write travel hop by hop (row first, then column) until DEST
// matches the cell address; logic-logic words go to the neighbour's logic
// plane; reply words travel back to the TCA of the read.
//
// Interface: lreq_i/lreq_nack_o from the logic plane, lout_o to it (a
// one-cycle pulse, the logic plane always takes it); nb_in_i/nb_in_nack_o
// from the neighbours and nb_out_o/nb_out_nack_i to them, indexed by the
// relative code (0 E, 1 S, 2 W, 3 N); a memory port with combinational read.
// A sender keeps its word on the link until a cycle in which nack is low.
//
// Timing: a granted word is latched in one cycle and executed in the next;
// a read adds a cycle to build the reply, so a local read returns to the
// logic plane three cycles after it is accepted.
//
// Own choices (the architecture gives none of these): the nack/retry link
// handshake, the separate reply registers, and that the priority manager
// skips a source whose word needs an output register that is still full
// and grants the next one. The last two keep mutual reads between
// neighbours, which the filter issues from every cell at once, from
// blocking each other.
module lim_routing_plane
  import lim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cell_addr_t        my_addr,
  // logic plane
  input  link_t             lreq_i,
  output logic              lreq_nack_o,
  output link_t             lout_o,
  // neighbours, indexed by dir_t
  input  link_t             nb_in_i      [4],
  output logic              nb_in_nack_o [4],
  output link_t             nb_out_o     [4],
  input  logic              nb_out_nack_i[4],
  // memory plane
  output logic              mem_we_o,
  output logic [WA_W-1:0]   mem_addr_o,
  output logic [DATA_W-1:0] mem_wdata_o,
  input  logic [DATA_W-1:0] mem_rdata_i
);

  typedef enum logic [2:0] {
    ACT_MEM_WR,    // write DATA at WA
    ACT_MEM_RD,    // read WA and reply to TCA
    ACT_TO_LOGIC,  // hand the word to the own logic plane
    ACT_FWD_REQ,   // forward through a request output register
    ACT_FWD_RESP   // forward through a reply output register
  } action_t;

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_REPLY} state_t;

  // Source order is the priority order: logic, N, W, S, E.
  localparam int NSRC = 5;

  function automatic dir_t src_dir(int s);
    case (s)
      1: return DIR_N;
      2: return DIR_W;
      3: return DIR_S;
      default: return DIR_E;
    endcase
  endfunction

  state_t     state_q;
  // word registers of the selection unit
  word_t      word_q;
  action_t    act_q;
  dir_t       dir_q;        // output direction for forwarding or reply
  logic       reply_lgc_q;  // reply goes to the own logic plane
  logic [DATA_W-1:0] mdr_q; // memory data register

  link_t      req_q  [4];
  link_t      resp_q [4];
  link_t      lout_q;

  link_t      src    [NSRC];
  logic       src_from_logic [NSRC];
  action_t    src_act [NSRC];
  dir_t       src_odir[NSRC];
  logic       src_rlgc[NSRC];
  logic       src_ok  [NSRC];
  logic [NSRC-1:0] grant;
  logic       any_grant;
  logic [2:0] gsel;

  // ---------------------------------------------------------------- input
  always_comb begin
    src[0] = lreq_i;
    src_from_logic[0] = 1'b1;
    for (int s = 1; s < NSRC; s++) begin
      src[s] = nb_in_i[src_dir(s)];
      src_from_logic[s] = 1'b0;
    end
  end

  // Decode every source so the priority manager knows which are feasible.
  always_comb begin
    for (int s = 0; s < NSRC; s++) begin
      word_t w;
      logic  for_me;
      w      = src[s].word;
      for_me = (w.dest == my_addr);
      src_act[s]  = ACT_MEM_WR;
      src_odir[s] = xy_dir(my_addr, w.dest);
      src_rlgc[s] = 1'b0;
      if (src_from_logic[s]) begin
        unique case (w.tag)
          TAG_LOCAL_WR: src_act[s] = ACT_MEM_WR;
          TAG_LOCAL_RD: begin src_act[s] = ACT_MEM_RD; src_rlgc[s] = 1'b1; end
          TAG_REM_WR:   src_act[s] = for_me ? ACT_MEM_WR : ACT_FWD_REQ;
          TAG_REM_RD: begin
            src_act[s]  = for_me ? ACT_MEM_RD : ACT_FWD_REQ;
            src_rlgc[s] = for_me;
          end
          TAG_RESP:     src_act[s] = for_me ? ACT_TO_LOGIC : ACT_FWD_RESP;
          default:      src_act[s] = ACT_FWD_REQ;  // toc-toc, logic-logic
        endcase
      end else begin
        unique case (w.tag)
          TAG_LOGIC:  src_act[s] = ACT_TO_LOGIC;
          TAG_RESP:   src_act[s] = for_me ? ACT_TO_LOGIC : ACT_FWD_RESP;
          TAG_REM_WR: src_act[s] = for_me ? ACT_MEM_WR : ACT_FWD_REQ;
          TAG_REM_RD: src_act[s] = for_me ? ACT_MEM_RD : ACT_FWD_REQ;
          TAG_TOC_RD, TAG_LOCAL_RD: src_act[s] = ACT_MEM_RD;
          default:    src_act[s] = ACT_MEM_WR;  // toc-toc and local write
        endcase
        if (src_act[s] == ACT_MEM_RD) begin
          src_rlgc[s] = (w.tca == my_addr);
          src_odir[s] = xy_dir(my_addr, w.tca);
        end
      end
      unique case (src_act[s])
        ACT_FWD_REQ:  src_ok[s] = !req_q[src_odir[s]].valid;
        ACT_FWD_RESP: src_ok[s] = !resp_q[src_odir[s]].valid;
        ACT_MEM_RD:   src_ok[s] = src_rlgc[s] || !resp_q[src_odir[s]].valid;
        default:      src_ok[s] = 1'b1;
      endcase
    end
  end

  // ------------------------------------------------------ priority manager
  always_comb begin
    grant     = '0;
    any_grant = 1'b0;
    gsel      = 0;
    if (state_q == S_IDLE) begin
      for (int s = NSRC - 1; s >= 0; s--) begin
        if (src[s].valid && src_ok[s]) gsel = 3'(s);
      end
      for (int s = 0; s < NSRC; s++) begin
        if (src[s].valid && src_ok[s]) any_grant = 1'b1;
      end
      if (any_grant) grant[gsel] = 1'b1;
    end
  end

  assign lreq_nack_o = lreq_i.valid && !grant[0];
  always_comb begin
    for (int s = 1; s < NSRC; s++)
      nb_in_nack_o[src_dir(s)] = src[s].valid && !grant[s];
  end

  // ------------------------------------------------------ FSM and datapath
  word_t reply_w;
  always_comb begin
    // tag generator: reply to the reader with the word read
    reply_w.tag  = TAG_RESP;
    reply_w.tca  = my_addr;
    reply_w.wa   = word_q.wa;
    reply_w.data = mdr_q;
    reply_w.dest = word_q.tca;
  end

  logic [3:0] link_taken;
  always_comb begin
    for (int d = 0; d < 4; d++)
      link_taken[d] = nb_out_o[d].valid && !nb_out_nack_i[d];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      word_q      <= '0;
      act_q       <= ACT_MEM_WR;
      dir_q       <= DIR_E;
      reply_lgc_q <= 1'b0;
      mdr_q       <= '0;
      lout_q      <= '0;
      for (int d = 0; d < 4; d++) begin
        req_q[d]  <= '0;
        resp_q[d] <= '0;
      end
    end else begin
      lout_q.valid <= 1'b0;
      // output interface: the link shows the reply register first
      for (int d = 0; d < 4; d++) begin
        if (link_taken[d]) begin
          if (resp_q[d].valid) resp_q[d].valid <= 1'b0;
          else                 req_q[d].valid  <= 1'b0;
        end
      end
      unique case (state_q)
        S_IDLE: if (any_grant) begin
          word_q      <= src[gsel].word;
          act_q       <= src_act[gsel];
          dir_q       <= src_odir[gsel];
          reply_lgc_q <= src_rlgc[gsel];
          state_q     <= S_EXEC;
        end
        S_EXEC: begin
          state_q <= S_IDLE;
          unique case (act_q)
            ACT_MEM_RD: begin
              mdr_q   <= mem_rdata_i;
              state_q <= S_REPLY;
            end
            ACT_TO_LOGIC: lout_q <= '{valid: 1'b1, word: word_q};
            ACT_FWD_REQ:  req_q[dir_q]  <= '{valid: 1'b1, word: word_q};
            ACT_FWD_RESP: resp_q[dir_q] <= '{valid: 1'b1, word: word_q};
            default: ;  // memory write happens through mem_we_o
          endcase
        end
        default: begin  // S_REPLY
          state_q <= S_IDLE;
          if (reply_lgc_q) lout_q <= '{valid: 1'b1, word: reply_w};
          else             resp_q[dir_q] <= '{valid: 1'b1, word: reply_w};
        end
      endcase
    end
  end

  assign mem_we_o    = (state_q == S_EXEC) && (act_q == ACT_MEM_WR);
  assign mem_addr_o  = word_q.wa;
  assign mem_wdata_o = word_q.data;
  assign lout_o      = lout_q;

  always_comb begin
    for (int d = 0; d < 4; d++)
      nb_out_o[d] = resp_q[d].valid ? resp_q[d] : req_q[d];
  end

  // ------------------------------------------------------------ assertions
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  // The selected output register must be free when the FSM fills it.
  a_fwd_free: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_EXEC && act_q == ACT_FWD_REQ) |-> !req_q[dir_q].valid);
  a_resp_free: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_EXEC && act_q == ACT_FWD_RESP) |-> !resp_q[dir_q].valid);

endmodule
