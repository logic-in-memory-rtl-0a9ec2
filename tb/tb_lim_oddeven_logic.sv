// tb_lim_oddeven_logic: the odd-even sort logic plane against a model of
// its routing plane. The model refuses requests at random (nack), answers
// reads after a random delay, and holds the cell's own memory and the
// memory of its next cell in the chain. Between phases the testbench
// changes the neighbour's number, as other cells would. Checked: the
// configuration word is read first; requests are made only in the cell's
// own phases and toc-toc requests go to the configured neighbour; after
// every phase both numbers equal a compare-and-swap computed here; the
// swap pulse; done exactly 2*ROUNDS*PHASE_CYCLES cycles after start. Run
// once as an even cell (next cell east) and once as an odd cell (south).
module tb_lim_oddeven_logic;
  import lim_pkg::*;

  localparam int PHASE_CYCLES = 32, ROUNDS = 8;
  localparam cell_addr_t ME = '{row: 3'd1, col: 3'd1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic  start = 1'b0;
  link_t req, in = '0;
  logic  nack = 1'b0;
  logic  swap, done;
  int checks = 0, failures = 0;

  lim_oddeven_logic #(.PHASE_CYCLES(PHASE_CYCLES), .ROUNDS(ROUNDS)) dut (
    .clk, .rst_n, .my_addr(ME), .start_i(start),
    .req_o(req), .req_nack_i(nack), .in_i(in), .swap_o(swap), .done_o(done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [DATA_W-1:0] mem [2**WA_W];   // own memory
  logic [DATA_W-1:0] nbr;             // next cell's number
  cell_addr_t        nbr_addr;
  int  phase;                         // current phase, -1 before start
  bit  active_odd;                    // cell is active in odd phases
  int  n_req, n_swaps, first_tag;
  int  pending_delay;
  word_t pending;
  bit  has_pending;

  // routing-plane model
  always @(negedge clk) if (rst_n) begin
    in   <= '0;
    nack <= 1'($urandom_range(0, 2) == 0);
    if (has_pending) begin
      if (pending_delay == 0) begin
        in <= '{valid: 1'b1, word: pending};
        has_pending = 0;
      end else pending_delay--;
    end
  end

  always @(posedge clk) if (rst_n && req.valid && !nack) begin
    word_t w;
    w = req.word;
    n_req++;
    if (n_req == 1) first_tag = (w.tag == TAG_LOCAL_RD && w.wa == WA_CONF) ? 1 : 0;
    if (w.wa != WA_CONF)
      check(phase >= 0 && (phase % 2 == 1) == active_odd,
            $sformatf("request %p in phase %0d of the other parity", w.tag, phase));
    check(!has_pending, "one request at a time");
    unique case (w.tag)
      TAG_LOCAL_RD: begin
        pending = '{tag: TAG_RESP, tca: ME, wa: w.wa, data: mem[w.wa], dest: ME};
        has_pending = 1;
        pending_delay = $urandom_range(0, 3);
      end
      TAG_TOC_RD: begin
        check(w.dest == nbr_addr && w.tca == ME, "toc-toc read addressed to the next cell");
        pending = '{tag: TAG_RESP, tca: nbr_addr, wa: w.wa, data: nbr, dest: ME};
        has_pending = 1;
        pending_delay = $urandom_range(0, 5);
      end
      TAG_LOCAL_WR: mem[w.wa] = w.data;
      TAG_TOC_WR: begin
        check(w.dest == nbr_addr && w.wa == WA_DATA, "toc-toc write addressed to the next cell");
        nbr = w.data;
      end
      default: check(0, "unexpected request tag");
    endcase
  end

  always @(posedge clk) if (rst_n && swap) n_swaps++;

  task automatic run(input bit odd, input dir_t d);
    logic [DATA_W-1:0] a, b;
    int n, exp_swaps;
    active_odd = odd;
    nbr_addr = neighbour_addr(ME, d);
    mem[WA_DATA] = 8'd250;  // large, so the first compare swaps
    mem[WA_CONF] = {4'b0, d, 1'b1, odd};
    nbr = 8'($urandom_range(0, 200));
    n_req = 0;
    n_swaps = 0;
    exp_swaps = 0;
    phase = -1;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int p = 0; p < 2 * ROUNDS; p++) begin
      phase = p;
      a = mem[WA_DATA];
      b = nbr;
      // wait for the edge that ends the phase
      repeat (PHASE_CYCLES) @(posedge clk);
      #1;
      if ((p % 2 == 1) == odd) begin
        if (a > b) begin
          exp_swaps++;
          check(mem[WA_DATA] == b && nbr == a, $sformatf("phase %0d swapped", p));
        end else begin
          check(mem[WA_DATA] == a && nbr == b, $sformatf("phase %0d kept", p));
        end
      end else begin
        check(mem[WA_DATA] == a && nbr == b, $sformatf("phase %0d idle", p));
        // the other partner of the neighbour may have changed it
        nbr = 8'($urandom_range(0, 255));
      end
      if (p < 2 * ROUNDS - 1) check(!done, "not done early");
    end
    #1 check(done, "done after 2*ROUNDS phases");
    check(first_tag == 1, "configuration word read first");
    check(n_swaps == exp_swaps, $sformatf("swap pulses %0d, expected %0d", n_swaps, exp_swaps));
    check(exp_swaps > 0, "at least one swap exercised");
    phase = -1;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    has_pending = 0;
    for (int i = 0; i < 2**WA_W; i++) mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, DIR_E);
    run(1'b1, DIR_S);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
