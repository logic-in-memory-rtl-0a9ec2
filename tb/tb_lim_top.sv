// tb_lim_top: end-to-end test of lim_top at its default size (two 4 x 4
// grids and the 4-bit NML adder).
//
// Sort grid: the host loads 16 random numbers and the configuration words
// of a snake-shaped chain with remote writes, starts the sort, checks that
// done rises exactly 2*ROUNDS*PHASE_CYCLES cycles later, reads every
// number back with remote reads and compares with a sorted copy. It also
// sends one logic-logic word and checks that it reaches the logic plane.
// Filter grid: the host loads a random 4 x 4 image, starts the filter and
// reads back every result, compared with a binomial filter computed here.
// Adder: random operands every cycle, results checked N+1 cycles later.
// Mechanisms counted (each must happen): remote writes, remote reads,
// multi-hop forwarding, toc-toc reads and writes, swaps in even and odd
// phases, requests refused by a busy routing plane, logic-logic delivery.
module tb_lim_top;
  import lim_pkg::*;

  localparam int ROWS = 4, COLS = 4, PHASE_CYCLES = 32, ROUNDS = 8, RCA_N = 4;
  localparam int NCELL = ROWS * COLS;
  localparam cell_addr_t HOST = '{row: 3'd0, col: 3'(COLS)};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic              sort_start = 1'b0, filt_start = 1'b0;
  link_t             sort_in = '0, filt_in = '0;
  logic              sort_in_nack, filt_in_nack;
  link_t             sort_out, filt_out;
  logic [NCELL-1:0]  sort_swap;
  logic              sort_done, filt_done;
  logic [RCA_N-1:0]  rca_a = '0, rca_b = '0, rca_s;
  logic              rca_cin = 1'b0, rca_cout;

  lim_top dut (
    .clk, .rst_n,
    .sort_start_i(sort_start), .sort_host_in_i(sort_in),
    .sort_host_in_nack_o(sort_in_nack), .sort_host_out_o(sort_out),
    .sort_host_out_nack_i(1'b0), .sort_swap_o(sort_swap), .sort_done_o(sort_done),
    .filt_start_i(filt_start), .filt_host_in_i(filt_in),
    .filt_host_in_nack_o(filt_in_nack), .filt_host_out_o(filt_out),
    .filt_host_out_nack_i(1'b0), .filt_done_o(filt_done),
    .rca_a_i(rca_a), .rca_b_i(rca_b), .rca_cin_i(rca_cin),
    .rca_s_o(rca_s), .rca_cout_o(rca_cout)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- events
  int n_rem_wr = 0, n_rem_rd = 0, n_host_refused = 0, n_refused = 0;
  int n_fwd = 0, n_toc_rd = 0, n_toc_wr = 0, n_logic = 0;
  int n_swap_even = 0, n_swap_odd = 0;

  // Count words crossing internal links, by tag, and refusals.
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int d = 0; d < 4; d++) begin
          if (dut.u_sort.in_l[r][c][d].valid && !dut.u_sort.in_nack[r][c][d]) begin
            if (dut.u_sort.in_l[r][c][d].word.tag == TAG_TOC_RD) n_toc_rd++;
            if (dut.u_sort.in_l[r][c][d].word.tag == TAG_TOC_WR) n_toc_wr++;
          end
          if (dut.u_filter.in_l[r][c][d].valid && dut.u_filter.in_nack[r][c][d])
            n_refused++;
          if (dut.u_filter.in_l[r][c][d].valid && !dut.u_filter.in_nack[r][c][d]
              && dut.u_filter.in_l[r][c][d].word.tag == TAG_REM_RD
              && dut.u_filter.in_l[r][c][d].word.dest != '{row: 3'(r), col: 3'(c)})
            n_fwd++;
        end
    if (dut.u_sort.g_row[0].g_col[COLS-1].u_cell.u_route.lout_o.valid &&
        dut.u_sort.g_row[0].g_col[COLS-1].u_cell.u_route.lout_o.word.tag == TAG_LOGIC)
      n_logic++;
    if (sort_swap != '0) begin
      if (dut.u_sort.g_row[0].g_col[0].u_cell.g_sort.u_logic.phase_odd_q) n_swap_odd++;
      else n_swap_even++;
    end
  end

  // Replies arriving at the host.
  word_t sort_rx[$], filt_rx[$];
  always @(posedge clk) if (rst_n) begin
    if (sort_out.valid) sort_rx.push_back(sort_out.word);
    if (filt_out.valid) filt_rx.push_back(filt_out.word);
  end

  // ------------------------------------------------------------- host side
  // Present a word at the host port until the grid accepts it.
  task automatic host_send(input bit filt, input word_t w);
    @(negedge clk);
    if (filt) filt_in = '{valid: 1'b1, word: w};
    else      sort_in = '{valid: 1'b1, word: w};
    #1;
    while (filt ? filt_in_nack : sort_in_nack) begin
      n_host_refused++;
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    if (filt) filt_in = '0;
    else      sort_in = '0;
    if (w.tag == TAG_REM_WR) n_rem_wr++;
    if (w.tag == TAG_REM_RD) n_rem_rd++;
  endtask

  function automatic cell_addr_t addr_of(int r, int c);
    return '{row: 3'(r), col: 3'(c)};
  endfunction

  task automatic rem_write(input bit filt, input int r, input int c,
                           input logic [WA_W-1:0] wa, input logic [DATA_W-1:0] v);
    host_send(filt, '{tag: TAG_REM_WR, tca: HOST, wa: wa, data: v, dest: addr_of(r, c)});
  endtask

  task automatic rem_read(input bit filt, input int r, input int c,
                          input logic [WA_W-1:0] wa, output logic [DATA_W-1:0] v);
    int t;
    host_send(filt, '{tag: TAG_REM_RD, tca: HOST, wa: wa, data: '0, dest: addr_of(r, c)});
    t = 0;
    while ((filt ? filt_rx.size() : sort_rx.size()) == 0 && t < 200) begin
      @(posedge clk);
      t++;
    end
    if ((filt ? filt_rx.size() : sort_rx.size()) == 0) begin
      check(0, $sformatf("no reply to remote read of (%0d,%0d)", r, c));
      v = '0;
    end else begin
      word_t w;
      w = filt ? filt_rx.pop_front() : sort_rx.pop_front();
      check(w.tag == TAG_RESP && w.tca == addr_of(r, c) && w.wa == wa,
            $sformatf("reply header from (%0d,%0d)", r, c));
      v = w.data;
    end
  endtask

  // ------------------------------------------------------------------ sort
  // Chain position i -> cell, snake order: even rows run east, odd west.
  function automatic int snake_row(int i); return i / COLS; endfunction
  function automatic int snake_col(int i);
    return (snake_row(i) % 2 == 0) ? i % COLS : COLS - 1 - i % COLS;
  endfunction
  function automatic logic [DATA_W-1:0] conf_of(int i);
    dir_t d;
    if (i % COLS == COLS - 1) d = DIR_S;
    else d = (snake_row(i) % 2 == 0) ? DIR_E : DIR_W;
    return {4'b0, d, (i < NCELL - 1) ? 1'b1 : 1'b0, 1'(i % 2)};
  endfunction

  task automatic run_sort();
    logic [DATA_W-1:0] vals[NCELL], got;
    logic [DATA_W-1:0] sorted[$];
    int n;
    for (int i = 0; i < NCELL; i++) begin
      vals[i] = 8'($urandom);
      sorted.push_back(vals[i]);
    end
    vals[3] = 8'd255;  // keep at least one number far from its place
    sorted[3] = 8'd255;
    sorted.sort();
    for (int i = 0; i < NCELL; i++) begin
      rem_write(0, snake_row(i), snake_col(i), WA_DATA, vals[i]);
      rem_write(0, snake_row(i), snake_col(i), WA_CONF, conf_of(i));
    end
    // logic-logic word to the row-0, east-most cell
    host_send(0, '{tag: TAG_LOGIC, tca: HOST, wa: '0, data: 8'h5A, dest: addr_of(0, COLS-1)});
    repeat (20) @(posedge clk);  // let the posted writes land
    @(negedge clk);
    sort_start = 1'b1;
    // count the clock edges after the one that samples start
    n = 0;
    @(negedge clk);
    sort_start = 1'b0;
    do begin
      @(negedge clk);
      n++;
    end while (!sort_done && n < 4 * ROUNDS * PHASE_CYCLES);
    check(n == 2 * ROUNDS * PHASE_CYCLES,
          $sformatf("sort took %0d cycles, expected %0d", n, 2 * ROUNDS * PHASE_CYCLES));
    for (int i = 0; i < NCELL; i++) begin
      rem_read(0, snake_row(i), snake_col(i), WA_DATA, got);
      check(got == sorted[i], $sformatf("sorted[%0d] = %0d, expected %0d", i, got, sorted[i]));
    end
  endtask

  // ---------------------------------------------------------------- filter
  task automatic run_filter();
    logic [DATA_W-1:0] img[ROWS][COLS], got;
    int sum, pr, pc, w, t;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = 8'($urandom);
        rem_write(1, r, c, WA_DATA, img[r][c]);
      end
    repeat (20) @(posedge clk);  // let the posted writes land
    @(negedge clk);
    filt_start = 1'b1;
    @(negedge clk);
    filt_start = 1'b0;
    t = 0;
    while (!filt_done && t < 5000) begin
      @(posedge clk);
      t++;
    end
    check(filt_done, "filter finished");
    $display("filter took %0d cycles", t);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        sum = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            w = (dr == 0 ? 2 : 1) * (dc == 0 ? 2 : 1);
            pr = r + dr;
            pc = c + dc;
            if (pr < 0 || pr >= ROWS || pc < 0 || pc >= COLS) sum += w * img[r][c];
            else sum += w * img[pr][pc];
          end
        rem_read(1, r, c, WA_RESULT, got);
        check(got == 8'(sum / 16), $sformatf("filter (%0d,%0d) = %0d, expected %0d",
                                             r, c, got, sum / 16));
        rem_read(1, r, c, WA_DATA, got);
        check(got == img[r][c], $sformatf("pixel (%0d,%0d) kept", r, c));
      end
  endtask

  // ------------------------------------------------------------------ adder
  task automatic run_rca();
    int exp_q[$];
    int n_ok = 0;
    for (int i = 0; i < 200 + RCA_N + 1; i++) begin
      @(negedge clk);
      if (i >= RCA_N + 1) begin
        int e;
        e = exp_q.pop_front();
        check({rca_cout, rca_s} == (RCA_N+1)'(e),
              $sformatf("adder result %0d, expected %0d", {rca_cout, rca_s}, e));
        n_ok++;
      end
      rca_a = RCA_N'($urandom);
      rca_b = RCA_N'($urandom);
      rca_cin = 1'($urandom);
      exp_q.push_back(int'(rca_a) + int'(rca_b) + int'(rca_cin));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fork
      run_sort();
      run_filter();
      run_rca();
    join
    check(n_rem_wr > 0, "remote writes happened");
    check(n_rem_rd > 0, "remote reads happened");
    check(n_fwd > 0, "remote reads were forwarded between cells");
    check(n_toc_rd > 0, "toc-toc reads happened");
    check(n_toc_wr > 0, "toc-toc writes happened");
    check(n_swap_even > 0, "swaps in even phases");
    check(n_swap_odd > 0, "swaps in odd phases");
    check(n_refused > 0, "busy routing planes refused requests");
    check(n_host_refused > 0, "host port refused a word");
    check(n_logic == 1, "logic-logic word delivered once");
    $display("events: rem_wr=%0d rem_rd=%0d fwd=%0d toc_rd=%0d toc_wr=%0d swaps=%0d/%0d refused=%0d host_refused=%0d logic=%0d",
             n_rem_wr, n_rem_rd, n_fwd, n_toc_rd, n_toc_wr, n_swap_even, n_swap_odd,
             n_refused, n_host_refused, n_logic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
