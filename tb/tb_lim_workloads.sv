// tb_lim_workloads: the two workloads of the design at full size, on two
// default 4 x 4 grids: sorting 16 numbers with the odd-even sort and
// filtering a 4 x 4 image with the binomial filter. Each is run on several
// data sets: for the sort, numbers in reverse order (the worst case, every
// round needed), already sorted, all equal, with duplicates, and random;
// for the filter, a flat image, a single bright pixel, a full-scale image
// (largest possible sums) and random images. Results are compared with a
// sort and a filter computed here, and the sort time with
// 2*ROUNDS*PHASE_CYCLES.
module tb_lim_workloads;
  import lim_pkg::*;

  localparam int SR = 4, SC = 4, FR = 4, FC = 4;
  localparam int PHASE_CYCLES = 32, ROUNDS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // index 0: sort grid, index 1: filter grid
  logic  start [2];
  link_t hin [2];
  logic  hin_nack [2];
  link_t hout [2];
  logic  done [2];
  logic [SR*SC-1:0] s_swap;
  logic [FR*FC-1:0] f_swap;

  lim_grid #(.ALGO(ALGO_SORT)) u_sort (
    .clk, .rst_n, .start_i(start[0]),
    .host_in_i(hin[0]), .host_in_nack_o(hin_nack[0]),
    .host_out_o(hout[0]), .host_out_nack_i(1'b0),
    .swap_o(s_swap), .done_o(done[0])
  );

  lim_grid #(.ALGO(ALGO_FILTER)) u_filt (
    .clk, .rst_n, .start_i(start[1]),
    .host_in_i(hin[1]), .host_in_nack_o(hin_nack[1]),
    .host_out_o(hout[1]), .host_out_nack_i(1'b0),
    .swap_o(f_swap), .done_o(done[1])
  );

  word_t rx [2][$];
  always @(posedge clk) if (rst_n)
    for (int g = 0; g < 2; g++) if (hout[g].valid) rx[g].push_back(hout[g].word);

  int n_swaps = 0;
  always @(posedge clk) if (rst_n && s_swap != '0) n_swaps++;

  function automatic cell_addr_t A(int r, int c);
    return '{row: 3'(r), col: 3'(c)};
  endfunction

  task automatic host_send(int g, word_t w);
    @(negedge clk);
    hin[g] = '{valid: 1'b1, word: w};
    #1;
    while (hin_nack[g]) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1 hin[g] = '0;
  endtask

  task automatic wr(int g, int cols, int r, int c, logic [WA_W-1:0] wa, logic [DATA_W-1:0] v);
    host_send(g, '{tag: TAG_REM_WR, tca: A(0, cols), wa: wa, data: v, dest: A(r, c)});
  endtask

  task automatic rd(int g, int cols, int r, int c, logic [WA_W-1:0] wa, output logic [DATA_W-1:0] v);
    int n;
    host_send(g, '{tag: TAG_REM_RD, tca: A(0, cols), wa: wa, data: '0, dest: A(r, c)});
    n = 0;
    while (rx[g].size() == 0 && n < 200) begin
      @(posedge clk);
      n++;
    end
    if (rx[g].size() == 0) begin
      check(0, $sformatf("grid %0d: no reply from (%0d,%0d)", g, r, c));
      v = '0;
    end else begin
      word_t w;
      w = rx[g].pop_front();
      check(w.tag == TAG_RESP && w.tca == A(r, c) && w.dest == A(0, cols), "reply header");
      v = w.data;
    end
  endtask

  // Remote writes are posted: give the last ones time to reach their cell.
  task automatic pulse_start(int g);
    repeat (20) @(negedge clk);
    start[g] = 1'b1;
    @(posedge clk);
    #1 start[g] = 1'b0;
  endtask

  task automatic run_sort(int kind);
    localparam int N = SR * SC;
    logic [DATA_W-1:0] v[$], got;
    int r, c, n;
    dir_t d;
    for (int i = 0; i < N; i++)
      case (kind)
        0: v.push_back(8'(250 - 10 * i));        // reverse order
        1: v.push_back(8'(3 * i));               // already sorted
        2: v.push_back(8'd77);                   // all equal
        3: v.push_back(8'($urandom_range(0, 3))); // many duplicates
        default: v.push_back(8'($urandom));
      endcase
    for (int i = 0; i < N; i++) begin
      r = i / SC;
      c = (r % 2 == 0) ? i % SC : SC - 1 - i % SC;
      d = (i % SC == SC - 1) ? DIR_S : ((r % 2 == 0) ? DIR_E : DIR_W);
      wr(0, SC, r, c, WA_DATA, v[i]);
      wr(0, SC, r, c, WA_CONF, {4'b0, d, (i < N - 1) ? 1'b1 : 1'b0, 1'(i % 2)});
    end
    v.sort();
    pulse_start(0);
    n = 0;
    while (!done[0] && n < 4 * ROUNDS * PHASE_CYCLES) begin
      @(posedge clk);
      #1 n++;
    end
    check(n == 2 * ROUNDS * PHASE_CYCLES, $sformatf("sort took %0d cycles", n));
    for (int i = 0; i < N; i++) begin
      r = i / SC;
      c = (r % 2 == 0) ? i % SC : SC - 1 - i % SC;
      rd(0, SC, r, c, WA_DATA, got);
      check(got == v[i], $sformatf("chain[%0d] = %0d, expected %0d", i, got, v[i]));
    end
  endtask

  task automatic run_filter(int kind);
    logic [DATA_W-1:0] img[FR][FC], got;
    int n, sum, pr, pc;
    for (int r = 0; r < FR; r++)
      for (int c = 0; c < FC; c++) begin
        case (kind)
          0: img[r][c] = 8'd90;                               // flat
          1: img[r][c] = (r == 1 && c == 2) ? 8'd255 : 8'd0;  // impulse
          2: img[r][c] = 8'd255;                              // full scale
          default: img[r][c] = 8'($urandom);
        endcase
        wr(1, FC, r, c, WA_DATA, img[r][c]);
      end
    pulse_start(1);
    n = 0;
    while (!done[1] && n < 3000) begin
      @(posedge clk);
      n++;
    end
    check(done[1], "filter done");
    for (int r = 0; r < FR; r++)
      for (int c = 0; c < FC; c++) begin
        sum = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            pr = r + dr;
            pc = c + dc;
            if (pr < 0 || pr >= FR || pc < 0 || pc >= FC) begin
              pr = r;
              pc = c;
            end
            sum += (2 - dr * dr) * (2 - dc * dc) * img[pr][pc];
          end
        rd(1, FC, r, c, WA_RESULT, got);
        check(got == DATA_W'(sum / 16), $sformatf("filter (%0d,%0d) = %0d, expected %0d",
                                                 r, c, got, sum / 16));
      end
  endtask

  initial begin
    start = '{default: 1'b0};
    hin   = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      fork
        run_sort(k);
        run_filter(k);
      join
    end
    check(n_swaps > 0, "swaps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
