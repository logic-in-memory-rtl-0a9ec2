// tb_lim_routing_plane: directed test of one routing plane (address row 1,
// column 1) with its memory plane. The testbench plays the logic plane and
// the four neighbours. It checks local write/read and the local read
// latency (reply three cycles after acceptance), toc-toc write and read
// with the reply sent back to the reader, remote write executed here or
// forwarded row-first, remote read replies routed to the reader,
// logic-logic and reply delivery to the logic plane, the fixed priority
// order logic > N > W > S > E with nack to the losers, and that a word
// waiting for a full output register is refused while other work goes on.
module tb_lim_routing_plane;
  import lim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  localparam cell_addr_t ME = '{row: 3'd1, col: 3'd1};

  link_t             lreq = '0, lout;
  logic              lreq_nack;
  link_t             nb_in [4];
  logic              nb_in_nack [4];
  link_t             nb_out [4];
  logic              nb_out_nack [4];
  logic              mem_we;
  logic [WA_W-1:0]   mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0;

  lim_routing_plane dut (
    .clk, .rst_n, .my_addr(ME),
    .lreq_i(lreq), .lreq_nack_o(lreq_nack), .lout_o(lout),
    .nb_in_i(nb_in), .nb_in_nack_o(nb_in_nack),
    .nb_out_o(nb_out), .nb_out_nack_i(nb_out_nack),
    .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
    .mem_rdata_i(mem_rdata)
  );

  lim_memory_plane u_mem (
    .clk, .rst_n, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // collected outputs
  word_t outq [4][$];
  word_t lq[$];
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 4; d++)
      if (nb_out[d].valid && !nb_out_nack[d]) outq[d].push_back(nb_out[d].word);
    if (lout.valid) lq.push_back(lout.word);
  end

  // source -1 is the logic plane, 0..3 a neighbour port
  function automatic logic src_nack(int src);
    return (src < 0) ? lreq_nack : nb_in_nack[src];
  endfunction

  task automatic drive(int src, link_t l);
    if (src < 0) lreq = l;
    else         nb_in[src] = l;
  endtask

  task automatic send(int src, word_t w);
    @(negedge clk);
    drive(src, '{valid: 1'b1, word: w});
    #1;
    while (src_nack(src)) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1 drive(src, '0);
  endtask

  function automatic word_t mk(tag_t t, cell_addr_t tca, int wa, int data, cell_addr_t dest);
    return '{tag: t, tca: tca, wa: WA_W'(wa), data: DATA_W'(data), dest: dest};
  endfunction

  function automatic cell_addr_t A(int r, int c);
    return '{row: 3'(r), col: 3'(c)};
  endfunction

  task automatic settle();
    repeat (8) @(posedge clk);
  endtask

  task automatic expect_out(int d, word_t w, string what);
    if (outq[d].size() == 0) check(0, {what, ": nothing sent"});
    else begin
      word_t g;
      g = outq[d].pop_front();
      check(g == w, $sformatf("%s: got %p", what, g));
    end
  endtask

  task automatic expect_logic(word_t w, string what);
    if (lq.size() == 0) check(0, {what, ": nothing delivered"});
    else begin
      word_t g;
      g = lq.pop_front();
      check(g == w, $sformatf("%s: got %p", what, g));
    end
  endtask

  initial begin
    int n;
    int order[$];
    for (int d = 0; d < 4; d++) begin
      nb_in[d] = '0;
      nb_out_nack[d] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. local write and read, with the read latency
    send(-1, mk(TAG_LOCAL_WR, ME, 3, 'hA5, ME));
    send(-1, mk(TAG_LOCAL_RD, ME, 3, 0, ME));
    n = 0;
    while (!lout.valid && n < 10) begin
      @(negedge clk);
      n++;
    end
    check(n == 3, $sformatf("local read reply %0d cycles after acceptance", n));
    settle();
    expect_logic(mk(TAG_RESP, ME, 3, 'hA5, ME), "local read");

    // 2. toc-toc write from the west, toc-toc read from the north
    send(DIR_W, mk(TAG_TOC_WR, A(1, 0), 1, 'h3C, ME));
    send(DIR_N, mk(TAG_TOC_RD, A(0, 1), 1, 0, ME));
    settle();
    expect_out(DIR_N, mk(TAG_RESP, ME, 1, 'h3C, A(0, 1)), "toc-toc read reply");

    // 3. remote writes: forwarded east, forwarded south, executed here
    send(DIR_W, mk(TAG_REM_WR, A(1, 0), 0, 'h11, A(1, 3)));
    send(DIR_W, mk(TAG_REM_WR, A(1, 0), 0, 'h22, A(3, 3)));
    send(DIR_E, mk(TAG_REM_WR, A(1, 3), 2, 'h33, ME));
    settle();
    expect_out(DIR_E, mk(TAG_REM_WR, A(1, 0), 0, 'h11, A(1, 3)), "remote write east");
    expect_out(DIR_S, mk(TAG_REM_WR, A(1, 0), 0, 'h22, A(3, 3)), "remote write south");

    // 4. remote read here from a reader at (0,3): reply goes north first
    send(DIR_E, mk(TAG_REM_RD, A(0, 3), 2, 0, ME));
    settle();
    expect_out(DIR_N, mk(TAG_RESP, ME, 2, 'h33, A(0, 3)), "remote read reply");

    // 5. logic-logic and replies for this cell go to the logic plane;
    //    a reply for another cell is forwarded
    send(DIR_S, mk(TAG_LOGIC, A(2, 1), 0, 'h77, ME));
    send(DIR_W, mk(TAG_RESP, A(1, 0), 0, 'h44, ME));
    send(DIR_S, mk(TAG_RESP, A(2, 1), 0, 'h55, A(1, 3)));
    settle();
    expect_logic(mk(TAG_LOGIC, A(2, 1), 0, 'h77, ME), "logic-logic");
    expect_logic(mk(TAG_RESP, A(1, 0), 0, 'h44, ME), "reply to logic");
    expect_out(DIR_E, mk(TAG_RESP, A(2, 1), 0, 'h55, A(1, 3)), "reply forwarded");

    // 6. logic sends a toc-toc read to the east neighbour
    send(-1, mk(TAG_TOC_RD, ME, 0, 0, A(1, 2)));
    settle();
    expect_out(DIR_E, mk(TAG_TOC_RD, ME, 0, 0, A(1, 2)), "toc-toc read out");

    // 7. priority: five simultaneous writes, accepted logic, N, W, S, E
    @(negedge clk);
    lreq         = '{valid: 1'b1, word: mk(TAG_LOCAL_WR, ME, 0, 1, ME)};
    nb_in[DIR_N] = '{valid: 1'b1, word: mk(TAG_TOC_WR, A(0, 1), 0, 2, ME)};
    nb_in[DIR_W] = '{valid: 1'b1, word: mk(TAG_TOC_WR, A(1, 0), 0, 3, ME)};
    nb_in[DIR_S] = '{valid: 1'b1, word: mk(TAG_TOC_WR, A(2, 1), 0, 4, ME)};
    nb_in[DIR_E] = '{valid: 1'b1, word: mk(TAG_TOC_WR, A(1, 2), 0, 5, ME)};
    n = 0;
    while ((lreq.valid || nb_in[0].valid || nb_in[1].valid || nb_in[2].valid
            || nb_in[3].valid) && n < 40) begin
      int acc;
      #1;
      acc = -2;
      if (lreq.valid && !lreq_nack) acc = -1;
      for (int d = 0; d < 4; d++) if (nb_in[d].valid && !nb_in_nack[d]) acc = d;
      @(posedge clk);
      #1;
      if (acc != -2) begin
        order.push_back(acc);
        drive(acc, '0);
      end
      @(negedge clk);
      n++;
    end
    check(order.size() == 5, "all five requests served");
    check(order.size() == 5 && order[0] == -1 && order[1] == DIR_N && order[2] == DIR_W
          && order[3] == DIR_S && order[4] == DIR_E, $sformatf("priority order %p", order));
    // the last one written wins: the east neighbour's 5
    send(-1, mk(TAG_LOCAL_RD, ME, 0, 0, ME));
    settle();
    expect_logic(mk(TAG_RESP, ME, 0, 5, ME), "value after the priority run");

    // 8. full output register: the second eastward word is refused while
    //    the east neighbour refuses the link; other work is still accepted
    @(negedge clk);
    nb_out_nack[DIR_E] = 1'b1;
    send(DIR_W, mk(TAG_REM_WR, A(1, 0), 0, 'h66, A(1, 3)));
    @(negedge clk);
    nb_in[DIR_W] = '{valid: 1'b1, word: mk(TAG_REM_WR, A(1, 0), 1, 'h67, A(1, 3))};
    repeat (4) @(negedge clk);
    #1 check(nb_in_nack[DIR_W], "word for a full output register refused");
    send(DIR_N, mk(TAG_TOC_WR, A(0, 1), 3, 'h99, ME));
    check(nb_in[DIR_W].valid, "refused word still waiting");
    @(negedge clk);
    nb_out_nack[DIR_E] = 1'b0;
    n = 0;
    while (nb_in_nack[DIR_W] && n < 20) begin
      @(negedge clk);
      #1 n++;
    end
    @(posedge clk);
    #1 nb_in[DIR_W] = '0;
    settle();
    expect_out(DIR_E, mk(TAG_REM_WR, A(1, 0), 0, 'h66, A(1, 3)), "first eastward word");
    expect_out(DIR_E, mk(TAG_REM_WR, A(1, 0), 1, 'h67, A(1, 3)), "second eastward word");
    send(-1, mk(TAG_LOCAL_RD, ME, 3, 0, ME));
    settle();
    expect_logic(mk(TAG_RESP, ME, 3, 'h99, ME), "write accepted during back-pressure");

    for (int d = 0; d < 4; d++) check(outq[d].size() == 0, $sformatf("no extra words on %0d", d));
    check(lq.size() == 0, "no extra words to logic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
