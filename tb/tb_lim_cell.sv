// tb_lim_cell: two single cells whose four neighbours are played by the
// testbench.
//   * A sort cell at (1,1), configured through toc-toc writes on its west
//     link as an even cell whose next cell is east. After start it must
//     read the east neighbour (toc-toc read on the east link), find its
//     own number larger, keep the neighbour's number and send its own with
//     a toc-toc write on the east link. A toc-toc read on the west link
//     during the odd (stand-by) phase must already return the new number.
//   * A filter cell at the north-west corner (0,0) of a 2 x 2 grid. It must
//     read east and south with toc-toc reads and the south-east corner
//     with a remote read sent south (row first), and store the filtered
//     value, read back with a toc-toc read from the east link.
module tb_lim_cell;
  import lim_pkg::*;

  localparam int PHASE_CYCLES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cell_addr_t A(int r, int c);
    return '{row: 3'(r), col: 3'(c)};
  endfunction

  // ------------------------------------------------------------- two cells
  // index 0: sort cell, index 1: filter cell
  link_t nb_in  [2][4];
  logic  nb_in_nack [2][4];
  link_t nb_out [2][4];
  logic  start [2];
  logic  swap [2], done [2];
  logic  zero_nack [4] = '{default: 1'b0};

  lim_cell #(.ALGO(ALGO_SORT), .PHASE_CYCLES(PHASE_CYCLES), .ROUNDS(1)) u_sort (
    .clk, .rst_n, .my_addr(A(1, 1)), .start_i(start[0]),
    .nb_in_i(nb_in[0]), .nb_in_nack_o(nb_in_nack[0]),
    .nb_out_o(nb_out[0]), .nb_out_nack_i(zero_nack),
    .swap_o(swap[0]), .done_o(done[0])
  );

  lim_cell #(.ALGO(ALGO_FILTER), .ROWS(2), .COLS(2)) u_filt (
    .clk, .rst_n, .my_addr(A(0, 0)), .start_i(start[1]),
    .nb_in_i(nb_in[1]), .nb_in_nack_o(nb_in_nack[1]),
    .nb_out_o(nb_out[1]), .nb_out_nack_i(zero_nack),
    .swap_o(swap[1]), .done_o(done[1])
  );

  // ----------------------------------------------------- neighbour models
  word_t txq [2][4][$];   // words to send into a cell, per link
  word_t rxq [2][4][$];   // words the cell sent out, per link
  logic [DATA_W-1:0] nval [2][4];  // value the neighbour model returns

  always @(negedge clk) begin
    for (int i = 0; i < 2; i++)
      for (int d = 0; d < 4; d++)
        if (txq[i][d].size() > 0) nb_in[i][d] <= '{valid: 1'b1, word: txq[i][d][0]};
        else nb_in[i][d] <= '0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++)
      for (int d = 0; d < 4; d++) begin
        if (nb_in[i][d].valid && !nb_in_nack[i][d]) void'(txq[i][d].pop_front());
        if (nb_out[i][d].valid) begin
          word_t w;
          w = nb_out[i][d].word;
          rxq[i][d].push_back(w);
          // neighbours answer reads addressed to them
          if (w.tag == TAG_TOC_RD || w.tag == TAG_REM_RD)
            txq[i][d].push_back('{tag: TAG_RESP, tca: w.dest, wa: w.wa,
                                  data: nval[i][d], dest: w.tca});
        end
      end
  end

  task automatic wait_idle(int i, int d);
    int n;
    n = 0;
    while (txq[i][d].size() > 0 && n < 200) begin
      @(posedge clk);
      n++;
    end
    repeat (6) @(posedge clk);
  endtask

  // -------------------------------------------------------------- tests
  task automatic test_sort();
    word_t w;
    int n;
    nval[0][DIR_E] = 8'd50;
    txq[0][DIR_W].push_back('{tag: TAG_TOC_WR, tca: A(1, 0), wa: WA_DATA, data: 8'd200, dest: A(1, 1)});
    txq[0][DIR_W].push_back('{tag: TAG_TOC_WR, tca: A(1, 0), wa: WA_CONF,
                              data: {4'b0, DIR_E, 1'b1, 1'b0}, dest: A(1, 1)});
    wait_idle(0, DIR_W);
    @(negedge clk);
    start[0] = 1'b1;
    @(negedge clk);
    start[0] = 1'b0;
    repeat (PHASE_CYCLES + 4) @(negedge clk);  // now in the odd phase
    check(rxq[0][DIR_E].size() == 2, $sformatf("two words east, got %0d", rxq[0][DIR_E].size()));
    if (rxq[0][DIR_E].size() == 2) begin
      w = rxq[0][DIR_E].pop_front();
      check(w.tag == TAG_TOC_RD && w.dest == A(1, 2) && w.tca == A(1, 1) && w.wa == WA_DATA,
            "toc-toc read of the east cell");
      w = rxq[0][DIR_E].pop_front();
      check(w.tag == TAG_TOC_WR && w.dest == A(1, 2) && w.data == 8'd200 && w.wa == WA_DATA,
            "own number sent east");
    end
    txq[0][DIR_W].push_back('{tag: TAG_TOC_RD, tca: A(1, 0), wa: WA_DATA, data: '0, dest: A(1, 1)});
    wait_idle(0, DIR_W);
    check(rxq[0][DIR_W].size() == 1 && rxq[0][DIR_W][0].data == 8'd50
          && rxq[0][DIR_W][0].tag == TAG_RESP && rxq[0][DIR_W][0].dest == A(1, 0),
          "neighbour's number stored locally");
    n = 0;
    while (!done[0] && n < 3 * PHASE_CYCLES) begin
      @(negedge clk);
      n++;
    end
    check(done[0], "sort cell done after one round");
  endtask

  task automatic test_filter();
    word_t w;
    int n, exp;
    nval[1][DIR_E] = 8'd100;   // (0,1)
    nval[1][DIR_S] = 8'd20;    // (1,0) and, by remote read, (1,1)
    txq[1][DIR_E].push_back('{tag: TAG_TOC_WR, tca: A(0, 1), wa: WA_DATA, data: 8'd60, dest: A(0, 0)});
    wait_idle(1, DIR_E);
    @(negedge clk);
    start[1] = 1'b1;
    @(negedge clk);
    start[1] = 1'b0;
    n = 0;
    while (!done[1] && n < 500) begin
      @(negedge clk);
      n++;
    end
    check(done[1], "filter cell done");
    check(rxq[1][DIR_E].size() == 1 && rxq[1][DIR_E][0].tag == TAG_TOC_RD
          && rxq[1][DIR_E][0].dest == A(0, 1), "toc-toc read east");
    check(rxq[1][DIR_S].size() == 2, "two reads sent south");
    if (rxq[1][DIR_S].size() == 2) begin
      check(rxq[1][DIR_S][0].tag == TAG_TOC_RD && rxq[1][DIR_S][0].dest == A(1, 0), "toc-toc read south");
      check(rxq[1][DIR_S][1].tag == TAG_REM_RD && rxq[1][DIR_S][1].dest == A(1, 1), "remote read of the corner");
    end
    // centre 60; E 100 and S 20 inside (weight 2); SE 20 (weight 1);
    // W, N and three corners outside take the centre value.
    exp = (4 * 60 + 2 * (100 + 20 + 60 + 60) + 20 + 3 * 60) / 16;
    rxq[1][DIR_E].delete();
    txq[1][DIR_E].push_back('{tag: TAG_TOC_RD, tca: A(0, 1), wa: WA_RESULT, data: '0, dest: A(0, 0)});
    wait_idle(1, DIR_E);
    check(rxq[1][DIR_E].size() == 1 && rxq[1][DIR_E][0].data == DATA_W'(exp),
          $sformatf("filtered value, expected %0d", exp));
  endtask

  initial begin
    start = '{default: 1'b0};
    for (int i = 0; i < 2; i++)
      for (int d = 0; d < 4; d++) begin
        nb_in[i][d] = '0;
        nval[i][d] = '0;
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    test_sort();
    test_filter();
    check(swap[0] == 1'b0 && swap[1] == 1'b0, "swap pulses have ended");
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
