// tb_lim_binomial_logic: the binomial filter logic plane against a model
// of its routing plane that serves reads from a random 4 x 4 image, with
// random nacks and reply delays. For a corner, an edge and an inner cell
// (and every cell of the image in turn) it checks that edge neighbours are
// read with toc-toc reads and corners with remote reads, that only cells
// inside the grid are read, that the pixel is never overwritten, and that
// the value written to WA_RESULT equals the 3x3 binomial filter computed
// here (neighbours outside the grid replaced by the centre pixel).
module tb_lim_binomial_logic;
  import lim_pkg::*;

  localparam int ROWS = 4, COLS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic       start = 1'b0;
  link_t      req, in = '0;
  logic       nack = 1'b0;
  logic       done;
  cell_addr_t me = '0;
  int checks = 0, failures = 0;

  lim_binomial_logic #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .my_addr(me), .start_i(start),
    .req_o(req), .req_nack_i(nack), .in_i(in), .done_o(done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [DATA_W-1:0] img [ROWS][COLS];
  logic [DATA_W-1:0] result;
  int    n_reads, n_writes;
  word_t pending;
  bit    has_pending;
  int    pending_delay;

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
    int dr, dc;
    w  = req.word;
    dr = int'(w.dest.row) - int'(me.row);
    dc = int'(w.dest.col) - int'(me.col);
    check(w.tca == me, "TCA is the own address");
    unique case (w.tag)
      TAG_LOCAL_RD, TAG_TOC_RD, TAG_REM_RD: begin
        n_reads++;
        check(w.wa == WA_DATA, "reads the pixel word");
        if (w.tag == TAG_LOCAL_RD) check(dr == 0 && dc == 0, "local read of itself");
        if (w.tag == TAG_TOC_RD)   check(dr * dr + dc * dc == 1, "toc-toc read of an edge neighbour");
        if (w.tag == TAG_REM_RD)   check(dr * dr == 1 && dc * dc == 1, "remote read of a corner neighbour");
        check(w.dest.row < ROWS && w.dest.col < COLS, "read inside the grid");
        pending = '{tag: TAG_RESP, tca: w.dest, wa: w.wa,
                    data: img[w.dest.row][w.dest.col], dest: me};
        has_pending = 1;
        pending_delay = $urandom_range(0, 4);
      end
      TAG_LOCAL_WR: begin
        n_writes++;
        check(w.wa == WA_RESULT, "writes the result word only");
        result = w.data;
      end
      default: check(0, "unexpected request tag");
    endcase
  end

  function automatic int reference(int r, int c);
    int sum, pr, pc;
    sum = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        pr = r + dr;
        pc = c + dc;
        if (pr < 0 || pr >= ROWS || pc < 0 || pc >= COLS) sum += (2 - dr*dr) * (2 - dc*dc) * img[r][c];
        else sum += (2 - dr*dr) * (2 - dc*dc) * img[pr][pc];
      end
    return sum / 16;
  endfunction

  task automatic run(input int r, input int c);
    int n, n_in;
    me = '{row: 3'(r), col: 3'(c)};
    n_reads = 0;
    n_writes = 0;
    n_in = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS) n_in++;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (!done && n < 500) begin
      @(negedge clk);
      n++;
    end
    check(done, "done");
    check(n_reads == n_in, $sformatf("(%0d,%0d) %0d reads, expected %0d", r, c, n_reads, n_in));
    check(n_writes == 1, "one result write");
    check(int'(result) == reference(r, c),
          $sformatf("(%0d,%0d) result %0d, expected %0d", r, c, result, reference(r, c)));
  endtask

  initial begin
    has_pending = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = 8'($urandom);
    img[1][1] = 8'd255;
    img[0][0] = 8'd255;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) run(r, c);
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
