// tb_lim_memory_plane: checks reset to zero, write-then-read of every word,
// that a write does not disturb other words, and that the read data follow
// the address in the same cycle.
module tb_lim_memory_plane;
  import lim_pkg::*;

  localparam int NWORDS = 2**WA_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic                      we = 1'b0;
  logic [$clog2(NWORDS)-1:0] addr = '0;
  logic [DATA_W-1:0]         wdata = '0, rdata;
  logic [DATA_W-1:0]         model [NWORDS];
  int checks = 0, failures = 0;

  lim_memory_plane dut (.clk, .rst_n, .we, .addr, .wdata, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NWORDS; i++) begin
      model[i] = '0;
      addr = i[$clog2(NWORDS)-1:0];
      #1 check(rdata == 0, $sformatf("word %0d reset", i));
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      addr  = $clog2(NWORDS)'($urandom);
      we    = 1'($urandom);
      wdata = DATA_W'($urandom);
      #1 check(rdata == model[addr], $sformatf("read word %0d = %0h, expected %0h",
                                               addr, rdata, model[addr]));
      if (we) model[addr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < NWORDS; i++) begin
      addr = i[$clog2(NWORDS)-1:0];
      #1 check(rdata == model[i], $sformatf("final word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
