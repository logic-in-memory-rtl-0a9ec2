// tb_nml_full_adder: applies a new random input triple every cycle and
// checks cout one cycle and s two cycles later against a + b + cin.
module tb_nml_full_adder;
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic a = 1'b0, b = 1'b0, cin = 1'b0, s, cout;
  int checks = 0, failures = 0;
  int hist[$];

  nml_full_adder dut (.clk, .a, .b, .cin, .s, .cout);

  initial begin
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        checks += 2;
        if (cout != hist[hist.size()-1][1]) begin
          failures++;
          $display("FAIL: cout at step %0d", n);
        end
        if (s != hist[hist.size()-2][0]) begin
          failures++;
          $display("FAIL: s at step %0d", n);
        end
      end
      // exhaustive in the first 8 steps, random afterwards
      {a, b, cin} = (n < 8) ? 3'(n) : 3'($urandom);
      hist.push_back(int'(a) + int'(b) + int'(cin));
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
