// tb_nml_rca: feeds a new random addition every cycle (including the
// all-ones carry chain) and checks that {cout, s} equals a + b + cin
// exactly N+1 cycles later.
module tb_nml_rca;
  localparam int N = 4;
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic [N-1:0] a = '0, b = '0, s;
  logic         cin = 1'b0, cout;
  int checks = 0, failures = 0;
  int hist[$];

  nml_rca dut (.clk, .a, .b, .cin, .s, .cout);

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n >= N + 1) begin
        checks++;
        if ({cout, s} != (N+1)'(hist[n - N - 1])) begin
          failures++;
          $display("FAIL: step %0d sum %0d, expected %0d", n, {cout, s}, hist[n - N - 1]);
        end
      end
      if (n % 7 == 0) begin
        a = '1; b = '0; cin = 1'b1;   // carry through every bit
      end else begin
        a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      end
      hist.push_back(int'(a) + int'(b) + int'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
