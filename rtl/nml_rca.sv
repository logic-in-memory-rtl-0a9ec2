// nml_rca: RTL model of an N-bit NanoMagnet Logic ripple carry adder
// (4 bits by default, the size of the NML layout it models).
//
// N nml_full_adder stages are chained through their carries. Because each
// clock zone is a pipeline register, the carry reaches bit i i cycles after
// bit 0 starts, so the operand bits of bit i are delayed by i cycles on the
// way in, and the sum bits are delayed by N-1-i cycles on the way out so
// that the whole sum leaves together. The result {cout, s} appears N+1
// cycles after a, b and cin are applied; one addition can start every
// cycle. Registers are not reset (NML has no reset); the first N+1 outputs
// after power-up are meaningless. The skew and deskew arrangement is the
// usual one for a pipelined ripple adder and is this design's choice.
module nml_rca #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] carry;   // carry[i] enters bit i
  logic [N-1:0] s_raw;
  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    // input skew: i register stages
    logic a_d [i+1];
    logic b_d [i+1];
    assign a_d[0] = a[i];
    assign b_d[0] = b[i];
    for (genvar k = 1; k <= i; k++) begin : g_skew
      always_ff @(posedge clk) begin
        a_d[k] <= a_d[k-1];
        b_d[k] <= b_d[k-1];
      end
    end

    nml_full_adder u_fa (
      .clk, .a(a_d[i]), .b(b_d[i]), .cin(carry[i]),
      .s(s_raw[i]), .cout(carry[i+1])
    );

    // output deskew: N-1-i register stages
    logic s_d [N-i];
    assign s_d[0] = s_raw[i];
    for (genvar k = 1; k < N - i; k++) begin : g_deskew
      always_ff @(posedge clk) s_d[k] <= s_d[k-1];
    end
    assign s[i] = s_d[N-1-i];
  end

  // The last carry leaves bit N-1 at cycle N, one cycle before the sums.
  logic cout_q;
  always_ff @(posedge clk) cout_q <= carry[N];
  assign cout = cout_q;

endmodule
