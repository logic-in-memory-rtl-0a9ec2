// nml_full_adder: RTL model of a NanoMagnet Logic full adder.
//
// In NML the only gates are the majority voter and the inverter, and a
// signal advances by one clock zone per clock phase. The RTL modelling
// style used here puts an ideal gate in front of a register, one register
// per clock zone. The adder is built from three majority voters:
//   zone 1:  m_c = MAJ(a, b, cin)     (this is the carry out)
//            m_x = MAJ(a, b, ~cin)
//   zone 2:  s   = MAJ(~m_c, cin, m_x)
// so cout is valid one cycle after the inputs and s two cycles after them.
// A new set of inputs can be applied every cycle (the circuit is a
// pipeline). The three-voter structure is the standard majority-logic full
// adder; the exact zone split is this design's choice, the layout itself
// (two magnet layers joined by via magnets) has no counterpart in RTL.
// NML has no reset: magnets keep their state, so the registers are not
// reset and the first two outputs after power-up are meaningless.
module nml_full_adder (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,     // two clock zones after the inputs
  output logic cout   // one clock zone after the inputs
);

  function automatic logic maj(logic x, logic y, logic z);
    return (x & y) | (x & z) | (y & z);
  endfunction

  logic m_c_q, m_x_q, cin_q, s_q;

  always_ff @(posedge clk) begin
    m_c_q <= maj(a, b, cin);
    m_x_q <= maj(a, b, !cin);
    cin_q <= cin;
    s_q   <= maj(!m_c_q, cin_q, m_x_q);
  end

  assign s    = s_q;
  assign cout = m_c_q;

endmodule
