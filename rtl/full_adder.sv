// full_adder - one-bit full adder, the basic cell of both multipliers.
//
// Adds three bits: sum = a ^ b ^ cin, cout = majority(a, b, cin). The
// published multipliers were laid out around a 14-transistor
// static CMOS full adder; only its logic function matters at RTL, so the cell
// is written as plain gates and any full-adder circuit may stand in for it.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic a_xor_b;

  always_comb begin
    a_xor_b = a ^ b;
    sum     = a_xor_b ^ cin;
    cout    = (a & b) | (a_xor_b & cin);
  end
endmodule
