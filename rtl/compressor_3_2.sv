// compressor_3_2: 3-2 compressor (full adder) used in the SAD adder array.
//
// a0 + a1 + a2 = sum + 2*cout. The XOR of a0 and a1 selects, through a
// multiplexer, whether the carry is a2 (inputs differ) or a0 (inputs equal);
// a second XOR forms the sum. This is the published XOR/XOR/MUX structure.
// Purely combinational.
module compressor_3_2 (
  input  logic a0,
  input  logic a1,
  input  logic a2,
  output logic sum,
  output logic cout
);
  logic x01;
  always_comb begin
    x01  = a0 ^ a1;
    sum  = x01 ^ a2;
    cout = x01 ? a2 : a0;
  end
endmodule
