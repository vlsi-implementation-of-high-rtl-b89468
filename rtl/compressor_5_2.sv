// compressor_5_2: 5-2 compressor used in the SAD adder array.
//
// Adds five bits a3..a7 of one column and two incoming bits cin1, cin2 of the
// same weight: a3+a4+a5+a6+a7+cin1+cin2 = sum + 2*(cout + cout1 + cout2).
// Structure as published: a carry generator gives cout1 = majority(a3,a4,a5);
// an XOR chain forms a3^a4^a5^a6 and a7^cin1^cin2; cout2 is the majority of
// a7, cin1, cin2 picked by a multiplexer; the final XOR gives sum and a last
// multiplexer gives cout. Purely combinational.
module compressor_5_2 (
  input  logic a3,
  input  logic a4,
  input  logic a5,
  input  logic a6,
  input  logic a7,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic cout,
  output logic cout1,
  output logic cout2
);
  logic x345, x3456, x7c, x7cc;
  always_comb begin
    cout1 = (a3 & a4) | (a3 & a5) | (a4 & a5);   // CGEN
    x345  = a3 ^ a4 ^ a5;
    x3456 = x345 ^ a6;
    x7c   = a7 ^ cin1;
    x7cc  = x7c ^ cin2;
    cout2 = x7c ? cin2 : a7;
    sum   = x3456 ^ x7cc;
    cout  = x3456 ? x7cc : a6;
  end
endmodule
