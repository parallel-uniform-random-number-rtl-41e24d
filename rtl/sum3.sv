// sum3: three-input column summator (a full adder).
//
// Yw = A ^ B ^ C is the column's result bit; Pw = (A & B) | (C & (A | B)) is
// set when two or more inputs are 1 and goes to the next column. Three ones
// (binary 11) never need a carry two columns up. Purely combinational; the
// equations are those of the source design.
module sum3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y,  // Yw
  output logic p   // Pw, weight 2
);
  assign y = a ^ b ^ c;
  assign p = (a & b) | (c & (a | b));
endmodule
