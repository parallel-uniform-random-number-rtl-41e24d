// sum2: two-input column summator, the smallest cell of the generator.
//
// Adds two bits of one result column: Yw = A ^ B is the column's result bit
// and Pw = A & B the carry into the next column. Purely combinational, no
// clock. The equations are those of the source design.
module sum2 (
  input  logic a,
  input  logic b,
  output logic y,  // Yw
  output logic p   // Pw, weight 2
);
  assign y = a ^ b;
  assign p = a & b;
endmodule
