// sum4: four-input column summator.
//
// Counts the ones among A..D (0 to 4) and returns the count as three bits:
// Yw (weight 1) = A ^ B ^ C ^ D, Pw (weight 2) and Rw (weight 4). Rw is set
// only when all four inputs are 1 and is passed to the column two places up;
// Pw is set when at least two inputs are 1, except when Rw is set (4 = 100b).
// Purely combinational; the equations are those of the source design.
module sum4 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y,  // Yw
  output logic p,  // Pw, weight 2
  output logic r   // Rw, weight 4
);
  logic two_or_more;

  assign y           = a ^ b ^ c ^ d;
  assign r           = a & b & c & d;
  assign two_or_more = ((a | b) & (c | d)) | ((a | c) & (b | d));
  assign p           = ~r & two_or_more;
endmodule
