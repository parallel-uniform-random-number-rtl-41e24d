// sum5: five-input column summator.
//
// Counts the ones among A..E (0 to 5) as Yw (weight 1), Pw (weight 2) and
// Rw (weight 4). Rw covers every way of having at least four ones; Pw is
// "at least two ones" masked by ~Rw, since counts 4 and 5 have bit 1 clear.
// Purely combinational; the equations are those of the source design.
module sum5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y,  // Yw
  output logic p,  // Pw, weight 2
  output logic r   // Rw, weight 4
);
  logic two_or_more;

  assign y           = a ^ b ^ c ^ d ^ e;
  assign r           = (a & b & c & (d | e)) | ((a | b) & c & d & e) | (a & b & d & e);
  assign two_or_more = ((a | b | c) & (d | e)) | ((a | b | d) & (c | e)) | (a & b);
  assign p           = ~r & two_or_more;
endmodule
