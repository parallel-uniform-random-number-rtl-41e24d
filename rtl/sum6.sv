// sum6: six-input column summator, the largest cell of the generator.
//
// Counts the ones among A..F (0 to 6) as Yw (weight 1), Pw (weight 2) and
// Rw (weight 4). Rw is "at least four ones", written as six product terms
// that together cover all fifteen four-input subsets. Pw is "at least two
// ones", masked by ~Rw except when all six inputs are 1 (6 = 110b has both
// Pw and Rw set). Purely combinational; the equations are those of the
// source design.
module sum6 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic f,
  output logic y,  // Yw
  output logic p,  // Pw, weight 2
  output logic r   // Rw, weight 4
);
  logic two_or_more;
  logic all_six;

  assign y = a ^ b ^ c ^ d ^ e ^ f;
  assign r = ((a | b) & (c | d) & e & f) | ((a | b) & c & d & (e | f)) |
             (a & b & (c | d) & (e | f)) | (c & d & e & f) |
             (a & b & e & f) | (a & b & c & d);
  assign all_six     = a & b & c & d & e & f;
  assign two_or_more = ((a | b | c) & (d | e | f)) | ((a | d | f) & (b | c | e)) |
                       ((b | d) & (c | f));
  assign p = (~r | all_six) & two_or_more;
endmodule
