// lcg_parallel: parallel uniform random number generator, N numbers per clock.
//
// A chain of N generator modules: the first (lcg_gen) holds the state X in
// a register, the other N-1 (lcg_step) are combinational. Each module maps
// its input x to (A * x + C) mod 2^W, so in one clock period the chain
// yields N consecutive numbers of the single generator's sequence:
//   rnd[0] = f(X), rnd[1] = f(f(X)), ..., rnd[N-1] = f^N(X).
// The last output is fed back to the register, so the next clock continues
// the sequence where this one ended and no number is skipped or repeated.
//
// Interface and timing:
//   rst_n  asynchronous, active low: X <= SEED
//   load   synchronous: X <= seed on the next edge
//   rnd    N words, rnd[k] is the (k+1)-th number after X; all N change
//          together after each rising edge and settle after N step delays,
//          so the clock period must cover the whole chain.
//
// The chain of ten modules with one register and the feedback of the last
// output follow the source design; the seed/reset handling is this design's
// own.
module lcg_parallel
  import lcg_pkg::*;
#(
  parameter int unsigned  W    = WORD_W,
  parameter logic [W-1:0] A    = W'(MULT_A),
  parameter logic [W-1:0] C    = W'(INCR_C),
  parameter int unsigned  N    = N_MODULES,
  parameter logic [W-1:0] SEED = W'(DEF_SEED)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [W-1:0]        seed,
  output logic [N-1:0][W-1:0] rnd
);

  // g_out[k].word is module k's output, a signal of its own so that the
  // chain is not read back through the packed output vector.

  lcg_gen #(.W(W), .A(A), .C(C), .SEED(SEED)) u_head (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .seed (seed),
    .d    (g_out[N-1].word),
    .q    (),
    .y    (g_out[0].word)
  );

  for (genvar k = 0; k < N; k++) begin : g_out
    logic [W-1:0] word;
    assign rnd[k] = word;
  end

  for (genvar k = 1; k < N; k++) begin : g_chain
    lcg_step #(.W(W), .A(A), .C(C)) u_step (.x(g_out[k-1].word), .y(g_out[k].word));
  end

endmodule
