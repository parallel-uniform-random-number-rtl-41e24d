// lcg_gen: generator module with the clocked state register.
//
// Holds the generator state X in a W-bit register and drives
// y = (A * X + C) mod 2^W through an lcg_step. Each rising clock edge the
// register takes its next value from d. Used on its own, d is tied to y and
// the module produces one new number per clock. At the head of the parallel
// chain (lcg_parallel), d is the output of the last module of the chain.
//
// Interface and timing:
//   rst_n  asynchronous, active low: X <= SEED
//   load   synchronous: X <= seed on the next edge (takes priority over d)
//   d      next state, sampled on the rising edge
//   q      the register, X
//   y      combinational function of q, valid one step-delay after the edge
//
// The register followed by an always-updating step module follows the
// source design; the reset value, the seed port and the load priority are
// this design's own choices.
module lcg_gen
  import lcg_pkg::*;
#(
  parameter int unsigned  W    = WORD_W,
  parameter logic [W-1:0] A    = W'(MULT_A),
  parameter logic [W-1:0] C    = W'(INCR_C),
  parameter logic [W-1:0] SEED = W'(DEF_SEED)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= seed;
    else           q <= d;
  end

  lcg_step #(.W(W), .A(A), .C(C)) u_step (.x(q), .y(y));

endmodule
