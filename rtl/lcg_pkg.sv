// lcg_pkg: constants and elaboration-time helpers shared by the linear
// congruential generator modules.
//
// The generator computes X(n+1) = (A * X(n) + C) mod 2^W. W = 32, so the
// modulo is free (the carry out of bit 31 is dropped). A = 2^27 + 2^21 + 2^0
// and C = 2^14 + 2^11 + 2^0 are the multiplier and increment selected for
// their low autocorrelation and the few set bits that keep the logic small;
// N_MODULES = 10 is the length of the parallel chain. These four values
// follow the source design; the reset seed DEF_SEED = 1 is this design's own.
//
// col_inputs() returns how many one-bit terms a result column receives when
// the multiplication and addition are flattened into one sum per bit:
// one term per set bit A[j] with j <= col (the shifted copy X << j), one for
// C[col] = 1, one carry Pw from column col-1 if that column sums two or more
// terms, and one carry Rw from column col-2 if that column sums four or more.
// The carry rule is this design's reading of how the summators chain.
package lcg_pkg;

  localparam int unsigned WORD_W    = 32;
  localparam logic [31:0] MULT_A    = 32'd136314881;  // 2^27 + 2^21 + 1
  localparam logic [31:0] INCR_C    = 32'd18433;      // 2^14 + 2^11 + 1
  localparam int unsigned N_MODULES = 10;
  localparam logic [31:0] DEF_SEED  = 32'd1;

  // Largest column a single summator can take.
  localparam int MAX_TERMS = 6;
  // Widest word col_inputs() accepts.
  localparam int MAX_W = 64;

  function automatic int col_inputs(input int col, input logic [MAX_W-1:0] a,
                                    input logic [MAX_W-1:0] c);
    int n [MAX_W];
    for (int i = 0; i <= col; i++) begin
      n[i] = 0;
      for (int j = 0; j <= i; j++) if (a[j]) n[i]++;
      if (c[i]) n[i]++;
      if (i >= 1 && n[i-1] >= 2) n[i]++;
      if (i >= 2 && n[i-2] >= 4) n[i]++;
    end
    return (col < 0) ? 0 : n[col];
  endfunction

endpackage
