// lcg_step: one combinational step of the linear congruential generator,
// y = (A * x + C) mod 2^W, built from column summators only.
//
// How it works: because A and C have few set bits, A * x + C is a sum of a
// few shifted copies of x plus a constant. For each result bit i the module
// collects every one-bit term of that column: x[i-j] for each set bit A[j]
// (j <= i), a constant 1 where C[i] = 1, the carry Pw of column i-1 and the
// carry Rw of column i-2. It feeds them to the summator of matching size
// (sum2 .. sum6); the summator's Yw is y[i]. Carries out of bit W-1 are
// dropped, which is the mod 2^W; those carry signals of the top columns are
// left unread, which lint reports as unused. A column with a single term passes it
// through. The default A = 2^27 + 2^21 + 1 and C = 2^14 + 2^11 + 1 need
// columns of two to five terms. Parameters whose columns would need more
// than six terms are rejected at elaboration.
//
// Interface: x in, y out, W bits each. No clock: y settles a gate delay
// chain after x changes (the carry ripples through the column summators).
//
// The summator cells and the choice of A, C, W follow the source design;
// the generic column-building rule (which carry goes where) and the
// elaboration-time check are this design's own.
module lcg_step
  import lcg_pkg::*;
#(
  parameter int unsigned     W = WORD_W,
  parameter logic [W-1:0]    A = W'(MULT_A),
  parameter logic [W-1:0]    C = W'(INCR_C)
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  if (W > MAX_W) begin : g_bad_width
    $error("lcg_step: W=%0d exceeds %0d", W, MAX_W);
  end

  for (genvar i = 0; i < W; i++) begin : g_col
    localparam int NI   = col_inputs(i, MAX_W'(A), MAX_W'(C));
    localparam int NP   = (i >= 1) ? col_inputs(i - 1, MAX_W'(A), MAX_W'(C)) : 0;
    localparam int NR   = (i >= 2) ? col_inputs(i - 2, MAX_W'(A), MAX_W'(C)) : 0;
    localparam bit HAS_P = (NP >= 2);  // column i-1 sends a Pw carry here
    localparam bit HAS_R = (NR >= 4);  // column i-2 sends an Rw carry here

    localparam int TW = (NI > 0) ? NI : 1;
    logic [TW-1:0]        terms;
    logic                 p_in, r_in;
    logic                 p, r;   // carries leaving this column

    if (HAS_P) begin : g_p
      assign p_in = g_col[i-1].p;
    end else begin : g_no_p
      assign p_in = 1'b0;
    end
    if (HAS_R) begin : g_r
      assign r_in = g_col[i-2].r;
    end else begin : g_no_r
      assign r_in = 1'b0;
    end

    // Pack the column's terms into the low NI bits of 'terms'.
    always_comb begin
      int k;
      terms = '0;
      k     = 0;
      for (int j = 0; j <= i; j++) begin
        if (A[j]) begin
          terms[k] = x[i-j];
          k++;
        end
      end
      if (C[i]) begin
        terms[k] = 1'b1;
        k++;
      end
      if (HAS_P) begin
        terms[k] = p_in;
        k++;
      end
      if (HAS_R) begin
        terms[k] = r_in;
      end
    end

    if (NI == 0) begin : g_n0
      assign y[i] = 1'b0;
      assign p    = 1'b0;
      assign r    = 1'b0;
    end else if (NI == 1) begin : g_n1
      assign y[i] = terms[0];
      assign p    = 1'b0;
      assign r    = 1'b0;
    end else if (NI == 2) begin : g_n2
      sum2 u_sum (.a(terms[0]), .b(terms[1]), .y(y[i]), .p(p));
      assign r = 1'b0;
    end else if (NI == 3) begin : g_n3
      sum3 u_sum (.a(terms[0]), .b(terms[1]), .c(terms[2]), .y(y[i]), .p(p));
      assign r = 1'b0;
    end else if (NI == 4) begin : g_n4
      sum4 u_sum (.a(terms[0]), .b(terms[1]), .c(terms[2]), .d(terms[3]),
                  .y(y[i]), .p(p), .r(r));
    end else if (NI == 5) begin : g_n5
      sum5 u_sum (.a(terms[0]), .b(terms[1]), .c(terms[2]), .d(terms[3]),
                  .e(terms[4]), .y(y[i]), .p(p), .r(r));
    end else if (NI == 6) begin : g_n6
      sum6 u_sum (.a(terms[0]), .b(terms[1]), .c(terms[2]), .d(terms[3]),
                  .e(terms[4]), .f(terms[5]), .y(y[i]), .p(p), .r(r));
    end else begin : g_too_many
      $error("lcg_step: column %0d needs %0d terms, more than %0d", i, NI, MAX_TERMS);
    end
  end

endmodule
