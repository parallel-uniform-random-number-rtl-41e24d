// tb_lcg_parallel: end-to-end, full-size testbench of the parallel generator
// (default parameters: W = 32, ten modules, A = 136314881, C = 18433).
//
// Runs 10000 clocks, i.e. 100000 consecutive numbers, and checks each one
// against the testbench's own multiply-add reference f(x) = A*x + C mod 2^32:
//   - within a clock, rnd[k] = f(rnd[k-1]) down the whole chain;
//   - across clocks, rnd[0] = f(previous rnd[9]) (feedback to the register),
//     so the 100000 numbers are one unbroken sequence;
//   - ten new numbers arrive on every clock edge (rate check);
//   - reset gives rnd[0] = f(SEED), and load restarts the sequence at a seed;
//   - the top 4 bits of the 100000 numbers fill 16 hist evenly (each bin
//     within 2 % of 6250).
// Each mechanism (reset, seed load, chain, feedback) is counted and a
// failure is recorded for one that never happened.
module tb_lcg_parallel;
  localparam int N = 10;
  localparam logic [31:0] A    = 32'd136314881;
  localparam logic [31:0] C    = 32'd18433;
  localparam logic [31:0] SEED = 32'd1;
  localparam int CYCLES = 10000;

  logic                clk;
  logic                rst_n;
  logic                load;
  logic [31:0]         seed;
  logic [N-1:0][31:0]  rnd;
  int checks = 0;
  int failures = 0;
  int cycles;
  int n_reset = 0, n_load = 0, n_chain = 0, n_feedback = 0;
  int hist [16];

  lcg_parallel dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .rnd(rnd));

  initial begin
    clk    = 1'b0;
    cycles = 0;
    forever begin
      #10 clk = 1'b1;   // 20 ns period, as on the target board
      cycles++;
      #10 clk = 1'b0;
    end
  end

  initial begin : watchdog
    wait (cycles == CYCLES + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] f(input logic [31:0] x);
    return A * x + C;
  endfunction

  task automatic expect_eq(input string what, input int k, input logic [31:0] got,
                           input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s [%0d] got=%h exp=%h", what, k, got, exp);
    end
  endtask

  // Check one clock's worth of numbers, given the number that precedes them.
  task automatic check_block(input logic [31:0] prev);
    logic [31:0] e;
    e = prev;
    for (int k = 0; k < N; k++) begin
      e = f(e);
      expect_eq("rnd", k, rnd[k], e);
      hist[rnd[k][31:28]]++;
    end
    n_chain++;
  endtask

  initial begin
    logic [31:0] last;
    int start_cycle, total;
    foreach (hist[i]) hist[i] = 0;
    rst_n = 1'b0;
    load  = 1'b0;
    seed  = '0;
    @(posedge clk);
    #1;
    expect_eq("reset", 0, rnd[0], f(SEED));
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;

    // Restart from a chosen seed.
    seed = 32'h1234_5678;
    load = 1'b1;
    @(posedge clk);
    #1;
    load = 1'b0;
    n_load++;
    check_block(32'h1234_5678);
    last = rnd[N-1];

    // 10000 clocks of free running, ten numbers each.
    start_cycle = cycles;
    total = 0;
    for (int c = 1; c < CYCLES; c++) begin
      @(posedge clk);
      #1;
      check_block(last);
      n_feedback++;
      total += N;
      last = rnd[N-1];
    end
    total += N;
    checks++;
    if (cycles - start_cycle != CYCLES - 1) begin
      failures++;
      $display("FAIL rate: %0d numbers took %0d clocks", total, cycles - start_cycle + 1);
    end

    // Histogram of the top four bits over all 100000 numbers.
    foreach (hist[i]) begin
      checks++;
      if (hist[i] < 6125 || hist[i] > 6375) begin
        failures++;
        $display("FAIL histogram bin %0d holds %0d", i, hist[i]);
      end
    end

    // Reset again mid-run.
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    expect_eq("reset again", 0, rnd[0], f(SEED));
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    // The register took rnd[N-1] = f^N(SEED) on this edge.
    last = SEED;
    for (int k = 0; k < N; k++) last = f(last);
    check_block(last);
    n_feedback++;

    $display("numbers=%0d reset=%0d load=%0d chain=%0d feedback=%0d",
             total, n_reset, n_load, n_chain, n_feedback);
    if (n_reset == 0 || n_load == 0 || n_chain == 0 || n_feedback == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
