// tb_lcg_gen: self-checking testbench for the registered generator module
// used on its own (d tied to y), i.e. the single 32-bit generator that
// delivers one number per clock.
//
// Checks, against the testbench's own multiply-add reference:
//   - after reset the register holds SEED and y = f(SEED);
//   - 1000 consecutive numbers, one per clock edge, each f() of the last;
//   - the low bit alternates every clock (A and C are both odd);
//   - load replaces the state with the seed on the next edge, and the
//     sequence continues from there;
//   - an asynchronous reset mid-run returns the register to SEED.
module tb_lcg_gen;
  localparam logic [31:0] A    = 32'd136314881;
  localparam logic [31:0] C    = 32'd18433;
  localparam logic [31:0] SEED = 32'd1;

  logic        clk;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [31:0] seed = '0;
  logic [31:0] q, y;
  int checks = 0;
  int failures = 0;
  int cycles;

  lcg_gen dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .d(y), .q(q), .y(y));

  initial begin
    clk    = 1'b0;
    cycles = 0;
    forever begin
      #10 clk = 1'b1;   // 20 ns clock period
      cycles++;
      #10 clk = 1'b0;
    end
  end

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] f(input logic [31:0] x);
    return A * x + C;
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // Run n clocks and check every number against the reference.
  task automatic run_and_check(input int n);
    logic [31:0] ref_x;
    ref_x = q;
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #1;
      ref_x = f(ref_x);
      expect_eq("state", q, ref_x);
      expect_eq("output", y, f(ref_x));
      checks++;
      if (y[0] === q[0]) begin  // parity must alternate from one number to the next
        failures++;
        $display("FAIL parity q=%h y=%h", q, y);
      end
    end
  endtask

  initial begin
    #25;
    expect_eq("reset state", q, SEED);
    expect_eq("reset output", y, f(SEED));
    rst_n = 1'b1;
    run_and_check(1000);

    // Load a new seed.
    @(negedge clk);
    seed = 32'hDEAD_BEEF;
    load = 1'b1;
    @(posedge clk);
    #1;
    load = 1'b0;
    expect_eq("loaded state", q, 32'hDEAD_BEEF);
    expect_eq("loaded output", y, f(32'hDEAD_BEEF));
    run_and_check(200);

    // Asynchronous reset in the middle of a clock period.
    @(negedge clk);
    #3 rst_n = 1'b0;
    #1;
    expect_eq("async reset", q, SEED);
    @(negedge clk);
    rst_n = 1'b1;
    run_and_check(50);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
