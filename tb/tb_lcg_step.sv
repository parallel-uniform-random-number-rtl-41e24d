// tb_lcg_step: self-checking testbench for the combinational generator step.
//
// Checks y = (A * x + C) mod 2^W against the testbench's own multiply-add for
//   - the default 32-bit module (A = 136314881, C = 18433): 20000 random x
//     plus the corner values 0 and all-ones;
//   - the 8-bit worked example A = 41, C = 5: all 256 values of x;
//   - every other (A, C) pair of the parameter survey (three set bits each),
//     2000 random x per pair, to show the column builder handles any of them.
module tb_lcg_step;
  localparam int NPAIRS = 8;
  localparam logic [31:0] PA [NPAIRS] = '{
    (1 << 11) | (1 << 5)  | 1, (1 << 19) | (1 << 9)  | 1,
    (1 << 18) | (1 << 9)  | 1, (1 << 30) | (1 << 13) | 1,
    (1 << 21) | (1 << 12) | 1, (1 << 29) | (1 << 15) | 1,
    (1 << 30) | (1 << 13) | 1, (1 << 30) | (1 << 19) | 1};
  localparam logic [31:0] PC [NPAIRS] = '{
    (1 << 3)  | (1 << 2)  | 1, (1 << 18) | (1 << 1)  | 1,
    (1 << 19) | (1 << 6)  | 1, (1 << 12) | (1 << 1)  | 1,
    (1 << 19) | (1 << 6)  | 1, (1 << 30) | (1 << 13) | 1,
    (1 << 20) | (1 << 17) | 1, (1 << 20) | (1 << 17) | 1};

  int checks = 0;
  int failures = 0;

  logic [31:0] x32, y32;
  logic [7:0]  x8, y8;
  logic [31:0] xs [NPAIRS];
  logic [31:0] ys [NPAIRS];

  lcg_step dut (.x(x32), .y(y32));
  lcg_step #(.W(8), .A(8'd41), .C(8'd5)) dut8 (.x(x8), .y(y8));

  for (genvar g = 0; g < NPAIRS; g++) begin : g_pair
    lcg_step #(.W(32), .A(PA[g]), .C(PC[g])) u (.x(xs[g]), .y(ys[g]));
  end

  task automatic check32(input logic [31:0] x);
    logic [31:0] exp;
    x32 = x;
    #1;
    exp = 32'd136314881 * x + 32'd18433;
    checks++;
    if (y32 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL default x=%h y=%h exp=%h", x, y32, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e8;
    check32('0);
    check32('1);
    for (int i = 0; i < 20000; i++) check32($urandom);

    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      e8 = 8'(41 * v + 5);
      checks++;
      if (y8 !== e8) begin
        failures++;
        $display("FAIL 8-bit x=%0d y=%0d exp=%0d", v, y8, e8);
      end
    end

    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < NPAIRS; k++) xs[k] = (i == 0) ? '1 : $urandom;
      #1;
      for (int k = 0; k < NPAIRS; k++) begin
        checks++;
        if (ys[k] !== PA[k] * xs[k] + PC[k]) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d x=%h y=%h", k, xs[k], ys[k]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
