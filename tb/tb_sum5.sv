// tb_sum5: exhaustive self-checking testbench for the 5-input column
// summator. For every one of the 2^5 input patterns it counts the ones with
// $countones and checks Yw = bit 0, Pw = bit 1, Rw = bit 2 of that count.
// Combinational: each pattern is held for one time unit before checking.
module tb_sum5;
  logic [4:0] in;
  logic y, p, r;
  int checks = 0;
  int failures = 0;

  sum5 dut (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]), .y(y), .p(p), .r(r));


  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] cnt;
    logic exp_r;
    for (int v = 0; v < (1 << 5); v++) begin
      in = 5'(v);
      #1;
      cnt = 3'($countones(in));
      exp_r = cnt[2];
      checks++;
      if ({r, p, y} !== {exp_r, cnt[1], cnt[0]}) begin
        failures++;
        $display("FAIL in=%b count=%0d got r=%b p=%b y=%b", in, cnt, r, p, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
