// tb_sum4: exhaustive self-checking testbench for the 4-input column
// summator. For every one of the 2^4 input patterns it counts the ones with
// $countones and checks Yw = bit 0, Pw = bit 1, Rw = bit 2 of that count.
// Combinational: each pattern is held for one time unit before checking.
module tb_sum4;
  logic [3:0] in;
  logic y, p, r;
  int checks = 0;
  int failures = 0;

  sum4 dut (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .y(y), .p(p), .r(r));


  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] cnt;
    logic exp_r;
    for (int v = 0; v < (1 << 4); v++) begin
      in = 4'(v);
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
