// tb_bit_enroll: random and boundary pairs of calibrated values; the helper
// bit, the response bit and the strong-bit count are compared with a direct
// evaluation of the threshold rule (|a-b| > 2.0 is strong, bit = a > b).
`timescale 1ps/1ps
module tb_bit_enroll;
  logic clk = 1'b0, rst, clr, in_valid, out_valid, helper, bit_out;
  logic signed [15:0] roc_a, roc_b;
  logic [11:0] n_strong;
  int checks = 0, failures = 0;
  int exp_strong = 0;

  bit_enroll dut (.*);
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; in_valid = 1'b0; roc_a = '0; roc_b = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int a, b, diff;
      bit exp_h, exp_b;
      a = int'($urandom_range(0, 4000)) - 2000;
      case (t % 4)
        0: b = a + int'($urandom_range(0, 100)) - 50;
        1: b = a + ((t % 8 < 4) ? 32 : -32);      // exactly on a threshold (2.0)
        2: b = a + ((t % 8 < 4) ? 33 : -33);      // just outside
        default: b = int'($urandom_range(0, 4000)) - 2000;
      endcase
      roc_a = 16'(a); roc_b = 16'(b); in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      diff = a - b;
      exp_h = (diff > 32) || (diff < -32);
      exp_b = exp_h && (diff > 0);
      if (exp_h) exp_strong++;
      check(out_valid, "out_valid");
      check(helper == exp_h && bit_out == exp_b,
            $sformatf("a=%0d b=%0d helper=%0b bit=%0b", a, b, helper, bit_out));
      check(int'(n_strong) == exp_strong, "strong count");
      if (t == 1000) begin
        clr = 1'b1; @(negedge clk); clr = 1'b0;
        exp_strong = 0;
        check(n_strong == 0, "count cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
