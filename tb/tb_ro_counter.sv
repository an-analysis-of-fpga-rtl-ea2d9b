// tb_ro_counter: counts random numbers of pulses, checks asynchronous clear
// and the wrap-around at 2^16.
`timescale 1ps/1ps
module tb_ro_counter;
  logic        pulse, clr;
  logic [15:0] count;
  int checks = 0, failures = 0;

  ro_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin pulse = 1'b1; #100; pulse = 1'b0; #100; end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse = 1'b0; clr = 1'b0; #10; clr = 1'b1; #100; clr = 1'b0; #100;
    check(count == 0, "cleared");
    for (int t = 0; t < 10; t++) begin
      int n;
      n = int'($urandom_range(3000));
      clr = 1'b1; #50; clr = 1'b0; #50;
      check(count == 0, "clear without clock");
      pulses(n);
      check(count == 16'(n), $sformatf("count %0d expected %0d", count, n));
    end
    clr = 1'b1; #50; clr = 1'b0; #50;
    pulses(65536 + 17);
    check(count == 16'd17, $sformatf("wrap: count %0d expected 17", count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
