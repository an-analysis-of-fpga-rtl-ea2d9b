// tb_ro_timer: for random runtimes checks that en rises one cycle after go,
// stays high for exactly runtime cycles, that done follows, and that the
// window does not reopen while go stays high; runtime 0 gives no window.
`timescale 1ps/1ps
module tb_ro_timer;
  logic        clk = 1'b0, rst, go;
  logic [22:0] runtime, timer;
  logic        en, done;
  int checks = 0, failures = 0;

  ro_timer dut (.*);
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rts [6] = '{512, 1, 0, 7, 3000, 65};
    go = 1'b0; runtime = '0; rst = 1'b1;
    repeat (2) @(negedge clk);
    foreach (rts[i]) begin
      int n_en, first;
      rst = 1'b1; runtime = 23'(rts[i]);
      @(negedge clk); rst = 1'b0;
      @(negedge clk);
      check(en == 1'b0 && done == 1'b0, "idle before go");
      go = 1'b1;
      @(negedge clk);
      check(en == (rts[i] != 0), "en one cycle after go");
      n_en = 0;
      repeat (rts[i] + 50) begin
        if (en) n_en++;
        @(negedge clk);
      end
      check(n_en == rts[i], $sformatf("window %0d cycles, expected %0d", n_en, rts[i]));
      check(done == 1'b1 && en == 1'b0, "done after window");
      check(timer == 23'(rts[i]), "timer stops at runtime");
      go = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
