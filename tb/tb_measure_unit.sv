// tb_measure_unit: the measure unit with eight model rings. Ring x toggles
// its pulse line with half-period HALF[x] while its ro_enable is high (one
// pulse per HALF[x] ps, as a real ring gives one pulse per edge). For each
// macro and for several runtimes the count must be runtime*10 ns / HALF[x]
// (+/-2), the enable window exactly runtime cycles, and only the selected
// macro enabled.
`timescale 1ps/1ps
module tb_measure_unit;
  import srpuf_pkg::*;
  localparam int unsigned HALF [N_MACROS] = '{2750, 2500, 3000, 2200, 4100, 1900, 2600, 3300};

  logic                clk = 1'b0, rst, go, en, done;
  logic [TIMER_W-1:0]  runtime;
  logic [MACRO_W-1:0]  macro_sel;
  logic [N_MACROS-1:0] pulses, ro_enable;
  logic [COUNT_W-1:0]  count;
  int checks = 0, failures = 0;
  int en_cycles, en_wrong;

  measure_unit dut (.*);
  always #5000 clk = ~clk;

  for (genvar x = 0; x < N_MACROS; x++) begin : g_ring
    initial begin
      pulses[x] = 1'b0;
      forever begin
        @(posedge ro_enable[x]);
        while (ro_enable[x]) begin
          #(HALF[x] - 300) pulses[x] = 1'b1;
          #300 pulses[x] = 1'b0;
        end
      end
    end
  end

  always @(negedge clk) begin
    if (ro_enable != '0) begin
      en_cycles++;
      if (ro_enable != (N_MACROS'(1) << macro_sel)) en_wrong++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rts [3] = '{512, 100, 2000};
    go = 1'b0; rst = 1'b1; runtime = '0; macro_sel = '0;
    repeat (3) @(negedge clk);
    foreach (rts[i]) begin
      for (int x = 0; x < N_MACROS; x++) begin
        int expect_n;
        rst = 1'b0; #100;
        rst = 1'b1; macro_sel = MACRO_W'(x); runtime = TIMER_W'(rts[i]);
        @(negedge clk); rst = 1'b0;
        check(count == 0, "count cleared by rst");
        en_cycles = 0; en_wrong = 0;
        go = 1'b1;
        while (!done) @(negedge clk);
        go = 1'b0;
        repeat (3) @(negedge clk);
        expect_n = rts[i] * 10000 / int'(HALF[x]);
        check((int'(count) - expect_n <= 2) && (expect_n - int'(count) <= 2),
              $sformatf("macro %0d runtime %0d count %0d expected %0d", x, rts[i], count, expect_n));
        check(en_cycles == rts[i], $sformatf("window %0d cycles", en_cycles));
        check(en_wrong == 0, "only the selected macro enabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
