// tb_cmb_init: captures what the pattern loader shifts into a model 32-bit
// register (on rising cmb_clk while ctrl is high) and checks, for both
// phases, that address k ends up holding phase ^ ~k[0], that exactly 32 shifts
// happen, that ctrl never changes while cmb_clk is high, that the load takes
// 2*32+3 cycles and that done is a single-cycle pulse.
`timescale 1ps/1ps
module tb_cmb_init;
  logic clk = 1'b0, rst, start, phase;
  logic ctrl, cmb_data, cmb_clk, busy, done;
  logic [31:0] reg_model;
  int n_shift;
  int checks = 0, failures = 0;

  cmb_init dut (.*);
  always #5000 clk = ~clk;

  always @(posedge cmb_clk) begin
    if (ctrl) begin
      reg_model = {reg_model[30:0], cmb_data};
      n_shift++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; phase = 1'b0; rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(ctrl == 1'b0 && busy == 1'b0, "idle after reset");
    for (int t = 0; t < 4; t++) begin
      int cyc, n_done;
      logic ctrl_prev;
      n_shift = 0;
      phase = t[0];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1; n_done = 0;
      ctrl_prev = ctrl;
      while (busy || n_done == 0) begin
        if (cmb_clk) check(ctrl == 1'b1, "ctrl high while cmb_clk high");
        @(negedge clk);
        if (done) n_done++;
        cyc++;
        if (cyc > 1000) break;
      end
      check(n_done == 1, "one done pulse");
      check(cyc == 2 * 32 + 3, $sformatf("load took %0d cycles", cyc));
      check(n_shift == 32, $sformatf("%0d shifts", n_shift));
      for (int k = 0; k < 32; k++)
        check(reg_model[k] == (phase ^ ~k[0]), $sformatf("phase %0b bit %0d", phase, k));
      @(negedge clk);
      check(done == 1'b0 && ctrl == 1'b0, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
