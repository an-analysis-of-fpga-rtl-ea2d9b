// tb_srl32: checks the shift-register LUT against a reference model.
// A random 32-bit word is scanned in through cmb_data/cmb_clk with ctrl=1
// (pulse edges must be ignored meanwhile), every address is read back, then
// with ctrl=0 ring pulses rotate the contents (cmb_clk edges must be ignored),
// and an alternating pattern is checked to toggle every bit on each pulse.
`timescale 1ps/1ps
module tb_srl32;
  logic       ctrl, cmb_data, cmb_clk, pulse;
  logic [4:0] addr;
  logic       out, q31;
  logic [31:0] model;
  int checks = 0, failures = 0;

  srl32 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_all(input string phase);
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a);
      #10;
      check(out == model[a], $sformatf("%s addr %0d out=%0b model=%0b", phase, a, out, model[a]));
    end
    check(q31 == model[31], {phase, " q31"});
  endtask

  task automatic cmb_shift(input logic b);
    cmb_data = b; #50;
    cmb_clk = 1'b1; #50;
    cmb_clk = 1'b0; #50;
    model = {model[30:0], b};
  endtask

  task automatic ring_pulse();
    pulse = 1'b1; #50;
    pulse = 1'b0; #50;
    model = {model[30:0], model[31]};
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] word;
    ctrl = 1'b1; cmb_data = 1'b0; cmb_clk = 1'b0; pulse = 1'b0; addr = '0;
    #100;
    for (int rep = 0; rep < 4; rep++) begin
      ctrl = 1'b1; #20;
      word = $urandom;
      for (int i = 0; i < 32; i++) begin
        cmb_shift(word[i]);
        if (i == 5) begin   // a ring pulse in configuration mode does nothing
          pulse = 1'b1; #50; pulse = 1'b0; #50;
        end
      end
      read_all("loaded");
      ctrl = 1'b0; #20;
      for (int p = 0; p < 7; p++) ring_pulse();
      cmb_clk = 1'b1; #50; cmb_clk = 1'b0; #50;  // ignored in ring mode
      read_all("rotated");
    end
    // Alternating pattern: every pulse toggles every bit.
    ctrl = 1'b1; #20;
    for (int i = 0; i < 32; i++) cmb_shift(i[0]);
    ctrl = 1'b0; #20;
    for (int p = 0; p < 5; p++) begin
      logic [31:0] prev;
      prev = model;
      ring_pulse();
      check(model == ~prev, "alternating pattern toggles");
      read_all("alternating");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
