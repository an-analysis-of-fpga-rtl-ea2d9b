// tb_srpuf_top: end-to-end test of the SR-PUF with every parameter at its
// default (eight macros, 4096 ROs, 16-bit counter, 23-bit timer).
//
// The processor side is modelled by tasks that write the two GPIO words and
// poll gpio_i. Each measurement selects one ring, runs it for the programmed
// window and reads the count. The expected count is the window divided by
// the ring's edge time from the reference delay model (ro_model_pkg, device
// seed 1), within +/-2. The test also checks the length of the enable window in cycles, that
// only the selected macro is enabled, that done/busy behave, that a soft reset
// clears the count, and that a changed runtime scales the count. Every
// mechanism (pattern load with both phases, all macros, runtime change, soft
// reset, counter wrap-around) is counted and must occur at least once.
`timescale 1ps/1ps
module tb_srpuf_top;
  import srpuf_pkg::*;
  import ro_model_pkg::*;

  localparam int unsigned CLK_PS = 10000;  // 100 MHz

  logic                clk = 1'b0;
  logic                rst;
  logic [31:0]         gpio_o;
  logic [31:0]         gpio_i;
  logic [N_MACROS-1:0] ro_enable;
  logic [COUNT_W-1:0]  count;

  int checks = 0;
  int failures = 0;
  int n_phase0 = 0, n_phase1 = 0, n_runtime_change = 0, n_soft_rst = 0;
  int n_wrap = 0;
  int macro_seen [N_MACROS];

  srpuf_top dut (.*);

  always #(CLK_PS/2) clk = ~clk;

  // Enable-window bookkeeping, sampled mid-cycle.
  int en_cycles;
  int en_other;
  int meas_sel;
  always @(negedge clk) begin
    if (ro_enable != '0) begin
      en_cycles++;
      if (ro_enable != (N_MACROS'(1) << meas_sel)) en_other++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_word(input logic [31:0] w);
    @(negedge clk) gpio_o = w;
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [31:0] ctrl_word(input bit srst, input bit go,
                                            input int m, input int s, input int r);
    return {18'b0, 5'(r), 4'(s), 3'(m), go, srst};
  endfunction

  task automatic measure(input int m, input int s, input int r, input int runtime,
                         input int exp_wrap);
    int   cyc;
    int   expect_cnt;
    int   got;
    meas_sel  = m;
    en_cycles = 0;
    en_other  = 0;
    write_word(ctrl_word(0, 0, m, s, r));
    write_word(ctrl_word(0, 1, m, s, r));
    cyc = 0;
    while (!gpio_i[16] && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check(gpio_i[16] == 1'b1, "done set");
    check(gpio_i[17] == 1'b0, "busy clear after done");
    got = int'(gpio_i[15:0]);
    expect_cnt = expected_count(runtime, edge_ps(1, m, s, r)) % (1 << COUNT_W);
    check((got - expect_cnt <= 2) && (expect_cnt - got <= 2),
          $sformatf("count macro %0d sr %0d ro %0d: got %0d expected %0d", m, s, r, got,
                    expect_cnt));
    check(en_cycles == runtime,
          $sformatf("enable window %0d cycles, expected %0d", en_cycles, runtime));
    check(en_other == 0, "only the selected macro is enabled");
    check(got == int'(count), "gpio_i count matches count port");
    if (r % 2 == 0) n_phase0++; else n_phase1++;
    macro_seen[m]++;
    if (exp_wrap != 0) n_wrap++;
    $display("measure m=%0d sr=%0d ro=%0d runtime=%0d count=%0d expected=%0d",
             m, s, r, runtime, got, expect_cnt);
    write_word(ctrl_word(0, 0, m, s, r));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (macro_seen[i]) macro_seen[i] = 0;
    meas_sel = 0;
    gpio_o = '0;
    rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    check(gpio_i[17:16] == 2'b00, "idle after reset");

    // Default window (512 cycles = 5.12 us): one ring in each macro.
    for (int m = 0; m < N_MACROS; m++)
      measure(m, (m * 5) % N_SR, (m * 7 + 3) % SRL_DEPTH, 512, 0);
    // Same ring twice in a row: must restart.
    measure(3, 15, 31, 512, 0);
    measure(3, 15, 31, 512, 0);
    measure(0, 0, 0, 512, 0);

    // Shorter window.
    write_word({1'b1, 8'b0, 23'd200});
    n_runtime_change++;
    measure(6, 9, 12, 200, 0);

    // Window long enough for the 16-bit counter to wrap (count > 65535).
    write_word({1'b1, 8'b0, 23'd18500});
    n_runtime_change++;
    measure(2, 4, 17, 18500, 1);

    // Soft reset clears the count and done.
    write_word(ctrl_word(1, 0, 0, 0, 0));
    check(gpio_i[15:0] == 16'd0, "soft reset clears count");
    check(gpio_i[16] == 1'b0, "soft reset clears done");
    n_soft_rst++;
    write_word(ctrl_word(0, 0, 0, 0, 0));
    write_word({1'b1, 8'b0, 23'd512});
    measure(7, 1, 30, 512, 0);

    check(n_phase0 > 0, "pattern loaded with phase 0");
    check(n_phase1 > 0, "pattern loaded with phase 1");
    check(n_runtime_change > 0, "runtime changed");
    check(n_soft_rst > 0, "soft reset used");
    check(n_wrap > 0, "counter wrap-around");
    foreach (macro_seen[i]) check(macro_seen[i] > 0, $sformatf("macro %0d measured", i));
    $display("mechanisms: phase0=%0d phase1=%0d runtime_changes=%0d soft_resets=%0d wraps=%0d",
             n_phase0, n_phase1, n_runtime_change, n_soft_rst, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
