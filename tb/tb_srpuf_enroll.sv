// tb_srpuf_enroll: end-to-end test of the whole design through its GPIO
// interface. First single measurements (both pattern phases, all macros, a
// runtime change, a window long enough to wrap the 16-bit counter, a soft
// reset), each count checked against the ring delay model within +/-2 and
// each enable window checked to last exactly runtime cycles. Then one
// complete enrollment of the whole array, during which a single-measurement
// request is issued and must be ignored: 4096 rings, 512-cycle window, but 2 samples per ring
// instead of the default 16 to keep the run near one minute (the ring models
// have no noise, so further samples only repeat the same count; 16 samples
// take about eight minutes). The processor model starts the enrollment, polls the status word,
// then reads the 64 helper words and 64 response words.
//
// Reference, computed here independently of the design:
//   - every stored sample sum must be NS x the count predicted by the ring
//     delay model (ro_model_pkg), within +/-2 counts per sample;
//   - from the stored sums it recomputes, in floating point, the calibration
//     of each group of eight identically placed rings (mean, sample standard
//     deviation, rescaling to 0 +/- 46.3), the adjacent-pair differences and
//     the +/-2 thresholds, and compares helper and response bits with what
//     was read back (a difference within 0.25 of a threshold may go either
//     way, since the design works in 1/16-count steps);
//   - n_strong in the status word must equal the number of helper ones.
// Every mechanism (both phases, every macro, runtime change, counter wrap,
// soft reset, ignored request, enrollment, strong and weak pairs, ones and
// zeros) is counted and must occur at least once.
`timescale 1ps/1ps
module tb_srpuf_enroll;
  import srpuf_pkg::*;
  import ro_model_pkg::*;

  localparam int N_RO = N_MACROS * N_SR * SRL_DEPTH;
  localparam int N_PAIR = N_RO / 2;
  localparam int NS = 2;

  logic                clk = 1'b0;
  logic                rst;
  logic [31:0]         gpio_o;
  logic [31:0]         gpio_i;
  logic [N_MACROS-1:0] ro_enable;
  logic [COUNT_W-1:0]  count;
  int checks = 0, failures = 0;
  int n_phase0 = 0, n_phase1 = 0, n_runtime_change = 0, n_soft_rst = 0;
  int n_wrap = 0, n_ignored = 0, n_enroll = 0;
  int macro_seen [N_MACROS];
  int en_cycles, en_other, meas_sel;

  srpuf_top #(.N_SAMPLES(NS)) dut (.*);
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic write_word(input logic [31:0] w);
    @(negedge clk) gpio_o = w;
    repeat (3) @(negedge clk);
  endtask

  always @(negedge clk) begin
    if (ro_enable != '0) begin
      en_cycles++;
      if (ro_enable != (N_MACROS'(1) << meas_sel)) en_other++;
    end
  end

  function automatic logic [31:0] ctrl_word(input bit srst, input bit go,
                                            input int m, input int s, input int r);
    return {18'b0, 5'(r), 4'(s), 3'(m), go, srst};
  endfunction

  task automatic measure(input int m, input int s, input int r, input int runtime);
    int cyc, expect_cnt, got;
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
    check(gpio_i[16] == 1'b1 && gpio_i[17] == 1'b0, "measurement done");
    got = int'(gpio_i[15:0]);
    expect_cnt = expected_count(runtime, edge_ps(1, m, s, r));
    if (expect_cnt >= (1 << COUNT_W)) n_wrap++;
    expect_cnt = expect_cnt % (1 << COUNT_W);
    check((got - expect_cnt <= 2) && (expect_cnt - got <= 2),
          $sformatf("count m%0d s%0d r%0d: got %0d expected %0d", m, s, r, got, expect_cnt));
    check(en_cycles == runtime, $sformatf("enable window %0d cycles", en_cycles));
    check(en_other == 0, "only the selected macro is enabled");
    if (r % 2 == 0) n_phase0++; else n_phase1++;
    macro_seen[m]++;
    write_word(ctrl_word(0, 0, m, s, r));
  endtask

  initial begin : watchdog
    repeat (50_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_PAIR-1:0] helper, resp;
    real roc [N_RO];
    int n_strong_read, n_ones, n_weak, n_near, n_sum_bad, status_strong;
    longint cyc;
    gpio_o = '0;
    rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    foreach (macro_seen[i]) macro_seen[i] = 0;
    meas_sel = 0;

    // Single measurements.
    for (int m = 0; m < N_MACROS; m++) measure(m, (3 * m) % N_SR, (5 * m + 2) % SRL_DEPTH, 512);
    write_word({2'b10, 7'b0, 23'd300});
    n_runtime_change++;
    measure(5, 11, 7, 300);
    write_word({2'b10, 7'b0, 23'd18200});
    n_runtime_change++;
    measure(1, 2, 28, 18200);
    write_word(ctrl_word(1, 0, 0, 0, 0));
    check(gpio_i[16:0] == 17'd0, "soft reset clears count and done");
    n_soft_rst++;
    write_word(ctrl_word(0, 0, 0, 0, 0));
    write_word({2'b10, 7'b0, 23'd512});

    // Enrollment, with an ignored single-measurement request in the middle.
    write_word(32'h0000_4000);      // enroll bit 0 -> 1
    write_word(32'h0000_0000);
    repeat (20000) @(negedge clk);
    write_word(ctrl_word(0, 1, 7, 15, 31));
    write_word(ctrl_word(0, 0, 7, 15, 31));
    n_ignored++;
    cyc = 0;
    while (!gpio_i[19]) begin
      @(negedge clk);
      cyc++;
      if (cyc % 5_000_000 == 0) $display("enrolling, %0d cycles", cyc);
    end
    n_enroll++;
    check(gpio_i[18] == 1'b0, "enrollment not busy when done");
    status_strong = int'(gpio_i[31:20]);
    $display("enrollment took %0d cycles", cyc);

    for (int w = 0; w < 128; w++) begin
      write_word(32'hC000_0000 | w);
      if (w < 64) helper[32*w +: 32] = gpio_i;
      else        resp[32*(w-64) +: 32] = gpio_i;
    end
    write_word(32'h0000_0000);
    check(int'(gpio_i[31:20]) == status_strong, "status word back after control word");

    // Stored sums against the delay model.
    n_sum_bad = 0;
    for (int i = 0; i < N_RO; i++) begin
      int x, y, z, e, got;
      x = i >> 9; y = (i >> 5) & 15; z = i & 31;
      e = NS * expected_count(512, edge_ps(1, x, y, z));
      got = int'(dut.u_enroll.sum_mem[i]);
      if (got - e > 2 * NS || e - got > 2 * NS) n_sum_bad++;
    end
    check(n_sum_bad == 0, $sformatf("%0d sample sums off the delay model", n_sum_bad));

    // Calibration of each group of eight, in floating point.
    for (int g = 0; g < N_RO / N_MACROS; g++) begin
      real v [N_MACROS];
      real mu, ss, sd;
      mu = 0.0;
      for (int x = 0; x < N_MACROS; x++) begin
        v[x] = real'(dut.u_enroll.sum_mem[(x << 9) | g]);
        mu += v[x];
      end
      mu /= N_MACROS;
      ss = 0.0;
      for (int x = 0; x < N_MACROS; x++) ss += (v[x] - mu) * (v[x] - mu);
      sd = $sqrt(ss / (N_MACROS - 1));
      for (int x = 0; x < N_MACROS; x++)
        roc[(x << 9) | g] = (sd == 0.0) ? 0.0 : (v[x] - mu) / sd * 46.3;
    end

    n_strong_read = 0; n_ones = 0; n_weak = 0; n_near = 0;
    for (int p = 0; p < N_PAIR; p++) begin
      real d;
      bit exp_h, exp_b;
      d = roc[2*p] - roc[2*p+1];
      exp_h = (d > 2.0) || (d < -2.0);
      exp_b = exp_h && (d > 0.0);
      if (helper[p]) n_strong_read++; else n_weak++;
      if (helper[p] && resp[p]) n_ones++;
      if ((d > 1.75 && d < 2.25) || (d < -1.75 && d > -2.25)) n_near++;
      else check(helper[p] == exp_h && resp[p] == exp_b,
                 $sformatf("pair %0d: d=%f helper=%0b bit=%0b", p, d, helper[p], resp[p]));
    end
    check(n_strong_read == status_strong, "n_strong matches helper ones");
    check(n_strong_read > 0, "strong pairs occur");
    check(n_weak > 0, "weak pairs occur");
    check(n_ones > 0 && n_ones < n_strong_read, "ones and zeros in the strong bits");
    check(n_phase0 > 0 && n_phase1 > 0, "both pattern phases used");
    foreach (macro_seen[i]) check(macro_seen[i] > 0, $sformatf("macro %0d measured", i));
    check(n_runtime_change > 0, "runtime changed");
    check(n_wrap > 0, "counter wrapped");
    check(n_soft_rst > 0, "soft reset used");
    check(n_ignored > 0 && n_enroll > 0, "request during enrollment, enrollment");
    $display("mechanisms: phase0=%0d phase1=%0d runtime_changes=%0d wraps=%0d soft_resets=%0d ignored=%0d enrollments=%0d",
             n_phase0, n_phase1, n_runtime_change, n_wrap, n_soft_rst, n_ignored, n_enroll);
    $display("strong=%0d weak=%0d ones among strong=%0d near-threshold=%0d",
             n_strong_read, n_weak, n_ones, n_near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
