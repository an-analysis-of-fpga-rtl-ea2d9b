// tb_zscore_calib: compares the fixed-point calibration with a floating-point
// computation of mean, sample standard deviation (divisor N-1), z-score and
// rescaling, done here in real arithmetic. Three instances: the bit-generation
// setting (N=8, SIGMA_REF=46.3), the per-shift-register setting (N=32,
// SIGMA_REF=20.9) and a small group with a non-zero MU_REF. Each result must
// be within 1 LSB (1/16 count). Also checks a group of equal values (all
// results = MU_REF), saturation is never needed for these ranges, and the
// start-to-done latency of the default instance (474 cycles).
`timescale 1ps/1ps
module tb_zscore_calib;
  localparam int FRAC = 4;
  logic clk = 1'b0, rst;
  always #5000 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start8, busy8, done8;
  logic [19:0] vals8 [8];
  logic signed [15:0] roc8 [8];
  zscore_calib dut8 (.clk, .rst, .start(start8), .vals(vals8), .busy(busy8), .done(done8), .roc(roc8));

  logic        start32, busy32, done32;
  logic [19:0] vals32 [32];
  logic signed [15:0] roc32 [32];
  zscore_calib #(.N(32), .SIGMA_REF(20.9)) dut32 (.clk, .rst, .start(start32), .vals(vals32),
                                                 .busy(busy32), .done(done32), .roc(roc32));

  logic        start4, busy4, done4;
  logic [19:0] vals4 [4];
  logic signed [15:0] roc4 [4];
  zscore_calib #(.N(4), .SIGMA_REF(10.0), .MU_REF(-3.5)) dut4 (.clk, .rst, .start(start4),
                                                             .vals(vals4), .busy(busy4),
                                                             .done(done4), .roc(roc4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: returns the expected value in LSBs.
  function automatic real ref_val(input real v [], input int i, input real sigma_ref,
                                  input real mu_ref);
    real mu, var_sum, sd;
    int n;
    n = v.size();
    mu = 0.0;
    foreach (v[k]) mu += v[k];
    mu /= n;
    var_sum = 0.0;
    foreach (v[k]) var_sum += (v[k] - mu) * (v[k] - mu);
    sd = $sqrt(var_sum / (n - 1));
    if (sd == 0.0) return mu_ref * (1 << FRAC);
    return ((v[i] - mu) / sd * sigma_ref + mu_ref) * (1 << FRAC);
  endfunction

  function automatic bit close(input int got, input real expv);
    real e;
    e = real'(got) - expv;
    return (e <= 1.0) && (e >= -1.0);
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rv [];
    int lat;
    start8 = 0; start32 = 0; start4 = 0;
    foreach (vals8[i]) vals8[i] = '0;
    foreach (vals32[i]) vals32[i] = '0;
    foreach (vals4[i]) vals4[i] = '0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      int base, spread;
      base = 16 * int'($urandom_range(1500, 2400));
      spread = (t % 4 == 0) ? 3 : int'($urandom_range(20, 1500));
      foreach (vals8[i]) vals8[i] = 20'(base + int'($urandom_range(0, spread)));
      if (t == 5) foreach (vals8[i]) vals8[i] = 20'(base);   // no spread
      foreach (vals32[i]) vals32[i] = 20'(base + int'($urandom_range(0, spread)));
      foreach (vals4[i]) vals4[i] = 20'(base + int'($urandom_range(0, spread)));
      start8 = 1; start32 = 1; start4 = 1;
      @(negedge clk);
      start8 = 0; start32 = 0; start4 = 0;
      foreach (vals8[i]) vals8[i] = '1;      // inputs are captured at start
      lat = 1;
      while (!done8) begin @(negedge clk); lat++; end
      if (t != 5) check(lat == 474, $sformatf("latency %0d", lat));
      while (busy32 || busy4) @(negedge clk);
      // reference for N=8 (values restored from the capture)
      rv = new[8];
      foreach (rv[i]) rv[i] = real'(dut8.v[i]);
      foreach (roc8[i])
        check(close(int'(roc8[i]), ref_val(rv, i, 46.3, 0.0)),
              $sformatf("N=8 t=%0d i=%0d got %0d exp %f", t, i, roc8[i], ref_val(rv, i, 46.3, 0.0)));
      rv = new[32];
      foreach (rv[i]) rv[i] = real'(vals32[i]);
      foreach (roc32[i])
        check(close(int'(roc32[i]), ref_val(rv, i, 20.9, 0.0)),
              $sformatf("N=32 t=%0d i=%0d got %0d exp %f", t, i, roc32[i], ref_val(rv, i, 20.9, 0.0)));
      rv = new[4];
      foreach (rv[i]) rv[i] = real'(vals4[i]);
      foreach (roc4[i])
        check(close(int'(roc4[i]), ref_val(rv, i, 10.0, -3.5)),
              $sformatf("N=4 t=%0d i=%0d got %0d exp %f", t, i, roc4[i], ref_val(rv, i, 10.0, -3.5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
