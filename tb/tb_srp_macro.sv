// tb_srp_macro: one macro with its behavioural ring delay.
// 1. Scans random words into the CMB arrays and checks ro_out for every
//    RO_sel against the scanned word (all 16 SRLs share the scan-in lines),
//    and for every SR_sel.
// 2. Loads the alternating pattern, enables the ring with the selected bit at
//    1 and counts pulses over a fixed time: expected window / edge time of
//    that path from the reference delay model (+/-2).
// 3. Checks that the ring stops when ro_enable falls, and that a ring whose
//    selected bit is 0 does not start when enabled.
`timescale 1ps/1ps
module tb_srp_macro;
  import ro_model_pkg::*;
  localparam int unsigned PATH = 2800;  // upper bound of a ring edge, for settling waits
  logic       ctrl, cmb_data, cmb_clk, ro_enable, ro_out, pulse;
  logic [3:0] sr_sel;
  logic [4:0] ro_sel;
  logic [31:0] model;
  int checks = 0, failures = 0;
  int n_pulse = 0;

  srp_macro dut (.*);

  always @(posedge pulse) n_pulse++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input logic [31:0] w);
    ctrl = 1'b1; #100;
    for (int i = 0; i < 32; i++) begin
      cmb_data = w[i]; #500; cmb_clk = 1'b1; #500; cmb_clk = 1'b0; #500;
    end
    ctrl = 1'b0; #100;
    // first bit scanned ends at address 31
    for (int k = 0; k < 32; k++) model[k] = w[31-k];
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = 1'b1; cmb_data = 1'b0; cmb_clk = 1'b0; ro_enable = 1'b0;
    sr_sel = '0; ro_sel = '0;
    #10000;
    for (int rep = 0; rep < 3; rep++) begin
      load($urandom);
      for (int s = 0; s < 16; s += 5) begin
        sr_sel = 4'(s);
        for (int a = 0; a < 32; a++) begin
          ro_sel = 5'(a); #10;
          check(ro_out == model[a], $sformatf("ro_out sr %0d ro %0d", s, a));
        end
      end
    end
    check(n_pulse == 0, "no pulses while disabled");

    for (int t = 0; t < 6; t++) begin
      int  r, n0, expect_n;
      time window;
      r = int'($urandom_range(31));
      sr_sel = 4'($urandom_range(15));
      ro_sel = 5'(r);
      // put a 1 on the selected bit: bit i sent = phase ^ i[0], phase = r[0]
      begin
        logic [31:0] w;
        for (int i = 0; i < 32; i++) w[i] = r[0] ^ i[0];
        load(w);
      end
      check(ro_out == 1'b1, "selected bit is 1 before enable");
      window = 100_000 * (t + 1);
      n0 = n_pulse;
      ro_enable = 1'b1;
      #(window);
      ro_enable = 1'b0;
      #(3 * PATH);
      expect_n = int'(window / edge_ps(1, 0, int'(sr_sel), r));
      check((n_pulse - n0 - expect_n <= 2) && (expect_n - (n_pulse - n0) <= 2),
            $sformatf("ring %0d pulses, expected %0d", n_pulse - n0, expect_n));
      n0 = n_pulse;
      #(10 * PATH);
      check(n_pulse == n0, "ring stays stopped");
      begin
        logic [31:0] w;
        for (int i = 0; i < 32; i++) w[i] = ~r[0] ^ i[0];
        load(w);
      end
      check(ro_out == 1'b0, "selected bit is 0");
      n0 = n_pulse;
      ro_enable = 1'b1;
      #(10 * PATH);
      check(n_pulse == n0, "ring with selected bit 0 does not start");
      ro_enable = 1'b0;
      #1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
