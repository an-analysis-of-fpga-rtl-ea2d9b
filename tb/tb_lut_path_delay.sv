// tb_lut_path_delay: for every path of one macro (16 SRs x 32 addresses) and
// for two device seeds, toggles d and measures when q follows; the delay
// must equal the path delay of the independent reference (ro_model_pkg,
// with no common delay). Also checks that the delays of different paths are
// not all the same and that the path-length bias makes addresses 0-15 slower
// on average than 16-30.
`timescale 1ps/1ps
module tb_lut_path_delay;
  import ro_model_pkg::*;
  logic       d;
  logic [3:0] sr_sel;
  logic [4:0] ro_sel;
  logic       q_a, q_b;
  int checks = 0, failures = 0;

  lut_path_delay #(.MACRO(3), .CHIP_SEED(5)) dut_a (.d(d), .sr_sel(sr_sel), .ro_sel(ro_sel), .q(q_a));
  lut_path_delay #(.MACRO(6), .CHIP_SEED(9)) dut_b (.d(d), .sr_sel(sr_sel), .ro_sel(ro_sel), .q(q_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum_lo, sum_hi;
    int dmin, dmax;
    sum_lo = 0; sum_hi = 0; dmin = 1 << 30; dmax = 0;
    d = 1'b0; sr_sel = '0; ro_sel = '0;
    #2000;
    for (int y = 0; y < 16; y++) begin
      for (int z = 0; z < 32; z++) begin
        time t0, ta, tb;
        sr_sel = 4'(y); ro_sel = 5'(z);
        #2000;
        t0 = $time;
        d = ~d;
        ta = 0; tb = 0;
        fork
          begin @(q_a); ta = $time - t0; end
          begin @(q_b); tb = $time - t0; end
        join
        check(int'(ta) == edge_ps(5, 3, y, z, 0), $sformatf("seed 5 path %0d/%0d: %0t", y, z, ta));
        check(int'(tb) == edge_ps(9, 6, y, z, 0), $sformatf("seed 9 path %0d/%0d: %0t", y, z, tb));
        if (z < 16) sum_lo += ta; else if (z < 31) sum_hi += ta;
        if (int'(ta) < dmin) dmin = int'(ta);
        if (int'(ta) > dmax) dmax = int'(ta);
        #500;
      end
    end
    check(dmax > dmin, "paths differ");
    check(sum_lo * 15 > sum_hi * 16, "addresses 0-15 slower on average");
    $display("path delays %0d..%0d ps", dmin, dmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
