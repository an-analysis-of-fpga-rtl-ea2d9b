// tb_puf_enroll: the enrollment engine alone, with default parameters (16
// samples per ring), against a model measurement sequencer that answers each
// request a few cycles later with a count taken from a table built here:
// count(ring, sample) = per-ring value + sample-dependent jitter of 0..3.
// The reference recomputes the sample sums, the floating-point calibration of
// each group of eight (mean, sample standard deviation, 0 +/- 46.3) and the
// +/-2 thresholding of adjacent pairs, and compares all 2048 helper and
// response bits read through rd_word/rd_data (differences within 0.25 of a
// threshold may go either way). A second engine with the vertical pairing
// (same ring of macros x and x+1) is checked the same way. It also checks the order of the requested
// addresses, the number of requests, n_strong, and busy/done.
`timescale 1ps/1ps
module tb_puf_enroll;
  import srpuf_pkg::*;
  localparam int N_RO = 4096;
  localparam int N_PAIR = 2048;
  localparam int NS = 16;

  logic clk = 1'b0, rst, start, meas_start, meas_done, meas_busy;
  ro_addr_t meas_addr;
  logic [COUNT_W-1:0] count;
  logic [6:0] rd_word;
  logic [31:0] rd_data;
  logic busy, done;
  logic [11:0] n_strong;
  int checks = 0, failures = 0;

  puf_enroll dut (.*);

  // Same engine with the vertical pairing; it issues the same requests at the
  // same times, so it shares the model sequencer.
  logic [31:0] rd_data_v;
  logic        busy_v, done_v;
  logic [11:0] n_strong_v;
  logic        meas_start_v;
  ro_addr_t    meas_addr_v;
  puf_enroll #(.VERTICAL(1'b1)) dut_v (
    .clk, .rst, .start, .meas_start(meas_start_v), .meas_addr(meas_addr_v),
    .meas_done, .meas_busy, .count, .rd_word, .rd_data(rd_data_v),
    .busy(busy_v), .done(done_v), .n_strong(n_strong_v)
  );
  always #5000 clk = ~clk;

  int base [N_RO];
  int sums [N_RO];
  int n_req = 0, n_order_bad = 0;

  function automatic int jitter(input int ring, input int smp);
    return (ring * 7 + smp * 3) % 4;
  endfunction

  // Model sequencer: busy for 5 cycles after a request, then done with count.
  int resp_cnt = 0;
  int cur_ring, cur_smp;
  always @(posedge clk) begin
    if (rst) begin
      meas_done <= 1'b1; meas_busy <= 1'b0; resp_cnt <= 0;
    end else if (meas_start) begin
      cur_ring = int'(meas_addr);
      cur_smp  = n_req % NS;
      if (cur_ring != n_req / NS) n_order_bad++;
      n_req++;
      meas_done <= 1'b0; meas_busy <= 1'b1; resp_cnt <= 5;
    end else if (resp_cnt > 1) begin
      resp_cnt <= resp_cnt - 1;
    end else if (resp_cnt == 1) begin
      resp_cnt <= 0;
      meas_busy <= 1'b0; meas_done <= 1'b1;
      count <= COUNT_W'(base[cur_ring] + jitter(cur_ring, cur_smp));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_PAIR-1:0] helper, resp, helper_v, resp_v;
    real roc [N_RO];
    int n_h, n_near;
    for (int i = 0; i < N_RO; i++) begin
      // chip/design offsets per SR, path bias per RO, random part per ring
      base[i] = 1700 + 37 * ((i >> 5) % 5) + 3 * (i % 7) + int'($urandom_range(0, 30));
      sums[i] = 0;
      for (int k = 0; k < NS; k++) sums[i] += base[i] + jitter(i, k);
    end
    start = 1'b0; rd_word = '0; count = '0; rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    check(!busy, "not busy when done");
    check(n_req == N_RO * NS, $sformatf("%0d measurement requests", n_req));
    check(n_order_bad == 0, "rings measured in order, NS samples each");
    for (int i = 0; i < N_RO; i++)
      check(int'(dut.sum_mem[i]) == sums[i], $sformatf("sum of ring %0d", i));

    for (int w = 0; w < 128; w++) begin
      rd_word = 7'(w);
      #1;
      if (w < 64) begin helper[32*w +: 32] = rd_data; helper_v[32*w +: 32] = rd_data_v; end
      else begin resp[32*(w-64) +: 32] = rd_data; resp_v[32*(w-64) +: 32] = rd_data_v; end
    end

    for (int g = 0; g < 512; g++) begin
      real mu, ss, sd;
      mu = 0.0;
      for (int x = 0; x < 8; x++) mu += real'(sums[(x << 9) | g]);
      mu /= 8.0;
      ss = 0.0;
      for (int x = 0; x < 8; x++) ss += (real'(sums[(x << 9) | g]) - mu) ** 2;
      sd = $sqrt(ss / 7.0);
      for (int x = 0; x < 8; x++)
        roc[(x << 9) | g] = (sd == 0.0) ? 0.0 : (real'(sums[(x << 9) | g]) - mu) / sd * 46.3;
    end
    n_h = 0; n_near = 0;
    for (int p = 0; p < N_PAIR; p++) begin
      real d;
      bit eh, eb;
      d = roc[2*p] - roc[2*p+1];
      eh = (d > 2.0) || (d < -2.0);
      eb = eh && (d > 0.0);
      n_h += int'(helper[p]);
      if ((d > 1.75 && d < 2.25) || (d < -1.75 && d > -2.25)) n_near++;
      else check(helper[p] == eh && resp[p] == eb, $sformatf("pair %0d d=%f", p, d));
    end
    check(int'(n_strong) == n_h, "n_strong equals helper ones");
    check(done_v && !busy_v, "vertical engine done");
    n_h = 0;
    for (int p = 0; p < N_PAIR; p++) begin
      real d;
      bit eh, eb;
      int ia, ib;
      ia = ((p >> 9) << 10) | (p & 511);
      ib = ia | 512;
      d = roc[ia] - roc[ib];
      eh = (d > 2.0) || (d < -2.0);
      eb = eh && (d > 0.0);
      n_h += int'(helper_v[p]);
      if (!((d > 1.75 && d < 2.25) || (d < -1.75 && d > -2.25)))
        check(helper_v[p] == eh && resp_v[p] == eb, $sformatf("vertical pair %0d d=%f", p, d));
    end
    check(int'(n_strong_v) == n_h, "vertical n_strong equals helper ones");
    check(n_h > 0 && n_h < N_PAIR, "strong and weak pairs");
    $display("strong=%0d near-threshold=%0d", n_h, n_near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
