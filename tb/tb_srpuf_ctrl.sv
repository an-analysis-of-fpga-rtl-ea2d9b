// tb_srpuf_ctrl: drives the sequencer with model responders: pattern load
// finishes INIT_LAT cycles after init_start, the timer reports done RUN_LAT
// cycles after go rises. Checks the order clear -> load -> go -> drain ->
// done, the one-cycle meas_rst and init_start pulses, the drain length, that
// addr is latched at start and runtime in the clear cycle, both held, and that a new start clears
// done.
`timescale 1ps/1ps
module tb_srpuf_ctrl;
  import srpuf_pkg::*;
  localparam int INIT_LAT = 67;
  localparam int RUN_LAT = 40;

  logic clk = 1'b0, rst, start, init_done, meas_done;
  ro_addr_t addr_in, addr;
  logic [TIMER_W-1:0] runtime_in, runtime;
  logic meas_rst, init_start, go, busy, done;
  int checks = 0, failures = 0;

  srpuf_ctrl dut (.*);
  always #5000 clk = ~clk;

  // Responders.
  int init_cnt = -1, run_cnt = -1;
  always @(posedge clk) begin
    init_done <= 1'b0;
    if (init_start) init_cnt <= INIT_LAT;
    else if (init_cnt > 0) init_cnt <= init_cnt - 1;
    if (init_cnt == 1) init_done <= 1'b1;
    if (meas_rst) begin run_cnt <= -1; meas_done <= 1'b0; end
    else if (go && run_cnt < 0) run_cnt <= RUN_LAT;
    else if (run_cnt > 0) run_cnt <= run_cnt - 1;
    else if (run_cnt == 0) meas_done <= 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; meas_done = 1'b0; addr_in = '0; runtime_in = '0; rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int t = 0; t < 5; t++) begin
      ro_addr_t a;
      int n_rst, n_init, t_rst, t_init, t_go, t_go_end, t_done, cyc;
      logic [TIMER_W-1:0] rt;
      a = ro_addr_t'($urandom);
      rt = TIMER_W'($urandom_range(1, 5000));
      addr_in = a; runtime_in = rt;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      addr_in = ~a;  // changes after start must not matter
      n_rst = 0; n_init = 0; t_go = -1; t_go_end = -1; t_rst = -1; t_init = -1; t_done = -1;
      cyc = 0;
      while (!done && cyc < 1000) begin
        if (meas_rst) begin n_rst++; t_rst = cyc; end
        if (init_start) begin n_init++; t_init = cyc; end
        if (go && t_go < 0) t_go = cyc;
        if (!go && t_go >= 0 && t_go_end < 0) t_go_end = cyc;
        check(busy, "busy during measurement");
        check(addr == a, "addr held");
        @(negedge clk);
        cyc++;
        if (cyc == 1) runtime_in = ~rt;  // runtime is taken in the clear cycle
      end
      check(done, "done reached");
      check(n_rst == 1 && t_rst == 0, "one meas_rst pulse first");
      check(n_init == 1 && t_init == 1, "one init_start after clear");
      check(runtime == rt, "runtime latched");
      check(t_go == t_init + INIT_LAT + 2, $sformatf("go after load (t_go=%0d)", t_go));
      check(t_go_end >= 0 && cyc - t_go_end == 4, $sformatf("drain %0d cycles", cyc - t_go_end));
      check(!busy, "not busy when done");
      repeat (3) @(negedge clk);
      check(done && !go, "done held, go low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
