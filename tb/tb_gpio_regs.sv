// tb_gpio_regs: writes random control, runtime and read words and checks the
// decoded fields, that start and enr_start are single pulses per 0->1 change
// of their bits (and only on control words), that runtime resets to 512 and
// is held across other words, that soft_rst follows bit 0, the status word
// layout, and that a read word switches gpio_i to rd_data until the next
// control word.
`timescale 1ps/1ps
module tb_gpio_regs;
  import srpuf_pkg::*;
  logic clk = 1'b0, rst;
  logic [31:0] gpio_o, gpio_i;
  logic [COUNT_W-1:0] count;
  logic done, busy, soft_rst, start, enr_start, enr_busy, enr_done;
  logic [31:0] rd_data;
  logic [11:0] n_strong;
  logic [6:0]  rd_word;
  ro_addr_t addr;
  logic [TIMER_W-1:0] runtime;
  int checks = 0, failures = 0;
  int n_start = 0, n_enr = 0;

  gpio_regs dut (.*);
  always #5000 clk = ~clk;
  always @(negedge clk) if (start) n_start++;
  always @(negedge clk) if (enr_start) n_enr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input logic [31:0] w);
    gpio_o = w;
    repeat (4) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TIMER_W-1:0] rt;
    gpio_o = '0; count = '0; done = 1'b0; busy = 1'b0; rst = 1'b1;
    rd_data = '0; enr_busy = 1'b0; enr_done = 1'b0; n_strong = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    check(runtime == TIMER_W'(512), "runtime resets to 512");
    rt = runtime;
    for (int t = 0; t < 80; t++) begin
      logic [31:0] w;
      int s0, e0;
      w = $urandom;
      s0 = n_start;
      e0 = n_enr;
      if (w[31] && !w[30]) begin
        put(w);
        rt = w[22:0];
        check(runtime == rt, "runtime word");
        check(n_start == s0 && n_enr == e0, "no start from runtime word");
      end else if (w[31]) begin
        rd_data = $urandom;
        put(w);
        check(rd_word == w[6:0], "read index");
        check(gpio_i == rd_data, "read data on gpio_i");
        check(n_start == s0 && n_enr == e0, "no start from read word");
        check(runtime == rt, "runtime held over read word");
      end else begin
        put({1'b0, w[30:15], 1'b0, w[13:2], 1'b0, w[0]});
        check(addr.macro_sel == w[4:2] && addr.sr_sel == w[8:5] && addr.ro_sel == w[13:9],
              "address fields");
        check(soft_rst == w[0], "soft reset bit");
        check(runtime == rt, "runtime held");
        put({1'b0, w[30:15], 1'b0, w[13:2], 1'b1, w[0]});
        check(n_start == s0 + 1 && n_enr == e0, "one start pulse per go edge");
        put({1'b0, w[30:15], 1'b0, w[13:2], 1'b1, w[0]});
        check(n_start == s0 + 1, "no start while go stays high");
        put({1'b0, w[30:15], 1'b1, w[13:2], 1'b0, w[0]});
        check(n_enr == e0 + 1 && n_start == s0 + 1, "one enroll pulse per enroll edge");
        put({1'b0, w[30:15], 1'b0, w[13:2], 1'b0, w[0]});
        count = 16'($urandom); done = 1'($urandom); busy = 1'($urandom);
        enr_busy = 1'($urandom); enr_done = 1'($urandom); n_strong = 12'($urandom);
        #1;
        check(gpio_i == {n_strong, enr_done, enr_busy, busy, done, count}, "status word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
