// tb_pulse_gen: checks the edge-to-pulse converter model. Each rising and
// each falling edge of node must give exactly one pulse, starting PATH_PS
// after the edge and lasting five buffer delays (5 x 120 ps = 600 ps).
`timescale 1ps/1ps
module tb_pulse_gen;
  localparam int unsigned PATH = 2750;
  localparam int unsigned WIDTH = 600;
  logic node, pulse;
  int checks = 0, failures = 0;
  int n_rise = 0;
  time t_rise, t_fall;

  pulse_gen dut (.node(node), .pulse(pulse));

  always @(posedge pulse) begin n_rise++; t_rise = $time; end
  always @(negedge pulse) t_fall = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_edge;
    node = 1'b1;
    #10000;
    check(pulse == 1'b0, "no pulse while node is steady");
    for (int i = 0; i < 8; i++) begin
      int prev;
      prev = n_rise;
      t_edge = $time;
      node = ~node;
      #(PATH + WIDTH + 1000);
      check(n_rise == prev + 1, $sformatf("edge %0d gives one pulse", i));
      check(t_rise - t_edge == PATH, $sformatf("pulse delay %0t", t_rise - t_edge));
      check(t_fall - t_rise == WIDTH, $sformatf("pulse width %0t", t_fall - t_rise));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
