// tb_mux16: exhaustive check of the two-level 16-to-1 MUX for every select
// value against random and one-hot data words.
`timescale 1ps/1ps
module tb_mux16;
  logic [15:0] d;
  logic [3:0]  sel;
  logic        y;
  int checks = 0, failures = 0;

  mux16 dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      d = (t < 16) ? (16'(1) << t) : 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (y !== d[s]) begin
          failures++;
          $display("FAIL: d=%h sel=%0d y=%0b", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
