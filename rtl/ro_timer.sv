// ro_timer: the measurement window generator of the measure unit.
//
// go is captured into go_reg on the next system-clock edge. A TIMER_W-bit
// timer, cleared by rst, is compared with runtime: flag = (timer < runtime).
// The window en = go_reg & flag enables the selected ring and advances the
// timer, so en is high for exactly runtime clock cycles, beginning one cycle
// after go is first seen high, and then falls for good because timer has
// reached runtime. done is go_reg & ~flag. A new measurement needs a rst
// pulse, as in the reference procedure.
//
// Interface: clk, rst (synchronous, active high), go, runtime in; en, done,
// timer out. At the reference's 100 MHz clock runtime=512 is 5.12 us.
`timescale 1ps/1ps
module ro_timer #(
  parameter int unsigned TIMER_W = 23
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               go,
  input  logic [TIMER_W-1:0] runtime,
  output logic               en,
  output logic               done,
  output logic [TIMER_W-1:0] timer
);
  logic go_reg;
  logic flag;

  assign flag = (timer < runtime);
  assign en   = go_reg & flag;
  assign done = go_reg & ~flag;

  always_ff @(posedge clk) begin
    if (rst) begin
      go_reg <= 1'b0;
      timer  <= '0;
    end else begin
      if (go) go_reg <= 1'b1;
      if (en) timer  <= timer + 1'b1;
    end
  end
endmodule
