// measure_unit: measures the oscillation count of one selected ring.
//
// The pulse lines of all macros meet in a MUX steered by macro_sel; its output
// clocks the 16-bit ro_counter. ro_timer opens a window of runtime system-clock
// cycles, and during it only the RO_enable line of the selected macro is high.
// Every ring therefore runs for the same time, and the count is proportional
// to its frequency. rst clears the counter and the timer.
//
// Interface: clk, rst, go, runtime, macro_sel, pulses[N_MACROS] in;
// ro_enable[N_MACROS], count, en, done out. count is valid once done has been
// high for a few cycles (the last pulse of the ring must have arrived).
// rst is synchronous for the timer and the asynchronous clear of the counter,
// whose clock is the ring pulse; a lint tool flags this mix, which is intended.
`timescale 1ps/1ps
module measure_unit
  import srpuf_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                go,
  input  logic [TIMER_W-1:0]  runtime,
  input  logic [MACRO_W-1:0]  macro_sel,
  input  logic [N_MACROS-1:0] pulses,
  output logic [N_MACROS-1:0] ro_enable,
  output logic [COUNT_W-1:0]  count,
  output logic                en,
  output logic                done
);
  logic               sel_pulse;
  logic [TIMER_W-1:0] timer_unused;

  assign sel_pulse = pulses[macro_sel];

  ro_counter #(.COUNT_W(COUNT_W)) u_cnt (
    .pulse(sel_pulse),
    .clr  (rst),
    .count(count)
  );

  ro_timer #(.TIMER_W(TIMER_W)) u_tmr (
    .clk    (clk),
    .rst    (rst),
    .go     (go),
    .runtime(runtime),
    .en     (en),
    .done   (done),
    .timer  (timer_unused)
  );

  always_comb begin
    ro_enable = '0;
    ro_enable[macro_sel] = en;
  end
endmodule
