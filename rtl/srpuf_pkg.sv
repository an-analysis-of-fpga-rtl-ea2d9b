// srpuf_pkg: sizes shared by the shift-register ring-oscillator PUF.
//
// The array is N_MACROS identical hard macros, each holding N_SR shift-register
// LUTs of SRL_DEPTH configuration bits. Every configuration bit is one
// ring-oscillator path, so the array holds N_MACROS*N_SR*SRL_DEPTH = 4096 ROs.
// The measurement side uses a 16-bit oscillation counter and a 23-bit timer
// that defines the measurement window in system-clock cycles. All of these
// numbers are the ones of the reference implementation on a Zynq 7010.
// Not every module uses every constant, so a lint run of one module may list
// some of them as unused.
`timescale 1ps/1ps
package srpuf_pkg;
  localparam int unsigned N_MACROS  = 8;
  localparam int unsigned N_SR      = 16;
  localparam int unsigned SRL_DEPTH = 32;
  localparam int unsigned COUNT_W   = 16;
  localparam int unsigned TIMER_W   = 23;

  localparam int unsigned MACRO_W = $clog2(N_MACROS);
  localparam int unsigned SR_W    = $clog2(N_SR);
  localparam int unsigned RO_W    = $clog2(SRL_DEPTH);

  // Default measurement window: 512 cycles of the 100 MHz system clock,
  // i.e. 5.12 us.
  localparam logic [TIMER_W-1:0] DEFAULT_RUNTIME = TIMER_W'(512);

  // Selection of one of the 4096 ring oscillators.
  typedef struct packed {
    logic [MACRO_W-1:0] macro_sel;
    logic [SR_W-1:0]    sr_sel;
    logic [RO_W-1:0]    ro_sel;
  } ro_addr_t;
endpackage
