// srpuf_top: the shift-register ring-oscillator PUF (SR-PUF) with its
// measurement system and an on-chip enrollment engine.
//
// Eight identical hard macros (srp_macro) hold 16 shift-register LUTs each,
// and every one of the 32 configuration bits of a LUT is the start of its own
// ring-oscillator path: 4096 ROs in all. They share the configuration lines
// (ctrl, cmb_data, cmb_clk from cmb_init) and the SR_sel/RO_sel address. The
// measure unit enables one macro's ring for runtime cycles of clk and counts
// its pulses. The processor drives all of it through two 32-bit GPIO words
// (see gpio_regs): it writes the RO address and a go bit, polls done and reads
// the 16-bit count.
//
// Measurement sequence (srpuf_ctrl): clear the counter and timer, scan the
// alternating pattern into all CMBs with the phase that puts a 1 on the
// selected bit, enable the selected ring for runtime cycles, wait for the last
// pulse, raise done. At runtime=512 and 100 MHz a measurement takes about
// 600 cycles.
//
// Enrollment (puf_enroll, started by the enroll bit of a control word) takes
// over the sequencer: it measures every ring N_SAMPLES times, calibrates each
// group of the 8 rings at the same place in the 8 macros (zscore_calib), and
// thresholds the 2048 pair differences into helper and response bits that the
// processor reads back through read words. While enrollment runs, go requests
// from the GPIO are ignored. The reference leaves all of this post-processing
// to software; doing it in hardware is this design's own choice, and the plain
// single-measurement path is kept so software can still do it.
//
// Interface: clk (100 MHz system clock), rst (sync, active high), gpio_o in,
// gpio_i out, plus ro_enable and the count for observation.
// CHIP_SEED only selects the device drawn by the behavioural delay models
// (see lut_path_delay); it has no effect on synthesis. VERTICAL selects the
// alternative pairing of the same ring in neighbouring macros.
// meas_rst is used synchronously by the timer and as the asynchronous clear of
// the pulse counter (which runs in the ring's own clock domain); that mix is
// intended.
`timescale 1ps/1ps
module srpuf_top
  import srpuf_pkg::*;
#(
  parameter int unsigned CHIP_SEED = 1,
  parameter int unsigned N_SAMPLES = 16,
  parameter bit          VERTICAL  = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [31:0]         gpio_o,
  output logic [31:0]         gpio_i,
  output logic [N_MACROS-1:0] ro_enable,
  output logic [COUNT_W-1:0]  count
);
  ro_addr_t           req_addr, addr;
  logic [TIMER_W-1:0] req_runtime, runtime;
  logic               soft_rst, busy, done;
  logic               meas_rst_ctrl, meas_rst;
  logic               init_start, init_done, init_busy_unused;
  logic               go, en_unused, meas_done;
  logic               ctrl, cmb_data, cmb_clk;
  logic [N_MACROS-1:0] pulses;
  logic [N_MACROS-1:0] ro_out_unused;
  ro_addr_t           enr_addr, ctrl_addr_in;
  logic               gpio_start, enr_start, enr_meas_start, ctrl_start;
  logic               enr_busy, enr_done;
  logic [11:0]        n_strong;
  logic [6:0]         rd_word;
  logic [31:0]        rd_data;

  gpio_regs u_gpio (
    .clk     (clk),
    .rst     (rst),
    .gpio_o  (gpio_o),
    .count   (count),
    .done    (done),
    .busy    (busy),
    .rd_data (rd_data),
    .enr_busy(enr_busy),
    .enr_done(enr_done),
    .n_strong(n_strong),
    .gpio_i  (gpio_i),
    .soft_rst(soft_rst),
    .start   (gpio_start),
    .enr_start(enr_start),
    .addr    (req_addr),
    .runtime (req_runtime),
    .rd_word (rd_word)
  );

  // The enrollment engine owns the sequencer while it runs; single
  // measurements requested over GPIO are ignored meanwhile.
  assign ctrl_start   = enr_busy ? enr_meas_start : gpio_start;
  assign ctrl_addr_in = enr_busy ? enr_addr : req_addr;

  puf_enroll #(.N_SAMPLES(N_SAMPLES), .VERTICAL(VERTICAL)) u_enroll (
    .clk       (clk),
    .rst       (rst | soft_rst),
    .start     (enr_start),
    .meas_start(enr_meas_start),
    .meas_addr (enr_addr),
    .meas_done (done),
    .meas_busy (busy),
    .count     (count),
    .rd_word   (rd_word),
    .rd_data   (rd_data),
    .busy      (enr_busy),
    .done      (enr_done),
    .n_strong  (n_strong)
  );

  srpuf_ctrl u_ctrl (
    .clk       (clk),
    .rst       (rst | soft_rst),
    .start     (ctrl_start),
    .addr_in   (ctrl_addr_in),
    .runtime_in(req_runtime),
    .init_done (init_done),
    .meas_done (meas_done),
    .addr      (addr),
    .runtime   (runtime),
    .meas_rst  (meas_rst_ctrl),
    .init_start(init_start),
    .go        (go),
    .busy      (busy),
    .done      (done)
  );

  assign meas_rst = rst | soft_rst | meas_rst_ctrl;

  cmb_init #(.DEPTH(SRL_DEPTH)) u_init (
    .clk     (clk),
    .rst     (rst | soft_rst),
    .start   (init_start),
    .phase   (addr.ro_sel[0]),
    .ctrl    (ctrl),
    .cmb_data(cmb_data),
    .cmb_clk (cmb_clk),
    .busy    (init_busy_unused),
    .done    (init_done)
  );

  for (genvar x = 0; x < N_MACROS; x++) begin : g_macro
    srp_macro #(.MACRO(x), .CHIP_SEED(CHIP_SEED)) u_macro (
      .ctrl     (ctrl),
      .cmb_data (cmb_data),
      .cmb_clk  (cmb_clk),
      .sr_sel   (addr.sr_sel),
      .ro_sel   (addr.ro_sel),
      .ro_enable(ro_enable[x]),
      .ro_out   (ro_out_unused[x]),
      .pulse    (pulses[x])
    );
  end

  measure_unit u_meas (
    .clk      (clk),
    .rst      (meas_rst),
    .go       (go),
    .runtime  (runtime),
    .macro_sel(addr.macro_sel),
    .pulses   (pulses),
    .ro_enable(ro_enable),
    .count    (count),
    .en       (en_unused),
    .done     (meas_done)
  );
endmodule
