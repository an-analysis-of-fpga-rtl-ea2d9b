// srp_macro: one SR-PUF hard macro, holding N_SR x SRL_DEPTH = 512 ring
// oscillators that share one ring-closing path.
//
// Sixteen shift-register LUTs (srl32) hold the alternating CMB pattern. Their
// outputs, each selected by the common RO_sel address, meet in a two-level
// 16-to-1 MUX steered by SR_sel. The MUX output and ro_enable drive a NAND;
// the NAND output goes to the edge-to-pulse converter, whose pulse clocks all
// sixteen shift registers. With ro_enable=1 every pulse rotates the patterns,
// which toggles the selected bit, which makes the next NAND edge: the selected
// path oscillates. With ro_enable=0 the NAND output is held at 1 and the ring
// stops.
//
// Only the selected RO oscillates, but all sixteen registers rotate together.
// The ring starts only if the selected CMB bit is 1 when ro_enable rises (the
// NAND output then falls); which bit value a stopped ring leaves behind
// depends on where in its cycle it was stopped. The controller therefore
// re-scans the pattern with the right phase before every measurement (see
// srpuf_ctrl), which is this design's choice.
//
// Interface: configuration inputs (ctrl, cmb_data, cmb_clk) shared with all
// macros, sr_sel/ro_sel shared, ro_enable from the measure unit; pulse goes to
// the measure unit's counter MUX, ro_out (the 16-to-1 MUX output) is brought
// out for observation. MACRO, CHIP_SEED, PATH_PS and BUF_STAGE_PS only set
// the delays of the behavioural timing models: lut_path_delay gives every
// one of the 512 paths its own delay (600 ps plus the chip, design, bias and
// within-die offsets), and pulse_gen adds the common ring delay PATH_PS and the pulse width. With the
// defaults a ring edge takes about 2750 ps on average over devices, about 1862 counts in 5.12 us.
`timescale 1ps/1ps
module srp_macro
  import srpuf_pkg::*;
#(
  parameter int unsigned MACRO        = 0,
  parameter int unsigned CHIP_SEED    = 1,
  parameter int unsigned PATH_PS      = 2150,
  parameter int unsigned BUF_STAGE_PS = 120
) (
  input  logic            ctrl,
  input  logic            cmb_data,
  input  logic            cmb_clk,
  input  logic [SR_W-1:0] sr_sel,
  input  logic [RO_W-1:0] ro_sel,
  input  logic            ro_enable,
  output logic            ro_out,
  output logic            pulse
);
  logic [N_SR-1:0] sr_out;
  logic            nand_out;
  logic            path_out;

  for (genvar y = 0; y < N_SR; y++) begin : g_sr
    logic q31_unused;
    srl32 #(.DEPTH(SRL_DEPTH)) u_srl (
      .ctrl    (ctrl),
      .cmb_data(cmb_data),
      .cmb_clk (cmb_clk),
      .pulse   (pulse),
      .addr    (ro_sel),
      .out     (sr_out[y]),
      .q31     (q31_unused)
    );
  end

  mux16 u_mux (.d(sr_out), .sel(sr_sel), .y(ro_out));

  // Timing of the selected LUT path (no logic: path_out follows ro_out).
  lut_path_delay #(.MACRO(MACRO), .CHIP_SEED(CHIP_SEED)) u_dly (
    .d     (ro_out),
    .sr_sel(sr_sel),
    .ro_sel(ro_sel),
    .q     (path_out)
  );

  assign nand_out = ~(path_out & ro_enable);

  pulse_gen #(.PATH_PS(PATH_PS), .BUF_STAGE_PS(BUF_STAGE_PS)) u_pg (
    .node (nand_out),
    .pulse(pulse)
  );
endmodule
