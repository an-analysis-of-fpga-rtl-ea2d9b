// srl32: one shift-register LUT (SRLC32E style) with its Data and Clk input
// multiplexers, the entropy source of the shift-register PUF.
//
// The 32 configuration memory bits (CMB) form a shift register. With ctrl=1
// the register is loaded from cmb_data on rising edges of cmb_clk; this is how
// the alternating 0101... pattern is scanned in once. With ctrl=0 the shift
// output Q31 is fed back to D and the register is clocked by the ring pulse,
// so every pulse rotates the pattern by one place and, because neighbouring
// bits differ, toggles every CMB bit. addr (RO_sel) picks which CMB bit drives
// out; each address is a different path through the LUT's internal MUX tree
// and therefore a different ring oscillator.
//
// Interface: ctrl, cmb_data, cmb_clk, pulse, addr[4:0] in; out, q31 out.
// Timing: out follows addr combinationally; the register shifts on the rising
// edge of the selected clock (cmb_clk or pulse).
// The muxed clock is intended: it is the structure of the reference design
// (the Clk MUX in front of the LUT clock pin). The register has no reset, as a
// LUT's configuration bits have none; the pattern is defined by the scan-in.
`timescale 1ps/1ps
module srl32 #(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     ctrl,
  input  logic                     cmb_data,
  input  logic                     cmb_clk,
  input  logic                     pulse,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic                     out,
  output logic                     q31
);
  logic [DEPTH-1:0] cmb;
  logic             d;
  logic             sr_clk;

  // Data MUX and Clk MUX, both steered by Ctrl.
  assign d      = ctrl ? cmb_data : cmb[DEPTH-1];
  assign sr_clk = ctrl ? cmb_clk  : pulse;

  always_ff @(posedge sr_clk)
    cmb <= {cmb[DEPTH-2:0], d};

  assign out = cmb[addr];
  assign q31 = cmb[DEPTH-1];
endmodule
