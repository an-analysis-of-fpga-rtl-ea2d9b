// pulse_gen: behavioural model of the ring's edge-to-pulse converter. It is a
// delay circuit, so it is modelled with delays and is not synthesizable.
//
// In hardware the NAND output fans out to both inputs of an XOR; one input
// passes through a chain of five buffer LUTs first. Every edge on node thus
// gives a pulse on the XOR output as wide as the buffer chain's delay, and the
// rising edge of that pulse clocks the shift registers.
//
// The model lumps the common part of the ring delay (NAND, routing, clock to
// output of the shift register) into PATH_PS, applied at the input, and the
// five-buffer chain into BUF_PS (five stages of BUF_STAGE_PS). Path-specific
// delay is modelled separately (lut_path_delay). Alone, one ring half-period
// is PATH_PS and a pulse is BUF_PS wide; PATH_PS must exceed BUF_PS, otherwise
// successive pulses merge. The default 2750 ps per edge gives about 1862
// pulses in a 5.12 us window, the mean count of the reference measurements.
//
// Interface: node in (NAND output), pulse out.
`timescale 1ps/1ps
module pulse_gen #(
  parameter int unsigned PATH_PS      = 2750,
  parameter int unsigned BUF_STAGE_PS = 120,
  parameter int unsigned N_BUF        = 5
) (
  input  logic node,
  output logic pulse
);
  localparam int unsigned BUF_PS = BUF_STAGE_PS * N_BUF;

  logic node_in;
  logic node_buf;

  assign #(PATH_PS) node_in  = node;
  assign #(BUF_PS)  node_buf = node_in;
  assign pulse = node_in ^ node_buf;

  initial begin
    assert (PATH_PS > BUF_PS)
      else $error("pulse_gen: PATH_PS must exceed the buffer chain delay");
  end
endmodule
