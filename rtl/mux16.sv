// mux16: 16-to-1 multiplexer that picks one shift-register output of a macro
// (SR_sel). It is built the way the reference layout builds it: two levels of
// 4-to-1 multiplexers, four in the first level (selected by sel[1:0]) and one
// in the second (sel[3:2]), five in all. Purely combinational.
`timescale 1ps/1ps
module mux16 (
  input  logic [15:0] d,
  input  logic [3:0]  sel,
  output logic        y
);
  logic [3:0] lvl1;

  for (genvar g = 0; g < 4; g++) begin : g_lvl1
    mux4 u_mux (.d(d[4*g +: 4]), .sel(sel[1:0]), .y(lvl1[g]));
  end

  mux4 u_lvl2 (.d(lvl1), .sel(sel[3:2]), .y(y));
endmodule
