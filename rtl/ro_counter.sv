// ro_counter: the oscillation counter of the measure unit.
//
// A COUNT_W-bit binary counter clocked by the pulse of the selected macro, so
// it counts one per ring edge. clr (the measurement Rst) clears it
// asynchronously, because its clock runs only while a ring oscillates. It
// wraps at 2^COUNT_W. The count is read by the system-clock side only after
// the ring has stopped and settled, so it needs no synchronizer.
//
// Interface: pulse (clock), clr (async, active high) in; count out.
`timescale 1ps/1ps
module ro_counter #(
  parameter int unsigned COUNT_W = 16
) (
  input  logic               pulse,
  input  logic               clr,
  output logic [COUNT_W-1:0] count
);
  always_ff @(posedge pulse or posedge clr) begin
    if (clr) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
