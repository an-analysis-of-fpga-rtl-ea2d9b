// lut_path_delay: behavioural model of the delay of the selected path through
// a shift-register LUT and the 16-to-1 MUX. It models timing only and is not
// synthesizable as a delay (synthesis sees q = d).
//
// Every one of the 512 paths of a macro has its own delay, and the model
// builds it from the sources of variation that matter for this PUF:
//   - a chip-wide offset (CHIP_SEED), common to all paths of a device, up
//     to +/-450 ps, so one ring's count spans roughly 1550 to 2350 over
//     many devices (the range measured on real parts is 1550 to 2400),
//   - a design offset per shift register of each macro (placement and
//     routing around the LUT), up to +/-30 ps,
//   - a path-length bias that depends only on the address inside the LUT and
//     is the same in every LUT: addresses 0-15 are slower than 16-30, and
//     address 31 is slow, spanning about -10 ps to +21 ps,
//   - a random within-die component per path, up to +/-9 ps.
// The random parts come from an integer hash of (CHIP_SEED, MACRO, y, z), so
// a given seed always gives the same device. Magnitudes are chosen to match
// measured behaviour of such rings (about 1.45 ps per count at a 5.12 us
// window); the hash and the bias shape are this model's own.
//
// Interface: d (selected LUT output) in, sr_sel and ro_sel pick the path, q
// out is d delayed by delay_ps(sr_sel, ro_sel) (transport delay). The delay
// is a run-time value, so a lint tool run without timing support warns that
// it cannot evaluate it; that is expected for a timing model.
`timescale 1ps/1ps
module lut_path_delay
  import srpuf_pkg::*;
#(
  parameter int unsigned MACRO     = 0,
  parameter int unsigned CHIP_SEED = 1
) (
  input  logic            d,
  input  logic [SR_W-1:0] sr_sel,
  input  logic [RO_W-1:0] ro_sel,
  output logic            q
);
  // 32-bit integer mixing function (xorshift-multiply).
  function automatic int unsigned mix(input int unsigned a);
    int unsigned h;
    h = a;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Signed offset in [-span, span] from a hash value.
  function automatic int spread(input int unsigned h, input int span);
    return int'(h % (2 * span + 1)) - span;
  endfunction

  function automatic int delay_ps(input int y, input int z);
    int chip, dsg, bias, wid;
    chip   = spread(mix(CHIP_SEED * 32'h9e3779b9), 450);
    dsg = spread(mix(CHIP_SEED ^ (MACRO << 8) ^ (y << 16) ^ 32'h51ed270b), 30);
    bias   = (z == 31) ? 21 : (z < 16) ? 6 + 3 * (z % 5) : -10 + 2 * (z % 4);
    wid    = spread(mix(CHIP_SEED * 31 + MACRO * 4099 + y * 257 + z * 17 + 32'h2545f491), 9);
    return chip + dsg + bias + wid;
  endfunction

  int dly;

  // The offsets may be negative; a fixed 600 ps keeps the delay positive. The
  // enclosing macro gives the pulse generator 600 ps less common delay.
  always_comb dly = 600 + delay_ps(int'(sr_sel), int'(ro_sel));

  always @(d) q <= #(dly) d;

  initial q = 1'b0;
endmodule
