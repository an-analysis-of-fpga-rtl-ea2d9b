// ro_model_pkg: testbench-side reference for the ring delays of the
// behavioural timing models, written independently of them from their
// specification: edge time = common delay + 600 ps + chip offset (+/-450 ps)
// + design offset per (macro, SR) (+/-30 ps) + path-length bias per LUT
// address + within-die offset per path (+/-9 ps), all offsets from the same
// integer hash as the model. expected_count() turns an edge time into the
// count of a window of runtime 10 ns cycles.
`timescale 1ps/1ps
package ro_model_pkg;
  function automatic int unsigned hash32(input int unsigned v);
    int unsigned x;
    x = v;
    x ^= x >> 16; x *= 32'h7feb352d;
    x ^= x >> 15; x *= 32'h846ca68b;
    x ^= x >> 16;
    return x;
  endfunction

  function automatic int offset(input int unsigned v, input int span);
    return int'(hash32(v) % (2 * span + 1)) - span;
  endfunction

  function automatic int path_bias(input int z);
    if (z == 31) return 21;
    if (z < 16)  return 6 + 3 * (z % 5);
    return 2 * (z % 4) - 10;
  endfunction

  // Full edge time of ring (x, y, z) for a device.
  function automatic int edge_ps(input int unsigned seed, input int x, input int y,
                                 input int z, input int common_ps = 2150);
    int t;
    t = common_ps + 600 + path_bias(z);
    t += offset(seed * 32'h9e3779b9, 450);
    t += offset(seed ^ (x << 8) ^ (y << 16) ^ 32'h51ed270b, 30);
    t += offset(seed * 31 + x * 4099 + y * 257 + z * 17 + 32'h2545f491, 9);
    return t;
  endfunction

  function automatic int expected_count(input int runtime_cycles, input int edge_time_ps);
    return int'((longint'(runtime_cycles) * 10000) / edge_time_ps);
  endfunction
endpackage
