// Transition delays of the example global bus, for testbenches.
//
// A transition of a bus is described wire by wire as stable, rising or
// falling. For the linear RLC wire model the delay of a pattern and of its
// mirror in sign (every rise swapped with a fall) are the same, so each
// table is looked up after turning the pattern so that its first switching
// wire rises. Values are in picoseconds:
//   3-bit bus with the middle wire stable (the encoded bus):
//     --R 24.6111   R-- 24.5803   R-F 29.2374   R-R 19.6909
//   2-bit bus without encoding:
//     -R 27.20840   R- 27.19817   RF 38.72782   RR 11.96549
// The delay constraint of the example is 30 ps. A pattern missing from a
// table returns a negative value.
package bus_delay_pkg;

  localparam real DELAY_CONSTRAINT_PS = 30.0;

  // Wire change: 0 stable, +1 rising, -1 falling.
  function automatic int wire_step(input logic from, input logic to);
    if (from == to) return 0;
    return to ? 1 : -1;
  endfunction

  // Encoded 3-bit bus. Class index 0..3 for --R, R--, R-F, R-R; -1 if the
  // middle wire switches or nothing switches.
  function automatic int class3(input logic [2:0] from, input logic [2:0] to);
    int s2, s1, s0;
    s2 = wire_step(from[2], to[2]);
    s1 = wire_step(from[1], to[1]);
    s0 = wire_step(from[0], to[0]);
    if (s1 != 0) return -1;
    if (s2 == 0 && s0 == 0) return -1;
    if (s2 == 0) return 0;
    if (s0 == 0) return 1;
    return (s2 == s0) ? 3 : 2;
  endfunction

  function automatic real delay3_ps(input logic [2:0] from, input logic [2:0] to);
    case (class3(from, to))
      0: return 24.6111;
      1: return 24.5803;
      2: return 29.2374;
      3: return 19.6909;
      default: return -1.0;
    endcase
  endfunction

  // Unencoded 2-bit bus. 0.0 when nothing switches.
  function automatic real delay2_ps(input logic [1:0] from, input logic [1:0] to);
    int s1, s0;
    s1 = wire_step(from[1], to[1]);
    s0 = wire_step(from[0], to[0]);
    if (s1 == 0 && s0 == 0) return 0.0;
    if (s1 == 0) return 27.20840;
    if (s0 == 0) return 27.19817;
    return (s1 == s0) ? 11.96549 : 38.72782;
  endfunction

endpackage
