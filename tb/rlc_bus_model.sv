// Behavioural model of the 3-bit encoded global bus (not synthesizable).
//
// The wires are analog RLC interconnect; this model keeps only their
// timing. When the near-end word changes, the far-end word follows after
// the transition delay of that switching pattern, taken from the delay
// table of the encoded 3-bit bus in bus_delay_pkg. A pattern the table
// does not hold (one that moves the middle wire, which the code set never
// does) is given 1.5 times the delay constraint, so it arrives too late to
// be captured, and is counted in bad_patterns. When a slow transition
// would land after a later, faster one, the older value is dropped.
//
// Ports: near_end (3) in from the transmit latch; far_end (3) out to the
// receive latch; last_delay_ps is the delay of the most recent transition
// and bad_patterns the count of transitions missing from the table.
`timescale 1ps/10fs
module rlc_bus_model
  import bus_delay_pkg::*;
(
  input  logic [2:0] near_end,
  output logic [2:0] far_end,
  output real        last_delay_ps,
  output int         bad_patterns
);

  logic [2:0] prev;
  int         launched;
  int         landed;

  initial begin
    prev          = near_end;
    far_end       = near_end;
    last_delay_ps = 0.0;
    bad_patterns  = 0;
    launched      = 0;
    landed        = 0;
  end

  always @(near_end) begin
    automatic logic [2:0] nxt = near_end;
    automatic real        d   = delay3_ps(prev, nxt);
    automatic int         id  = ++launched;
    if (d < 0.0) begin
      bad_patterns++;
      d = 1.5 * DELAY_CONSTRAINT_PS;
    end
    last_delay_ps = d;
    prev = nxt;
    fork
      begin
        #(d);
        if (id > landed) begin
          far_end = nxt;
          landed  = id;
        end
      end
    join_none
  end

endmodule
