// Synchronous latch at one end of the global bus.
//
// One register sits at the transmit end and one at the receive end, both
// on the same clock, so that every wire of the bus switches at the same
// instant and the delay of a transition depends only on the pattern of
// rising, falling and stable wires. That synchronous arrangement is the
// published scheme's; the positive-edge flip-flop and the asynchronous
// active-low reset to RESET_VALUE are this design's choices.
//
// Interface: clk, rst_n, d (W bits) in; q (W bits) out.
// Timing: q takes d at each rising edge of clk; one cycle of latency.
module bus_latch #(
  parameter int unsigned    W           = 3,
  parameter logic [W-1:0]   RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= d;
  end

endmodule
