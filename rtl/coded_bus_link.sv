// Coded on-chip global bus: encoder, transmit latch, wires, receive latch,
// decoder.
//
// n-bit data is encoded into one of the 2^n words of the valid code set,
// registered in the transmit latch and driven onto the m global wires
// (bus_tx). The far ends of the wires come back in as bus_rx, are
// registered by the receive latch on the same clock and decoded to n-bit
// data. Because only valid codewords are ever driven, every transition on
// the wires is one that meets the delay constraint the code set was
// chosen for, so the clock period can be set to that constraint.
//
// The wires themselves are analog RLC interconnect and are not modelled
// here; connect bus_tx to bus_rx directly, or through a delay model.
//
// Ports: clk, rst_n (asynchronous, active low), data_in (N), bus_tx (M)
// out to the wires, bus_rx (M) in from the wires, data_out (N), and
// code_ok, high when the received word belongs to the code set.
// Timing: data_in sampled at edge k appears on bus_tx after edge k, is
// captured from bus_rx at edge k+1 and shows on data_out after it:
// two clock edges of latency, one word per cycle.
// Following the published scheme: the chain encoder -> latch -> m-bit bus
// -> latch -> decoder, and the default 2-bit/3-bit code set. This design's
// choices: the reset, and both latches resetting to the codeword of 0.
module coded_bus_link
  import bus_code_pkg::*;
#(
  parameter int unsigned N = DATA_BITS,
  parameter int unsigned M = BUS_BITS,
  parameter logic [2**N-1:0][M-1:0] CODEBOOK = DEFAULT_CODEBOOK
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] data_in,
  output logic [M-1:0] bus_tx,
  input  logic [M-1:0] bus_rx,
  output logic [N-1:0] data_out,
  output logic         code_ok
);

  logic [M-1:0] tx_code;
  logic [M-1:0] rx_code;

  bus_encoder #(.N(N), .M(M), .CODEBOOK(CODEBOOK)) u_encoder (
    .data (data_in),
    .code (tx_code)
  );

  bus_latch #(.W(M), .RESET_VALUE(CODEBOOK[0])) u_tx_latch (
    .clk, .rst_n, .d(tx_code), .q(bus_tx)
  );

  bus_latch #(.W(M), .RESET_VALUE(CODEBOOK[0])) u_rx_latch (
    .clk, .rst_n, .d(bus_rx), .q(rx_code)
  );

  bus_decoder #(.N(N), .M(M), .CODEBOOK(CODEBOOK)) u_decoder (
    .code    (rx_code),
    .data    (data_out),
    .code_ok (code_ok)
  );

  // Out of reset, only members of the code set may be driven onto the
  // wires.
  function automatic logic in_code_set(input logic [M-1:0] w);
    for (int i = 0; i < 2**N; i++) if (w == CODEBOOK[i]) return 1'b1;
    return 1'b0;
  endfunction

  assert property (@(posedge clk) disable iff (!rst_n) in_code_set(bus_tx))
    else $error("coded_bus_link: word outside the code set driven onto the bus");

endmodule
