// Receive-side decoder of the coded on-chip bus.
//
// Inverts the encoder's table: the received m-bit word is compared with
// every entry of the valid code set, and the index of the matching entry
// is the n-bit data pattern. A word that matches no entry (which a correct
// link never delivers) decodes to 0 with code_ok low.
//
// Interface: code (M bits) in; data (N bits) and code_ok out; no clock.
// Timing: combinational, fed by the receive latch.
// Following the published scheme: the one-to-one mapping and the default
// 3-bit to 2-bit table. This design's choice: the parallel-compare
// structure and the code_ok flag for words outside the code set.
module bus_decoder
  import bus_code_pkg::*;
#(
  parameter int unsigned N = DATA_BITS,
  parameter int unsigned M = BUS_BITS,
  parameter logic [2**N-1:0][M-1:0] CODEBOOK = DEFAULT_CODEBOOK
) (
  input  logic [M-1:0] code,
  output logic [N-1:0] data,
  output logic         code_ok
);

  logic [2**N-1:0] hit;

  always_comb begin
    for (int i = 0; i < 2**N; i++) hit[i] = (code == CODEBOOK[i]);
  end

  always_comb begin
    data    = '0;
    code_ok = 1'b0;
    for (int i = 0; i < 2**N; i++) begin
      if (hit[i]) begin
        data    = N'(i);
        code_ok = 1'b1;
      end
    end
  end

  // Codewords are distinct, so at most one entry can match.
  always_comb assert ($onehot0(hit)) else $error("bus_decoder: codebook has repeated entries");

endmodule
