// Transmit-side encoder of the coded on-chip bus.
//
// Maps each n-bit data pattern to its m-bit codeword in the valid code set.
// The code set comes from an offline search that keeps only words whose
// mutual transitions meet the bus delay constraint; the hardware only has
// to apply the resulting one-to-one table, so the encoder is a purely
// combinational lookup indexed by the data. The table is the CODEBOOK
// parameter (entry d is the code of data d), so any code set produced for
// another bus geometry, frequency or delay constraint can be dropped in.
//
// Interface: data (N bits) in, code (M bits) out, no clock.
// Timing: combinational; the transmit latch that follows registers it.
// Following the published scheme: the one-to-one mapping and the default
// 2-bit to 3-bit table. This design's choice: the table-lookup structure.
module bus_encoder
  import bus_code_pkg::*;
#(
  parameter int unsigned N = DATA_BITS,
  parameter int unsigned M = BUS_BITS,
  parameter logic [2**N-1:0][M-1:0] CODEBOOK = DEFAULT_CODEBOOK
) (
  input  logic [N-1:0] data,
  output logic [M-1:0] code
);

  always_comb code = CODEBOOK[data];

  // A decodable code set needs 2^n distinct words.
  initial begin
    for (int i = 0; i < 2**N; i++)
      for (int j = i + 1; j < 2**N; j++)
        assert (CODEBOOK[i] != CODEBOOK[j])
          else $error("bus_encoder: codebook entries %0d and %0d are equal", i, j);
  end

endmodule
