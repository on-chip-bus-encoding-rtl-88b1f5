// Shared constants of the coded on-chip bus.
//
// The bus carries n-bit data over an m-bit group of global wires (m > n).
// Only 2^n of the 2^m possible words, the "valid code set", are ever
// driven. The set is chosen offline so that every transition between two
// of its members meets the bus delay constraint once both capacitive and
// inductive coupling between the wires are taken into account.
//
// The default code set here is the worked 2-bit example: the transition
// "one wire rises while its neighbour falls" on a plain 2-bit bus takes
// 38.7 ps and breaks a 30 ps constraint; spreading the two data bits onto
// the outer wires of a 3-bit bus whose middle wire stays low removes that
// transition (worst remaining case 29.2 ps). The mapping
//   00 -> 000, 01 -> 001, 10 -> 100, 11 -> 101
// is the one the published scheme gives. Bit order (leftmost digit is
// wire m-1) is this design's reading of it.
package bus_code_pkg;

  // Data bits n and bus wires m of the default configuration.
  localparam int unsigned DATA_BITS = 2;
  localparam int unsigned BUS_BITS  = 3;

  // Codebook entry d is the codeword for data pattern d.
  localparam logic [2**DATA_BITS-1:0][BUS_BITS-1:0] DEFAULT_CODEBOOK = {
    3'b101,  // data 11
    3'b100,  // data 10
    3'b001,  // data 01
    3'b000   // data 00
  };

endpackage
