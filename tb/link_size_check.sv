// Testbench helper: runs one coded_bus_link of N data bits on M wires with
// a placeholder code set and counts round-trip checks.
//
// The placeholder code of data d is d shifted up by M-N places, extra low
// wires held at 0; it is only a distinct word per data pattern, used to
// exercise the link at a given size. Wires are joined directly. Words go
// in at each falling edge; each must come out two clock edges later.
// The helper raises done after NWORDS words.
`timescale 1ns/1ps
module link_size_check #(
  parameter int unsigned N      = 6,
  parameter int unsigned M      = 7,
  parameter int unsigned NWORDS = 500
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  function automatic logic [2**N-1:0][M-1:0] make_codebook();
    logic [2**N-1:0][M-1:0] cb;
    for (int d = 0; d < 2**N; d++) cb[d] = M'(d) << (M - N);
    return cb;
  endfunction

  localparam logic [2**N-1:0][M-1:0] CB = make_codebook();

  logic [N-1:0] data_in;
  logic [M-1:0] bus;
  logic [N-1:0] data_out;
  logic         code_ok;

  coded_bus_link #(.N(N), .M(M), .CODEBOOK(CB)) dut (
    .clk, .rst_n, .data_in, .bus_tx(bus), .bus_rx(bus), .data_out, .code_ok
  );

  logic [N-1:0] hist [$];

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    data_in  = '0;
    hist     = {N'(0), N'(0)};
    @(posedge rst_n);
    for (int i = 0; i < NWORDS; i++) begin
      automatic logic [N-1:0] d = (i < 2**N) ? N'(i) : N'($urandom);
      @(negedge clk);
      checks++;
      if (data_out !== hist[$-1] || code_ok !== 1'b1 ||
          bus[M-N-1:0] !== '0) begin
        failures++;
        $display("FAIL N=%0d M=%0d: data_out=%h code_ok=%b expected %h",
                 N, M, data_out, code_ok, hist[$-1]);
      end
      data_in = d;
      hist.push_back(d);
    end
    done = 1'b1;
  end
endmodule
