// Self-checking testbench for bus_encoder.
//
// Checks the default 2-bit to 3-bit code set exhaustively against the rule
// it follows (data bits on the two outer wires, middle wire held low), and
// a second instance with a 3-bit to 4-bit code set built by the formula
// code = {data, 0}, so the lookup is exercised beyond the default size.
`timescale 1ns/1ps
module tb_bus_encoder;
  logic [1:0] d2;
  logic [2:0] c3;
  logic [2:0] d3;
  logic [3:0] c4;
  int checks = 0, failures = 0;

  localparam logic [7:0][3:0] CB4 = {4'he, 4'hc, 4'ha, 4'h8, 4'h6, 4'h4, 4'h2, 4'h0};

  bus_encoder dut (.data(d2), .code(c3));
  bus_encoder #(.N(3), .M(4), .CODEBOOK(CB4)) dut4 (.data(d3), .code(c4));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      d2 = 2'(i);
      #1;
      checks++;
      if (c3 !== {d2[1], 1'b0, d2[0]}) begin
        failures++;
        $display("FAIL data=%b code=%b expected=%b", d2, c3, {d2[1], 1'b0, d2[0]});
      end
    end
    for (int i = 0; i < 8; i++) begin
      d3 = 3'(i);
      #1;
      checks++;
      if (c4 !== {d3, 1'b0}) begin
        failures++;
        $display("FAIL 3/4 data=%b code=%b", d3, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
