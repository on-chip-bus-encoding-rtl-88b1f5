// Self-checking testbench for bus_decoder.
//
// Presents every 3-bit word to the default decoder: the four members of the
// code set (middle wire low) must decode to {outer wires} with code_ok
// high, the other four must give code_ok low and data 0. A second
// instance with the 3-bit to 4-bit code set code = {data, 0} is checked
// over all 16 words in the same way.
`timescale 1ns/1ps
module tb_bus_decoder;
  logic [2:0] c3;
  logic [1:0] d2;
  logic       ok3;
  logic [3:0] c4;
  logic [2:0] d3;
  logic       ok4;
  int checks = 0, failures = 0;

  localparam logic [7:0][3:0] CB4 = {4'he, 4'hc, 4'ha, 4'h8, 4'h6, 4'h4, 4'h2, 4'h0};

  bus_decoder dut (.code(c3), .data(d2), .code_ok(ok3));
  bus_decoder #(.N(3), .M(4), .CODEBOOK(CB4)) dut4 (.code(c4), .data(d3), .code_ok(ok4));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp_ok;
      logic [1:0] exp_d;
      c3 = 3'(i);
      #1;
      exp_ok = (c3[1] == 1'b0);
      exp_d  = exp_ok ? {c3[2], c3[0]} : 2'b00;
      checks++;
      if (ok3 !== exp_ok || d2 !== exp_d) begin
        failures++;
        $display("FAIL code=%b data=%b ok=%b expected data=%b ok=%b", c3, d2, ok3, exp_d, exp_ok);
      end
    end
    for (int i = 0; i < 16; i++) begin
      logic exp_ok;
      logic [2:0] exp_d;
      c4 = 4'(i);
      #1;
      exp_ok = (c4[0] == 1'b0);
      exp_d  = exp_ok ? c4[3:1] : 3'b000;
      checks++;
      if (ok4 !== exp_ok || d3 !== exp_d) begin
        failures++;
        $display("FAIL 4/3 code=%b data=%b ok=%b", c4, d3, ok4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
