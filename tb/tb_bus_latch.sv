// Self-checking testbench for bus_latch.
//
// Checks the reset value, that q takes d at each rising edge and holds it
// through the cycle (one cycle of latency), and that reset acts without a
// clock edge.
`timescale 1ns/1ps
module tb_bus_latch;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] d;
  logic [2:0] q;
  int checks = 0, failures = 0;

  bus_latch #(.W(3), .RESET_VALUE(3'b101)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected=%b", what, q, exp);
    end
  endtask

  initial begin
    logic [2:0] prev;
    rst_n = 1'b0;
    d     = 3'b010;
    @(negedge clk);
    check(3'b101, "reset value");
    @(negedge clk);
    check(3'b101, "held in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      d = 3'($urandom);
      prev = q;
      #1;
      check(prev, "no change before the edge");
      @(negedge clk);
      check(d, "captured at the edge");
    end
    #2 rst_n = 1'b0;
    #1 check(3'b101, "asynchronous reset");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
