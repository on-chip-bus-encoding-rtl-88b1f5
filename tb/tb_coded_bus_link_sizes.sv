// Testbench: coded_bus_link at the larger sizes the encoding is applied to.
//
// Runs three links side by side: 6 data bits on 7 wires, 4 data bits on
// 9 wires (five extra wires, the tightest delay constraint of the 4-bit
// study) and 9 data bits on 13 wires (the widest bus of the study). The
// code sets found for those buses are not available, so each link uses a
// placeholder set (see link_size_check); the test shows that the encoder,
// latches and decoder scale to these sizes and keep the two-cycle latency.
`timescale 1ns/1ps
module tb_coded_bus_link_sizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c [3];
  int   f [3];
  logic d [3];
  int   checks, failures;

  always #5 clk = ~clk;

  link_size_check #(.N(6), .M(7),  .NWORDS(300))  u_6_7  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  link_size_check #(.N(4), .M(9),  .NWORDS(300))  u_4_9  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  link_size_check #(.N(9), .M(13), .NWORDS(1200)) u_9_13 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
