// Testbench: coded_bus_link loaded with a second 3-bit code set.
//
// The code set {010, 100, 101, 110} is the clique the greedy search finds
// in the example transition graph of a 3-bit bus (a bus whose allowed
// transitions differ from those of the default example). It is loaded
// through the CODEBOOK parameter, data 0..3 mapped in ascending code
// order. The wires are joined directly. The test checks the two-cycle
// round trip for every ordered pair of data words and for random data,
// that each word driven onto the wires belongs to the set, and that
// the four words outside the set are flagged by code_ok.
`timescale 1ns/1ps
module tb_coded_bus_link_fig19;
  localparam logic [3:0][2:0] CB = {3'b110, 3'b101, 3'b100, 3'b010};

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] data_in;
  logic [2:0] bus_tx;
  logic [2:0] bus_rx;
  logic [2:0] force_word;
  logic       force_en;
  logic [1:0] data_out;
  logic       code_ok;
  int checks = 0, failures = 0;
  int flagged = 0;

  coded_bus_link #(.N(2), .M(3), .CODEBOOK(CB)) dut (
    .clk, .rst_n, .data_in, .bus_tx, .bus_rx, .data_out, .code_ok
  );

  assign bus_rx = force_en ? force_word : bus_tx;

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every word on the wires must be one of the four clique members.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (!(bus_tx inside {3'b010, 3'b100, 3'b101, 3'b110})) begin
        failures++;
        $display("FAIL word %b outside the code set on the bus", bus_tx);
      end
    end
  end

  logic [1:0] hist [$];

  task automatic send(input logic [1:0] d);
    @(negedge clk);
    checks++;
    if (data_out !== hist[$-1] || code_ok !== 1'b1) begin
      failures++;
      $display("FAIL data_out=%b code_ok=%b expected %b", data_out, code_ok, hist[$-1]);
    end
    data_in = d;
    hist.push_back(d);
  endtask

  initial begin
    rst_n = 1'b0;
    data_in = 2'b00;
    force_en = 1'b0;
    force_word = 3'b000;
    hist = {2'b00, 2'b00};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        send(2'(a));
        send(2'(b));
      end
    for (int i = 0; i < 500; i++) send(2'($urandom));

    // Words outside the set: 000, 001, 011, 111.
    for (int w = 0; w < 8; w++) begin
      if (3'(w) inside {3'b010, 3'b100, 3'b101, 3'b110}) continue;
      @(negedge clk);
      force_word = 3'(w);
      force_en = 1'b1;
      @(negedge clk);
      checks++;
      if (code_ok !== 1'b0) begin
        failures++;
        $display("FAIL word %b not flagged", 3'(w));
      end else flagged++;
      force_en = 1'b0;
    end
    checks++;
    if (flagged != 4) begin
      failures++;
      $display("FAIL only %0d of 4 outside words flagged", flagged);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
