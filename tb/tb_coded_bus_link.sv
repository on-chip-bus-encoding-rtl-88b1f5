// End-to-end testbench for coded_bus_link at its default parameters
// (2 data bits on a 3-wire bus, default code set).
//
// The transmit side drives a behavioural model of the global wires whose
// far end feeds the receive side. The clock period equals the 30 ps delay
// constraint the code set was chosen for, so a word is only received
// correctly if every transition on the wires settles within one cycle.
// The test sends every one of the 16 data-to-data transitions, then random
// data, and checks that each word comes out two clock edges after it went
// in. It also counts:
//   - each switching class of the encoded bus (--R, R--, R-F, R-R, either
//     sign), and the largest wire delay seen, which must stay under 30 ps;
//   - data transitions that would have been the 38.7 ps rise-against-fall
//     pattern on an unencoded 2-bit bus, i.e. that the encoding rescued;
//   - a corrupted word forced onto the receive side, which must be
//     flagged by code_ok;
//   - reset, after which the link must deliver data 0.
// Any of these that never happens counts as a failure.
`timescale 1ps/10fs
module tb_coded_bus_link;
  import bus_delay_pkg::*;

  localparam real PERIOD_PS = DELAY_CONSTRAINT_PS;
  localparam int  N_RANDOM  = 4000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] data_in;
  logic [2:0] bus_tx;
  logic [2:0] wire_far;
  logic [2:0] bus_rx;
  logic [2:0] corrupt;
  logic [1:0] data_out;
  logic       code_ok;
  real        last_delay_ps;
  int         bad_patterns;

  int checks = 0, failures = 0;
  int class_seen [4];
  int rescued = 0;
  int flagged = 0;
  int resets  = 0;
  real max_delay_ps = 0.0;

  coded_bus_link dut (
    .clk, .rst_n, .data_in, .bus_tx, .bus_rx, .data_out, .code_ok
  );

  rlc_bus_model wires (
    .near_end (bus_tx),
    .far_end  (wire_far),
    .last_delay_ps,
    .bad_patterns
  );

  assign bus_rx = wire_far ^ corrupt;

  always #(PERIOD_PS / 2.0) clk = ~clk;

  // Watchdog.
  initial begin
    #((N_RANDOM + 200) * PERIOD_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify every transition the transmit latch puts on the wires.
  logic [2:0] tx_prev;
  always @(posedge clk) begin
    if (rst_n) begin
      automatic int c = class3(tx_prev, bus_tx);
      if (c >= 0) class_seen[c]++;
    end
    tx_prev <= bus_tx;
  end
  always @(last_delay_ps) if (rst_n && last_delay_ps > max_delay_ps) max_delay_ps = last_delay_ps;

  logic [1:0] hist [$];

  task automatic check(input logic [1:0] exp, input logic exp_ok, input string what);
    checks++;
    if (data_out !== exp || code_ok !== exp_ok) begin
      failures++;
      $display("FAIL %s at %0t: data_out=%b code_ok=%b expected %b/%b",
               what, $time, data_out, code_ok, exp, exp_ok);
    end
  endtask

  // Drive one word at the falling edge; check the word of two cycles ago.
  task automatic send(input logic [1:0] d);
    @(negedge clk);
    check(hist[$-1], 1'b1, "data");
    if (delay2_ps(hist[$], d) > DELAY_CONSTRAINT_PS) rescued++;
    data_in = d;
    hist.push_back(d);
  endtask

  initial begin
    int bad_at_start;
    rst_n   = 1'b0;
    data_in = 2'b00;
    corrupt = 3'b000;
    tx_prev = 3'b000;
    hist = {2'b00, 2'b00};
    repeat (3) @(negedge clk);
    check(2'b00, 1'b1, "after reset");
    resets++;
    rst_n = 1'b1;
    bad_at_start = bad_patterns;

    // Every ordered pair of data words.
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        send(2'(a));
        send(2'(b));
      end

    // Random traffic.
    for (int i = 0; i < N_RANDOM; i++) send(2'($urandom));

    // Corrupt the received word for one cycle: the middle wire of a valid
    // code is always low, so raising it gives a word outside the code set.
    @(negedge clk);
    check(hist[$-1], 1'b1, "data");
    data_in = hist[$];
    hist.push_back(hist[$]);
    corrupt = 3'b010;
    @(negedge clk);
    corrupt = 3'b000;
    checks++;
    if (code_ok !== 1'b0 || data_out !== 2'b00) begin
      failures++;
      $display("FAIL corrupted word not flagged: data_out=%b code_ok=%b", data_out, code_ok);
    end else flagged++;
    @(negedge clk);
    check(hist[$], 1'b1, "after corrupted word");

    // Reset in the middle of traffic.
    send(2'b11);
    send(2'b10);
    rst_n = 1'b0;
    #1;
    check(2'b00, 1'b1, "asynchronous reset");
    resets++;

    checks++;
    if (bad_patterns != bad_at_start) begin
      failures++;
      $display("FAIL %0d transitions outside the delay table", bad_patterns - bad_at_start);
    end
    checks++;
    if (max_delay_ps >= DELAY_CONSTRAINT_PS) begin
      failures++;
      $display("FAIL largest transition delay %f ps breaks the constraint", max_delay_ps);
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (class_seen[c] == 0) begin
        failures++;
        $display("FAIL switching class %0d never seen", c);
      end
    end
    checks++;
    if (rescued == 0) begin
      failures++;
      $display("FAIL no rise-against-fall data transition was sent");
    end
    checks++;
    if (flagged == 0 || resets < 2) begin
      failures++;
      $display("FAIL corrupted word or reset not exercised");
    end
    $display("classes --R=%0d R--=%0d R-F=%0d R-R=%0d, max delay %0.4f ps, rescued %0d, flagged %0d, resets %0d",
             class_seen[0], class_seen[1], class_seen[2], class_seen[3],
             max_delay_ps, rescued, flagged, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
