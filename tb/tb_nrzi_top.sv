// tb_nrzi_top: end-to-end testbench for nrzi_top at its default parameters.
//
// Serial data enters enc_di one bit per clock period; the testbench keeps a
// record of what it sent and requires dec_do, in every period, to equal the
// bit that was on enc_di two periods earlier. It also follows the internal NRZI
// line (u_enc.enc_do) with its own model of the toggle-on-zero code: a 0
// flips the line, a 1 holds it.
//
// Stimulus: random bits, long runs of 1s (the line stays constant) and of 0s
// (the line toggles every cycle), an isolated 0 after a run of 1s whose
// arrival time on dec_do is measured in cycles, and an asynchronous reset in
// the middle of the stream. Each of these mechanisms is counted and must
// happen at least once.
module tb_nrzi_top;
  import nrzi_pkg::*;

  logic clk;
  initial clk = 1'b0;
  logic reset_l;
  logic enc_di;
  logic dec_do;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_line_toggle = 0;   // 0 bits: line changed level
  int n_line_hold   = 0;   // 1 bits: line kept its level
  int n_run0 = 0;          // runs of at least 16 zeros
  int n_run1 = 0;          // runs of at least 16 ones
  int n_reset = 0;         // asynchronous resets applied mid-stream
  int n_latency = 0;       // latency measurements equal to 2

  nrzi_top dut (.clk(clk), .reset_l(reset_l), .enc_di(enc_di), .dec_do(dec_do));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       sent;   // bit presented in the previous clock period
  logic       line;   // model of the NRZI line level
  int         run_len;
  logic       run_bit;

  task automatic send(input logic b);
    // Called just after a falling edge.
    enc_di = b;
    @(posedge clk);
    #1;
    // Line model.
    if (b == 1'b0) begin line = ~line; n_line_toggle++; end
    else           n_line_hold++;
    check(dut.enc_do, line, "NRZI line level");
    // Two-cycle end-to-end latency.
    // A bit presented in clock period j is sampled at the edge ending j and
    // shows on dec_do throughout period j+2, i.e. after the next edge.
    check(dec_do, sent, "dec_do shows the bit presented two periods earlier");
    sent = b;
    // Run tracking.
    if (b == run_bit) run_len++;
    else begin run_bit = b; run_len = 1; end
    if (run_len == 16) begin
      if (b) n_run1++; else n_run0++;
    end
    @(negedge clk);
  endtask

  task automatic reset_pulse();
    #2 reset_l = 1'b0;
    #1;
    check(dec_do, 1'b1, "dec_do set by async reset");
    check(dut.enc_do, 1'b1, "line set by async reset");
    enc_di = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(dec_do, 1'b1, "dec_do held while in reset");
    check(dut.enc_do, 1'b1, "line held while in reset");
    @(negedge clk) reset_l = 1'b1;
    // After reset the pipeline reads 1s, so dec_do shows 1 for two cycles.
    line = 1'b1;
    sent = 1'b1;
    run_len = 0;
  endtask

  // Send a run of 1s, then a single 0, and count the clock periods from the
  // one in which the 0 is on enc_di to the one in which it is on dec_do.
  task automatic measure_latency();
    int n;
    repeat (4) send(1'b1);
    send(1'b0);
    n = 1;
    while (dec_do !== 1'b0 && n < 8) begin
      send(1'b1);
      n++;
    end
    checks++;
    if (n != int'(CODEC_LATENCY)) begin
      failures++;
      $display("FAIL latency: %0d cycles, expected %0d", n, CODEC_LATENCY);
    end else n_latency++;
  endtask

  initial begin : stim
    // Start released, then assert, so that the set sees a falling edge.
    reset_l = 1'b1;
    #1 reset_l = 1'b0;
    enc_di  = 1'b1;
    run_bit = 1'b1;
    run_len = 0;
    #1;
    check(dec_do, 1'b1, "dec_do in initial reset");
    repeat (2) @(posedge clk);
    @(negedge clk) reset_l = 1'b1;
    line = 1'b1;
    sent = 1'b1;

    measure_latency();
    repeat (500) send(1'($urandom_range(0, 1)));
    repeat (24) send(1'b1);
    repeat (24) send(1'b0);
    reset_pulse();
    n_reset++;
    measure_latency();
    repeat (500) send(1'($urandom_range(0, 1)));

    $display("coverage: toggles=%0d holds=%0d runs0=%0d runs1=%0d resets=%0d latency2=%0d",
             n_line_toggle, n_line_hold, n_run0, n_run1, n_reset, n_latency);
    checks++;
    if (n_line_toggle == 0 || n_line_hold == 0 || n_run0 == 0 || n_run1 == 0 ||
        n_reset == 0 || n_latency < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
