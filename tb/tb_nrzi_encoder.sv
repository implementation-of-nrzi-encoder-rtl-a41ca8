// tb_nrzi_encoder: self-checking testbench for nrzi_encoder.
//
// Two encoders run side by side on the same data, one per NRZI convention.
// The testbench keeps its own line level for each: with toggle-on-zero a 0
// bit flips the level and a 1 keeps it, with toggle-on-one the opposite.
// After every rising edge both outputs are compared with these levels. The
// data mixes random bits with long runs of 0s and 1s, and reset_l is pulsed
// asynchronously mid-stream to check that the line returns to 1 at once.
// Each case the encoder must handle (toggle, hold, async reset) is counted
// and must occur.
module tb_nrzi_encoder;
  import nrzi_pkg::*;

  logic clk;
  initial clk = 1'b0;
  logic reset_l;
  logic enc_di;
  logic do_z, do_o;   // outputs for toggle-on-zero / toggle-on-one

  int checks = 0;
  int failures = 0;
  int n_toggle = 0, n_hold = 0, n_reset = 0;

  nrzi_encoder #(.CONV(NRZI_TOGGLE_ON_ZERO)) dut_z (
    .clk(clk), .reset_l(reset_l), .enc_di(enc_di), .enc_do(do_z));
  nrzi_encoder #(.CONV(NRZI_TOGGLE_ON_ONE)) dut_o (
    .clk(clk), .reset_l(reset_l), .enc_di(enc_di), .enc_do(do_o));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ref_z, ref_o;

  task automatic send(input logic b);
    // Called just after a falling edge.
    enc_di = b;
    @(posedge clk);
    if (b == 1'b0) begin ref_z = ~ref_z; n_toggle++; end
    else           begin n_hold++; end
    if (b == 1'b1) ref_o = ~ref_o;
    #1;
    check(do_z, ref_z, "toggle-on-zero line");
    check(do_o, ref_o, "toggle-on-one line");
    @(negedge clk);
  endtask

  initial begin : stim
    // Start released, then assert, so that the set sees a falling edge.
    reset_l = 1'b1;
    #1 reset_l = 1'b0;
    enc_di  = 1'b1;
    #1;
    check(do_z, 1'b1, "reset level z");
    check(do_o, 1'b1, "reset level o");
    repeat (2) @(posedge clk);
    @(negedge clk) reset_l = 1'b1;
    ref_z = 1'b1;
    ref_o = 1'b1;

    repeat (300) send(1'($urandom_range(0, 1)));
    repeat (20) send(1'b0);
    repeat (20) send(1'b1);

    // Asynchronous reset pulse in the middle of a cycle.
    #2 reset_l = 1'b0;
    #1;
    n_reset++;
    check(do_z, 1'b1, "async reset z");
    check(do_o, 1'b1, "async reset o");
    @(negedge clk) reset_l = 1'b1;
    ref_z = 1'b1;
    ref_o = 1'b1;

    repeat (300) send(1'($urandom_range(0, 1)));

    checks++;
    if (n_toggle == 0 || n_hold == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL coverage: toggle=%0d hold=%0d reset=%0d", n_toggle, n_hold, n_reset);
    end
    $display("coverage: toggle-on-zero bits=%0d hold bits=%0d resets=%0d",
             n_toggle, n_hold, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
