// tb_nrzi_decoder: self-checking testbench for nrzi_decoder.
//
// The testbench builds NRZI line streams itself from random data (plus long
// runs of 0s and 1s): one for the toggle-on-zero decoder and one for the
// toggle-on-one decoder. The line level for bit k is applied before rising
// edge k; the decoder must show bit k right after edge k, i.e. one clock
// after the line level that carries it. After reset both decoders output 1.
module tb_nrzi_decoder;
  import nrzi_pkg::*;

  logic clk;
  initial clk = 1'b0;
  logic reset_l;
  logic line_z, line_o;
  logic do_z, do_o;

  int checks = 0;
  int failures = 0;
  int n_zero = 0, n_one = 0, n_reset = 0;

  nrzi_decoder #(.CONV(NRZI_TOGGLE_ON_ZERO)) dut_z (
    .clk(clk), .reset_l(reset_l), .dec_di(line_z), .dec_do(do_z));
  nrzi_decoder #(.CONV(NRZI_TOGGLE_ON_ONE)) dut_o (
    .clk(clk), .reset_l(reset_l), .dec_di(line_o), .dec_do(do_o));

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

  task automatic send(input logic b);
    // Called just after a falling edge.
    if (b == 1'b0) line_z = ~line_z;
    if (b == 1'b1) line_o = ~line_o;
    @(posedge clk);
    #1;
    if (b) n_one++; else n_zero++;
    check(do_z, b, "toggle-on-zero decode");
    check(do_o, b, "toggle-on-one decode");
    @(negedge clk);
  endtask

  task automatic do_reset();
    #2 reset_l = 1'b0;
    #1;
    n_reset++;
    check(do_z, 1'b1, "async set z");
    check(do_o, 1'b1, "async set o");
    // Idle line during reset; one edge loads the delay flip-flop.
    line_z = 1'b1;
    line_o = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(do_z, 1'b1, "held set z");
    check(do_o, 1'b1, "held set o");
    @(negedge clk) reset_l = 1'b1;
  endtask

  initial begin : stim
    reset_l = 1'b1;
    line_z  = 1'b1;
    line_o  = 1'b1;
    @(negedge clk);
    do_reset();
    repeat (300) send(1'($urandom_range(0, 1)));
    repeat (20) send(1'b0);
    repeat (20) send(1'b1);
    do_reset();
    repeat (300) send(1'($urandom_range(0, 1)));

    checks++;
    if (n_zero == 0 || n_one == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL coverage: zeros=%0d ones=%0d resets=%0d", n_zero, n_one, n_reset);
    end
    $display("coverage: zeros=%0d ones=%0d resets=%0d", n_zero, n_one, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
