// tb_nrzi_set_ff: self-checking testbench for nrzi_set_ff.
//
// Checks that the register captures d only on rising clock edges, holds its
// value across falling edges, and that an active-low set forces q to 1
// immediately (no clock edge needed) and holds it there while set_n is low,
// even when d is 0 and the clock runs. Random data is compared with a
// reference value kept by the testbench.
module tb_nrzi_set_ff;

  logic clk;
  initial clk = 1'b0;
  logic set_n;
  logic d;
  logic q;

  int checks = 0;
  int failures = 0;

  nrzi_set_ff dut (.clk(clk), .set_n(set_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic expq;
    set_n = 1'b1;
    d     = 1'b0;
    // Asynchronous set between clock edges.
    @(negedge clk);
    #2 set_n = 1'b0;
    #1 check(q, 1'b1, "async set without clock edge");
    // Set dominates data while held low.
    d = 1'b0;
    repeat (3) begin
      @(posedge clk); #1 check(q, 1'b1, "held set over rising edge with d=0");
    end
    @(negedge clk) set_n = 1'b1;
    @(posedge clk);
    expq = d;
    #1 check(q, expq, "first capture after set released");
    // Random data: capture on rising edge, hold over falling edge.
    repeat (500) begin
      @(negedge clk);
      check(q, expq, "hold across falling edge");
      d = 1'($urandom_range(0, 1));
      @(posedge clk);
      expq = d;
      #1 check(q, expq, "capture on rising edge");
      // Change d mid-cycle: q must not follow.
      #2 d = ~d;
      #1 check(q, expq, "no capture between edges");
    end
    // Set again while q is 0.
    @(negedge clk) d = 1'b0;
    @(posedge clk); #1 check(q, 1'b0, "q low before second set");
    #1 set_n = 1'b0;
    #1 check(q, 1'b1, "second async set");
    @(negedge clk) set_n = 1'b1;
    @(posedge clk); #1 check(q, 1'b0, "release and capture 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
