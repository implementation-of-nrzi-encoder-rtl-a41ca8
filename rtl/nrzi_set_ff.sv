// nrzi_set_ff: one-bit rising-edge register with an active-low asynchronous set.
//
// This is the storage element that follows the XOR stage in both the NRZI
// encoder and decoder. The original circuit draws it as an "SR flip-flop"
// whose S pin carries an inversion bubble and is driven by reset_l; the data
// path enters its D input and it is clocked on the rising edge of clk. It is
// modelled here as a D flip-flop with preset, the cell the circuit maps to on
// the FPGA (FDP).
//
// Interface and timing:
//   set_n low  -> q goes to 1 (nrzi_pkg::LINE_RESET_LEVEL) at once, without waiting for a clock edge, and
//                 stays 1 while set_n is low.
//   set_n high -> q takes d at each rising edge of clk.
// There is no reset-to-0 path, so the "both S and R active" case of an SR
// latch cannot arise.
module nrzi_set_ff
  import nrzi_pkg::*;
(
  input  logic clk,
  input  logic set_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge set_n) begin
    if (!set_n) q <= LINE_RESET_LEVEL;
    else        q <= d;
  end

endmodule
