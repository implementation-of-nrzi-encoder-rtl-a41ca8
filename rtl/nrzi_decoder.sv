// nrzi_decoder: serial NRZI line decoder.
//
// A plain D flip-flop (no reset) keeps the previous line level dec_di_1d.
// The current line level dec_di is XORed with it, inverted, and captured in a
// set flip-flop whose output is the recovered data dec_do. With the default
// convention "no change on the line" decodes as 1 and "change" decodes as 0;
// with CONV = NRZI_TOGGLE_ON_ONE the inversion is dropped.
//
// The delay flip-flop, XOR-invert stage and set flip-flop follow the original
// circuit, as does the absence of a reset on the delay flip-flop; CONV is this
// design's addition. While reset_l is low the delay flip-flop still samples
// the line, so one clock edge in reset is enough to make it valid.
//
// Interface and timing:
//   clk      rising-edge clock, one line bit per cycle.
//   reset_l  asynchronous, active low: forces dec_do to 1.
//   dec_di   NRZI line in, sampled at each rising edge.
//   dec_do   decoded data, registered. It is the bit carried by the line
//            change between the levels sampled at the two preceding edges,
//            i.e. one cycle after the newer of those two levels is sampled.
module nrzi_decoder
  import nrzi_pkg::*;
#(
  parameter nrzi_conv_e CONV = NRZI_TOGGLE_ON_ZERO
) (
  input  logic clk,
  input  logic reset_l,
  input  logic dec_di,
  output logic dec_do
);

  logic dec_di_1d;  // line level one clock earlier
  logic dec_do_in;  // next decoded bit, input of the output flip-flop

  always_ff @(posedge clk) dec_di_1d <= dec_di;

  always_comb dec_do_in = nrzi_unstep(CONV, dec_di, dec_di_1d);

  nrzi_set_ff u_data_ff (
    .clk   (clk),
    .set_n (reset_l),
    .d     (dec_do_in),
    .q     (dec_do)
  );

endmodule
