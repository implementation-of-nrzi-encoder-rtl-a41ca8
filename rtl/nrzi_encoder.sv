// nrzi_encoder: serial NRZI line encoder.
//
// The line level enc_do is held in a set flip-flop. Every rising clock edge
// the data bit enc_di is XORed with the current line level (fed back from
// the flip-flop output), the result is inverted, and the flip-flop captures
// it. With the default convention a 0 bit therefore toggles the line and a 1
// bit leaves it unchanged; with CONV = NRZI_TOGGLE_ON_ONE the inversion is
// dropped and a 1 toggles the line.
//
// The XOR-invert-register structure with feedback and the active-low set on
// reset_l follow the original circuit; the CONV parameter is an addition of
// this design so that the other NRZI convention can be selected.
//
// Interface and timing:
//   clk      rising-edge clock, one data bit per cycle.
//   reset_l  asynchronous, active low: forces enc_do to 1 (line idle level).
//   enc_di   serial data in, sampled at each rising edge.
//   enc_do   NRZI line out, registered: the bit held on enc_di during a
//            clock period decides the level enc_do shows during the next
//            period (one period of latency).
module nrzi_encoder
  import nrzi_pkg::*;
#(
  parameter nrzi_conv_e CONV = NRZI_TOGGLE_ON_ZERO
) (
  input  logic clk,
  input  logic reset_l,
  input  logic enc_di,
  output logic enc_do
);

  logic enc_do_in;  // next line level, input of the output flip-flop

  always_comb enc_do_in = nrzi_step(CONV, enc_di, enc_do);

  nrzi_set_ff u_line_ff (
    .clk   (clk),
    .set_n (reset_l),
    .d     (enc_do_in),
    .q     (enc_do)
  );

endmodule
