// nrzi_top: NRZI encoder looped straight into an NRZI decoder.
//
// The serial input enc_di is NRZI-encoded onto an internal line (enc_do),
// which is fed directly into the decoder; dec_do reproduces enc_di exactly,
// delayed by two bit periods (one register in the encoder, one in the
// decoder's output stage). The four ports are the ones of the original
// single-chip test setup, where enc_di came from a switch, dec_do drove an
// LED and reset_l was active low. The internal line enc_do is not brought
// out, as in that setup.
//
// Interface and timing:
//   clk      rising-edge clock, one bit per cycle.
//   reset_l  asynchronous, active low. Hold it low for at least one rising
//            clock edge: this sets the line and dec_do to 1 and lets the
//            decoder's delay flip-flop (which has no reset) load the line.
//   enc_di   serial data in.
//   dec_do   recovered data. A bit held on enc_di during clock period j is
//            sampled at the rising edge that ends period j and is shown on
//            dec_do during period j+2, i.e. after the following rising edge
//            (nrzi_pkg::CODEC_LATENCY = 2 periods). During reset dec_do
//            reads 1; after release it shows the bit that leaves the line
//            unchanged (1 by default) until the first real bit arrives.
//
// CONV selects the NRZI convention of both halves together; the default,
// toggle-on-zero, is what the original XOR-plus-inversion circuit computes.
module nrzi_top
  import nrzi_pkg::*;
#(
  parameter nrzi_conv_e CONV = NRZI_TOGGLE_ON_ZERO
) (
  input  logic clk,
  input  logic reset_l,
  input  logic enc_di,
  output logic dec_do
);

  logic enc_do;  // NRZI line between encoder and decoder

  nrzi_encoder #(.CONV(CONV)) u_enc (
    .clk     (clk),
    .reset_l (reset_l),
    .enc_di  (enc_di),
    .enc_do  (enc_do)
  );

  nrzi_decoder #(.CONV(CONV)) u_dec (
    .clk     (clk),
    .reset_l (reset_l),
    .dec_di  (enc_do),
    .dec_do  (dec_do)
  );

endmodule
