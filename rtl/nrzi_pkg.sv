// nrzi_pkg: constants and types shared by the NRZI encoder, decoder and top.
//
// An NRZI line carries each data bit as the presence or absence of a level
// change at a clock boundary. Which bit value produces the change is a choice
// of convention, captured here by nrzi_conv_e:
//   NRZI_TOGGLE_ON_ZERO - a 0 toggles the line, a 1 holds it. This is what the
//                         XOR-with-inverted-output circuit of the encoder and
//                         decoder computes, and it is the default everywhere.
//   NRZI_TOGGLE_ON_ONE  - a 1 toggles the line, a 0 holds it (the textbook
//                         wording of NRZI); the inversion after the XOR is
//                         dropped.
// Both the encoder and the decoder must use the same convention.
package nrzi_pkg;

  typedef enum logic {
    NRZI_TOGGLE_ON_ZERO = 1'b0,
    NRZI_TOGGLE_ON_ONE  = 1'b1
  } nrzi_conv_e;

  // Level every output register is forced to while reset_l is low
  // (the flip-flops are asynchronously set, not cleared).
  localparam logic LINE_RESET_LEVEL = 1'b1;

  // Bit periods from a bit held on enc_di to the same bit on dec_do when the
  // encoder drives the decoder directly: a bit present in clock period j is
  // output in period j+2 (two registers on the path).
  localparam int unsigned CODEC_LATENCY = 2;

  // One NRZI step: the next line level for data bit `d` when the line is at
  // level `line`. With toggle-on-zero this is ~(d ^ line), with toggle-on-one
  // it is d ^ line.
  function automatic logic nrzi_step(nrzi_conv_e conv, logic d, logic line);
    return (conv == NRZI_TOGGLE_ON_ZERO) ? ~(d ^ line) : (d ^ line);
  endfunction

  // Inverse of nrzi_step: the data bit carried by the change from `prev` to
  // `curr` on the line.
  function automatic logic nrzi_unstep(nrzi_conv_e conv, logic curr, logic prev);
    return (conv == NRZI_TOGGLE_ON_ZERO) ? ~(curr ^ prev) : (curr ^ prev);
  endfunction

endpackage
