// oci_hybrid_encoder: one-bit hybrid CDMA spreading encoder.
//
// The data bit is XOR-ed with the code chip to give orthogonal (Walsh) spread
// data and AND-ed with it to give non-orthogonal (overloading) spread data; a
// multiplexer driven by the assigned code type picks one of the two. This is
// the encoder structure of the OCI crossbar. An encoder that holds no code
// this transaction (en = 0) sends '0', which adds nothing to the channel sum;
// that idle behaviour is this design's choice.
// Purely combinational; the serial crossbar uses one per flit bit and port,
// the parallel crossbar one per flit bit, port and chip.
module oci_hybrid_encoder
  import oci_pkg::*;
(
  input  logic       en,        // encoder holds a code this transaction
  input  code_type_e code_type, // orthogonal (XOR) or non-orthogonal (AND)
  input  logic       data,      // data bit to spread
  input  logic       chip,      // current chip of the assigned code
  output logic       spread     // spread chip to the channel adder
);

  logic orth_chip, nonorth_chip;

  assign orth_chip    = data ^ chip;
  assign nonorth_chip = data & chip;
  assign spread       = en & ((code_type == CODE_NONORTH) ? nonorth_chip : orth_chip);

endmodule
