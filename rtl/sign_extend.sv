// sign_extend: widens a two's complement field by copying its sign bit.
//
// Combinational. The IN_W-bit input is placed in the low bits of the OUT_W-bit
// output and its MSB is repeated into every upper bit, so that the value is
// unchanged when read as a signed number (4-bit 0101 -> 8-bit 00000101,
// 1110 -> 11111110). The datapath uses it on the 4-bit immediate before the
// B-operand multiplexer; the program counter uses it on the branch offset.
// It contains no gates: every output bit is a copy of an input bit.
// The function and its examples are the lecture's.
module sign_extend #(
  parameter int unsigned IN_W  = sc_pkg::IMM_W,
  parameter int unsigned OUT_W = sc_pkg::DATA_W
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  assign out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};

endmodule
