// walsh_modulator: 64-ary orthogonal modulation. Six code symbols (first symbol in the
// least significant bit of sym6) select Walsh function i; chip j of that function is the
// parity of (i AND j), the natural-order Hadamard code. The module is a pure
// combinational look-up: chip_idx walks 0..63 while a symbol is sent.
module walsh_modulator (
  input  logic [5:0] sym6,
  input  logic [5:0] chip_idx,
  output logic       chip
);
  assign chip = ^(sym6 & chip_idx);
endmodule
