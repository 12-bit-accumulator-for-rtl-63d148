// xor2: 2-input XOR cell, oup = inp1 xor inp2 (high when the inputs differ).
//
// The original cell is a custom transistor circuit; this RTL keeps only its
// logic function. Pin names follow the original cell. Purely combinational.
module xor2 (
  input  logic inp1,
  input  logic inp2,
  output logic oup
);
  assign oup = inp1 ^ inp2;
endmodule
