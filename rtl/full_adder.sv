// full_adder: one-bit full adder built from the gate cells.
//
//   S    = A xor B xor Cin
//   Cout = A.B + (A xor B).Cin
//
// Two XOR cells form the sum; two AND cells and one OR cell form the carry,
// exactly the gate structure of the original adder. Purely combinational;
// in the accumulator slices these adders ripple their carries.
module full_adder (
  input  logic A,
  input  logic B,
  input  logic Cin,
  output logic S,
  output logic Cout
);
  logic axb, g, pc;

  xor2 u_x1 (.inp1(A),   .inp2(B),   .oup(axb));
  xor2 u_x2 (.inp1(axb), .inp2(Cin), .oup(S));
  and2 u_a1 (.inp1(A),   .inp2(B),   .oup(g));
  and2 u_a2 (.inp1(axb), .inp2(Cin), .oup(pc));
  or2  u_o1 (.inp1(g),   .inp2(pc),  .oup(Cout));
endmodule
