// or2: 2-input OR cell, built as in the original library from a NOR cell
// followed by an inverter: oup = inp1 or inp2. Purely combinational.
module or2 (
  input  logic inp1,
  input  logic inp2,
  output logic oup
);
  logic n;
  nor2 u_nor (.inp1(inp1), .inp2(inp2), .oup(n));
  inv  u_inv (.inp(n), .oup(oup));
endmodule
