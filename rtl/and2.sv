// and2: 2-input AND cell, built as in the original library from a NAND cell
// followed by an inverter: oup = inp1 and inp2. Purely combinational.
module and2 (
  input  logic inp1,
  input  logic inp2,
  output logic oup
);
  logic n;
  nand2 u_nand (.inp1(inp1), .inp2(inp2), .oup(n));
  inv   u_inv  (.inp(n), .oup(oup));
endmodule
