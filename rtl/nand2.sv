// nand2: 2-input CMOS NAND cell, oup = not (inp1 and inp2).
//
// Two parallel PMOS pull-ups and two series NMOS pull-downs in the original
// cell; here only the logic function. Pin names follow the original cell.
// Purely combinational.
module nand2 (
  input  logic inp1,
  input  logic inp2,
  output logic oup
);
  assign oup = ~(inp1 & inp2);
endmodule
