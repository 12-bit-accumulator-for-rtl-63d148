// nor2: 2-input CMOS NOR cell, oup = not (inp1 or inp2).
//
// Two series PMOS pull-ups and two parallel NMOS pull-downs in the original
// cell; here only the logic function. Pin names follow the original cell.
// Purely combinational.
module nor2 (
  input  logic inp1,
  input  logic inp2,
  output logic oup
);
  assign oup = ~(inp1 | inp2);
endmodule
