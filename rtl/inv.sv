// inv: static CMOS inverter cell, oup = not inp.
//
// The smallest cell of the gate library the accumulator is built from. In the
// original design it is a sized PMOS/NMOS pair; at RTL only its logic function
// remains. Pin names inp/oup follow the original cell. Purely combinational.
module inv (
  input  logic inp,
  output logic oup
);
  assign oup = ~inp;
endmodule
