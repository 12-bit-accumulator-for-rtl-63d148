// dds_pkg: constants shared by the direct digital synthesizer.
//
// The phase accumulator is 12 bits wide and is cut into three 4-bit slices,
// as in the design this RTL follows. The 8-bit width of the sine samples is
// this implementation's own choice; the source design does not state it.
package dds_pkg;
  localparam int unsigned ACC_W    = 12;  // phase word width
  localparam int unsigned SLICE_W  = 4;   // width of one pipelined accumulator slice
  localparam int unsigned N_SLICES = ACC_W / SLICE_W;
  localparam int unsigned ROM_DW   = 8;   // sine sample width (chosen here)
endpackage
