// sine_rom: sine look-up table (the "waveform map") of the synthesizer.
//
// Maps a phase word addr, 0 .. 2^AW-1 for one full turn, to an offset-binary
// sample of one period of a sine wave:
//
//   data = round( H + H * sin(2*pi*addr / 2^AW) ),  H = (2^DW - 1) / 2
//
// so 0 degrees and 180 degrees give mid-scale, 90 degrees full scale and 270
// degrees zero. The table is computed at elaboration time by a constant
// function and read combinationally (no clock): data follows addr in the same
// cycle. The role of the ROM follows the original design; its contents, its
// 12-bit address (the whole phase word) and its 8-bit sample width are this
// implementation's choices, as the source does not give them.
module sine_rom #(
  parameter int unsigned AW = dds_pkg::ACC_W,
  parameter int unsigned DW = dds_pkg::ROM_DW
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  localparam int unsigned DEPTH = 2 ** AW;
  typedef logic [DW-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    half, x;
    half = (2.0 ** DW - 1.0) / 2.0;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      x    = half + half * $sin(2.0 * 3.14159265358979323846 * real'(a) / real'(DEPTH));
      t[a] = DW'($rtoi(x + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];
endmodule
