// dds_chip: direct digital synthesizer built around the 12-bit pipelined
// phase accumulator.
//
// Every clock the accumulator adds the frequency word A (pins A0..A11) to the
// phase; the phase addresses the sine ROM; the DAC model turns the ROM sample
// into the output voltage. With clock frequency fclk the output frequency is
//
//   fout = A * fclk / 2^12
//
// e.g. A = 2048 at 50 MHz gives 25 MHz. The phase wraps (Cout0 = 1) once per
// output period on average.
//
// Ports: clk, rst_n (asynchronous, active low, added by this RTL: the chip has
// no reset pin), A, the analogue output out, and for observation the phase S,
// the wrap flag Cout0 and the DAC input code sample. out is the DAC output
// voltage in microvolts. S, Cout0 and sample are
// valid in the same cycle; sample and out follow S combinationally.
// The accumulator -> ROM -> DAC chain follows the original chip; the ROM
// contents and sample width, the DAC model and the reset are choices of this
// RTL. Pads and the off-chip filter are not modelled.
module dds_chip
  import dds_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] A,
  output logic [ACC_W-1:0] S,
  output logic             Cout0,
  output logic [ROM_DW-1:0] sample,
  output logic [31:0]      out
);
  acc12 #(.SLICE_W(SLICE_W), .N_SLICES(N_SLICES)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .A    (A),
    .S    (S),
    .Cout0(Cout0)
  );

  sine_rom #(.AW(ACC_W), .DW(ROM_DW)) u_rom (
    .addr(S),
    .data(sample)
  );

  dac #(.DW(ROM_DW)) u_dac (
    .code(sample),
    .vout_uv(out)
  );
endmodule
