// acc12: 12-bit pipelined phase accumulator made of three 4-bit slices.
//
// The 12-bit accumulation S <= S + A is split into N_SLICES slices of SLICE_W
// bits (acc4). Slice 0 holds the least significant bits. The carry out of each
// slice is registered inside the slice and enters the next slice one clock
// later, so no carry ever ripples through more than SLICE_W adders in one
// cycle. As a result slice k runs k clocks ahead of slice 0 in terms of which
// accumulation step its bits belong to. Output re-alignment flip-flops undo
// this: slice k's sum passes through N_SLICES-1-k flip-flops (2 for the low
// slice, 1 for the middle slice, none for the top slice), so all bits of S and
// the top carry Cout0 belong to the same accumulation step.
//
// Timing: A is taken straight from the input pins by all slices, without input
// skew registers, as in the original schematic. Counting rising edges n = 1,
// 2, ... after reset, with A(e) the word sampled at edge e, S after edge n is
//
//   S(n) = sum_{e<=n-2} A[3:0](e) + 16 * sum_{e<=n-1} A[7:4](e)
//          + 256 * sum_{e<=n} A[11:8](e)                          (mod 2^12)
//
// so a word's low bits reach S two edges after its top bits: the low slice's
// first sum appears at the output after the third edge. With a constant A, S
// advances by exactly A (mod 2^12) every clock, from a constant start offset.
// Cout0 is 1 in the cycle in which S shows a value that wrapped past 2^12.
// rst_n (asynchronous, active low) clears every flip-flop; it is an addition
// of this RTL. Everything else follows the original design.
module acc12 #(
  parameter int unsigned SLICE_W  = dds_pkg::SLICE_W,
  parameter int unsigned N_SLICES = dds_pkg::N_SLICES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [SLICE_W*N_SLICES-1:0] A,
  output logic [SLICE_W*N_SLICES-1:0] S,
  output logic                        Cout0
);
  logic [N_SLICES:0] carry;   // carry[k] enters slice k; carry[0] tied low
  assign carry[0] = 1'b0;

  for (genvar k = 0; k < N_SLICES; k++) begin : g_slice
    localparam int unsigned DELAY = N_SLICES - 1 - k;
    // pipe[j] is the slice output after j re-alignment flip-flops
    logic [SLICE_W-1:0] pipe [DELAY+1];

    acc4 #(.WIDTH(SLICE_W)) u_acc (
      .clk  (clk),
      .rst_n(rst_n),
      .A    (A[k*SLICE_W +: SLICE_W]),
      .cin  (carry[k]),
      .S    (pipe[0]),
      .Cout0(carry[k+1])
    );

    for (genvar j = 0; j < DELAY; j++) begin : g_delay
      for (genvar b = 0; b < SLICE_W; b++) begin : g_bit
        dff u_dff (
          .clk  (clk),
          .rst_n(rst_n),
          .d    (pipe[j][b]),
          .q    (pipe[j+1][b]),
          .q_bar()
        );
      end
    end

    assign S[k*SLICE_W +: SLICE_W] = pipe[DELAY];
  end

  assign Cout0 = carry[N_SLICES];
endmodule
