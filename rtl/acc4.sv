// acc4: 4-bit accumulator slice (4 ripple-carry full adders and 5 D flip-flops).
//
// Each clock edge adds the input word A and the carry in cin to the value held
// in the sum flip-flops: S <= S + A + cin (mod 2^WIDTH). The sum flip-flops feed
// back to the B inputs of the full adders; the carries ripple from bit 0 to the
// top bit inside one clock cycle. The carry out of the top adder goes into a
// fifth flip-flop, so Cout0 is the carry of the addition that produced the
// current S and is handed to the next slice exactly one clock later.
//
// Interface: A and cin are sampled at the rising edge of clk; S and Cout0
// change right after it. rst_n (asynchronous, active low) clears S and Cout0;
// the reset is an addition of this RTL. The structure (adder chain, 4 + 1
// flip-flops, registered carry) follows the original slice; WIDTH defaults to
// its 4 bits.
module acc4 #(
  parameter int unsigned WIDTH = dds_pkg::SLICE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] A,
  input  logic             cin,
  output logic [WIDTH-1:0] S,
  output logic             Cout0
);
  logic [WIDTH:0]   c;     // ripple carries, c[0] = cin
  logic [WIDTH-1:0] sum;   // adder outputs, next value of S

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .A   (A[i]),
      .B   (S[i]),
      .Cin (c[i]),
      .S   (sum[i]),
      .Cout(c[i+1])
    );
    dff u_s (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (sum[i]),
      .q    (S[i]),
      .q_bar()
    );
  end

  dff u_cout (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (c[WIDTH]),
    .q    (Cout0),
    .q_bar()
  );
endmodule
