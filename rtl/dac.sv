// dac: behavioural model of the digital-to-analogue converter. The real
// converter is an analogue circuit; this model only gives its transfer
// function, with the output voltage expressed as an integer in microvolts.
//
// An ideal, linear converter with no delay: the output spans VPP_UV peak to
// peak, centred on VMID_UV, as the code goes from 0 to 2^DW - 1:
//
//   vout_uv = VMID_UV - VPP_UV/2 + round(VPP_UV * code / (2^DW - 1))
//
// The 1.7 V peak-to-peak swing is the output swing reported for the original
// chip; the 2.5 V centre (half of the 5 V supply) and the 8-bit input width are
// choices of this model. Integer microvolts are used instead of a real-valued
// port so that every tool flow can read the model.
module dac #(
  parameter int unsigned DW      = dds_pkg::ROM_DW,
  parameter int unsigned VPP_UV  = 1_700_000,
  parameter int unsigned VMID_UV = 2_500_000
) (
  input  logic [DW-1:0] code,
  output logic [31:0]   vout_uv
);
  localparam longint unsigned FULL = (64'd1 << DW) - 64'd1;
  localparam longint unsigned VLOW = longint'(VMID_UV) - longint'(VPP_UV) / 2;

  logic [63:0] span;   // VPP_UV * code / FULL, rounded to nearest

  always_comb begin
    span    = (64'(VPP_UV) * 64'(code) + FULL / 2) / FULL;
    vout_uv = 32'(VLOW + span);
  end
endmodule
