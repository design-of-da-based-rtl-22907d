// da_ipcore_top - the DA filter IP core with both of its filter configurations.
//
// The core is offered in two configurations, chosen when it is generated: a half-band FIR
// filter (single rate) and an M-to-1 polyphase decimator. Both are serial distributed-
// arithmetic designs that take B clocks per processed sample set and share the same building
// blocks and the same data-flow handshake (DIN/ND in, RFD ready-for-data, DOUT/RDY out,
// synchronous active-high RST). This top instantiates both side by side, each with its own
// ports (hb_* and pd_*) and the default sizes of each:
//   half-band filter : N = 11 taps, B = 4-bit input, C = 4-bit coefficients, 12-bit output
//   decimator        : M = 4, N = 4 taps, B = 8-bit input, C = 8-bit coefficients, 18-bit output
// One clock and one reset drive both.
module da_ipcore_top
  import da_pkg::*;
#(
  parameter int unsigned HB_B      = 4,
  parameter int unsigned HB_C      = 4,
  parameter int unsigned HB_N      = 11,
  parameter coef_t [HB_N-1:0] HB_COEFF = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd2, 32'sd4, 32'sd2, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter int unsigned PD_M      = 4,
  parameter int unsigned PD_N      = 4,
  parameter int unsigned PD_B      = 8,
  parameter int unsigned PD_C      = 8,
  parameter coef_t [PD_N-1:0] PD_COEFF = {32'sd5, 32'sd59, 32'sd59, 32'sd5},
  localparam int unsigned HB_R     = lut_width(HB_N, HB_C, 1'b1) + HB_B,
  localparam int unsigned PD_R     = lut_width(phase_taps(PD_N, PD_M), PD_C, 1'b1) + PD_B
                                     + clog2i(PD_M)
) (
  input  logic                   clk,
  input  logic                   rst,
  // half-band filter
  input  logic [HB_B-1:0]        hb_din,
  input  logic                   hb_nd,
  output logic                   hb_rfd,
  output logic                   hb_rdy,
  output logic signed [HB_R-1:0] hb_dout,
  // polyphase decimator
  input  logic [PD_B-1:0]        pd_din,
  input  logic                   pd_nd,
  output logic                   pd_rfd,
  output logic                   pd_rdy,
  output logic signed [PD_R-1:0] pd_dout
);

  da_halfband_filter #(.B(HB_B), .C(HB_C), .N(HB_N), .COEFF(HB_COEFF)) u_hbf (
    .CLK(clk), .RST(rst), .DIN(hb_din), .ND(hb_nd), .RFD(hb_rfd), .RDY(hb_rdy), .DOUT(hb_dout)
  );

  da_polyphase_decimator #(.M(PD_M), .N(PD_N), .B(PD_B), .C(PD_C), .COEFF(PD_COEFF)) u_pd (
    .CLK(clk), .RST(rst), .DIN(pd_din), .ND(pd_nd), .RFD(pd_rfd), .RDY(pd_rdy), .DOUT(pd_dout)
  );

endmodule
