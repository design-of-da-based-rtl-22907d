// da_datapath - one serial DA inner-product unit: PSC -> TSB -> LUT -> scaling accumulator.
//
// This is the signal chain of the block schematic without its control counter. The sample on
// `din` is captured by `load`; during the following B clocks (ctrl.shift) its bits, LSB first,
// and the same bits of the TAPS-1 previous samples address the LUT; the scaling accumulator
// combines the B LUT words and raises `done` B+2 clocks after the clock with `load`, with
//     y = sum_k h(k) * x(n-k),   h(k) = COEFF[OFFSET + STRIDE*k],  k = 0..TAPS-1.
// The half-band filter uses one unit with all N taps; the polyphase decimator uses one unit
// per polyphase segment (OFFSET = segment index, STRIDE = M).
module da_datapath
  import da_pkg::*;
#(
  parameter int unsigned B           = 4,
  parameter int unsigned C           = 4,
  parameter int unsigned NT          = 11,
  parameter coef_t [NT-1:0] COEFF = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd2, 32'sd4, 32'sd2, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter bit          COEF_SIGNED = 1'b1,
  parameter bit          SIGNED_IN   = 1'b0,
  parameter bit          REG_OUT     = 1'b1,
  parameter int unsigned TAPS        = NT,
  parameter int unsigned OFFSET      = 0,
  parameter int unsigned STRIDE      = 1,
  localparam int unsigned W          = lut_width(TAPS, C, COEF_SIGNED),
  localparam int unsigned R          = W + B
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  da_ctrl_t            ctrl,
  input  logic [B-1:0]        din,
  output logic signed [R-1:0] y,
  output logic                done
);

  logic                sbit;
  logic [TAPS-1:0]     addr;
  logic signed [W-1:0] p;

  da_psc #(.B(B)) u_psc (
    .clk, .rst, .load, .shift(ctrl.shift), .din, .sout(sbit)
  );

  da_tsb #(.B(B), .TAPS(TAPS)) u_tsb (
    .clk, .rst, .shift(ctrl.shift), .sin(sbit), .addr
  );

  da_lut #(
    .NT(NT), .COEFF(COEFF), .C(C), .COEF_SIGNED(COEF_SIGNED),
    .TAPS(TAPS), .OFFSET(OFFSET), .STRIDE(STRIDE)
  ) u_lut (
    .clk, .addr, .q(p)
  );

  da_scaling_acc #(.W(W), .B(B), .SIGNED_IN(SIGNED_IN), .REG_OUT(REG_OUT)) u_acc (
    .clk, .rst, .ctrl, .p, .y, .done
  );

endmodule
