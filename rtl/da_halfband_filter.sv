// da_halfband_filter - serial distributed-arithmetic FIR core, half-band configuration.
//
// y(n) = sum_{k=0}^{N-1} h(k) x(n-k) computed without multipliers: the sample is serialised
// LSB first (PSC), its bits and those of the N-1 previous samples (TSB) address a 2^N-entry
// table of coefficient partial sums (LUT), and a shift-and-add scaling accumulator combines
// the B table words. One sample takes B clocks whatever N is.
//
// The default coefficients are the document's half-band design for N=11, C=4: a Hamming-
// windowed sinc(n/2)/2, n = -(N-1)/2..(N-1)/2, quantised as round(h*(2^(C-1)-1)), which gives
// {0,0,0,0,2,4,2,0,0,0,0}. Any coefficient list may be given; half-band sets have every other
// coefficient zero, which the LUT absorbs at no cost.
//
// Interface (document's port list): DIN is loaded when ND is high in a clock where RFD is high
// (ND while RFD is low is ignored). RFD is high when the core is idle and in the clock that
// processes the final bit of the current sample, so with ND tied to RFD a sample is taken every
// B clocks. RDY is high for one clock, B+2 clocks after the clock that accepted the sample; DOUT is held between RDY
// pulses when REG_OUT=1 and valid only with RDY when REG_OUT=0. RST is synchronous, active
// high, and clears the sample history. DOUT is two's complement, R = B + C + log2(N) bits
// (one more for unsigned coefficients).
module da_halfband_filter
  import da_pkg::*;
#(
  parameter int unsigned B           = 4,    // input bit precision
  parameter int unsigned C           = 4,    // coefficient width
  parameter int unsigned N           = 11,   // number of taps
  parameter coef_t [N-1:0] COEFF = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd2, 32'sd4, 32'sd2, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter bit          COEF_SIGNED = 1'b1,
  parameter bit          SIGNED_IN   = 1'b0, // DIN two's complement (1) or unsigned (0)
  parameter bit          REG_OUT     = 1'b1, // registered output option
  localparam int unsigned R          = lut_width(N, C, COEF_SIGNED) + B
) (
  input  logic                CLK,
  input  logic                RST,
  input  logic [B-1:0]        DIN,
  input  logic                ND,
  output logic                RFD,
  output logic                RDY,
  output logic signed [R-1:0] DOUT
);

  logic     start;
  da_ctrl_t ctrl;

  assign start = ND && RFD;

  da_control #(.B(B)) u_ctrl (
    .clk(CLK), .rst(RST), .start, .can_start(RFD), .ctrl
  );

  da_datapath #(
    .B(B), .C(C), .NT(N), .COEFF(COEFF), .COEF_SIGNED(COEF_SIGNED),
    .SIGNED_IN(SIGNED_IN), .REG_OUT(REG_OUT), .TAPS(N), .OFFSET(0), .STRIDE(1)
  ) u_dp (
    .clk(CLK), .rst(RST), .load(start), .ctrl, .din(DIN), .y(DOUT), .done(RDY)
  );

endmodule
