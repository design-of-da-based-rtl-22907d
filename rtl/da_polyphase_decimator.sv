// da_polyphase_decimator - M-to-1 polyphase decimating FIR built from serial DA units.
//
// Output: y(m) = sum_{k=0}^{N-1} h(k) x(mM - k), i.e. the N-tap FIR output kept at every M-th
// input. The N coefficients are split into M polyphase segments h_i(r) = h(i + M r), each of
// floor((N-1)/M)+1 taps (missing taps are zero). The commutator hands input samples to the
// segments from index M-1 down to 0; once segment 0 has its sample, all M segments run their
// DA inner product in parallel, over B clocks, at the low output rate, and an adder sums the
// M segment results into DOUT.
//
// Each segment is a PSC/TSB/LUT/scaling-accumulator unit with a 2^(taps per segment) table;
// one shared divide-by-B counter sequences them. The structure follows the document; the
// holding registers of the commutator, the shared counter and the registered output adder are
// this design's choices.
//
// Interface: as the FIR core. DIN is taken when ND and RFD are both high. RFD is low only when
// the sample that would complete a group arrives while the previous group's computation has
// more than its final bit left, so inputs may come as fast as one per clock when B <= M and
// otherwise stall briefly once per output. RDY is high for one clock, B+3 clocks after the clock
// that took the group-completing sample (one more than the half-band core, for the adder); DOUT holds the
// value until the next RDY. With REG_OUT=0 (unregistered output option) the adder drives DOUT
// directly: RDY comes one clock earlier (B+2) and DOUT is valid only while RDY is high.
// Reset is synchronous and active high.
module da_polyphase_decimator
  import da_pkg::*;
#(
  parameter int unsigned M           = 4,    // decimation factor
  parameter int unsigned N           = 4,    // taps of the prototype filter
  parameter int unsigned B           = 8,    // input bit precision
  parameter int unsigned C           = 8,    // coefficient width
  parameter coef_t [N-1:0] COEFF = {32'sd5, 32'sd59, 32'sd59, 32'sd5},
  parameter bit          COEF_SIGNED = 1'b1,
  parameter bit          SIGNED_IN   = 1'b0,
  parameter bit          REG_OUT     = 1'b1, // registered output option
  localparam int unsigned LP         = phase_taps(N, M),
  localparam int unsigned RP         = lut_width(LP, C, COEF_SIGNED) + B,   // segment result
  localparam int unsigned R          = RP + clog2i(M)
) (
  input  logic                CLK,
  input  logic                RST,
  input  logic [B-1:0]        DIN,
  input  logic                ND,
  output logic                RFD,
  output logic                RDY,
  output logic signed [R-1:0] DOUT
);

  logic     accept, group, last, can_start;
  da_ctrl_t ctrl;
  logic [B-1:0]           seg  [M];
  logic signed [RP-1:0]   py   [M];
  logic [M-1:0]           pdone;

  assign RFD    = !last || can_start;
  assign accept = ND && RFD;

  da_commutator #(.M(M), .B(B)) u_comm (
    .clk(CLK), .rst(RST), .accept, .din(DIN), .last, .group, .seg
  );

  da_control #(.B(B)) u_ctrl (
    .clk(CLK), .rst(RST), .start(group), .can_start, .ctrl
  );

  for (genvar i = 0; i < M; i++) begin : g_seg
    da_datapath #(
      .B(B), .C(C), .NT(N), .COEFF(COEFF), .COEF_SIGNED(COEF_SIGNED),
      .SIGNED_IN(SIGNED_IN), .REG_OUT(1'b0), .TAPS(LP), .OFFSET(i), .STRIDE(M)
    ) u_dp (
      .clk(CLK), .rst(RST), .load(group), .ctrl, .din(seg[i]), .y(py[i]), .done(pdone[i])
    );
  end

  // Output adder (summing node of the polyphase structure).
  logic signed [R-1:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < M; i++) sum += R'(py[i]);
  end

  if (REG_OUT) begin : g_reg_out
    // registered: DOUT holds between RDY pulses
    always_ff @(posedge CLK) begin
      if (RST) begin
        RDY  <= 1'b0;
        DOUT <= '0;
      end else begin
        RDY <= pdone[0];
        if (pdone[0]) DOUT <= sum;
      end
    end
  end else begin : g_comb_out
    // unregistered: DOUT is the adder output, valid only while RDY is high
    assign RDY  = pdone[0];
    assign DOUT = sum;
  end

  a_segments_in_step: assert property (@(posedge CLK) disable iff (RST)
                                       (pdone == '0) || (pdone == '1))
    else $error("da_polyphase_decimator: segment results out of step");

endmodule
