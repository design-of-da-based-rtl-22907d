// da_scaling_acc - scaling accumulator of the serial DA filter.
//
// It adds the B LUT words P_0..P_{B-1} (one per input bit position, LSB first) with weights
// 2^b:   y = sum_b P_b * 2^b,   the MSB term subtracted when the input is two's complement.
// It is an adder/subtractor and a register whose value is shifted right by one every clock:
//     S_0 = P_0,   S_b = (S_{b-1} >>> 1) + P_b     (P_{B-1} negated for signed inputs)
// which is the recurrence of the document's reference model. That model drops the bit shifted
// out each clock; here those bits are kept in a (B-1)-bit register, so the result
// {S_{B-1}, shifted-out bits} is exact and W+B bits wide.
//
// Timing: ctrl.acc_en marks a clock whose `p` is valid; acc_first/acc_last mark bit 0 and
// bit B-1. `done` pulses in the clock after the last word. With REG_OUT=1 (registered output)
// `y` is loaded then and held until the next `done`; with REG_OUT=0 `y` is the running
// register value, valid only while `done` is high (the document's two output options).
module da_scaling_acc
  import da_pkg::*;
#(
  parameter int unsigned W       = 6,     // LUT word width
  parameter int unsigned B       = 4,     // input bit precision (>= 2)
  parameter bit          SIGNED_IN = 1'b0,
  parameter bit          REG_OUT = 1'b1,
  localparam int unsigned R      = W + B
) (
  input  logic                clk,
  input  logic                rst,
  input  da_ctrl_t            ctrl,
  input  logic signed [W-1:0] p,
  output logic signed [R-1:0] y,
  output logic                done
);

  logic signed [W:0]   s;     // S_b, one guard bit: |S_b| < 2 * max|P|
  logic        [B-2:0] lo;    // bits already shifted out = low bits of the result
  logic signed [W:0]   term;
  logic signed [W:0]   s_next;
  logic        [B-2:0] lo_next;
  logic signed [R-1:0] y_reg;
  logic                unused_shift;   // the shift-stage flag is not needed here

  assign unused_shift = ctrl.shift;

  always_comb begin
    term = (SIGNED_IN && ctrl.acc_last) ? -(W+1)'(p) : (W+1)'(p);
    if (ctrl.acc_first) begin
      s_next  = term;
      lo_next = '0;
    end else begin
      s_next  = (s >>> 1) + term;
      lo_next = (B-1)'({s[0], lo} >> 1);  // s[0] enters at the top
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s     <= '0;
      lo    <= '0;
      y_reg <= '0;
      done  <= 1'b0;
    end else begin
      done <= ctrl.acc_en && ctrl.acc_last;
      if (ctrl.acc_en) begin
        s  <= s_next;
        lo <= lo_next;
        if (ctrl.acc_last) y_reg <= {s_next, lo_next};
      end
    end
  end

  assign y = REG_OUT ? y_reg : {s, lo};

endmodule
