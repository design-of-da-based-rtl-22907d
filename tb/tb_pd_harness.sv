// tb_pd_harness - drives one da_polyphase_decimator and checks it against a direct model.
//
// NSAMP samples (random, or the three-tone test signal of tb_test_signal) are offered, ND high in a clock with probability ND_PCT percent.
// Reference: with x[j] the j-th accepted sample (j = 0, 1, ...), every M-th sample
// (j = M-1, 2M-1, ...) completes an output y = sum_{k=0}^{N-1} h(k) x[j-k] (x[<0] = 0), i.e.
// the N-tap FIR output kept at every M-th input. Every clock the harness checks RFD (low only
// when the group-completing sample would arrive less than B clocks after the previous group
// started), each RDY value and its timing (B+3 clocks after the clock that completed the
// group, B+2 with the unregistered output), and that DOUT holds between RDY pulses. It counts the clocks in which ND was refused.
module tb_pd_harness
  import da_pkg::*;
#(
  parameter int unsigned M         = 4,
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 8,
  parameter int unsigned C         = 8,
  parameter coef_t [N-1:0] COEFF   = {32'sd5, 32'sd59, 32'sd59, 32'sd5},
  parameter bit          SIGNED_IN = 1'b0,
  parameter bit          REG_OUT   = 1'b1,
  parameter int unsigned STIM      = 0,     // 0 = random, 1 = three-tone test signal
  parameter int unsigned NSAMP     = 100,
  parameter int unsigned ND_PCT    = 100
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   outputs,
  output logic finished
);

  localparam int unsigned R = lut_width(phase_taps(N, M), C, 1'b1) + B + clog2i(M);

  logic [B-1:0]        din;
  logic                nd, rfd, rdy;
  logic signed [R-1:0] dout;

  da_polyphase_decimator #(
    .M(M), .N(N), .B(B), .C(C), .COEFF(COEFF), .SIGNED_IN(SIGNED_IN), .REG_OUT(REG_OUT)
  ) dut (
    .CLK(clk), .RST(rst), .DIN(din), .ND(nd), .RFD(rfd), .RDY(rdy), .DOUT(dout)
  );

  function automatic logic [B-1:0] sample(input int unsigned i);
    return (STIM == 1) ? B'(tb_test_signal::value(i, B)) : B'($urandom);
  endfunction

  longint      x [$];
  longint      exp_val [$];
  longint      exp_due [$];
  longint      cyc = 0;
  longint      last_group = -1;
  longint      prev_dout = 0;
  int unsigned nacc = 0;
  logic [B-1:0] next_sample;

  initial begin
    checks = 0; failures = 0; stalls = 0; outputs = 0; finished = 1'b0;
    nd = 1'b0; din = '0;
    next_sample = sample(0);
  end

  always @(negedge clk) begin
    if (rst || nacc >= NSAMP) begin
      nd <= 1'b0;
    end else begin
      nd  <= ($urandom % 100) < ND_PCT;
      din <= next_sample;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      automatic bit completes = (nacc % M) == M - 1;
      cyc++;
      checks++;
      if (rfd !== (!completes || last_group < 0 || cyc - last_group >= longint'(B))) begin
        failures++;
        $display("pd M=%0d N=%0d: RFD=%0b wrong at clock %0d", M, N, rfd, cyc);
      end
      if (nd && !rfd) stalls++;
      if (nd && rfd) begin
        x.push_back(SIGNED_IN ? longint'(signed'(din)) : longint'(din));
        if (completes) begin
          automatic longint y = 0;
          automatic int j = x.size() - 1;
          for (int k = 0; k < N; k++)
            if (j - k >= 0) y += longint'(COEFF[k]) * x[j-k];
          exp_val.push_back(y);
          exp_due.push_back(cyc + longint'(B) + (REG_OUT ? 3 : 2));
          last_group = cyc;
        end
        nacc++;
        next_sample = sample(nacc);
      end
      if (rdy) begin
        checks++;
        outputs++;
        if (exp_val.size() == 0) begin
          failures++;
          $display("pd: RDY with no output pending at clock %0d", cyc);
        end else begin
          automatic longint e = exp_val.pop_front();
          automatic longint d = exp_due.pop_front();
          if (longint'(dout) != e || cyc != d) begin
            failures++;
            $display("pd M=%0d N=%0d: out %0d at clock %0d, expected %0d at clock %0d",
                     M, N, longint'(dout), cyc, e, d);
          end
        end
        prev_dout = longint'(dout);
      end else if (REG_OUT) begin
        checks++;
        if (longint'(dout) != prev_dout) begin
          failures++;
          $display("pd: DOUT changed without RDY at clock %0d", cyc);
        end
      end
      if (nacc >= NSAMP && exp_val.size() == 0) finished <= 1'b1;
    end
  end

endmodule
