// tb_hbf_harness - drives one da_halfband_filter and checks it against a direct-form model.
//
// Stimulus: NSAMP samples (STIM 0 = random, 1 = unit impulse then zeros, 2 = ramp 1,2,3..,
// 3 = ramp 0,1,2.., 4 = three-tone test signal of tb_test_signal, 5 = step: 0 then 1s),
// ND raised in a clock with probability ND_PCT percent. Every clock the harness checks:
//  * RFD against the rule "idle, or at least B clocks since the last accepted sample";
//  * each RDY: DOUT equals sum_k h(k) x(n-k) over the accepted samples, and RDY comes exactly
//    B+2 clocks after the clock that accepted x(n);
//  * with ND held high, consecutive samples are accepted exactly B clocks apart;
//  * with the registered output option, DOUT does not change between RDY pulses.
// The first 16 outputs are also exported for comparison with printed results.
module tb_hbf_harness
  import da_pkg::*;
#(
  parameter int unsigned B         = 4,
  parameter int unsigned C         = 4,
  parameter int unsigned N         = 11,
  parameter coef_t [N-1:0] COEFF = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd2, 32'sd4, 32'sd2, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter bit          SIGNED_IN = 1'b0,
  parameter bit          REG_OUT   = 1'b1,
  parameter int unsigned STIM      = 0,
  parameter int unsigned NSAMP     = 100,
  parameter int unsigned ND_PCT    = 100
) (
  input  logic   clk,
  input  logic   rst,
  output int     checks,
  output int     failures,
  output int     stalls,        // clocks with ND high and RFD low
  output logic   finished,
  output longint outs [16]
);

  localparam int unsigned R = lut_width(N, C, 1'b1) + B;

  logic [B-1:0]        din;
  logic                nd, rfd, rdy;
  logic signed [R-1:0] dout;

  da_halfband_filter #(
    .B(B), .C(C), .N(N), .COEFF(COEFF), .SIGNED_IN(SIGNED_IN), .REG_OUT(REG_OUT)
  ) dut (
    .CLK(clk), .RST(rst), .DIN(din), .ND(nd), .RFD(rfd), .RDY(rdy), .DOUT(dout)
  );

  function automatic logic [B-1:0] sample(input int unsigned i);
    case (STIM)
      1:       return (i == 0) ? B'(1) : '0;
      2:       return B'(i + 1);
      3:       return B'(i);
      4:       return B'(tb_test_signal::value(i, B));
      5:       return (i == 0) ? '0 : B'(1);
      default: return B'($urandom);
    endcase
  endfunction

  function automatic longint as_value(input logic [B-1:0] v);
    return SIGNED_IN ? longint'(signed'(v)) : longint'(v);
  endfunction

  longint      hist [$];      // accepted samples, newest first
  longint      exp_val [$];
  longint      exp_due [$];
  longint      cyc = 0;
  longint      last_acc = -1;
  longint      prev_dout = 0;
  int unsigned nacc = 0;
  int unsigned nout = 0;
  logic [B-1:0] next_sample;

  initial begin
    checks = 0; failures = 0; stalls = 0; finished = 1'b0;
    for (int i = 0; i < 16; i++) outs[i] = 0;
    nd = 1'b0; din = '0;
    next_sample = sample(0);
  end

  // stimulus, applied away from the active edge
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
      cyc++;
      // RFD rule
      checks++;
      if (rfd !== ((last_acc < 0) || (cyc - last_acc >= longint'(B)))) begin
        failures++;
        $display("hbf N=%0d B=%0d: RFD=%0b wrong at clock %0d", N, B, rfd, cyc);
      end
      if (nd && !rfd) stalls++;
      if (nd && rfd) begin
        automatic longint y = 0;
        if (ND_PCT == 100 && last_acc >= 0) begin
          checks++;
          if (cyc - last_acc != longint'(B)) begin
            failures++;
            $display("hbf: samples %0d clocks apart, expected %0d", cyc - last_acc, B);
          end
        end
        hist.push_front(as_value(din));
        if (hist.size() > N) void'(hist.pop_back());
        for (int k = 0; k < hist.size(); k++) y += longint'(COEFF[k]) * hist[k];
        exp_val.push_back(y);
        exp_due.push_back(cyc + longint'(B) + 2);
        last_acc = cyc;
        nacc++;
        next_sample = sample(nacc);
      end
      if (rdy) begin
        checks++;
        if (exp_val.size() == 0) begin
          failures++;
          $display("hbf: RDY with no sample pending at clock %0d", cyc);
        end else begin
          automatic longint e = exp_val.pop_front();
          automatic longint d = exp_due.pop_front();
          if (longint'(dout) != e || cyc != d) begin
            failures++;
            $display("hbf N=%0d B=%0d: out %0d at clock %0d, expected %0d at clock %0d",
                     N, B, longint'(dout), cyc, e, d);
          end
          if (nout < 16) outs[nout] = longint'(dout);
          nout++;
        end
        prev_dout = longint'(dout);
      end else if (REG_OUT) begin
        checks++;
        if (longint'(dout) != prev_dout) begin
          failures++;
          $display("hbf: DOUT changed without RDY at clock %0d", cyc);
        end
      end
      if (nacc >= NSAMP && exp_val.size() == 0) finished <= 1'b1;
    end
  end

endmodule
