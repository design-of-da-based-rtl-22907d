// tb_da_halfband_filter - self-checking test of the DA half-band filter core.
//
// Fourteen configurations run in parallel, each checked clock by clock by tb_hbf_harness:
//  u0  default core (N=11, B=4, C=4), ND held high: full-rate stream, throughput = B clocks
//  u1  default core, ND random (30 %): idle gaps and ND pulses ignored while RFD is low
//  u2  N=7, B=4, C=4 with coefficients {0,0,3,8,3,0,0}: unit impulse, outputs must read
//      0 0 3 8 3 0 0
//  u3  N=11, B=8, C=8 half-band set {1,0,-5,0,37,64,37,0,-5,0,1}, signed input, unregistered
//      output option
//  u4  4 taps, B=6, C=6, h = {2,30,30,2}: ramp 0,1,2,.. must give 0,2,34,96,160,224,288,
//      352,416 (the printed 4-tap 6-bit ramp response)
//  u5  4 taps, B=10 and u6  8 taps, B=8: the other FIR sizes evaluated, random data
//  u7  7 taps, B=8, C=8 and u8  11 taps, B=8, C=8 half-band sets, three-tone test signal
//  u9  the u2 core with a step (0, then 1 held): outputs must read 0 0 0 3 11 14 14 ...
//  u10 4 taps, B=8, h = {0,8,8,0}: ramp 1,2,3,.. must give 0,8,24,40,56,..
//  u11 4 taps, B=8 and u12 4 taps, B=10, h = {0,2,2,0}: ramp 1,2,3,.. must give 0,2,6,10,14,..
//      (the printed 4-tap 8-bit and 10-bit ramp responses)
//  u13 6 taps, B=8, C=6, random data with ND at 70 %
module tb_da_halfband_filter;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c [14], f [14], s [14];
  logic [13:0] fin;
  longint o0 [16], o1 [16], o2 [16], o3 [16], o4 [16], o5 [16], o6 [16], o7 [16], o8 [16], o9 [16];
  longint o10 [16], o11 [16], o12 [16], o13 [16];

  tb_hbf_harness #(.NSAMP(300), .ND_PCT(100)) u0 (
    .clk, .rst, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .finished(fin[0]), .outs(o0));
  tb_hbf_harness #(.NSAMP(200), .ND_PCT(30)) u1 (
    .clk, .rst, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .finished(fin[1]), .outs(o1));
  tb_hbf_harness #(.N(7), .COEFF({32'sd0, 32'sd0, 32'sd3, 32'sd8, 32'sd3, 32'sd0, 32'sd0}),
                   .STIM(1), .NSAMP(10)) u2 (
    .clk, .rst, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .finished(fin[2]), .outs(o2));
  tb_hbf_harness #(.B(8), .C(8),
                   .COEFF({32'sd1, 32'sd0, -32'sd5, 32'sd0, 32'sd37, 32'sd64, 32'sd37, 32'sd0, -32'sd5, 32'sd0, 32'sd1}),
                   .SIGNED_IN(1'b1), .REG_OUT(1'b0), .NSAMP(200), .ND_PCT(60)) u3 (
    .clk, .rst, .checks(c[3]), .failures(f[3]), .stalls(s[3]), .finished(fin[3]), .outs(o3));

  tb_hbf_harness #(.B(6), .C(6), .N(4), .COEFF({32'sd2, 32'sd30, 32'sd30, 32'sd2}),
                   .STIM(3), .NSAMP(20)) u4 (
    .clk, .rst, .checks(c[4]), .failures(f[4]), .stalls(s[4]), .finished(fin[4]), .outs(o4));
  tb_hbf_harness #(.B(10), .C(6), .N(4), .COEFF({32'sd2, 32'sd30, 32'sd30, 32'sd2}),
                   .NSAMP(100)) u5 (
    .clk, .rst, .checks(c[5]), .failures(f[5]), .stalls(s[5]), .finished(fin[5]), .outs(o5));
  tb_hbf_harness #(.B(8), .C(8), .N(8),
                   .COEFF({32'sd0, 32'sd5, 32'sd20, 32'sd38, 32'sd38, 32'sd20, 32'sd5, 32'sd0}),
                   .NSAMP(100), .ND_PCT(50)) u6 (
    .clk, .rst, .checks(c[6]), .failures(f[6]), .stalls(s[6]), .finished(fin[6]), .outs(o6));

  tb_hbf_harness #(.B(8), .C(8), .N(7),
                   .COEFF({-32'sd1, 32'sd0, 32'sd31, 32'sd64, 32'sd31, 32'sd0, -32'sd1}),
                   .STIM(4), .NSAMP(100)) u7 (
    .clk, .rst, .checks(c[7]), .failures(f[7]), .stalls(s[7]), .finished(fin[7]), .outs(o7));
  tb_hbf_harness #(.B(8), .C(8),
                   .COEFF({32'sd1, 32'sd0, -32'sd5, 32'sd0, 32'sd37, 32'sd64, 32'sd37, 32'sd0, -32'sd5, 32'sd0, 32'sd1}),
                   .STIM(4), .NSAMP(100)) u8 (
    .clk, .rst, .checks(c[8]), .failures(f[8]), .stalls(s[8]), .finished(fin[8]), .outs(o8));

  tb_hbf_harness #(.N(7), .COEFF({32'sd0, 32'sd0, 32'sd3, 32'sd8, 32'sd3, 32'sd0, 32'sd0}),
                   .STIM(5), .NSAMP(12)) u9 (
    .clk, .rst, .checks(c[9]), .failures(f[9]), .stalls(s[9]), .finished(fin[9]), .outs(o9));

  tb_hbf_harness #(.B(8), .C(8), .N(4), .COEFF({32'sd0, 32'sd8, 32'sd8, 32'sd0}),
                   .STIM(2), .NSAMP(10)) u10 (
    .clk, .rst, .checks(c[10]), .failures(f[10]), .stalls(s[10]), .finished(fin[10]), .outs(o10));
  tb_hbf_harness #(.B(8), .C(8), .N(4), .COEFF({32'sd0, 32'sd2, 32'sd2, 32'sd0}),
                   .STIM(2), .NSAMP(10)) u11 (
    .clk, .rst, .checks(c[11]), .failures(f[11]), .stalls(s[11]), .finished(fin[11]), .outs(o11));
  tb_hbf_harness #(.B(10), .C(8), .N(4), .COEFF({32'sd0, 32'sd2, 32'sd2, 32'sd0}),
                   .STIM(2), .NSAMP(10)) u12 (
    .clk, .rst, .checks(c[12]), .failures(f[12]), .stalls(s[12]), .finished(fin[12]), .outs(o12));

  tb_hbf_harness #(.B(8), .C(6), .N(6),
                   .COEFF({32'sd1, -32'sd3, 32'sd18, 32'sd18, -32'sd3, 32'sd1}),
                   .NSAMP(100), .ND_PCT(70)) u13 (
    .clk, .rst, .checks(c[13]), .failures(f[13]), .stalls(s[13]), .finished(fin[13]), .outs(o13));

  localparam longint RAMP8A [6] = '{0, 8, 24, 40, 56, 72};
  localparam longint RAMP8B [6] = '{0, 2, 6, 10, 14, 18};
  localparam longint STEP [10] = '{0, 0, 0, 3, 11, 14, 14, 14, 14, 14};
  localparam longint RAMP4 [9] = '{0, 2, 34, 96, 160, 224, 288, 352, 416};
  localparam longint IMPULSE [7] = '{0, 0, 3, 8, 3, 0, 0};

  task automatic finish_run();
    for (int i = 0; i < 14; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (&fin);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (o2[i] != IMPULSE[i]) begin
        failures++;
        $display("impulse response[%0d] = %0d, expected %0d", i, o2[i], IMPULSE[i]);
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks += 3;
      if (o10[i] != RAMP8A[i]) begin
        failures++;
        $display("4-tap 8-bit ramp response A[%0d] = %0d, expected %0d", i, o10[i], RAMP8A[i]);
      end
      if (o11[i] != RAMP8B[i]) begin
        failures++;
        $display("4-tap 8-bit ramp response B[%0d] = %0d, expected %0d", i, o11[i], RAMP8B[i]);
      end
      if (o12[i] != RAMP8B[i]) begin
        failures++;
        $display("4-tap 10-bit ramp response[%0d] = %0d, expected %0d", i, o12[i], RAMP8B[i]);
      end
    end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (o9[i] != STEP[i]) begin
        failures++;
        $display("step response[%0d] = %0d, expected %0d", i, o9[i], STEP[i]);
      end
    end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (o4[i] != RAMP4[i]) begin
        failures++;
        $display("4-tap ramp response[%0d] = %0d, expected %0d", i, o4[i], RAMP4[i]);
      end
    end
    checks++;
    if (s[1] == 0) begin
      failures++;
      $display("ND while RFD low never happened");
    end
    finish_run();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    finish_run();
  end

endmodule
