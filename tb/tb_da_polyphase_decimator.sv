// tb_da_polyphase_decimator - self-checking test of the DA polyphase decimator.
//
// Five configurations run in parallel, each checked clock by clock by tb_pd_harness:
//  u0  default (M=4, N=4, B=8, C=8), ND every clock: inputs faster than one output per B
//      clocks, so RFD must hold off the group-completing sample (stall)
//  u1  default, ND random (40 %)
//  u2  M=2, N=4, B=8          u3  M=3, N=4, B=8          u4  M=2, N=5, B=8, signed input
//  u5  M=4, N=4, B=8 with the three-tone test signal, ND every 3rd clock, unregistered output
//  u6  M=2, N=4 and u7  M=3, N=4 and u8  M=2, N=5 with the three-tone test signal
// (the decimation factors, filter lengths and test signal evaluated for this design).
module tb_da_polyphase_decimator;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c [9], f [9], s [9], o [9];
  logic [8:0] fin;

  tb_pd_harness #(.NSAMP(400), .ND_PCT(100)) u0 (
    .clk, .rst, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .outputs(o[0]), .finished(fin[0]));
  tb_pd_harness #(.NSAMP(400), .ND_PCT(40)) u1 (
    .clk, .rst, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .outputs(o[1]), .finished(fin[1]));
  tb_pd_harness #(.M(2), .NSAMP(300), .ND_PCT(30)) u2 (
    .clk, .rst, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .outputs(o[2]), .finished(fin[2]));
  tb_pd_harness #(.M(3), .NSAMP(300), .ND_PCT(100)) u3 (
    .clk, .rst, .checks(c[3]), .failures(f[3]), .stalls(s[3]), .outputs(o[3]), .finished(fin[3]));
  tb_pd_harness #(.M(2), .N(5), .COEFF({32'sd3, 32'sd30, 32'sd61, 32'sd30, 32'sd3}),
                  .SIGNED_IN(1'b1), .NSAMP(300), .ND_PCT(70)) u4 (
    .clk, .rst, .checks(c[4]), .failures(f[4]), .stalls(s[4]), .outputs(o[4]), .finished(fin[4]));

  tb_pd_harness #(.STIM(1), .REG_OUT(1'b0), .NSAMP(200), .ND_PCT(35)) u5 (
    .clk, .rst, .checks(c[5]), .failures(f[5]), .stalls(s[5]), .outputs(o[5]), .finished(fin[5]));
  tb_pd_harness #(.M(2), .STIM(1), .NSAMP(100)) u6 (
    .clk, .rst, .checks(c[6]), .failures(f[6]), .stalls(s[6]), .outputs(o[6]), .finished(fin[6]));
  tb_pd_harness #(.M(3), .STIM(1), .NSAMP(99)) u7 (
    .clk, .rst, .checks(c[7]), .failures(f[7]), .stalls(s[7]), .outputs(o[7]), .finished(fin[7]));
  tb_pd_harness #(.M(2), .N(5), .COEFF({32'sd3, 32'sd30, 32'sd61, 32'sd30, 32'sd3}),
                  .STIM(1), .NSAMP(100)) u8 (
    .clk, .rst, .checks(c[8]), .failures(f[8]), .stalls(s[8]), .outputs(o[8]), .finished(fin[8]));

  task automatic finish_run();
    for (int i = 0; i < 9; i++) begin
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
    checks++;
    if (s[0] == 0) begin
      failures++;
      $display("RFD never held off a sample in the full-rate run");
    end
    checks++;
    if (o[0] != 100) begin
      failures++;
      $display("full-rate run gave %0d outputs, expected 100", o[0]);
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
