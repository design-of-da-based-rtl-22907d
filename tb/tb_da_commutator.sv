// tb_da_commutator - self-checking test of the polyphase input commutator.
//
// Random samples are accepted with random gaps. The testbench counts accepted samples itself:
// `last` must be high exactly when the next sample is the M-th of its group, `group` must
// equal accept && last, and while `group` is high segment i must carry the sample accepted i
// samples earlier (segment 0 the current one, segment M-1 the first of the group).
module tb_da_commutator;

  localparam int unsigned M = 3;
  localparam int unsigned B = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         accept, last, group;
  logic [B-1:0] din;
  logic [B-1:0] seg [M];

  da_commutator #(.M(M), .B(B)) dut (.clk, .rst, .accept, .din, .last, .group, .seg);

  int checks = 0, failures = 0, groups = 0;
  logic [B-1:0] recent [$];
  int unsigned  nacc = 0;

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    accept = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      accept = ($urandom % 3) != 0;
      din = B'($urandom);
      #1;
      checks++;
      if (last !== ((nacc % M) == M - 1)) begin failures++; $display("last wrong at %0d", n); end
      checks++;
      if (group !== (accept && last)) begin failures++; $display("group wrong at %0d", n); end
      if (accept && (nacc % M) == M - 1) begin
        groups++;
        for (int i = 0; i < M; i++) begin
          automatic logic [B-1:0] e = (i == 0) ? din : recent[i-1];
          checks++;
          if (seg[i] !== e) begin
            failures++;
            $display("group %0d: seg[%0d]=%0d expected %0d", groups, i, seg[i], e);
          end
        end
      end
      @(negedge clk);
      if (accept) begin
        recent.push_front(din);
        if (recent.size() > M) void'(recent.pop_back());
        nacc++;
      end
    end
    checks++;
    if (groups < 100) begin failures++; $display("too few groups"); end
    finish_run();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    finish_run();
  end

endmodule
