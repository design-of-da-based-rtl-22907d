// tb_da_scaling_acc - self-checking test of the scaling accumulator.
//
// Random sequences of B LUT words are fed with the accumulator flags, with idle clocks
// between and sometimes inside a sequence. The expected result y = sum_b p_b * 2^b (MSB word
// subtracted for a signed input) is computed in the testbench. Three instances:
//  u0  unsigned input, registered output: y checked on `done` and held until the next one
//  u1  signed input (MSB word subtracted), registered output
//  u2  signed input, unregistered output: y checked only while `done` is high
module tb_da_scaling_acc;
  import da_pkg::*;

  localparam int unsigned W = 7;
  localparam int unsigned B = 5;
  localparam int unsigned R = W + B;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  da_ctrl_t            ctrl;
  logic signed [W-1:0] p;
  logic signed [R-1:0] y0, y1, y2;
  logic                d0, d1, d2;

  da_scaling_acc #(.W(W), .B(B)) u0 (.clk, .rst, .ctrl, .p, .y(y0), .done(d0));
  da_scaling_acc #(.W(W), .B(B), .SIGNED_IN(1'b1)) u1 (.clk, .rst, .ctrl, .p, .y(y1), .done(d1));
  da_scaling_acc #(.W(W), .B(B), .SIGNED_IN(1'b1), .REG_OUT(1'b0)) u2 (
    .clk, .rst, .ctrl, .p, .y(y2), .done(d2));

  int checks = 0, failures = 0;

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint eu, es, held_u, held_s;
    ctrl = '0; p = '0;
    held_u = 0; held_s = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      eu = 0; es = 0;
      for (int b = 0; b < B; b++) begin
        automatic logic signed [W-1:0] w = W'($urandom);
        while ($urandom % 5 == 0) begin      // idle clock inside the sequence
          ctrl = '0;
          @(negedge clk);
        end
        ctrl.acc_en = 1; ctrl.acc_first = (b == 0); ctrl.acc_last = (b == B - 1);
        p = w;
        eu += longint'(w) <<< b;
        es += (b == B - 1) ? -(longint'(w) <<< b) : (longint'(w) <<< b);
        @(negedge clk);
        ctrl = '0;
        checks++;
        if (d0 != (b == B - 1)) begin failures++; $display("done timing, sequence %0d", n); end
        if (b < B - 1) begin     // registered outputs hold the previous result meanwhile
          expect_eq(longint'(y0), held_u, "u0 held");
          expect_eq(longint'(y1), held_s, "u1 held");
        end
      end
      expect_eq(longint'(y0), eu, "u0 unsigned");
      expect_eq(longint'(y1), es, "u1 signed");
      checks++;
      if (!(d1 && d2)) begin failures++; $display("done missing, sequence %0d", n); end
      expect_eq(longint'(y2), es, "u2 unregistered");
      held_u = eu; held_s = es;
      if ($urandom % 2) @(negedge clk);
    end
    finish_run();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    finish_run();
  end

endmodule
