// tb_da_control - self-checking test of the divide-by-B bit sequencer.
//
// Starts are requested at random whenever can_start allows (so runs are back to back or
// separated by idle gaps), plus one reset in the middle of a run. A separate model in the
// testbench tracks how many bits of the current sample remain and checks, every clock:
// shift high for exactly B clocks after each start, can_start high when idle or on the final
// bit, and the accumulator flags (acc_en, acc_first, acc_last) equal to the shift-stage
// sequence delayed by one clock.
module tb_da_control;
  import da_pkg::*;

  localparam int unsigned B = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic     start, can_start;
  da_ctrl_t ctrl;

  da_control #(.B(B)) dut (.clk, .rst, .start, .can_start, .ctrl);

  int checks = 0, failures = 0;
  int remain = 0;              // bits of the current sample still to shift, this clock
  bit p_en = 0, p_first = 0, p_last = 0;
  int starts = 0, cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("clock %0d: %s", cyc, what);
    end
  endtask

  always @(negedge clk) begin
    start <= !rst && can_start && (($urandom % 3) != 0);
  end

  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      remain = 0; p_en = 0; p_first = 0; p_last = 0;
    end else begin
      check(ctrl.shift == (remain > 0), "shift");
      check(can_start == (remain <= 1), "can_start");
      check(ctrl.acc_en == p_en, "acc_en");
      check(ctrl.acc_first == p_first, "acc_first");
      check(ctrl.acc_last == p_last, "acc_last");
      p_en    = remain > 0;
      p_first = remain == B;
      p_last  = remain == 1;
      if (remain > 0) remain--;
      if (start) begin
        remain = B;
        starts++;
      end
    end
  end

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (200) @(posedge clk);
    rst <= 1'b1;                 // reset in the middle of whatever is running
    @(posedge clk);
    rst <= 1'b0;
    repeat (200) @(posedge clk);
    check(starts > 40, "too few starts");
    finish_run();
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    finish_run();
  end

endmodule
