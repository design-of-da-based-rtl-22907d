// tb_da_tsb - self-checking test of the time-skew buffer.
//
// A random bit stream is shifted in with random idle clocks. The testbench keeps its own list
// of the bits shifted so far and checks, every clock, that address bit k equals the input bit
// of k*B shifts ago (bit 0 is the input itself), with zeros before the first shift after
// reset.
module tb_da_tsb;

  localparam int unsigned B    = 3;
  localparam int unsigned TAPS = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic            shift, sin;
  logic [TAPS-1:0] addr;

  da_tsb #(.B(B), .TAPS(TAPS)) dut (.clk, .rst, .shift, .sin, .addr);

  int checks = 0, failures = 0;
  bit past [$];           // past[0] = most recently shifted-in bit

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    shift = 0; sin = 0;
    for (int i = 0; i < TAPS * B; i++) past.push_front(1'b0);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      shift = ($urandom % 4) != 0;
      sin   = $urandom % 2;
      #1;
      for (int k = 0; k < TAPS; k++) begin
        automatic bit e = (k == 0) ? sin : past[k*B - 1];
        checks++;
        if (addr[k] !== e) begin
          failures++;
          $display("step %0d: addr[%0d]=%0b expected %0b", n, k, addr[k], e);
        end
      end
      @(negedge clk);
      if (shift) begin
        past.push_front(sin);
        void'(past.pop_back());
      end
    end
    finish_run();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    finish_run();
  end

endmodule
