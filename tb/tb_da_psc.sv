// tb_da_psc - self-checking test of the parallel-to-serial converter.
//
// Random B-bit words are loaded, either after an idle gap or in the same clock as the last
// shift of the previous word. For each word the testbench checks that sout shows bit 0, 1,
// ..., B-1 in consecutive shift clocks, and that sout does not move while shift is low.
module tb_da_psc;

  localparam int unsigned B = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         load, shift, sout;
  logic [B-1:0] din;

  da_psc #(.B(B)) dut (.clk, .rst, .load, .shift, .din, .sout);

  int checks = 0, failures = 0;

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    logic [B-1:0] w;
    load = 0; shift = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    w = B'($urandom);
    load = 1; din = w;
    @(negedge clk);
    load = 0;
    for (int n = 0; n < 60; n++) begin
      automatic logic [B-1:0] nw = B'($urandom);
      automatic bit chain = $urandom % 2;
      for (int b = 0; b < B; b++) begin
        if ($urandom % 4 == 0) begin   // idle clock: output must hold
          shift = 0;
          @(posedge clk); #1;
          checks++;
          if (sout !== w[b]) begin failures++; $display("word %0d bit %0d moved while idle", n, b); end
          @(negedge clk);
        end
        checks++;
        if (sout !== w[b]) begin
          failures++;
          $display("word %0d bit %0d: sout=%0b expected %0b", n, b, sout, w[b]);
        end
        shift = 1;
        load = (b == B - 1) && chain;
        din = nw;
        @(negedge clk);
        shift = 0; load = 0;
      end
      if (!chain) begin
        @(negedge clk);
        load = 1; din = nw;
        @(negedge clk);
        load = 0;
      end
      w = nw;
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
