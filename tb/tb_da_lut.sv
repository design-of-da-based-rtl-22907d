// tb_da_lut - self-checking test of the DA look-up table.
//
// Two tables are read at every address: the default 11-tap half-band table and a polyphase
// segment table (3 address bits, taps h(1), h(4), h(7) of an 8-coefficient list with negative
// values). The expected entry is the sum of the coefficients selected by the address bits,
// computed in the testbench; the read latency of one clock is checked too.
module tb_da_lut;
  import da_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam coef_t [10:0] HB = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd2, 32'sd4, 32'sd2,
                                 32'sd0, 32'sd0, 32'sd0, 32'sd0};
  // h(0..7) = 3, -8, 5, 7, -6, 1, 2, -4   (listed from h(7) down)
  localparam coef_t [7:0]  PP = {-32'sd4, 32'sd2, 32'sd1, -32'sd6, 32'sd7, 32'sd5, -32'sd8,
                                 32'sd3};

  logic [10:0]       a0;
  logic signed [7:0] q0;
  logic [2:0]        a1;
  logic signed [5:0] q1;

  da_lut u0 (.clk, .addr(a0), .q(q0));
  da_lut #(.NT(8), .COEFF(PP), .C(4), .TAPS(3), .OFFSET(1), .STRIDE(3)) u1 (
    .clk, .addr(a1), .q(q1));

  int checks = 0, failures = 0;

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) begin
      automatic int e0 = 0, e1 = 0;
      for (int k = 0; k < 11; k++) if (a[k]) e0 += HB[k];
      for (int k = 0; k < 3; k++) if (a[k]) e1 += PP[1 + 3*k];
      @(negedge clk);
      a0 = 11'(a); a1 = 3'(a);
      @(negedge clk);
      a0 = ~a0; a1 = ~a1;           // a new address must not affect q before the next edge
      #1;
      checks++;
      if (int'(q0) != e0) begin failures++; $display("hb[%0d]=%0d expected %0d", a, q0, e0); end
      if (a < 8) begin
        checks++;
        if (int'(q1) != e1) begin failures++; $display("pp[%0d]=%0d expected %0d", a, q1, e1); end
      end
    end
    finish_run();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    finish_run();
  end

endmodule
