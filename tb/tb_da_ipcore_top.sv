// tb_da_ipcore_top - end-to-end test of the IP core top, all parameters at their defaults.
//
// Both configurations are driven at once from one clock:
//   half-band filter (N=11, B=4, C=4)   and   polyphase decimator (M=4, N=4, B=8, C=8).
// The run has three phases: ND held high on both inputs (the filter runs at one sample per B
// clocks; the decimator is offered more than it can take, so RFD holds samples off), ND
// random, and, after a reset in the middle of a stream, ND held high again. Reference models
// in this file, written from the filter equations, check every output value and its clock,
// every RFD, and that DOUT holds between RDY pulses. Each mechanism is counted and a failure
// is counted for any that never happened: back-to-back samples, samples after an idle gap,
// ND refused while RFD is low, decimator hold-off, outputs of both filters, reset mid-run.
module tb_da_ipcore_top;
  import da_pkg::*;

  localparam int unsigned HB_B = 4, HB_N = 11;
  localparam int unsigned PD_M = 4, PD_N = 4, PD_B = 8;
  localparam longint HB_H [HB_N] = '{0, 0, 0, 0, 2, 4, 2, 0, 0, 0, 0};
  localparam longint PD_H [PD_N] = '{5, 59, 59, 5};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [HB_B-1:0]    hb_din;
  logic               hb_nd, hb_rfd, hb_rdy;
  logic signed [11:0] hb_dout;
  logic [PD_B-1:0]    pd_din;
  logic               pd_nd, pd_rfd, pd_rdy;
  logic signed [17:0] pd_dout;

  da_ipcore_top dut (
    .clk, .rst,
    .hb_din, .hb_nd, .hb_rfd, .hb_rdy, .hb_dout,
    .pd_din, .pd_nd, .pd_rfd, .pd_rdy, .pd_dout
  );

  int checks = 0, failures = 0;
  int phase = 0;            // 0/2: ND held high, 1: ND random, 3: no ND
  longint cyc = 0;

  // mechanism counters
  int n_b2b = 0, n_gap = 0, n_refused = 0, n_pd_stall = 0, n_hb_out = 0, n_pd_out = 0;
  int n_reset = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("clock %0d: %s", cyc, what);
    end
  endtask

  // ---------------- stimulus ----------------
  always @(negedge clk) begin
    if (rst) begin
      hb_nd <= 1'b0; pd_nd <= 1'b0;
    end else begin
      hb_nd <= (phase == 1) ? ($urandom % 100) < 35 : (phase != 3);
      pd_nd <= (phase == 1) ? ($urandom % 100) < 35 : (phase != 3);
      hb_din <= HB_B'($urandom);
      pd_din <= PD_B'($urandom);
    end
  end

  // ---------------- half-band reference ----------------
  longint hb_hist [$], hb_exp [$], hb_due [$];
  longint hb_last = -1, hb_prev = 0;

  // ---------------- decimator reference ----------------
  longint pd_x [$], pd_exp [$], pd_due [$];
  longint pd_group = -1, pd_prev = 0;
  int     pd_n = 0;

  always @(posedge clk) begin
    if (rst) begin
      hb_hist.delete(); hb_exp.delete(); hb_due.delete(); hb_last = -1; hb_prev = 0;
      pd_x.delete(); pd_exp.delete(); pd_due.delete(); pd_group = -1; pd_prev = 0; pd_n = 0;
    end else begin
      cyc++;
      // half-band filter
      check(hb_rfd == (hb_last < 0 || cyc - hb_last >= longint'(HB_B)), "hb RFD");
      if (hb_nd && !hb_rfd) n_refused++;
      if (hb_nd && hb_rfd) begin
        automatic longint y = 0;
        if (hb_last >= 0 && cyc - hb_last == longint'(HB_B)) n_b2b++;
        if (hb_last >= 0 && cyc - hb_last > longint'(HB_B)) n_gap++;
        hb_hist.push_front(longint'(hb_din));
        if (hb_hist.size() > HB_N) void'(hb_hist.pop_back());
        foreach (hb_hist[k]) y += HB_H[k] * hb_hist[k];
        hb_exp.push_back(y);
        hb_due.push_back(cyc + longint'(HB_B) + 2);
        hb_last = cyc;
      end
      if (hb_rdy) begin
        n_hb_out++;
        if (hb_exp.size() == 0) check(0, "hb RDY with nothing pending");
        else begin
          automatic longint e = hb_exp.pop_front();
          automatic longint d = hb_due.pop_front();
          check(longint'(hb_dout) == e && cyc == d,
                $sformatf("hb out %0d expected %0d (due %0d)", hb_dout, e, d));
        end
        hb_prev = longint'(hb_dout);
      end else check(longint'(hb_dout) == hb_prev, "hb DOUT moved without RDY");

      // polyphase decimator
      begin
        automatic bit completes = (pd_n % PD_M) == PD_M - 1;
        check(pd_rfd == (!completes || pd_group < 0 || cyc - pd_group >= longint'(PD_B)),
              "pd RFD");
        if (pd_nd && !pd_rfd) n_pd_stall++;
        if (pd_nd && pd_rfd) begin
          pd_x.push_back(longint'(pd_din));
          if (completes) begin
            automatic longint y = 0;
            automatic int j = pd_x.size() - 1;
            for (int k = 0; k < PD_N; k++) if (j - k >= 0) y += PD_H[k] * pd_x[j-k];
            pd_exp.push_back(y);
            pd_due.push_back(cyc + longint'(PD_B) + 3);
            pd_group = cyc;
          end
          pd_n++;
        end
      end
      if (pd_rdy) begin
        n_pd_out++;
        if (pd_exp.size() == 0) check(0, "pd RDY with nothing pending");
        else begin
          automatic longint e = pd_exp.pop_front();
          automatic longint d = pd_due.pop_front();
          check(longint'(pd_dout) == e && cyc == d,
                $sformatf("pd out %0d expected %0d (due %0d)", pd_dout, e, d));
        end
        pd_prev = longint'(pd_dout);
      end else check(longint'(pd_dout) == pd_prev, "pd DOUT moved without RDY");
    end
  end

  task automatic finish_run();
    $display("mechanisms: back-to-back %0d, after gap %0d, ND refused %0d, decimator hold-off %0d,",
             n_b2b, n_gap, n_refused, n_pd_stall);
    $display("            half-band outputs %0d, decimator outputs %0d, resets mid-run %0d",
             n_hb_out, n_pd_out, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    phase = 0;
    repeat (400) @(posedge clk);
    phase = 1;
    repeat (1500) @(posedge clk);
    phase = 2;
    repeat (37) @(posedge clk);
    rst <= 1'b1;                       // reset with both filters in mid-computation
    n_reset++;
    @(posedge clk);
    rst <= 1'b0;
    repeat (400) @(posedge clk);
    phase = 3;                         // stop both streams and let them drain
    repeat (30) @(posedge clk);
    check(hb_exp.size() == 0 && pd_exp.size() == 0, "outputs still pending at the end");
    check(n_b2b > 0, "no back-to-back samples");
    check(n_gap > 0, "no sample after an idle gap");
    check(n_refused > 0, "ND never refused");
    check(n_pd_stall > 0, "decimator never held a sample off");
    check(n_hb_out > 100, "too few half-band outputs");
    check(n_pd_out > 50, "too few decimator outputs");
    check(n_reset > 0, "no reset mid-run");
    finish_run();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    finish_run();
  end

endmodule
