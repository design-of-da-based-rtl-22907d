// da_commutator - input commutator of the M-to-1 polyphase decimator.
//
// Each accepted input sample goes to one polyphase segment. The segment index starts at M-1
// and decrements to 0 (as the document describes), so within one output period the oldest
// sample x(mM-M+1) goes to segment M-1 and the newest, x(mM), to segment 0; segment i thus
// sees the sequence x(mM - i). Samples for segments M-1..1 wait in holding registers; the
// sample for segment 0 is passed straight through, and in that clock `group` is high: all M
// samples of the output period are then on `seg`, ready to be loaded into the M parallel-to-
// serial converters at the coming edge. After it the index wraps back to M-1.
// `last` (index is 0) lets the decimator hold off the group-completing sample while the
// previous output is still being computed. Reset (synchronous) sets the index to M-1.
module da_commutator
  import da_pkg::*;
#(
  parameter int unsigned M = 4,   // decimation factor (>= 2)
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         accept,        // din is taken at this edge
  input  logic [B-1:0] din,
  output logic         last,          // next accepted sample completes a group
  output logic         group,         // accept && last
  output logic [B-1:0] seg [M]        // sample for each segment, valid while group is high
);

  localparam int unsigned IW = clog2i(M);

  logic [IW-1:0] idx;
  logic [B-1:0]  hold [M];

  assign last  = (idx == '0);
  assign group = accept && last;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= IW'(M - 1);
      for (int i = 0; i < M; i++) hold[i] <= '0;
    end else if (accept) begin
      hold[idx] <= din;
      idx       <= last ? IW'(M - 1) : idx - 1'b1;
    end
  end

  always_comb begin
    seg[0] = din;
    for (int i = 1; i < M; i++) seg[i] = hold[i];
  end

endmodule
