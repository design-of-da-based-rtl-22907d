// da_control - bit-clock sequencer of the serial DA filter (the "control signal" block).
//
// It is a divide-by-B counter. A computation is started by `start`; for the next B clocks
// `ctrl.shift` is high and the bit counter runs 0..B-1 (LSB first), which makes the PSC and the
// TSB advance one bit per clock. The LUT is a synchronous ROM, so the accumulator flags
// (`acc_en`, `acc_first`, `acc_last`) are the same sequence delayed by one clock.
//
// `can_start` is the READY-FOR-DATA condition: the counter is idle, or the final bit of the
// current sample is being processed in this clock, so a new sample may be loaded at the
// coming edge. With `start` asserted in every such clock the core processes one sample every
// B clocks with no gap. A `start` while `can_start` is low is a protocol error (assertion).
//
// Reset is synchronous and active high, as the core's RST pin. The counter and the
// sequencing follow the document; the one-clock LUT latency is this design's choice
// (synchronous ROM, as in a block RAM).
module da_control
  import da_pkg::*;
#(
  parameter int unsigned B = 4            // input bit precision = clocks per sample
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,     // load a new sample at this edge
  output logic                     can_start, // start is allowed in this clock (RFD)
  output da_ctrl_t                 ctrl
);

  localparam int unsigned CW = clog2i(B+1);
  localparam logic [CW-1:0] LAST = CW'(B - 1);

  logic          busy;      // a sample is being serialised
  logic [CW-1:0] bit_idx;   // bit position handled in this clock
  logic          last_bit;
  assign last_bit  = busy && (bit_idx == LAST);
  assign can_start = !busy || last_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy           <= 1'b0;
      bit_idx        <= '0;
      ctrl.acc_en    <= 1'b0;
      ctrl.acc_first <= 1'b0;
      ctrl.acc_last  <= 1'b0;
    end else begin
      // accumulator stage: one clock behind the shift stage
      ctrl.acc_en    <= busy;
      ctrl.acc_first <= busy && (bit_idx == '0);
      ctrl.acc_last  <= last_bit;
      if (start && can_start) begin
        busy    <= 1'b1;
        bit_idx <= '0;
      end else if (last_bit) begin
        busy    <= 1'b0;
        bit_idx <= '0;
      end else if (busy) begin
        bit_idx <= bit_idx + 1'b1;
      end
    end
  end

  assign ctrl.shift = busy;

  a_start_only_when_ready: assert property (@(posedge clk) disable iff (rst) start |-> can_start)
    else $error("da_control: start while not ready for data");

endmodule
