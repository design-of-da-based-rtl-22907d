// da_tsb - time-skew buffer: the bit-serial sample history of the serial DA filter.
//
// The serial bit from the PSC enters a cascade of TAPS-1 shift registers of B bits each,
// advanced by `shift`. Because one sample is exactly B shifts long, the bit leaving segment k
// in a given clock is the same bit position of the sample k periods older. The nodes of the
// cascade form the LUT address: addr[0] is the PSC bit itself (current sample x(n)) and
// addr[k] the node after k segments (x(n-k)). Together with the PSC this holds N*B bits of
// history, the "TSB (N*B)" of the block schematic.
// Reset (synchronous) clears the history to zero samples; the document does not say what the
// TSB holds after reset.
module da_tsb #(
  parameter int unsigned B    = 4,
  parameter int unsigned TAPS = 11
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            shift,
  input  logic            sin,
  output logic [TAPS-1:0] addr
);

  assign addr[0] = sin;

  if (TAPS > 1) begin : g_chain
    localparam int unsigned L = (TAPS - 1) * B;
    logic [L-1:0] chain;  // chain[j] = sin delayed by j+1 shifts

    always_ff @(posedge clk) begin
      if (rst)        chain <= '0;
      else if (shift) chain <= {chain[L-2:0], sin};
    end

    for (genvar k = 1; k < TAPS; k++) begin : g_node
      assign addr[k] = chain[k*B-1];
    end
  end else begin : g_no_chain
    // a single-tap table is addressed by the PSC bit alone: no history to keep
    logic unused_ports;
    assign unused_ports = &{clk, rst, shift};
  end

endmodule
