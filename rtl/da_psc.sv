// da_psc - parallel-to-serial converter of the serial DA filter.
//
// `load` captures a B-bit sample; every clock with `shift` high the register moves right by
// one, so `sout` presents bit 0 (LSB) first and bit B-1 last, one bit per clock. When load and
// shift coincide (the clock that handles the final bit of the previous sample) the final bit
// is still on `sout` during that clock and the new sample replaces it at the edge.
// The LSB-first order follows the document's reference model of the scaling accumulator;
// the register and its priority are this design's choice.
module da_psc #(
  parameter int unsigned B = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [B-1:0] din,
  output logic         sout
);

  logic [B-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)        sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {1'b0, sr[B-1:1]};
  end

  assign sout = sr[0];

endmodule
