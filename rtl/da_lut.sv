// da_lut - distributed-arithmetic look-up table (DALUT).
//
// Entry `a` holds the sum of the coefficients whose address bit is 1:
//     LUT[a] = sum over k of a[k] * h(k),      h(k) = COEFF[OFFSET + STRIDE*k]
// (taps that fall beyond the coefficient list count as zero). With OFFSET=0, STRIDE=1 this is
// the plain 2^N-entry table of an N-tap filter; with OFFSET=i, STRIDE=M it is the table of
// polyphase segment i, whose taps are h(i + M*r). The table is computed at elaboration from the
// coefficient list (the document computes the same table offline and loads it), so a
// different coefficient set is only a parameter change.
//
// The read is synchronous: `q` is the entry of the address presented one clock earlier, like a
// block RAM. Zero coefficients need no special handling: they add nothing to any entry.
module da_lut
  import da_pkg::*;
#(
  parameter int unsigned NT          = 11,           // length of the coefficient list
  parameter coef_t [NT-1:0] COEFF = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd2, 32'sd4, 32'sd2, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter int unsigned C           = 4,            // coefficient width
  parameter bit          COEF_SIGNED = 1'b1,         // coefficients are two's complement
  parameter int unsigned TAPS        = NT,           // address bits of this table
  parameter int unsigned OFFSET      = 0,
  parameter int unsigned STRIDE      = 1,
  localparam int unsigned W          = lut_width(TAPS, C, COEF_SIGNED)
) (
  input  logic                clk,
  input  logic [TAPS-1:0]     addr,
  output logic signed [W-1:0] q
);

  localparam int unsigned DEPTH = 1 << TAPS;

  function automatic logic signed [W-1:0] entry(input int unsigned a);
    int sum = 0;
    for (int unsigned k = 0; k < TAPS; k++)
      if (a[k] && (OFFSET + STRIDE * k < NT)) sum += COEFF[OFFSET + STRIDE * k];
    return W'(sum);
  endfunction

  logic signed [W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) rom[a] = entry(a);
  end

  always_ff @(posedge clk) q <= rom[addr];

endmodule
