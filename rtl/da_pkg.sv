// da_pkg - types and width rules shared by the distributed-arithmetic (DA) FIR blocks.
//
// A bit-serial DA filter handles one input bit position per clock. The control counter
// produces, every clock, the flags below; they travel to the datapath as one struct so the
// stage alignment (shift this clock, accumulate the LUT word read last clock) stays together.
//
// Width rules (this design's own, derived so nothing can overflow):
//   LUT word   : C + clog2(TAPS) bits signed, one more when coefficients are unsigned
//                (|sum of TAPS coefficients| <= TAPS * 2^(C-1)).
//   Output word: LUT word + B bits. For a signed C-bit coefficient set this is
//                B + C + log2(N), the output width printed in the block schematic.
package da_pkg;

  // One filter coefficient. Coefficient lists are packed arrays of these, element k = h(k);
  // written as a concatenation, the list therefore starts with h(N-1).
  typedef logic signed [31:0] coef_t;

  // Per-clock control flags, from da_control to the datapath.
  typedef struct packed {
    logic shift;      // PSC and TSB advance one bit; LUT is read with the current address
    logic acc_en;     // scaling accumulator takes the LUT word read in the previous clock
    logic acc_first;  // that LUT word belongs to bit 0 (LSB): restart the accumulation
    logic acc_last;   // that LUT word belongs to bit B-1 (MSB): result is complete after it
  } da_ctrl_t;

  // ceil(log2(n)) with clog2(1) = 0.
  function automatic int unsigned clog2i(input int unsigned n);
    int unsigned r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  function automatic int unsigned lut_width(input int unsigned taps, input int unsigned c,
                                            input bit coef_signed);
    return c + clog2i(taps) + (coef_signed ? 0 : 1);
  endfunction

  // Number of taps of each polyphase segment: floor((N-1)/M)+1.
  function automatic int unsigned phase_taps(input int unsigned n, input int unsigned m);
    return (n - 1) / m + 1;
  endfunction

endpackage
