// mult_cell -- one column of a 2 x k carry-chain multiplier.
//
// The column adds the two partial products of equal weight, Am*Bn+1 and
// Am+1*Bn, plus the carry arriving from the column below. It is laid out the
// way an FPGA slice builds it: a 4-input function generator (LUT) forms
// prop = (Am & Bn+1) ^ (Am+1 & Bn); a dedicated AND gate forms gen = Am+1 & Bn;
// a carry multiplexer (MUXCY) passes ci when prop is 1 and gen otherwise (when
// prop is 0 both products are equal, so either one is the carry); an XOR on the
// carry chain (XORCY) forms s = prop ^ ci. The column therefore costs one LUT.
//
// Interface: five single-bit inputs, sum s and carry-out co. Purely
// combinational, no clock.
//
// The decomposition into LUT, AND, MUXCY and XORCY follows the slice element
// the multiplier is built from; the select polarity of the multiplexer is the
// one that makes the sum correct. Vendor primitives are not instantiated, so
// synthesis is free to map the logic.
module mult_cell (
  input  logic am,   // A[m]
  input  logic am1,  // A[m+1]
  input  logic bn,   // B[n]
  input  logic bn1,  // B[n+1]
  input  logic ci,   // carry in from the column below
  output logic s,    // sum bit of this column
  output logic co    // carry out to the column above
);
  logic prop;  // function generator output
  logic gen;   // dedicated AND output

  always_comb begin
    prop = (am & bn1) ^ (am1 & bn);
    gen  = am1 & bn;
    co   = prop ? ci : gen;
    s    = prop ^ ci;
  end
endmodule
