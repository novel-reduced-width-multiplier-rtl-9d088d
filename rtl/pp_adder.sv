// pp_adder -- adder of the aligned partial products.
//
// Sums NUM unsigned WIDTH-bit words, the partial products of the 2 x k blocks
// already shifted to the truncation line, into one WIDTH-bit word. The sum is
// written as a plain addition so that synthesis can build it from the
// FPGA's carry-chain adders; the adder's internal organisation (chain or
// tree) is this design's choice. The caller sizes WIDTH so the sum cannot
// wrap. Purely combinational.
module pp_adder #(
  parameter int NUM   = 4,   // number of partial products
  parameter int WIDTH = 10   // width of each word and of the sum
) (
  input  logic [NUM-1:0][WIDTH-1:0] x,  // aligned partial products
  output logic [WIDTH-1:0]          s   // their sum
);
  always_comb begin
    s = '0;
    for (int i = 0; i < NUM; i++) s = s + x[i];
  end
endmodule
