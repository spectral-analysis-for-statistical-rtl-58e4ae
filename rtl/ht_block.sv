// ht_block - Hadamard transform (H(1)) of the bit stream at one primary
// output (PO), the "HT Block" of SRC5.
//
// A flip-flop keeps the PO bit of the previous test vector, so that the
// previous and the current bit form an overlapping 2-bit chunk. One full
// adder applies a row of H(1) to the chunk:
//   sub = 0 (first row,  [1  1]):  {cout,sum} = prev + cur
//   sub = 1 (second row, [1 -1]):  {cout,sum} = prev + ~cur + 1
//                                             = prev - cur + 2
// i.e. subtraction in two's-complement form, by inverting the B input and
// feeding sub into the carry input. The flip-flop on the PO, the full adder
// with the stored bit on A, PO and sub combined on B and sub on Cin follow
// the document's drawing; the XOR used to invert B is how this design
// reads "minor adjustments to the addition hardware".
//
// Interface: sum/cout are combinational from prev, po and sub. The stored
// bit is cleared by clr (so the first chunk of a run has a preceding 0, as
// in the document's examples) and loaded with po on each cycle with en=1.
module ht_block (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic sub,
  input  logic po,
  output logic sum,
  output logic cout
);

  logic prev;
  logic b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   prev <= 1'b0;
    else if (clr) prev <= 1'b0;
    else if (en)  prev <= po;
  end

  assign b = po ^ sub;

  // full adder: A = prev, B = po xor sub, Cin = sub
  assign sum  = prev ^ b ^ sub;
  assign cout = (prev & b) | (prev & sub) | (b & sub);

endmodule
