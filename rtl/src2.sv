// src2 - Spectral Response Compactor 2: cross-correlation of POs in pairs,
// one shared tone counter, two runs of the test set.
//
// Instead of following each primary output (PO) in time, SRC2 applies H(1)
// across POs: the POs are taken in pairs (po[0],po[1]), (po[2],po[3]), ...
// and each pair goes through one full adder with Cin = sub:
//   sub = 0 (first row):   a + b
//   sub = 1 (second row):  a + ~b + 1 = a - b + 2
// An adder tree sums the pair results and one tone counter with end-around
// carry accumulates the sum. The test set is applied twice: once with
// sub = 0 (the adder tree signature) and once with sub = 1 (the subtract
// tree signature). No per-PO flip-flop is needed, which is why this is the
// cheapest compactor. Pairing, the single counter, the end-around carry and
// the two runs follow the document. Inverting b with sub on every pair,
// the word-level adder tree and adding an unpaired last PO (odd NUM_PO) on
// its own are choices of this design. In the sub = 1 run every pair adds a
// constant offset of 2 per vector, identical for good and faulty circuits.
//
// Interface: clr clears the counter before each run, en marks a compacted
// vector, sub selects the run and must be steady during it. The signature
// of a run is (cnt, eac) after its last vector; it changes on the clock
// edge after each enabled cycle.
module src2 #(
  parameter int unsigned NUM_PO = 4,
  parameter int unsigned CNT_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  input  logic              sub,
  input  logic [NUM_PO-1:0] po,
  output logic [CNT_W-1:0]  cnt,
  output logic              eac
);

  localparam int unsigned NUM_PAIR = (NUM_PO + 1) / 2;
  localparam int unsigned VAL_W    = $clog2(3 * NUM_PAIR + 1);

  logic [NUM_PAIR-1:0][1:0] pair_val;
  logic [VAL_W-1:0]         tree_sum;

  for (genvar k = 0; k < NUM_PAIR; k++) begin : g_pair
    if (2 * k + 1 < NUM_PO) begin : g_full
      logic a, b;
      assign a = po[2*k];
      assign b = po[2*k+1] ^ sub;
      // full adder: A = a, B = b, Cin = sub
      assign pair_val[k] = {(a & b) | (a & sub) | (b & sub), a ^ b ^ sub};
    end else begin : g_single
      assign pair_val[k] = {1'b0, po[2*k]};
    end
  end

  always_comb begin
    tree_sum = '0;
    for (int k = 0; k < NUM_PAIR; k++) tree_sum = tree_sum + VAL_W'(pair_val[k]);
  end

  tone_counter #(.CNT_W(CNT_W), .VAL_W(VAL_W), .END_AROUND(1'b1)) u_tone (
    .clk, .rst_n, .clr, .en, .val(tree_sum), .cnt, .eac
  );

endmodule
