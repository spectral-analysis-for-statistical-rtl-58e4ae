// src5 - Spectral Response Compactor 5: auto-correlation at every PO, one
// shared tone counter, two runs of the test set.
//
// Each primary output (PO) has an HT block (ht_block): a flip-flop with the
// previous bit and a full adder that forms prev + cur when sub = 0 and
// prev - cur + 2 when sub = 1. An adder tree sums the 2-bit (cout,sum)
// results of all POs and one tone counter with end-around carry accumulates
// the sum. In the first run of the test set (sub = 0) the counter collects
// the first Hadamard tone of all POs, in the second run (sub = 1) the
// second tone. It is a hybrid of SRC1 (per-PO spectra) and SRC2 (one shared
// counter). The structure follows the document; the adder tree written as
// one word-level sum is this design's choice. The sub = 1 run adds a
// constant offset of 2 per PO and vector, identical for good and faulty
// circuits.
//
// Interface: as src2. clr also clears the HT blocks' previous bits, so each
// run starts with a preceding 0 at every PO.
module src5 #(
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

  localparam int unsigned VAL_W = $clog2(3 * NUM_PO + 1);

  logic [NUM_PO-1:0][1:0] ht_val;
  logic [VAL_W-1:0]       tree_sum;

  for (genvar i = 0; i < NUM_PO; i++) begin : g_ht
    ht_block u_ht (
      .clk, .rst_n, .clr, .en, .sub,
      .po  (po[i]),
      .sum (ht_val[i][0]),
      .cout(ht_val[i][1])
    );
  end

  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < NUM_PO; i++) tree_sum = tree_sum + VAL_W'(ht_val[i]);
  end

  tone_counter #(.CNT_W(CNT_W), .VAL_W(VAL_W), .END_AROUND(1'b1)) u_tone (
    .clk, .rst_n, .clr, .en, .val(tree_sum), .cnt, .eac
  );

endmodule
