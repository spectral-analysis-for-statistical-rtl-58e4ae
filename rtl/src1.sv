// src1 - Spectral Response Compactor 1: both Hadamard tones at every PO.
//
// For each primary output (PO) a flip-flop holds the bit of the previous
// test vector. The overlapping chunk (prev, cur) is multiplied by H(1):
//   first row  [1  1]: a half adder gives prev + cur      (0..2)
//   second row [1 -1]: a half subtracter gives prev - cur (-1..1),
//                      as difference and borrow
// and each result is added to its own counter, the add counter and the
// subtract counter of that PO. The counters are two's complement and drop
// the carry or borrow out of their most significant bit, so they count
// modulo 2^CNT_W; the subtract counter reads 1111 for -1 with CNT_W = 4.
// All of this follows the document, except that sharing the XOR between
// the half adder and the half subtracter is this design's reading of the
// "hardware recycling" the document credits SRC1 with. It is the compactor
// with the most hardware (2 * NUM_PO counters) and the least aliasing.
//
// Interface: clr clears the previous bits and counters before a run; on each
// cycle with en=1 the PO vector po is compacted, the counters change on the
// following clock edge. The signature is add_cnt and sub_cnt, one CNT_W-bit
// word per PO (index i of the packed array belongs to po[i]).
// A single run of the test set gives the whole signature.
module src1 #(
  parameter int unsigned NUM_PO = 4,
  parameter int unsigned CNT_W  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic                          en,
  input  logic [NUM_PO-1:0]             po,
  output logic [NUM_PO-1:0][CNT_W-1:0]  add_cnt,
  output logic [NUM_PO-1:0][CNT_W-1:0]  sub_cnt
);

  if (CNT_W < 2) begin : g_bad_width
    $error("src1: CNT_W must be at least 2");
  end

  logic [NUM_PO-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   prev <= '0;
    else if (clr) prev <= '0;
    else if (en)  prev <= po;
  end

  for (genvar i = 0; i < NUM_PO; i++) begin : g_po
    logic             ha_sum, ha_carry;   // half adder: prev + cur
    logic             hs_diff, hs_borrow; // half subtracter: prev - cur
    logic [CNT_W-1:0] add_val, sub_val;
    logic             unused_add_eac, unused_sub_eac;

    // The half adder's sum and the half subtracter's difference are the
    // same XOR of prev and cur; one gate serves both tones.
    assign ha_sum    = prev[i] ^ po[i];
    assign ha_carry  = prev[i] & po[i];
    assign hs_diff   = ha_sum;
    assign hs_borrow = ~prev[i] & po[i];

    // {carry,sum} is 0..2; {borrow,diff} is the 2-bit two's complement of
    // prev - cur, sign-extended here to the counter width.
    assign add_val = CNT_W'({ha_carry, ha_sum});
    assign sub_val = {{(CNT_W - 1){hs_borrow}}, hs_diff};

    tone_counter #(.CNT_W(CNT_W), .VAL_W(CNT_W), .END_AROUND(1'b0)) u_add (
      .clk, .rst_n, .clr, .en, .val(add_val), .cnt(add_cnt[i]), .eac(unused_add_eac)
    );
    tone_counter #(.CNT_W(CNT_W), .VAL_W(CNT_W), .END_AROUND(1'b0)) u_sub (
      .clk, .rst_n, .clr, .en, .val(sub_val), .cnt(sub_cnt[i]), .eac(unused_sub_eac)
    );
  end

endmodule
