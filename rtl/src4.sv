// src4 - Spectral Response Compactor 4: second Hadamard tone only.
//
// SRC1 without the add counter and its half adder: for each primary output
// (PO) a flip-flop holds the previous bit, a half subtracter forms
// prev - cur as difference and borrow (-1, 0 or +1) and the result is
// accumulated in a subtract counter of that PO. Borrows out of the most
// significant bit are not lost: the counter works modulo 2^CNT_W - 1 with
// an end-around carry, and -1 is added as the one's complement of 1
// (all ones except the LSB), which is the same as subtracting 1 with an
// end-around borrow. The reduction to one tone is the document's; the
// modular arithmetic reads its statement that SRC2 to SRC5 keep all carries
// and borrows out of the most significant bit, and is this design's choice
// of how to keep them.
//
// Interface: as src3. Signature: cnt[i] and eac[i] per PO i; the reduced
// value cnt + eac is congruent to the sum of (prev - cur) modulo 2^CNT_W - 1.
module src4 #(
  parameter int unsigned NUM_PO = 4,
  parameter int unsigned CNT_W  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic                          en,
  input  logic [NUM_PO-1:0]             po,
  output logic [NUM_PO-1:0][CNT_W-1:0]  cnt,
  output logic [NUM_PO-1:0]             eac
);

  if (CNT_W < 2) begin : g_bad_width
    $error("src4: CNT_W must be at least 2");
  end

  logic [NUM_PO-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   prev <= '0;
    else if (clr) prev <= '0;
    else if (en)  prev <= po;
  end

  for (genvar i = 0; i < NUM_PO; i++) begin : g_po
    logic             hs_diff, hs_borrow;
    logic [CNT_W-1:0] sub_val;

    assign hs_diff   = prev[i] ^ po[i];
    assign hs_borrow = ~prev[i] & po[i];

    // +1 -> 0..01, 0 -> 0..00, -1 (borrow) -> 1..10 (one's complement)
    assign sub_val = {{(CNT_W - 1){hs_borrow}}, hs_diff & ~hs_borrow};

    tone_counter #(.CNT_W(CNT_W), .VAL_W(CNT_W), .END_AROUND(1'b1)) u_sub (
      .clk, .rst_n, .clr, .en, .val(sub_val), .cnt(cnt[i]), .eac(eac[i])
    );
  end

endmodule
