// src3 - Spectral Response Compactor 3: first Hadamard tone only.
//
// SRC1 without the subtract counter and its half subtracter: for each
// primary output (PO) a flip-flop holds the previous bit, a half adder forms
// prev + cur (0..2) and the result is accumulated in an add counter of that
// PO. Unlike SRC1, the carry out of the counter's most significant bit is
// kept as an end-around carry (see tone_counter), so each counter holds the
// first-tone content modulo 2^CNT_W - 1. The reduction to one tone is the
// document's; applying the end-around carry to SRC3 reads its statement
// that SRC2 to SRC5 keep all carries out of the most significant bit.
//
// Interface: clr clears before a run, en marks a compacted vector, results
// change on the next clock edge. Signature: cnt[i] and eac[i] per PO i.
// One run of the test set gives the signature.
module src3 #(
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

  logic [NUM_PO-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   prev <= '0;
    else if (clr) prev <= '0;
    else if (en)  prev <= po;
  end

  for (genvar i = 0; i < NUM_PO; i++) begin : g_po
    logic [1:0] add_val;

    // half adder: carry = prev & cur, sum = prev ^ cur
    assign add_val = {prev[i] & po[i], prev[i] ^ po[i]};

    tone_counter #(.CNT_W(CNT_W), .VAL_W(2), .END_AROUND(1'b1)) u_add (
      .clk, .rst_n, .clr, .en, .val(add_val), .cnt(cnt[i]), .eac(eac[i])
    );
  end

endmodule
