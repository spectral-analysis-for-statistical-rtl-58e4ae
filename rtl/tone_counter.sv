// tone_counter - accumulator for the spectral content of one Hadamard tone.
//
// Every cycle with en=1 the unsigned value val is added to the CNT_W-bit
// counter cnt. With END_AROUND=1 the carry out of the most significant bit
// is not lost: it is stored in the flip-flop eac and added into the least
// significant bit on the next enabled cycle (an end-around carry), so an
// overflow cannot bring the counter back to an earlier value. The pair
// (cnt, eac) then holds the sum of all values modulo 2^CNT_W - 1, with
// cnt + eac being the reduced value. This is the "tone counter" with its
// extra carry flip-flop drawn for SRC2 and SRC5; the end-around carry is the
// document's remedy for aliasing by counter overflow.
// With END_AROUND=0 the carry out is discarded and the counter works modulo
// 2^CNT_W, which is how the SRC1 counters behave; a negative value is then
// given sign-extended to CNT_W bits (two's complement).
//
// Interface: clr (synchronous) clears cnt and eac; it wins over en.
// rst_n clears them asynchronously. The new count appears one clock after
// the value. VAL_W must not exceed CNT_W so that a single carry bit per
// cycle is enough; the word-level adder stands for the ripple chain of full
// adders in the document's drawings (a choice of this design).
module tone_counter #(
  parameter int unsigned CNT_W      = 4,
  parameter int unsigned VAL_W      = 3,
  parameter bit          END_AROUND = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [VAL_W-1:0] val,
  output logic [CNT_W-1:0] cnt,
  output logic             eac
);

  if (VAL_W > CNT_W) begin : g_bad_width
    $error("tone_counter: VAL_W (%0d) must not exceed CNT_W (%0d)", VAL_W, CNT_W);
  end

  logic [CNT_W:0] total;

  always_comb begin
    total = {1'b0, cnt} + (CNT_W + 1)'(val);
    if (END_AROUND) total = total + (CNT_W + 1)'(eac);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      eac <= 1'b0;
    end else if (clr) begin
      cnt <= '0;
      eac <= 1'b0;
    end else if (en) begin
      cnt <= total[CNT_W-1:0];
      eac <= END_AROUND ? total[CNT_W] : 1'b0;
    end
  end

endmodule
