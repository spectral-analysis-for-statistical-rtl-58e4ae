// spectral_bist_top - response-analysis side of a spectral BIST system with
// all five spectral response compactors (SRC1..SRC5) side by side.
//
// A spectral pattern generator (outside this design) drives the primary
// inputs of the circuit under test (CUT, also outside); its primary outputs
// arrive on po. The BIST controller runs the test set twice. Before each run
// bist_init re-initialises CUT, pattern generator and compactors; during a
// run tpg_en is high for test_len cycles, one test vector per cycle; sub
// tells which Hadamard tone the shared-counter compactors collect (0 in the
// first run, 1 in the second). At the end of each run the signatures are
// compared with the fault-free (golden) signatures supplied on the golden_*
// ports, and a mismatch sets a sticky fail flag for that compactor:
//   SRC1  add and subtract counter per PO           checked after run 0
//   SRC2  pairwise cross-correlation, one counter   checked after both runs
//   SRC3  add counter per PO                        checked after run 0
//   SRC4  subtract counter per PO                   checked after run 0
//   SRC5  per-PO HT blocks, one counter             checked after both runs
// Signatures with an end-around carry are compared as the raw pair
// (eac, cnt), packed as {eac, cnt}. When done rises, pass[i] is 1 for each
// compactor i (index by src_pkg::src_id_e) whose signatures all matched.
//
// Running all five together reflects the document's experiment, in which
// every compactor was inserted into the same CUT; a product would keep one.
// The on-chip comparison against golden ports and the sticky flags are this
// design's choices. Timing: see bist_ctrl; done follows start by
// 2 * (test_len + 2) + 1 cycles.
module spectral_bist_top
  import src_pkg::*;
#(
  parameter int unsigned NUM_PO = 4,
  parameter int unsigned CNT_W  = 4,
  parameter int unsigned LEN_W  = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [LEN_W-1:0]              test_len,
  input  logic [NUM_PO-1:0]             po,

  output logic                          bist_init,
  output logic                          tpg_en,
  output logic                          sub,
  output logic                          busy,
  output logic                          done,

  input  logic [NUM_PO-1:0][CNT_W-1:0]  golden_src1_add,
  input  logic [NUM_PO-1:0][CNT_W-1:0]  golden_src1_sub,
  input  logic [1:0][CNT_W:0]           golden_src2,      // [run] = {eac, cnt}
  input  logic [NUM_PO-1:0][CNT_W-1:0]  golden_src3_cnt,
  input  logic [NUM_PO-1:0]             golden_src3_eac,
  input  logic [NUM_PO-1:0][CNT_W-1:0]  golden_src4_cnt,
  input  logic [NUM_PO-1:0]             golden_src4_eac,
  input  logic [1:0][CNT_W:0]           golden_src5,      // [run] = {eac, cnt}

  output logic [NUM_PO-1:0][CNT_W-1:0]  sig_src1_add,
  output logic [NUM_PO-1:0][CNT_W-1:0]  sig_src1_sub,
  output logic [CNT_W:0]                sig_src2,
  output logic [NUM_PO-1:0][CNT_W-1:0]  sig_src3_cnt,
  output logic [NUM_PO-1:0]             sig_src3_eac,
  output logic [NUM_PO-1:0][CNT_W-1:0]  sig_src4_cnt,
  output logic [NUM_PO-1:0]             sig_src4_eac,
  output logic [CNT_W:0]                sig_src5,

  output logic [NUM_SRC-1:0]            fail,
  output logic [NUM_SRC-1:0]            pass
);

  logic clr, en, check;

  bist_ctrl #(.LEN_W(LEN_W)) u_ctrl (
    .clk, .rst_n, .start, .test_len,
    .clr, .en, .sub, .check, .busy, .done
  );

  assign bist_init = clr;
  assign tpg_en    = en;

  src1 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) u_src1 (
    .clk, .rst_n, .clr, .en, .po, .add_cnt(sig_src1_add), .sub_cnt(sig_src1_sub)
  );

  src2 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) u_src2 (
    .clk, .rst_n, .clr, .en, .sub, .po, .cnt(sig_src2[CNT_W-1:0]), .eac(sig_src2[CNT_W])
  );

  src3 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) u_src3 (
    .clk, .rst_n, .clr, .en, .po, .cnt(sig_src3_cnt), .eac(sig_src3_eac)
  );

  src4 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) u_src4 (
    .clk, .rst_n, .clr, .en, .po, .cnt(sig_src4_cnt), .eac(sig_src4_eac)
  );

  src5 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) u_src5 (
    .clk, .rst_n, .clr, .en, .sub, .po, .cnt(sig_src5[CNT_W-1:0]), .eac(sig_src5[CNT_W])
  );

  // Signature comparison at the end of each run.
  logic [NUM_SRC-1:0] mismatch;

  always_comb begin
    mismatch       = '0;
    mismatch[SRC1] = !sub && ((sig_src1_add != golden_src1_add) ||
                              (sig_src1_sub != golden_src1_sub));
    mismatch[SRC2] = (sig_src2 != golden_src2[sub]);
    mismatch[SRC3] = !sub && ((sig_src3_cnt != golden_src3_cnt) ||
                              (sig_src3_eac != golden_src3_eac));
    mismatch[SRC4] = !sub && ((sig_src4_cnt != golden_src4_cnt) ||
                              (sig_src4_eac != golden_src4_eac));
    mismatch[SRC5] = (sig_src5 != golden_src5[sub]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  fail <= '0;
    else if (start && !busy)     fail <= '0;
    else if (check)              fail <= fail | mismatch;
  end

  assign pass = done ? ~fail : '0;

  // The tone selected by sub must not change within a run.
  a_sub_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                  (en && $past(en)) |-> (sub == $past(sub)))
    else $error("sub changed during a run");

endmodule
