// wl_harness - runs spectral_bist_top at one workload size and counts
// which compactors detect injected response errors.
//
// The harness plays pattern generator and circuit under test: it fills a
// table of LEN random PO vectors (NUM_PO bits each) and replays it after
// every bist_init, one vector per tpg_en cycle. A reference model computes
// all golden signatures from the table (sums of H(1) chunk values, with the
// end-around counters tracked as counter plus pending carry). Then:
//   * one fault-free session: every signature must match the model at each
//     run end and all five compactors must pass;
//   * NFAULT faulty sessions, alternating a single flipped response bit and
//     a PO stuck at 0 or 1. A single flipped bit changes the first-tone sums
//     by 1 or 2, so SRC1, SRC2, SRC3 and SRC5 must detect it; SRC4 may
//     miss it, since the -1 and +1 of the two chunks around the bit cancel.
// Each session must take 2 * (LEN + 2) cycles. Results (checks, failures,
// detections per compactor) are printed and reported through the ports
// when done rises. The response streams are random stand-ins; real circuit
// responses are not modelled.
module wl_harness #(
  parameter string       NAME   = "wl",
  parameter int unsigned NUM_PO = 4,
  parameter int unsigned CNT_W  = 4,
  parameter int          LEN    = 10,
  parameter int          NFAULT = 6
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  import src_pkg::*;

  localparam int unsigned LEN_W = 16;
  localparam int          MODV  = (1 << CNT_W) - 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [LEN_W-1:0] test_len = LEN_W'(LEN);
  logic [NUM_PO-1:0] po;
  logic bist_init, tpg_en, sub, busy, done;

  logic [NUM_PO-1:0][CNT_W-1:0] g1a, g1s, g3c, g4c;
  logic [NUM_PO-1:0]            g3e, g4e;
  logic [1:0][CNT_W:0]          g2, g5;
  logic [NUM_PO-1:0][CNT_W-1:0] s1a, s1s, s3c, s4c;
  logic [NUM_PO-1:0]            s3e, s4e;
  logic [CNT_W:0]               s2, s5;
  logic [NUM_SRC-1:0]           fail, pass;

  spectral_bist_top #(.NUM_PO(NUM_PO), .CNT_W(CNT_W), .LEN_W(LEN_W)) dut (
    .clk, .rst_n, .start, .test_len, .po,
    .bist_init, .tpg_en, .sub, .busy, .done,
    .golden_src1_add(g1a), .golden_src1_sub(g1s), .golden_src2(g2),
    .golden_src3_cnt(g3c), .golden_src3_eac(g3e),
    .golden_src4_cnt(g4c), .golden_src4_eac(g4e), .golden_src5(g5),
    .sig_src1_add(s1a), .sig_src1_sub(s1s), .sig_src2(s2),
    .sig_src3_cnt(s3c), .sig_src3_eac(s3e),
    .sig_src4_cnt(s4c), .sig_src4_eac(s4e), .sig_src5(s5),
    .fail, .pass
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int det_by [NUM_SRC] = '{0, 0, 0, 0, 0};
  int n_faulty = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  logic [NUM_PO-1:0] good [LEN];
  logic [NUM_PO-1:0] bad  [LEN];
  bit use_bad = 1'b0;
  int idx = 0;

  always_ff @(posedge clk) begin
    if (bist_init)   idx <= 0;
    else if (tpg_en) idx <= idx + 1;
  end
  assign po = use_bad ? bad[idx % LEN] : good[idx % LEN];

  typedef struct { int cnt; int c; } eac_t;

  function automatic eac_t eac_add(eac_t a, int v);
    eac_t r;
    int t = a.cnt + v + a.c;
    r.cnt = t % (1 << CNT_W);
    r.c   = t / (1 << CNT_W);
    return r;
  endfunction

  function automatic int md(int x);
    return ((x % MODV) + MODV) % MODV;
  endfunction

  task automatic model();
    eac_t c2 [2], c5 [2], c3, c4;
    int p2 [2], p5 [2], a1, b1, p3, p4;
    for (int r = 0; r < 2; r++) begin c2[r] = '{0, 0}; c5[r] = '{0, 0}; p2[r] = 0; p5[r] = 0; end
    // shared counters
    for (int n = 0; n < LEN; n++)
      for (int r = 0; r < 2; r++) begin
        int x2 = 0, x5 = 0;
        for (int p = 0; p < int'(NUM_PO); p += 2)
          if (p + 1 < int'(NUM_PO)) x2 += r ? (int'(good[n][p]) - int'(good[n][p+1]) + 2)
                                            : (int'(good[n][p]) + int'(good[n][p+1]));
          else                      x2 += int'(good[n][p]);
        for (int i = 0; i < int'(NUM_PO); i++) begin
          int pv = (n == 0) ? 0 : int'(good[n-1][i]);
          x5 += r ? (pv - int'(good[n][i]) + 2) : (pv + int'(good[n][i]));
        end
        c2[r] = eac_add(c2[r], x2); p2[r] += x2;
        c5[r] = eac_add(c5[r], x5); p5[r] += x5;
      end
    for (int r = 0; r < 2; r++) begin
      chk(md(c2[r].cnt + c2[r].c) == md(p2[r]) && md(c5[r].cnt + c5[r].c) == md(p5[r]),
          "model congruence (shared counters)");
      g2[r] = {1'(c2[r].c), CNT_W'(c2[r].cnt)};
      g5[r] = {1'(c5[r].c), CNT_W'(c5[r].cnt)};
    end
    // per-PO counters
    for (int i = 0; i < int'(NUM_PO); i++) begin
      a1 = 0; b1 = 0; p3 = 0; p4 = 0; c3 = '{0, 0}; c4 = '{0, 0};
      for (int n = 0; n < LEN; n++) begin
        int pv = (n == 0) ? 0 : int'(good[n-1][i]);
        int ad = pv + int'(good[n][i]);
        int sb = pv - int'(good[n][i]);
        a1 += ad; b1 += sb; p3 += ad; p4 += sb;
        c3 = eac_add(c3, ad);
        c4 = eac_add(c4, (sb >= 0) ? sb : MODV + sb);
      end
      chk(md(c3.cnt + c3.c) == md(p3) && md(c4.cnt + c4.c) == md(p4), "model congruence (per-PO)");
      g1a[i] = CNT_W'(a1);
      g1s[i] = CNT_W'(b1);
      g3c[i] = CNT_W'(c3.cnt); g3e[i] = 1'(c3.c);
      g4c[i] = CNT_W'(c4.cnt); g4e[i] = 1'(c4.c);
    end
  endtask

  task automatic session(bit faulty, int kind);
    int cyc = 0;
    use_bad = faulty;
    start   = 1'b1;
    @(negedge clk);
    start   = 1'b0;
    while (!done && cyc < 2 * LEN + 10) begin
      if (dut.check && !faulty) begin
        if (!sub) chk(s1a == g1a && s1s == g1s && s3c == g3c && s3e == g3e && s4c == g4c && s4e == g4e,
                      "per-PO signatures at end of run 0");
        chk(s2 == g2[sub] && s5 == g5[sub], $sformatf("shared signatures at end of run %0d", sub));
      end
      cyc++;
      @(negedge clk);
    end
    chk(done && cyc == 2 * (LEN + 2), $sformatf("session length %0d, expected %0d", cyc, 2 * (LEN + 2)));
    if (!faulty) chk(pass == '1, "fault-free circuit passes");
    else begin
      n_faulty++;
      for (int k = 0; k < NUM_SRC; k++) if (fail[k]) det_by[k]++;
      if (kind == 0) chk(fail[SRC1] && fail[SRC2] && fail[SRC3] && fail[SRC5],
                         $sformatf("single bit error detected by SRC1/2/3/5 (fail=%b)", fail));
    end
    @(negedge clk);
  endtask

  initial begin
    done_o = 1'b0; checks_o = 0; failures_o = 0;
    for (int n = 0; n < LEN; n++)
      for (int i = 0; i < int'(NUM_PO); i++) good[n][i] = 1'($urandom);
    model();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    session(1'b0, 0);
    for (int f = 0; f < NFAULT; f++) begin
      int t = $urandom_range(0, LEN - 1);
      int i = $urandom_range(0, NUM_PO - 1);
      foreach (good[n]) bad[n] = good[n];
      if (f % 2 == 0) bad[t][i] = ~bad[t][i];
      else foreach (bad[n]) bad[n][i] = 1'(f % 4 == 1);
      if (bad != good) session(1'b1, f % 2);
    end
    $display("%s: %0d POs, %0d vectors, %0d-bit counters: %0d faulty sessions, detected by SRC1..SRC5: %0d %0d %0d %0d %0d",
             NAME, NUM_PO, LEN, CNT_W, n_faulty, det_by[0], det_by[1], det_by[2], det_by[3], det_by[4]);
    checks_o = checks; failures_o = failures;
    done_o = 1'b1;
  end
endmodule
