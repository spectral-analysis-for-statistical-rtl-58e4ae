// tb_spectral_bist_top - end-to-end test of spectral_bist_top at its default
// parameters (4 primary outputs, 4-bit counters, 16-bit test length).
//
// The testbench stands in for the spectral pattern generator and the circuit
// under test: a table of PO vectors is replayed from its first entry after
// every bist_init pulse, one vector per tpg_en cycle, optionally with a
// fault that changes some bits. A reference model computes, from the
// fault-free table alone, every compactor's signature for both runs:
//   SRC1  per PO, sum of (prev + cur) and of (prev - cur), modulo 16
//   SRC3  per PO, prev + cur, counter with end-around carry
//   SRC4  per PO, prev - cur, end-around carry/borrow
//   SRC2  sum over PO pairs of a + b (run 0) or a - b + 2 (run 1)
//   SRC5  sum over POs of prev + cur (run 0) or prev - cur + 2 (run 1)
// For the end-around counters the model tracks the counter and its pending
// carry, and also checks that (cnt + carry) mod 15 equals the plain sum
// mod 15. These are the golden signatures given to the design.
//
// Sessions: fault-free circuits must pass on all five compactors and their
// signatures must match the model at the end of each run; injected faults
// (stuck-at PO bits, random bit errors) must be flagged by at least one
// compactor; a fault that swaps two adjacent bits of a PO stream must
// alias in SRC1 (the documented weakness). Each session must last
// 2 * (test_len + 2) cycles. The test counts that end-around carries,
// SRC1 counter wrap-around, both Hadamard runs (sub = 0 and 1), detections
// and aliasing all happened at least once.
module tb_spectral_bist_top;
  import src_pkg::*;

  localparam int unsigned NUM_PO = 4;
  localparam int unsigned CNT_W  = 4;
  localparam int unsigned LEN_W  = 16;
  localparam int          MAXL   = 600;
  localparam int          MODV   = (1 << CNT_W) - 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [LEN_W-1:0] test_len = '0;
  logic [NUM_PO-1:0] po;
  logic bist_init, tpg_en, sub, busy, done;

  logic [NUM_PO-1:0][CNT_W-1:0] g1a, g1s, g3c, g4c;
  logic [NUM_PO-1:0]            g3e, g4e;
  logic [1:0][CNT_W:0]          g2, g5;

  logic [NUM_PO-1:0][CNT_W-1:0] s1a, s1s, s3c, s4c;
  logic [NUM_PO-1:0]            s3e, s4e;
  logic [CNT_W:0]               s2, s5;
  logic [NUM_SRC-1:0]           fail, pass;

  spectral_bist_top dut (
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
  int n_eac = 0, n_wrap = 0, n_sub0 = 0, n_sub1 = 0, n_detect = 0, n_alias = 0;
  int det_by [NUM_SRC] = '{0, 0, 0, 0, 0};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  logic [NUM_PO-1:0] good [MAXL];
  logic [NUM_PO-1:0] bad  [MAXL];
  bit use_bad = 1'b0;
  int idx = 0;

  always_ff @(posedge clk) begin
    if (bist_init)   idx <= 0;
    else if (tpg_en) idx <= idx + 1;
  end
  assign po = use_bad ? bad[idx % MAXL] : good[idx % MAXL];

  // ---------------------------------------------------------- reference model
  typedef struct { int cnt; int c; } eac_t;

  function automatic eac_t eac_add(eac_t a, int v);
    eac_t r;
    int t = a.cnt + v + a.c;
    r.cnt = t % (1 << CNT_W);
    r.c   = t / (1 << CNT_W);
    return r;
  endfunction

  // one's-complement form of a small signed value, as added to a counter
  function automatic int ones(int v);
    return (v >= 0) ? v : ((1 << CNT_W) - 1 + v);
  endfunction

  function automatic int md(int x);
    return ((x % MODV) + MODV) % MODV;
  endfunction

  task automatic model(int len);
    eac_t c2 [2], c5 [2], c3 [NUM_PO], c4 [NUM_PO];
    int a1 [NUM_PO], b1 [NUM_PO], p2 [2], p5 [2], p3 [NUM_PO], p4 [NUM_PO];
    bit prev [NUM_PO];
    for (int i = 0; i < NUM_PO; i++) begin
      a1[i] = 0; b1[i] = 0; p3[i] = 0; p4[i] = 0; prev[i] = 0;
      c3[i] = '{0, 0}; c4[i] = '{0, 0};
    end
    for (int r = 0; r < 2; r++) begin c2[r] = '{0, 0}; c5[r] = '{0, 0}; p2[r] = 0; p5[r] = 0; end
    for (int n = 0; n < len; n++) begin
      logic [NUM_PO-1:0] v = good[n];
      for (int r = 0; r < 2; r++) begin
        int x2 = 0, x5 = 0;
        for (int p = 0; p + 1 < NUM_PO; p += 2)
          x2 += r ? (int'(v[p]) - int'(v[p+1]) + 2) : (int'(v[p]) + int'(v[p+1]));
        for (int i = 0; i < NUM_PO; i++)
          x5 += r ? (int'(prev[i]) - int'(v[i]) + 2) : (int'(prev[i]) + int'(v[i]));
        c2[r] = eac_add(c2[r], x2); p2[r] += x2;
        c5[r] = eac_add(c5[r], x5); p5[r] += x5;
      end
      for (int i = 0; i < NUM_PO; i++) begin
        int ad = int'(prev[i]) + int'(v[i]);
        int sb = int'(prev[i]) - int'(v[i]);
        a1[i] += ad; b1[i] += sb;
        c3[i] = eac_add(c3[i], ad); p3[i] += ad;
        c4[i] = eac_add(c4[i], ones(sb)); p4[i] += sb;
        prev[i] = v[i];
      end
    end
    for (int r = 0; r < 2; r++) begin
      chk(md(c2[r].cnt + c2[r].c) == md(p2[r]) && md(c5[r].cnt + c5[r].c) == md(p5[r]),
          "model: shared counters congruent to plain sums");
      g2[r] = {1'(c2[r].c), CNT_W'(c2[r].cnt)};
      g5[r] = {1'(c5[r].c), CNT_W'(c5[r].cnt)};
    end
    for (int i = 0; i < NUM_PO; i++) begin
      chk(md(c3[i].cnt + c3[i].c) == md(p3[i]) && md(c4[i].cnt + c4[i].c) == md(p4[i]),
          "model: per-PO counters congruent to plain sums");
      g1a[i] = CNT_W'(a1[i]);
      g1s[i] = CNT_W'(b1[i]);
      g3c[i] = CNT_W'(c3[i].cnt); g3e[i] = 1'(c3[i].c);
      g4c[i] = CNT_W'(c4[i].cnt); g4e[i] = 1'(c4[i].c);
    end
  endtask

  // ------------------------------------------------------------- monitors
  always @(negedge clk) if (rst_n) begin
    if (tpg_en && !sub) n_sub0++;
    if (tpg_en &&  sub) n_sub1++;
    if (s2[CNT_W] || s5[CNT_W] || (|s3e) || (|s4e)) n_eac++;
  end

  // ------------------------------------------------------------- a session
  bit exp_sig_match;

  task automatic session(int len, bit faulty, string name);
    int cyc = 0;
    bit saw_wrap = 1'b0;
    use_bad  = faulty;
    test_len = LEN_W'(len);
    start    = 1'b1;
    @(negedge clk);
    start    = 1'b0;
    while (!done && cyc < 4 * MAXL) begin
      if (dut.check) begin
        if (!faulty) begin
          if (!sub) begin
            chk(s1a == g1a && s1s == g1s, {name, ": SRC1 signature"});
            chk(s3c == g3c && s3e == g3e, {name, ": SRC3 signature"});
            chk(s4c == g4c && s4e == g4e, {name, ": SRC4 signature"});
          end
          chk(s2 == g2[sub], $sformatf("%s: SRC2 signature run %0d", name, sub));
          chk(s5 == g5[sub], $sformatf("%s: SRC5 signature run %0d", name, sub));
        end
      end
      for (int i = 0; i < NUM_PO; i++) if (s1s[i][CNT_W-1]) saw_wrap = 1'b1;
      cyc++;
      @(negedge clk);
    end
    if (saw_wrap) n_wrap++;
    chk(done, {name, ": done"});
    chk(cyc == 2 * (len + 2), $sformatf("%s: %0d cycles, expected %0d", name, cyc, 2 * (len + 2)));
    if (!faulty) begin
      chk(pass == '1 && fail == '0, $sformatf("%s: fault-free circuit passes (pass=%b)", name, pass));
    end else begin
      chk(pass == ~fail, {name, ": pass is the complement of fail"});
      for (int k = 0; k < NUM_SRC; k++) if (fail[k]) det_by[k]++;
      if (fail != '0) n_detect++;
    end
    @(negedge clk);
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < MAXL; n++) begin
      good[n] = NUM_PO'($urandom);
      bad[n]  = good[n];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. ten vectors, as in the counter-overflow example: fault-free
    model(10);
    session(10, 1'b0, "len10 good");

    // 2. PO 3 stuck at 1 over ten vectors
    for (int n = 0; n < MAXL; n++) bad[n] = good[n] | 4'b0100;
    if (bad[0:9] != good[0:9]) session(10, 1'b1, "len10 po3 stuck-at-1");

    // 3. adjacent bit swap on PO 1 (bit flipping): SRC1 must alias
    for (int n = 0; n < MAXL; n++) good[n][0] = 1'b0;
    good[3][0] = 1'b1;              // PO 1 stream ... 0 1 0 ...
    model(10);
    session(10, 1'b0, "swap base good");
    for (int n = 0; n < MAXL; n++) bad[n] = good[n];
    bad[3][0] = 1'b0;
    bad[4][0] = 1'b1;               // the 1 moves one vector later
    session(10, 1'b1, "adjacent swap");
    chk(!fail[SRC1], "SRC1 aliases on an adjacent bit swap");
    if (!fail[SRC1]) n_alias++;

    // 4. longer test sets, several random faults each
    for (int t = 0; t < 6; t++) begin
      int len = (t < 3) ? 64 : 512;
      for (int n = 0; n < MAXL; n++) good[n] = NUM_PO'($urandom);
      model(len);
      session(len, 1'b0, $sformatf("len%0d good", len));
      for (int f = 0; f < 3; f++) begin
        for (int n = 0; n < MAXL; n++) bad[n] = good[n];
        case (f)
          0: for (int n = 0; n < MAXL; n++) bad[n][t % NUM_PO] = 1'b0;          // stuck-at-0
          1: bad[$urandom_range(0, len - 1)][$urandom_range(0, NUM_PO - 1)] ^= 1'b1; // single error
          default: for (int n = 0; n < MAXL; n += 7) bad[n] = ~bad[n];            // burst errors
        endcase
        session(len, 1'b1, $sformatf("len%0d fault %0d", len, f));
      end
    end

    $display("mechanisms: end-around carry pending %0d cycles, SRC1 wrap in %0d sessions, sub=0 vectors %0d, sub=1 vectors %0d, faulty sessions detected %0d, aliasing shown %0d",
             n_eac, n_wrap, n_sub0, n_sub1, n_detect, n_alias);
    $display("detections per compactor SRC1..SRC5: %0d %0d %0d %0d %0d",
             det_by[0], det_by[1], det_by[2], det_by[3], det_by[4]);
    chk(n_eac  > 0, "an end-around carry happened");
    chk(n_wrap > 0, "an SRC1 counter wrapped");
    chk(n_sub0 > 0 && n_sub1 > 0, "both Hadamard runs happened");
    chk(n_detect > 0, "a fault was detected");
    chk(n_alias > 0, "aliasing happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
