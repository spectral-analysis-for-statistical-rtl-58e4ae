// tb_src5 - self-checking test of src5 (NUM_PO = 4, CNT_W = 4).
//
// Expected per-vector value: the sum over all POs of prev + cur with
// sub = 0, and of prev - cur + 2 with sub = 1.
// Random PO vectors and enables are applied in runs with sub = 0 and sub = 1.
// After every clock the reduced counter value (cnt + eac) must equal, modulo
// 2^CNT_W - 1 = 15, the sum the testbench keeps of the per-vector values.
// Before the random part a run of all-ones vectors forces the counter to
// overflow, and the test counts how often an end-around carry was pending.
module tb_src5;
  localparam int unsigned NUM_PO = 4;
  localparam int unsigned CNT_W  = 4;
  localparam int          MODV   = (1 << CNT_W) - 1;
  localparam int unsigned NCNT   = 1;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, sub = 1'b0;
  logic [NUM_PO-1:0] po = '0;
  logic [NCNT-1:0][CNT_W-1:0] cnt;
  logic [NCNT-1:0] eac;
  int checks = 0, failures = 0, overflows = 0;
  int ref_sum [NCNT];
  bit ref_prev [NUM_PO];

  always #5 clk = ~clk;

  src5 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) dut (.clk, .rst_n, .clr, .en, .sub, .po, .cnt, .eac);

  // value one vector adds to counter k
  function automatic int value(int k, logic [NUM_PO-1:0] v, bit s);
    int r = 0;
    for (int i = 0; i < int'(NUM_PO); i++)
      r += s ? (int'(ref_prev[i]) - int'(v[i]) + 2) : (int'(ref_prev[i]) + int'(v[i]));
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int md(int x);
    return ((x % MODV) + MODV) % MODV;
  endfunction

  task automatic step(logic [NUM_PO-1:0] v, bit e);
    po = v;
    en = e;
    if (e) begin
      for (int k = 0; k < int'(NCNT); k++) ref_sum[k] += value(k, v, sub);
      for (int i = 0; i < int'(NUM_PO); i++) ref_prev[i] = v[i];
    end
    @(negedge clk);
    for (int k = 0; k < int'(NCNT); k++) begin
      if (eac[k]) overflows++;
      check(md(int'(cnt[k]) + int'(eac[k])) == md(ref_sum[k]), $sformatf("counter %0d modulo %0d", k, MODV));
    end
  endtask

  task automatic start_run(bit s);
    sub = s;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(cnt == '0 && eac == '0, "clr");
    for (int k = 0; k < int'(NCNT); k++) ref_sum[k] = 0;
    for (int i = 0; i < int'(NUM_PO); i++) ref_prev[i] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < 2; s++) begin
      start_run(1'(s));
      for (int n = 0; n < 40; n++) step('1, 1'b1);
      for (int n = 0; n < 40; n++) step(NUM_PO'(n % 2 == 0 ? 4'b0101 : 4'b1010), 1'b1);
      for (int rep = 0; rep < 5; rep++) begin
        start_run(1'(s));
        for (int n = 0; n < 300; n++) step(NUM_PO'($urandom), 1'($urandom_range(0, 4) != 0));
      end
    end
    check(overflows > 10, "end-around carries happened");
    $display("pending end-around carries seen: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
