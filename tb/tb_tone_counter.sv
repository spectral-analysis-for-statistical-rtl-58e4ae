// tb_tone_counter - self-checking test of tone_counter.
//
// Two instances with CNT_W = 4: one with the end-around carry, one without.
// Random values and enables are applied; after every clock the end-around
// counter must satisfy (cnt + eac) == (sum of values) modulo 15, and the
// plain counter cnt == (sum of values) modulo 16. clr must clear both.
// The test also counts how often an end-around carry was pending, so an
// overflow is known to have happened.
module tb_tone_counter;
  localparam int unsigned CNT_W = 4;
  localparam int unsigned VAL_W = 4;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [VAL_W-1:0] val = '0;
  logic [CNT_W-1:0] cnt_e, cnt_p;
  logic eac_e, eac_p;
  int checks = 0, failures = 0, overflows = 0;
  int unsigned ref_sum = 0;

  always #5 clk = ~clk;

  tone_counter #(.CNT_W(CNT_W), .VAL_W(VAL_W), .END_AROUND(1'b1)) dut_e (
    .clk, .rst_n, .clr, .en, .val, .cnt(cnt_e), .eac(eac_e));
  tone_counter #(.CNT_W(CNT_W), .VAL_W(VAL_W), .END_AROUND(1'b0)) dut_p (
    .clk, .rst_n, .clr, .en, .val, .cnt(cnt_p), .eac(eac_p));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cnt_e=%0d eac_e=%0d cnt_p=%0d ref_sum=%0d", what, cnt_e, eac_e, cnt_p, ref_sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cnt_e == 0 && eac_e == 0 && cnt_p == 0, "reset");
    // 5.1-style overflow: add 1 eighteen times (overflow on the 16th), then 3 a few times
    for (int n = 0; n < 600; n++) begin
      en  = (n < 40) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      val = (n < 18) ? 4'd1 : (n < 40) ? 4'd3 : VAL_W'($urandom_range(0, 15));
      if (en) ref_sum += val;
      @(negedge clk);
      if (eac_e) overflows++;
      check(((cnt_e + eac_e) % 15) == (ref_sum % 15), "end-around modulo 15");
      check(cnt_p == CNT_W'(ref_sum % 16), "plain modulo 16");
      check(eac_p == 1'b0, "plain counter keeps no carry");
      if (n == 14) check(cnt_e == 4'd15 && eac_e == 1'b0, "16 ones before overflow");
      if (n == 15) check(cnt_e == 4'd0 && eac_e == 1'b1, "overflow stores the carry");
      if (n == 16) check(cnt_e == 4'd2 && eac_e == 1'b0, "carry added into LSB");
    end
    en = 1'b0;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(cnt_e == 0 && eac_e == 0 && cnt_p == 0, "clr");
    check(overflows > 10, "overflows happened");
    $display("overflows with end-around carry: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
