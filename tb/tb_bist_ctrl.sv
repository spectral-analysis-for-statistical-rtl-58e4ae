// tb_bist_ctrl - self-checking test of bist_ctrl (LEN_W = 16).
//
// For several test lengths a session is started and every cycle is
// recorded. Expected: one clr pulse before each of the two runs, exactly
// test_len en cycles per run, sub = 0 in the first run and 1 in the second,
// one check pulse after each run, busy over the whole session and done
// reached 2 * (test_len + 2) cycles after the first busy cycle.
module tb_bist_ctrl;
  localparam int unsigned LEN_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [LEN_W-1:0] test_len = '0;
  logic clr, en, sub, check, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_ctrl #(.LEN_W(LEN_W)) dut (.clk, .rst_n, .start, .test_len, .clr, .en, .sub, .check, .busy, .done);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lens [5] = '{10, 1, 0, 6, 512};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && !done && !clr && !en && !check, "idle after reset");
    foreach (lens[t]) begin
      int cyc, clrs, checks_seen, cur_run;
      int en_run [2];
      bit sub_ok;
      cyc = 0; clrs = 0; checks_seen = 0; cur_run = 0;
      en_run = '{0, 0};
      sub_ok = 1'b1;
      test_len = LEN_W'(lens[t]);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      test_len = '1;   // must have been latched
      while (!done && cyc < 5000) begin
        chk(busy, "busy during session");
        if (clr) clrs++;
        if (en) en_run[cur_run]++;
        if (en && sub != 1'(cur_run)) sub_ok = 1'b0;
        if (check) begin
          checks_seen++;
          if (sub != 1'(cur_run)) sub_ok = 1'b0;
          cur_run = 1;
        end
        cyc++;
        @(negedge clk);
      end
      chk(done && !busy, "done");
      chk(clrs == 2, $sformatf("two clr pulses, got %0d", clrs));
      chk(en_run[0] == lens[t] && en_run[1] == lens[t],
          $sformatf("len %0d: run lengths %0d and %0d", lens[t], en_run[0], en_run[1]));
      chk(checks_seen == 2, "two check pulses");
      chk(sub_ok, "sub 0 in first run, 1 in second");
      chk(cyc == 2 * (lens[t] + 2), $sformatf("session length %0d cycles, expected %0d", cyc, 2 * (lens[t] + 2)));
      @(negedge clk);
      chk(done, "done held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
