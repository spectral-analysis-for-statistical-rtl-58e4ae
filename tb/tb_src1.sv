// tb_src1 - self-checking test of src1 (NUM_PO = 4, CNT_W = 4).
//
// Part 1 replays four short PO streams with known results, one per PO:
//   po[0]: bits 0,1,0,0,0,1 -> add/sub counters step by step
//          0001 0010 0010 0010 0011 / 1111 0000 0000 0000 1111
//   po[1]: the same stream with its last two bits swapped (1,0,0,0,0,1):
//          same final signature 0011 / 1111 (aliasing by bit flipping)
//   po[2]: two 2-bit subsequences swapped (0,0,0,1,0,1): again 0011 / 1111
//   po[3]: bits 1,0,1,0,0,0 -> add 4 (0100), sub 0 (0000)
// Part 2 applies random streams with random enables and compares every
// counter, after every clock, with sums of (prev + cur) and (prev - cur)
// modulo 16 kept by the testbench.
module tb_src1;
  localparam int unsigned NUM_PO = 4;
  localparam int unsigned CNT_W  = 4;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [NUM_PO-1:0] po = '0;
  logic [NUM_PO-1:0][CNT_W-1:0] add_cnt, sub_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  src1 #(.NUM_PO(NUM_PO), .CNT_W(CNT_W)) dut (.clk, .rst_n, .clr, .en, .po, .add_cnt, .sub_cnt);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // known streams, time order, index 0 first
  bit s0 [6] = '{0, 1, 0, 0, 0, 1};
  bit s1 [6] = '{1, 0, 0, 0, 0, 1};
  bit s2 [6] = '{0, 0, 0, 1, 0, 1};
  bit s3 [6] = '{1, 0, 1, 0, 0, 0};
  logic [3:0] exp_add0 [6] = '{4'b0000, 4'b0001, 4'b0010, 4'b0010, 4'b0010, 4'b0011};
  logic [3:0] exp_sub0 [6] = '{4'b0000, 4'b1111, 4'b0000, 4'b0000, 4'b0000, 4'b1111};
  logic [3:0] exp_add1 [6] = '{4'b0001, 4'b0010, 4'b0010, 4'b0010, 4'b0010, 4'b0011};
  logic [3:0] exp_sub1 [6] = '{4'b1111, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b1111};

  int ref_add [NUM_PO];
  int ref_sub [NUM_PO];
  bit ref_prev [NUM_PO];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int n = 0; n < 6; n++) begin
      po = {s3[n], s2[n], s1[n], s0[n]};
      en = 1'b1;
      @(negedge clk);
      check(add_cnt[0] == exp_add0[n] && sub_cnt[0] == exp_sub0[n], $sformatf("original stream step %0d", n));
      check(add_cnt[1] == exp_add1[n] && sub_cnt[1] == exp_sub1[n], $sformatf("bit-flipped stream step %0d", n));
    end
    en = 1'b0;
    check(add_cnt[0] == add_cnt[1] && sub_cnt[0] == sub_cnt[1], "bit flip aliases");
    check(add_cnt[2] == 4'b0011 && sub_cnt[2] == 4'b1111, "subsequence flip aliases");
    check(add_cnt[3] == 4'b0100 && sub_cnt[3] == 4'b0000, "stream 1,0,1,0,0,0 gives 4 and 0");
    // en = 0 holds the counters
    po = '1;
    @(negedge clk);
    check(add_cnt[3] == 4'b0100 && sub_cnt[3] == 4'b0000, "hold when en = 0");

    // random part
    for (int rep = 0; rep < 4; rep++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      check(add_cnt == '0 && sub_cnt == '0, "clr");
      for (int i = 0; i < NUM_PO; i++) begin ref_add[i] = 0; ref_sub[i] = 0; ref_prev[i] = 0; end
      for (int n = 0; n < 100; n++) begin
        po = NUM_PO'($urandom);
        en = 1'($urandom_range(0, 4) != 0);
        if (en)
          for (int i = 0; i < NUM_PO; i++) begin
            ref_add[i] += int'(ref_prev[i]) + int'(po[i]);
            ref_sub[i] += int'(ref_prev[i]) - int'(po[i]);
            ref_prev[i] = po[i];
          end
        @(negedge clk);
        for (int i = 0; i < NUM_PO; i++) begin
          check(add_cnt[i] == CNT_W'(ref_add[i]), $sformatf("random add po %0d", i));
          check(sub_cnt[i] == CNT_W'(ref_sub[i]), $sformatf("random sub po %0d", i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
