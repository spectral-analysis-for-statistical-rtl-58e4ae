// tb_ht_block - self-checking test of ht_block.
//
// For every combination of stored previous bit, current PO bit and sub the
// outputs must equal prev + cur (sub = 0) or prev - cur + 2 (sub = 1). The
// stored bit is loaded only with en = 1 and cleared by clr; both rules are
// checked, followed by a random stream compared against a model of the
// previous bit.
module tb_ht_block;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, sub = 1'b0, po = 1'b0;
  logic sum, cout;
  int checks = 0, failures = 0;
  bit prev_model = 1'b0;

  always #5 clk = ~clk;

  ht_block dut (.clk, .rst_n, .clr, .en, .sub, .po, .sum, .cout);

  function automatic int expected(bit p, bit c, bit s);
    return s ? (int'(p) - int'(c) + 2) : (int'(p) + int'(c));
  endfunction

  task automatic check_out(string what);
    checks++;
    if (int'({cout, sum}) != expected(prev_model, po, sub)) begin
      failures++;
      $display("FAIL %s: prev=%0d po=%0d sub=%0d got %0d", what, prev_model, po, sub, {cout, sum});
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      po = 1'(p); en = 1'b1;
      @(negedge clk);
      prev_model = 1'(p);
      en = 1'b0;
      for (int c = 0; c < 2; c++)
        for (int s = 0; s < 2; s++) begin
          po = 1'(c); sub = 1'(s);
          #1 check_out("exhaustive");
        end
      @(negedge clk);   // en = 0: the stored bit must not change
      po = ~po;
      #1 check_out("hold when en=0");
    end
    // clr
    po = 1'b1; en = 1'b1; @(negedge clk); prev_model = 1'b1;
    en = 1'b0; clr = 1'b1; @(negedge clk); prev_model = 1'b0; clr = 1'b0;
    po = 1'b1; sub = 1'b0;
    #1 check_out("clr gives preceding 0");
    // random stream
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      po = 1'($urandom); sub = 1'($urandom); en = 1'($urandom);
      #1 check_out("random");
      @(posedge clk);
      if (en) prev_model = po;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
