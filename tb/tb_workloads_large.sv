// tb_workloads_large - the compactors at the output counts and test lengths of
// the ISCAS '89 benchmark experiment: the two circuits with more than 250 outputs.
//
// One wl_harness per benchmark circuit sets the top level to that circuit's
// number of primary outputs and test length, with counters of
// max(ceil(log2(test length)), ceil(log2(3 * POs + 1))) bits: the first term
// is the recommended counter width, the second keeps one SRC5 adder-tree
// value within the counter. Each harness runs a fault-free session and six
// faulty ones on random response streams (the benchmark netlists are not
// part of this design) and prints which compactors detected each fault.
// All harnesses run in parallel; the test ends when all are done.
module tb_workloads_large;
  localparam int N = 2;

  logic dn [N];
  int   ck [N];
  int   fl [N];
  int   checks, failures;

  wl_harness #(.NAME("s35932"), .NUM_PO(320), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s35932 (
    .done_o(dn[0]), .checks_o(ck[0]), .failures_o(fl[0]));
  wl_harness #(.NAME("s38584"), .NUM_PO(278), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s38584 (
    .done_o(dn[1]), .checks_o(ck[1]), .failures_o(fl[1]));

  initial begin
    repeat (200000) #10;
    checks = 0; failures = 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #100;
      all_done = 1'b1;
      for (int k = 0; k < N; k++) if (!dn[k]) all_done = 1'b0;
    end while (!all_done);
    checks = 0; failures = 0;
    for (int k = 0; k < N; k++) begin checks += ck[k]; failures += fl[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
