// tb_workloads_small - the compactors at the output counts and test lengths of
// the ISCAS '89 benchmark experiment: the twenty circuits with fewer than 100 outputs.
//
// One wl_harness per benchmark circuit sets the top level to that circuit's
// number of primary outputs and test length, with counters of
// max(ceil(log2(test length)), ceil(log2(3 * POs + 1))) bits: the first term
// is the recommended counter width, the second keeps one SRC5 adder-tree
// value within the counter. Each harness runs a fault-free session and six
// faulty ones on random response streams (the benchmark netlists are not
// part of this design) and prints which compactors detected each fault.
// All harnesses run in parallel; the test ends when all are done.
module tb_workloads_small;
  localparam int N = 20;

  logic dn [N];
  int   ck [N];
  int   fl [N];
  int   checks, failures;

  wl_harness #(.NAME("s298"), .NUM_PO(6), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s298 (
    .done_o(dn[0]), .checks_o(ck[0]), .failures_o(fl[0]));
  wl_harness #(.NAME("s344"), .NUM_PO(11), .CNT_W(6), .LEN(64), .NFAULT(6)) u_s344 (
    .done_o(dn[1]), .checks_o(ck[1]), .failures_o(fl[1]));
  wl_harness #(.NAME("s349"), .NUM_PO(11), .CNT_W(7), .LEN(128), .NFAULT(6)) u_s349 (
    .done_o(dn[2]), .checks_o(ck[2]), .failures_o(fl[2]));
  wl_harness #(.NAME("s382"), .NUM_PO(6), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s382 (
    .done_o(dn[3]), .checks_o(ck[3]), .failures_o(fl[3]));
  wl_harness #(.NAME("s386"), .NUM_PO(7), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s386 (
    .done_o(dn[4]), .checks_o(ck[4]), .failures_o(fl[4]));
  wl_harness #(.NAME("s420"), .NUM_PO(2), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s420 (
    .done_o(dn[5]), .checks_o(ck[5]), .failures_o(fl[5]));
  wl_harness #(.NAME("s444"), .NUM_PO(6), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s444 (
    .done_o(dn[6]), .checks_o(ck[6]), .failures_o(fl[6]));
  wl_harness #(.NAME("s526"), .NUM_PO(6), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s526 (
    .done_o(dn[7]), .checks_o(ck[7]), .failures_o(fl[7]));
  wl_harness #(.NAME("s641"), .NUM_PO(24), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s641 (
    .done_o(dn[8]), .checks_o(ck[8]), .failures_o(fl[8]));
  wl_harness #(.NAME("s713"), .NUM_PO(23), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s713 (
    .done_o(dn[9]), .checks_o(ck[9]), .failures_o(fl[9]));
  wl_harness #(.NAME("s820"), .NUM_PO(19), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s820 (
    .done_o(dn[10]), .checks_o(ck[10]), .failures_o(fl[10]));
  wl_harness #(.NAME("s832"), .NUM_PO(19), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s832 (
    .done_o(dn[11]), .checks_o(ck[11]), .failures_o(fl[11]));
  wl_harness #(.NAME("s953"), .NUM_PO(23), .CNT_W(8), .LEN(256), .NFAULT(6)) u_s953 (
    .done_o(dn[12]), .checks_o(ck[12]), .failures_o(fl[12]));
  wl_harness #(.NAME("s1196"), .NUM_PO(14), .CNT_W(8), .LEN(256), .NFAULT(6)) u_s1196 (
    .done_o(dn[13]), .checks_o(ck[13]), .failures_o(fl[13]));
  wl_harness #(.NAME("s1238"), .NUM_PO(14), .CNT_W(8), .LEN(256), .NFAULT(6)) u_s1238 (
    .done_o(dn[14]), .checks_o(ck[14]), .failures_o(fl[14]));
  wl_harness #(.NAME("s1423"), .NUM_PO(5), .CNT_W(11), .LEN(2048), .NFAULT(6)) u_s1423 (
    .done_o(dn[15]), .checks_o(ck[15]), .failures_o(fl[15]));
  wl_harness #(.NAME("s1488"), .NUM_PO(19), .CNT_W(9), .LEN(512), .NFAULT(6)) u_s1488 (
    .done_o(dn[16]), .checks_o(ck[16]), .failures_o(fl[16]));
  wl_harness #(.NAME("s1494"), .NUM_PO(19), .CNT_W(7), .LEN(128), .NFAULT(6)) u_s1494 (
    .done_o(dn[17]), .checks_o(ck[17]), .failures_o(fl[17]));
  wl_harness #(.NAME("s5378"), .NUM_PO(49), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s5378 (
    .done_o(dn[18]), .checks_o(ck[18]), .failures_o(fl[18]));
  wl_harness #(.NAME("s9234"), .NUM_PO(39), .CNT_W(10), .LEN(1024), .NFAULT(6)) u_s9234 (
    .done_o(dn[19]), .checks_o(ck[19]), .failures_o(fl[19]));

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
