// tb_fetch_unit: self-checking test of the transfer-bus scheduler.
//
// Directed cases, with expected bus use worked out by hand: demands served in
// port order while buses last; duplicate, present, unwritten and in-flight
// registers filtered; a prefetch taking a free bus at once; prefetches queued
// behind demands and served oldest first; a queued prefetch discarded when
// its register reaches the upper level; the queue overflowing and dropping;
// the fill outputs repeating the grants one cycle later; and a second
// instance, fetch-on-demand only, ignoring prefetches. A random phase then
// checks the rules on every cycle: no bus for a present or unwritten
// register, no register on two buses, no prefetch on a bus while a servable
// demand was refused, fills equal to the previous cycle's grants.
module tb_fetch_unit;
  import rfc_pkg::*;
  localparam int NB = 2, ND = 4, NP = 8, QD = 8;

  logic clk = 0, rst_n = 0;
  logic  [ND-1:0] dv;
  preg_t [ND-1:0] dp;
  logic  [NP-1:0] pv;
  preg_t [NP-1:0] pp;
  logic  [NUM_PREGS-1:0] present, written;
  logic  [NB-1:0] ben, bpf, fv;
  preg_t [NB-1:0] bp, fp;
  logic  drop;
  logic  [3:0] qc;
  logic  [NB-1:0] ben2, bpf2, fv2;
  preg_t [NB-1:0] bp2, fp2;
  logic  drop2;
  logic  [3:0] qc2;

  int checks = 0, failures = 0;

  fetch_unit #(.POLICY(FETCH_PREFETCH_FIRST), .NB(NB), .ND(ND), .NP(NP), .QD(QD)) dut (
    .clk, .rst_n, .dem_valid_i(dv), .dem_preg_i(dp), .pf_valid_i(pv), .pf_preg_i(pp),
    .present_i(present), .written_i(written), .bus_en_o(ben), .bus_preg_o(bp),
    .bus_is_pf_o(bpf), .fill_valid_o(fv), .fill_preg_o(fp), .pf_drop_o(drop), .q_count_o(qc));

  fetch_unit #(.POLICY(FETCH_ON_DEMAND), .NB(NB), .ND(ND), .NP(NP), .QD(QD)) dut_od (
    .clk, .rst_n, .dem_valid_i(dv), .dem_preg_i(dp), .pf_valid_i(pv), .pf_preg_i(pp),
    .present_i(present), .written_i(written), .bus_en_o(ben2), .bus_preg_o(bp2),
    .bus_is_pf_o(bpf2), .fill_valid_o(fv2), .fill_preg_o(fp2), .pf_drop_o(drop2), .q_count_o(qc2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic quiet();
    dv = '0; pv = '0;
  endtask

  task automatic expect_bus(input int b, input bit en, input int p, input bit is_pf, input string what);
    check(ben[b] == en && (!en || (bp[b] == preg_t'(p) && bpf[b] == is_pf)),
          $sformatf("%s: bus %0d en=%0b preg=%0d pf=%0b", what, b, ben[b], bp[b], bpf[b]));
  endtask

  initial begin
    quiet(); dp = '0; pp = '0;
    present = '0;
    written = '0; written[63:0] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. three demands, two buses: ports 0 and 1 win
    dv = 4'b0111; dp[0] = 5; dp[1] = 6; dp[2] = 7;
    #1;
    expect_bus(0, 1, 5, 0, "demand port 0");
    expect_bus(1, 1, 6, 0, "demand port 1");
    @(negedge clk);
    quiet();
    #1;
    check(fv == 2'b11 && fp[0] == 5 && fp[1] == 6, "fills follow one cycle later");
    // 2. demand for a register returning now is filtered; duplicates too
    dv = 4'b0111; dp[0] = 5; dp[1] = 7; dp[2] = 7;
    #1;
    expect_bus(0, 1, 7, 0, "in-flight and duplicate filtered");
    expect_bus(1, 0, 0, 0, "second bus idle");
    @(negedge clk);
    // 3. present and unwritten registers are not fetched
    present[9] = 1;
    dv = 4'b0011; dp[0] = 9; dp[1] = 100;
    #1;
    check(ben == '0, "present / unwritten demand not fetched");
    @(negedge clk);
    present = '0;
    quiet();
    // 4. a prefetch takes a free bus immediately
    pv = 8'b1; pp[0] = 20;
    #1;
    expect_bus(0, 1, 20, 1, "direct prefetch");
    @(negedge clk);
    quiet();
    // 5. demands first; three prefetches wait in the queue
    dv = 4'b0011; dp[0] = 30; dp[1] = 31;
    pv = 8'b0111; pp[0] = 40; pp[1] = 41; pp[2] = 42;
    #1;
    expect_bus(0, 1, 30, 0, "demand before prefetch");
    expect_bus(1, 1, 31, 0, "demand before prefetch");
    @(negedge clk);
    quiet();
    #1;
    check(qc == 3, $sformatf("three prefetches queued (%0d)", qc));
    expect_bus(0, 1, 40, 1, "oldest queued prefetch");
    expect_bus(1, 1, 41, 1, "next queued prefetch");
    @(negedge clk);
    #1;
    check(qc == 1, "one prefetch left");
    // 6. the last one became present meanwhile: discarded, no bus
    present[42] = 1;
    #1;
    check(ben == '0, "stale queued prefetch not fetched");
    @(negedge clk);
    present = '0;
    #1;
    check(qc == 0, "stale prefetch discarded");
    // 7. overflow: two demands and eight prefetches, then eight more
    dv = 4'b0011; dp[0] = 1; dp[1] = 2;
    pv = '1;
    for (int i = 0; i < NP; i++) pp[i] = preg_t'(44 + i);
    #1;
    check(!drop, "eight prefetches fit");
    @(negedge clk);
    dv = 4'b0011; dp[0] = 3; dp[1] = 4;
    for (int i = 0; i < NP; i++) pp[i] = preg_t'(54 + i);
    #1;
    check(drop, "full queue drops prefetches");
    check(ben2 == 2'b11 && bpf2 == '0 && qc2 == 0, "fetch-on-demand instance ignores prefetches");
    @(negedge clk);
    quiet();
    #1;
    check(qc == QD, "queue full");
    check(bp[0] == 44 && bp[1] == 45 && bpf == 2'b11, "queue drains oldest first");
    repeat (6) @(negedge clk);

    // random phase: rules
    for (int c = 0; c < 2000; c++) begin
      bit [NB-1:0] prev_en;
      preg_t [NB-1:0] prev_p;
      bit dem_refused;
      present = '0;
      for (int k = 0; k < 12; k++) present[$urandom_range(0, 63)] = 1;
      written = '0;
      for (int k = 0; k < 48; k++) written[$urandom_range(0, 63)] = 1;
      for (int d = 0; d < ND; d++) begin dv[d] = $urandom_range(0, 2) == 0; dp[d] = preg_t'($urandom_range(0, 63)); end
      for (int p = 0; p < NP; p++) begin pv[p] = $urandom_range(0, 3) == 0; pp[p] = preg_t'($urandom_range(0, 63)); end
      #1;
      for (int b = 0; b < NB; b++)
        if (ben[b]) begin
          check(!present[bp[b]] && (bpf[b] || written[bp[b]]), "no fetch of present/unwritten register");
          for (int b2 = b + 1; b2 < NB; b2++) check(!(ben[b2] && bp[b2] == bp[b]), "register on two buses");
          for (int b2 = 0; b2 < NB; b2++) check(!(fv[b2] && fp[b2] == bp[b]), "register already returning");
        end
      dem_refused = 0;
      for (int d = 0; d < ND; d++)
        if (dv[d] && written[dp[d]] && !present[dp[d]]) begin
          bit served = 0;
          for (int b = 0; b < NB; b++) if ((ben[b] && bp[b] == dp[d]) || (fv[b] && fp[b] == dp[d])) served = 1;
          if (!served) dem_refused = 1;
        end
      if (dem_refused) check(bpf == '0 && ben == '1, "a refused demand means both buses serve demands");
      prev_en = ben; prev_p = bp;
      @(negedge clk);
      check(fv == prev_en && (fv == '0 || (fv[0] ? fp[0] == prev_p[0] : 1) && (fv[1] ? fp[1] == prev_p[1] : 1)),
            "fills repeat the previous grants");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
