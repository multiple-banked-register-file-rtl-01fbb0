// tb_cache_policy: self-checking test of the result routing and caching
// policies.
//
// Two instances, one per policy, see the same random results and bus values.
// Expected outputs are worked out in the testbench: every valid result goes to
// the lowest level; non-bypass caching sends to the upper level exactly the
// results nobody read from the bypass network, ready caching exactly those
// with a ready consumer; the others become invalidations; a bus value is
// written into the upper level unless a result for the same register arrives
// in the same cycle.
module tb_cache_policy;
  import rfc_pkg::*;
  localparam int WP = 4, NB = 2;

  result_t [WP-1:0] res;
  logic  [NB-1:0] fv;
  preg_t [NB-1:0] fp;
  data_t [NB-1:0] fd;

  logic  [1:0][WP-1:0]    lw_en;
  preg_t [1:0][WP-1:0]    lw_p;
  data_t [1:0][WP-1:0]    lw_d;
  logic  [1:0][WP+NB-1:0] uw_en;
  preg_t [1:0][WP+NB-1:0] uw_p;
  data_t [1:0][WP+NB-1:0] uw_d;
  logic  [1:0][WP-1:0]    ui_en;
  preg_t [1:0][WP-1:0]    ui_p;

  int checks = 0, failures = 0;

  cache_policy #(.POLICY(CACHE_NON_BYPASS), .WP(WP), .NB(NB)) dut_nb (
    .result_i(res), .fill_valid_i(fv), .fill_preg_i(fp), .fill_data_i(fd),
    .low_wr_en_o(lw_en[0]), .low_wr_preg_o(lw_p[0]), .low_wr_data_o(lw_d[0]),
    .up_wr_en_o(uw_en[0]), .up_wr_preg_o(uw_p[0]), .up_wr_data_o(uw_d[0]),
    .up_inv_en_o(ui_en[0]), .up_inv_preg_o(ui_p[0]));

  cache_policy #(.POLICY(CACHE_READY), .WP(WP), .NB(NB)) dut_rd (
    .result_i(res), .fill_valid_i(fv), .fill_preg_i(fp), .fill_data_i(fd),
    .low_wr_en_o(lw_en[1]), .low_wr_preg_o(lw_p[1]), .low_wr_data_o(lw_d[1]),
    .up_wr_en_o(uw_en[1]), .up_wr_preg_o(uw_p[1]), .up_wr_data_o(uw_d[1]),
    .up_inv_en_o(ui_en[1]), .up_inv_preg_o(ui_p[1]));

  initial begin
    #100000;
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

  int cached_nb = 0, cached_rd = 0, fills_dropped = 0;

  initial begin
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < WP; i++) begin
        res[i].valid = $urandom_range(0, 3) != 0;
        res[i].preg = preg_t'($urandom_range(0, 15));
        res[i].data = {$urandom, $urandom};
        res[i].bypassed = $urandom_range(0, 1);
        res[i].ready_consumer = $urandom_range(0, 1);
      end
      for (int b = 0; b < NB; b++) begin
        fv[b] = $urandom_range(0, 1);
        fp[b] = preg_t'($urandom_range(0, 15));
        fd[b] = {$urandom, $urandom};
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        for (int i = 0; i < WP; i++) begin
          bit want;
          want = (k == 0) ? (res[i].valid && !res[i].bypassed)
                          : (res[i].valid && res[i].ready_consumer);
          check(lw_en[k][i] == res[i].valid, "every result reaches the lowest level");
          if (res[i].valid)
            check(lw_p[k][i] == res[i].preg && lw_d[k][i] == res[i].data, "lowest-level write data");
          check(uw_en[k][i] == want, $sformatf("policy %0d result %0d cache decision", k, i));
          if (want) check(uw_p[k][i] == res[i].preg && uw_d[k][i] == res[i].data, "upper write data");
          check(ui_en[k][i] == (res[i].valid && !want), "uncached result invalidates");
          if (ui_en[k][i]) check(ui_p[k][i] == res[i].preg, "invalidate register");
          if (want && k == 0) cached_nb++;
          if (want && k == 1) cached_rd++;
        end
        for (int b = 0; b < NB; b++) begin
          bit clash;
          clash = 0;
          for (int i = 0; i < WP; i++) if (res[i].valid && res[i].preg == fp[b]) clash = 1;
          check(uw_en[k][WP+b] == (fv[b] && !clash), "bus value written unless a result clashes");
          if (fv[b] && !clash) check(uw_p[k][WP+b] == fp[b] && uw_d[k][WP+b] == fd[b], "bus write data");
          if (fv[b] && clash && k == 0) fills_dropped++;
        end
      end
      #9;
    end
    check(cached_nb > 0 && cached_rd > 0 && fills_dropped > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
