// tb_rfc_configs: the register file cache in the other configurations that
// were evaluated for it, each driven by its own copy of the processor model.
//
//   C1 (upper 3 read / 2 write ports, lower 2 write ports, 2 buses)
//   C2 (upper 4 / 3, lower 3, 2 buses)
//   C4 (upper 4 / 4, lower 4, 3 buses)
// all with non-bypass caching and prefetch-first-pair, and configuration C3
// with the three other policy combinations:
//   ready caching + prefetch-first-pair, non-bypass caching + fetch-on-demand,
//   ready caching + fetch-on-demand.
// Every run must read correct values throughout and at the end (the model's
// checks). Fetch-on-demand runs must put no prefetch on a bus; prefetch runs
// must. The instructions-per-cycle of each run is printed for comparison; it
// reflects the random instruction stream of the model, not real programs.
module tb_rfc_configs;
  import rfc_pkg::*;
  localparam int NCFG = 6;
  localparam int            C_RP[NCFG] = '{3, 4, 4, 4, 4, 4};
  localparam int            C_WP[NCFG] = '{2, 3, 4, 4, 4, 4};
  localparam int            C_NB[NCFG] = '{2, 2, 3, 2, 2, 2};
  localparam cache_policy_e C_CP[NCFG] = '{CACHE_NON_BYPASS, CACHE_NON_BYPASS, CACHE_NON_BYPASS,
                                           CACHE_READY, CACHE_NON_BYPASS, CACHE_READY};
  localparam fetch_policy_e C_FP[NCFG] = '{FETCH_PREFETCH_FIRST, FETCH_PREFETCH_FIRST,
                                           FETCH_PREFETCH_FIRST, FETCH_PREFETCH_FIRST,
                                           FETCH_ON_DEMAND, FETCH_ON_DEMAND};
  localparam string         C_NAME[NCFG] = '{"C1 non-bypass + prefetch", "C2 non-bypass + prefetch",
                                             "C4 non-bypass + prefetch", "C3 ready + prefetch",
                                             "C3 non-bypass + on-demand", "C3 ready + on-demand"};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int m_checks[NCFG], m_failures[NCFG], run_cycles[NCFG], n_prefetch[NCFG], n_demand[NCFG];
  int n_cached_hit[NCFG], n_stall[NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int RP = C_RP[g], WP = C_WP[g], NB = C_NB[g], RW = 8, IW = 8;
    renamed_t [RW-1:0] ren;
    logic  [RP-1:0] rd_en, rd_hit;
    preg_t [RP-1:0] rd_preg;
    data_t [RP-1:0] rd_data;
    logic  [IW-1:0] iss_v;
    preg_t [IW-1:0] iss_d;
    result_t [WP-1:0] res;
    logic  [NB-1:0] bus_en, bus_pf;
    logic  pf_drop;
    logic  [3:0] pf_q;
    int n_bypassed, n_queued, n_drop, n_evict, n_realloc_inv, n_lat_ok, n_ready_consumer;

    reg_file_cache #(.CPOL(C_CP[g]), .FPOL(C_FP[g]), .RP(RP), .WP(WP), .NB(NB)) dut (
      .clk, .rst_n, .ren_i(ren), .rd_en_i(rd_en), .rd_preg_i(rd_preg), .rd_hit_o(rd_hit),
      .rd_data_o(rd_data), .iss_valid_i(iss_v), .iss_dst_i(iss_d), .result_i(res),
      .bus_en_o(bus_en), .bus_is_pf_o(bus_pf), .pf_drop_o(pf_drop), .pf_queue_o(pf_q));

    rfc_cpu_model #(.NAME(C_NAME[g]), .CPOL(C_CP[g]), .RP(RP), .WP(WP), .NB(NB), .NINSTR(1500)) cpu (
      .clk, .rst_n, .ren, .rd_en, .rd_preg, .rd_hit, .rd_data, .iss_v, .iss_d, .res,
      .bus_en, .bus_pf, .pf_drop, .pf_q,
      .present(dut.u_upper.present_o), .bus_preg(dut.u_fetch.bus_preg_o),
      .up_wr_en(dut.up_wr_en), .up_wr_preg(dut.up_wr_preg),
      .done(done[g]), .checks(m_checks[g]), .failures(m_failures[g]), .run_cycles(run_cycles[g]),
      .n_cached_hit(n_cached_hit[g]), .n_bypassed, .n_demand(n_demand[g]),
      .n_prefetch(n_prefetch[g]), .n_queued, .n_drop, .n_evict, .n_realloc_inv,
      .n_stall(n_stall[g]), .n_lat_ok, .n_ready_consumer);
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int sum(int a[NCFG]);
    int s = 0;
    for (int i = 0; i < NCFG; i++) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(m_checks) + checks, sum(m_failures) + failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done == '1);
    for (int g = 0; g < NCFG; g++) begin
      $display("%-26s  IPC %0d.%02d  demand fetches %0d  prefetches %0d  upper-level hits on cached results %0d  stalls %0d",
               C_NAME[g], 1500 / run_cycles[g], (1500 * 100 / run_cycles[g]) % 100,
               n_demand[g], n_prefetch[g], n_cached_hit[g], n_stall[g]);
      check(m_failures[g] == 0, $sformatf("%s: data errors", C_NAME[g]));
      check(n_demand[g] > 0, $sformatf("%s: demand fetches happen", C_NAME[g]));
      if (C_FP[g] == FETCH_ON_DEMAND)
        check(n_prefetch[g] == 0, $sformatf("%s: no prefetch on a bus", C_NAME[g]));
      else
        check(n_prefetch[g] > 0, $sformatf("%s: prefetches happen", C_NAME[g]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", sum(m_checks) + checks, sum(m_failures) + failures);
    $finish;
  end
endmodule
