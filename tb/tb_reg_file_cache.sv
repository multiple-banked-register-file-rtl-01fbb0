// tb_reg_file_cache: end-to-end test of the two-level register file cache at
// its default configuration (128 + 16 registers, 4 read, 4 result write
// ports, 2 buses, non-bypass caching with prefetch-first-pair).
//
// The processor around it is the behavioural model rfc_cpu_model, which runs
// 3000 random instructions through rename, issue, operand reads and result
// write-back, checks every operand read against the values it computed and
// the two-cycle demand-fetch latency, and reads back all logical registers at
// the end. This testbench adds the mechanism coverage: each of the following
// must happen at least once or it counts a failure: a cached result read from
// the upper level, a bypassed (uncached) result, a demand fetch, a prefetch on
// a bus, a prefetch waiting in the queue, a prefetch dropped from a full
// queue, an eviction from a full upper level, a stale copy dropped when its
// register is reallocated, and an issue stall on a miss.
module tb_reg_file_cache;
  import rfc_pkg::*;
  localparam int RP = 4, WP = 4, NB = 2, RW = 8, IW = 8;

  logic clk = 0, rst_n = 0;
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

  reg_file_cache dut (
    .clk, .rst_n, .ren_i(ren), .rd_en_i(rd_en), .rd_preg_i(rd_preg), .rd_hit_o(rd_hit),
    .rd_data_o(rd_data), .iss_valid_i(iss_v), .iss_dst_i(iss_d), .result_i(res),
    .bus_en_o(bus_en), .bus_is_pf_o(bus_pf), .pf_drop_o(pf_drop), .pf_queue_o(pf_q));

  logic done;
  int   m_checks, m_failures, run_cycles;
  int   n_cached_hit, n_bypassed, n_demand, n_prefetch, n_queued;
  int   n_drop, n_evict, n_realloc_inv, n_stall, n_lat_ok, n_ready_consumer;

  rfc_cpu_model #(.NAME("C3 non-bypass + prefetch-first-pair")) cpu (
    .clk, .rst_n, .ren, .rd_en, .rd_preg, .rd_hit, .rd_data, .iss_v, .iss_d, .res,
    .bus_en, .bus_pf, .pf_drop, .pf_q,
    .present(dut.u_upper.present_o), .bus_preg(dut.u_fetch.bus_preg_o),
    .up_wr_en(dut.up_wr_en), .up_wr_preg(dut.up_wr_preg),
    .done, .checks(m_checks), .failures(m_failures), .run_cycles,
    .n_cached_hit, .n_bypassed, .n_demand, .n_prefetch, .n_queued,
    .n_drop, .n_evict, .n_realloc_inv, .n_stall, .n_lat_ok, .n_ready_consumer);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", m_checks + checks, m_failures + failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: mechanism never seen: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done);
    check(n_cached_hit > 0, "cached result read from the upper level");
    check(n_bypassed > 0, "bypassed result");
    check(n_demand > 0 && n_lat_ok > 0, "demand fetch");
    check(n_prefetch > 0, "prefetch on a bus");
    check(n_queued > 0, "prefetch queued");
    check(n_drop > 0, "prefetch dropped");
    check(n_evict > 0, "eviction from a full upper level");
    check(n_realloc_inv > 0, "stale copy dropped at reallocation");
    check(n_stall > 0, "issue stall on a miss");
    $display("TB_RESULT checks=%0d failures=%0d", m_checks + checks, m_failures + failures);
    $finish;
  end
endmodule
