// reg_file_cache: a two-level register file ("register file cache") for a
// wide-issue, dynamically scheduled processor.
//
// A large register file with many ports is too slow for a one-cycle access,
// and pipelining it costs an extra level of bypass. Here a small, fast,
// fully-associative upper bank holds the values likely to be read soon and
// alone feeds the functional units, so the bypass network needs a single
// level. A large lower bank receives every result and so holds every value;
// values move only upward, over a few transfer buses.
//
//   result_i --> cache_policy --+--> lower_bank (always) --buses--+
//                               |                                 |
//                               +--> upper_bank <-----------------+
//   rd_* <---------------------------upper_bank (hit/miss)
//   miss ------------------------> fetch_unit (demand)  --> buses
//   iss_* --> first_pair_table --> fetch_unit (prefetch)
//   ren_i --> first_pair_table; allocation clears lower `written` bits and
//             drops stale upper copies
//
// Interface and timing:
//   ren_i     renamed instructions, program order. A valid destination is a
//             register allocation.
//   rd_*      RP upper-level read ports, answered in the same cycle. A miss on
//             a register whose value exists starts a demand fetch; the value
//             can be read two cycles after the first miss if a bus is free.
//   iss_*     destinations of the instructions issued this cycle; each
//             triggers a prefetch of its first consumer's other operand.
//   result_i  WP results with their `bypassed`/`ready_consumer` flags; they
//             are readable from the upper level (if cached) and the lower
//             level from the next cycle on.
//   bus_*, pf_*_o  activity of the transfer buses, for monitoring.
//
// Defaults follow the evaluated configuration: 128 registers below, 16 above,
// fully associative with pseudo-LRU, non-bypass caching with
// prefetch-first-pair, and the port counts of configuration C3 (upper level 4
// read and 4 result write ports, lower level 4 write ports, 2 buses, each bus
// one lower read port and one extra upper write port). Rename and issue widths
// of 8 come from the 8-wide machine it was evaluated in. The bank latencies,
// the prefetch queue and the interface signals are this design's choices.
module reg_file_cache
  import rfc_pkg::*;
#(
  parameter cache_policy_e CPOL = CACHE_NON_BYPASS,
  parameter fetch_policy_e FPOL = FETCH_PREFETCH_FIRST,
  parameter int unsigned   RP   = 4,   // upper-level read ports
  parameter int unsigned   WP   = 4,   // result write ports
  parameter int unsigned   NB   = 2,   // buses between the levels
  parameter int unsigned   RW   = 8,   // rename width
  parameter int unsigned   IW   = 8,   // issue width
  parameter int unsigned   QD   = 8    // prefetch queue depth
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  renamed_t [RW-1:0]    ren_i,
  input  logic     [RP-1:0]    rd_en_i,
  input  preg_t    [RP-1:0]    rd_preg_i,
  output logic     [RP-1:0]    rd_hit_o,
  output data_t    [RP-1:0]    rd_data_o,
  input  logic     [IW-1:0]    iss_valid_i,
  input  preg_t    [IW-1:0]    iss_dst_i,
  input  result_t  [WP-1:0]    result_i,
  output logic     [NB-1:0]    bus_en_o,
  output logic     [NB-1:0]    bus_is_pf_o,
  output logic                 pf_drop_o,
  output logic [$clog2(QD+1)-1:0] pf_queue_o   // prefetches waiting for a bus
);

  logic  [NUM_PREGS-1:0] present, written;
  preg_t [NB-1:0]        bus_preg;
  logic  [NB-1:0]        fill_valid;
  preg_t [NB-1:0]        fill_preg;
  data_t [NB-1:0]        fill_data;
  logic  [IW-1:0]        pf_valid;
  preg_t [IW-1:0]        pf_preg;

  logic  [WP-1:0]        low_wr_en;
  preg_t [WP-1:0]        low_wr_preg;
  data_t [WP-1:0]        low_wr_data;
  logic  [WP+NB-1:0]     up_wr_en;
  preg_t [WP+NB-1:0]     up_wr_preg;
  data_t [WP+NB-1:0]     up_wr_data;
  logic  [WP+RW-1:0]     up_inv_en;
  preg_t [WP+RW-1:0]     up_inv_preg;

  logic  [RW-1:0]        alloc;
  preg_t [RW-1:0]        alloc_preg;
  always_comb
    for (int i = 0; i < int'(RW); i++) begin
      alloc[i]      = ren_i[i].valid && ren_i[i].dst_valid;
      alloc_preg[i] = ren_i[i].dst;
      up_inv_en[WP+i]   = alloc[i];
      up_inv_preg[WP+i] = alloc_preg[i];
    end

  cache_policy #(.POLICY(CPOL), .WP(WP), .NB(NB)) u_policy (
    .result_i     (result_i),
    .fill_valid_i (fill_valid),
    .fill_preg_i  (fill_preg),
    .fill_data_i  (fill_data),
    .low_wr_en_o  (low_wr_en),
    .low_wr_preg_o(low_wr_preg),
    .low_wr_data_o(low_wr_data),
    .up_wr_en_o   (up_wr_en),
    .up_wr_preg_o (up_wr_preg),
    .up_wr_data_o (up_wr_data),
    .up_inv_en_o  (up_inv_en[WP-1:0]),
    .up_inv_preg_o(up_inv_preg[WP-1:0])
  );

  upper_bank #(.ENTRIES(NUM_CACHE), .RP(RP), .NW(WP + NB), .NI(WP + RW)) u_upper (
    .clk       (clk),
    .rst_n     (rst_n),
    .rd_en_i   (rd_en_i),
    .rd_preg_i (rd_preg_i),
    .rd_hit_o  (rd_hit_o),
    .rd_data_o (rd_data_o),
    .wr_en_i   (up_wr_en),
    .wr_preg_i (up_wr_preg),
    .wr_data_i (up_wr_data),
    .inv_en_i  (up_inv_en),
    .inv_preg_i(up_inv_preg),
    .present_o (present)
  );

  lower_bank #(.REGS(NUM_PREGS), .NW(WP), .NR(NB), .NA(RW)) u_lower (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en_i     (low_wr_en),
    .wr_preg_i   (low_wr_preg),
    .wr_data_i   (low_wr_data),
    .rd_en_i     (bus_en_o),
    .rd_preg_i   (bus_preg),
    .rd_data_o   (fill_data),
    .alloc_i     (alloc),
    .alloc_preg_i(alloc_preg),
    .written_o   (written)
  );

  first_pair_table #(.REGS(NUM_PREGS), .RW(RW), .IW(IW)) u_fpt (
    .clk        (clk),
    .rst_n      (rst_n),
    .ren_i      (ren_i),
    .iss_valid_i(iss_valid_i),
    .iss_dst_i  (iss_dst_i),
    .pf_valid_o (pf_valid),
    .pf_preg_o  (pf_preg)
  );

  fetch_unit #(.POLICY(FPOL), .REGS(NUM_PREGS), .NB(NB), .ND(RP), .NP(IW), .QD(QD)) u_fetch (
    .clk         (clk),
    .rst_n       (rst_n),
    .dem_valid_i (rd_en_i & ~rd_hit_o),
    .dem_preg_i  (rd_preg_i),
    .pf_valid_i  (pf_valid),
    .pf_preg_i   (pf_preg),
    .present_i   (present),
    .written_i   (written),
    .bus_en_o    (bus_en_o),
    .bus_preg_o  (bus_preg),
    .bus_is_pf_o (bus_is_pf_o),
    .fill_valid_o(fill_valid),
    .fill_preg_o (fill_preg),
    .pf_drop_o   (pf_drop_o),
    .q_count_o   (pf_queue_o)
  );

endmodule
