// rfc_cpu_model: behavioural model of the out-of-order processor around the
// register file cache, used by the testbenches. Not synthesizable.
//
// It renames a random stream of two-source instructions over 32 logical
// registers onto the 128 physical registers (free list, most recently freed
// register reused first, in-order commit that frees the previous mapping),
// keeps up to 32 of them in a window and issues the oldest ready ones. An
// instruction is ready when both sources have been produced. When a result is
// written, each waiting consumer whose other source already exists catches
// it on the bypass network three times in four (the result is then flagged
// `bypassed`); otherwise the result is flagged `ready_consumer`. Sources not
// caught on the bypass are read through the upper-level read ports; an
// instruction issues only when all its reads hit, and retries while its
// misses are fetched on demand. On issue its destination is announced for
// prefetch-first-pair, and its result (src1 + src2 + sequence number) is
// written one cycle later on a result port, at most WP per cycle.
//
// After NINSTR instructions have committed it announces every register as an
// issuing producer for a few cycles while misses keep the buses busy (to fill
// the prefetch queue), then reads every logical register back.
//
// Checked (into `checks`/`failures`): every read hit returns the value the
// model computed; a demand fetch granted at a miss in cycle t puts the
// register into the upper level in cycle t+2 and not in t+1; the final
// values. The counters report how often each mechanism happened. `done`
// rises when the run is over. The ports named after internal nets (present,
// bus_preg, up_wr_*) are connected to the design's internals by the
// testbench, for monitoring only.
module rfc_cpu_model
  import rfc_pkg::*;
#(
  parameter string         NAME   = "rfc",
  parameter cache_policy_e CPOL   = CACHE_NON_BYPASS,
  parameter int            RP     = 4,
  parameter int            WP     = 4,
  parameter int            NB     = 2,
  parameter int            RW     = 8,
  parameter int            IW     = 8,
  parameter int            NINSTR = 3000
) (
  input  logic              clk,
  input  logic              rst_n,
  output renamed_t [RW-1:0] ren,
  output logic  [RP-1:0]    rd_en,
  output preg_t [RP-1:0]    rd_preg,
  input  logic  [RP-1:0]    rd_hit,
  input  data_t [RP-1:0]    rd_data,
  output logic  [IW-1:0]    iss_v,
  output preg_t [IW-1:0]    iss_d,
  output result_t [WP-1:0]  res,
  input  logic  [NB-1:0]    bus_en,
  input  logic  [NB-1:0]    bus_pf,
  input  logic              pf_drop,
  input  logic  [3:0]       pf_q,
  input  logic  [NUM_PREGS-1:0] present,
  input  preg_t [NB-1:0]    bus_preg,
  input  logic  [WP+NB-1:0] up_wr_en,
  input  preg_t [WP+NB-1:0] up_wr_preg,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                run_cycles,
  output int                n_cached_hit, n_bypassed, n_demand, n_prefetch, n_queued,
  output int                n_drop, n_evict, n_realloc_inv, n_stall, n_lat_ok, n_ready_consumer
);
  localparam int NLOG = 32, WIN = 32;

  int cycle = 0, start_cycle = 0;
  always @(posedge clk) cycle++;
  initial begin
    checks = 0; failures = 0; run_cycles = 0;
    n_cached_hit = 0; n_bypassed = 0; n_demand = 0; n_prefetch = 0; n_queued = 0;
    n_drop = 0; n_evict = 0; n_realloc_inv = 0; n_stall = 0; n_lat_ok = 0; n_ready_consumer = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%s] @cycle %0d: %s", NAME, cycle, what);
    end
  endtask

  // ---------------- processor model state ----------------
  typedef struct {
    int   seq;
    int   dst, old;           // physical destination, previous mapping
    int   src[2];
    bit   have[2];            // operand obtained (bypass or read)
    bit   issued, done;
  } instr_t;

  instr_t win[$];
  int     map[NLOG];
  int     free_list[$];
  data_t  truth[NUM_PREGS];
  bit     produced[NUM_PREGS];
  int     dem_due[NUM_PREGS]; // cycle at which a granted demand must hit, 0 = none
  result_t pend[$];           // results waiting for a result port
  int     seq = 0;
  int     committed = 0;

  // mechanism counters
  bit cached_once[NUM_PREGS];

  // monitors of the buses and the upper level
  always @(negedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++)
      if (bus_en[b]) begin
        if (bus_pf[b]) n_prefetch++; else n_demand++;
      end
    if (pf_q != 0) n_queued++;
    if (pf_drop) n_drop++;
  end

  always @(posedge clk) if (rst_n) begin
    if ($countones(present) == NUM_CACHE)
      for (int w = 0; w < WP + NB; w++)
        if (up_wr_en[w] && !present[up_wr_preg[w]]) n_evict++;
    for (int i = 0; i < RW; i++)
      if (ren[i].valid && ren[i].dst_valid && present[ren[i].dst]) n_realloc_inv++;
  end

  // a demand fetch granted in cycle t: not held in t+1, held in t+2
  always @(negedge clk) if (rst_n)
    for (int p = 0; p < NUM_PREGS; p++)
      if (dem_due[p] == cycle + 1)
        check(!present[p], $sformatf("p%0d held one cycle after its demand", p));
      else if (dem_due[p] == cycle) begin
        check(present[p], $sformatf("p%0d held two cycles after its demand", p));
        n_lat_ok++;
        dem_due[p] = 0;
      end

  // all inputs idle
  task automatic idle_inputs();
    ren = '0; rd_en = '0; rd_preg = '0; iss_v = '0; iss_d = '0; res = '0;
  endtask

  // One cycle of the model; inputs are applied after the falling edge.
  task automatic model_cycle(input bit allow_rename);
    int ports, nren, niss;
    int rd_idx[RP], rd_src[RP];
    int want[2];
    idle_inputs();

    // --- results: up to WP per cycle ---
    for (int w = 0; w < WP && pend.size() > 0; w++) begin
      result_t r;
      int p;
      r = pend.pop_front();
      p = int'(r.preg);
      // a waiting consumer whose other source exists takes it from the bypass
      r.bypassed = 0;
      r.ready_consumer = 0;
      foreach (win[i])
        if (!win[i].issued)
          for (int s = 0; s < 2; s++)
            if (win[i].src[s] == p && !win[i].have[s] && produced[win[i].src[1-s]]) begin
              // a ready consumer usually catches the value on the bypass; one
              // that misses its issue slot will read it from the registers
              if ($urandom_range(0, 3) != 0) begin
                win[i].have[s] = 1;
                r.bypassed = 1;
              end else r.ready_consumer = 1;
            end
      if (r.bypassed) n_bypassed++;
      if (r.ready_consumer) n_ready_consumer++;
      cached_once[p] = (CPOL == CACHE_NON_BYPASS) ? !r.bypassed : r.ready_consumer;
      res[w] = r;
      truth[p] = r.data;
    end

    // --- operand reads, oldest ready instructions first ---
    ports = 0;
    foreach (win[i]) begin
      int need;
      if (win[i].issued || !produced[win[i].src[0]] || !produced[win[i].src[1]]) continue;
      need = 0;
      for (int s = 0; s < 2; s++) if (!win[i].have[s]) need++;
      if (ports + need > RP) break;
      for (int s = 0; s < 2; s++)
        if (!win[i].have[s]) begin
          rd_en[ports] = 1; rd_preg[ports] = preg_t'(win[i].src[s]);
          rd_idx[ports] = i; rd_src[ports] = s;
          ports++;
        end
      if (need == 0) begin
        // both operands came from the bypass network: issue with no read
        win[i].issued = 1;
      end
    end
    #1;
    begin
      bit ok[WIN];
      for (int i = 0; i < WIN; i++) ok[i] = 1;
      for (int r = 0; r < ports; r++) begin
        int p;
        p = int'(rd_preg[r]);
        if (rd_hit[r]) begin
          check(rd_data[r] == truth[p], $sformatf("read of p%0d: %0h expected %0h", p, rd_data[r], truth[p]));
          if (cached_once[p]) n_cached_hit++;
        end else begin
          ok[rd_idx[r]] = 0;
          n_stall++;
          for (int b = 0; b < NB; b++)
            if (bus_en[b] && !bus_pf[b] && bus_preg[b] == rd_preg[r] && dem_due[p] == 0)
              dem_due[p] = cycle + 2;
        end
      end
      for (int r = 0; r < ports; r++)
        if (ok[rd_idx[r]]) begin
          win[rd_idx[r]].issued = 1;
          win[rd_idx[r]].have[rd_src[r]] = 1;
        end
    end

    // --- results and prefetch announcements of the instructions issued now ---
    niss = 0;
    foreach (win[i])
      if (win[i].issued && !win[i].done && niss < IW) begin
        result_t r;
        r.valid = 1;
        r.preg = preg_t'(win[i].dst);
        r.data = truth[win[i].src[0]] + truth[win[i].src[1]] + data_t'(win[i].seq);
        r.bypassed = 0;
        r.ready_consumer = 0;
        pend.push_back(r);
        win[i].done = 1;
        iss_v[niss] = 1; iss_d[niss] = preg_t'(win[i].dst);
        niss++;
      end

    // --- rename ---
    nren = 0;
    if (allow_rename)
      while (nren < 4 && win.size() < WIN && free_list.size() > 0 && seq < NINSTR) begin
        instr_t in;
        int l;
        in.seq = seq;
        in.src[0] = map[$urandom_range(0, NLOG - 1)];
        in.src[1] = map[$urandom_range(0, NLOG - 1)];
        in.have[0] = 0; in.have[1] = 0;
        in.issued = 0; in.done = 0;
        l = $urandom_range(0, NLOG - 1);
        in.old = map[l];
        in.dst = free_list.pop_front();
        map[l] = in.dst;
        produced[in.dst] = 0;
        ren[nren].valid = 1;
        ren[nren].dst_valid = 1;  ren[nren].dst = preg_t'(in.dst);
        ren[nren].src1_valid = 1; ren[nren].src1 = preg_t'(in.src[0]);
        ren[nren].src2_valid = 1; ren[nren].src2 = preg_t'(in.src[1]);
        win.push_back(in);
        seq++;
        nren++;
      end

    @(negedge clk);
    // results written last cycle are now produced
    for (int w = 0; w < WP; w++) if (res[w].valid) produced[res[w].preg] = 1;
    // commit in order the instructions whose result is written
    while (win.size() > 0 && win[0].done && produced[win[0].dst]) begin
      free_list.push_front(win[0].old);   // most recently freed reused first
      void'(win.pop_front());
      committed++;
    end
  endtask

  initial begin
    idle_inputs();
    for (int p = 0; p < NUM_PREGS; p++) begin
      produced[p] = 0; dem_due[p] = 0; cached_once[p] = 0; truth[p] = '0;
    end
    done = 0;
    wait (rst_n);
    @(negedge clk);
    // architectural initial values: p0..p31, written to the lowest level only
    for (int l = 0; l < NLOG; l++) begin
      result_t r;
      map[l] = l;
      r.valid = 1; r.preg = preg_t'(l); r.data = {$urandom, $urandom};
      r.bypassed = 1; r.ready_consumer = 0;
      pend.push_back(r);
    end
    for (int p = NLOG; p < NUM_PREGS; p++) free_list.push_back(p);
    while (pend.size() > 0) model_cycle(0);

    // main run
    start_cycle = cycle;
    while (committed < NINSTR) model_cycle(1);
    run_cycles = cycle - start_cycle;
    $display("[%s] committed %0d instructions in %0d cycles", NAME, committed, run_cycles);

    // prefetch burst: announce every register's producer, demands busy the buses
    for (int k = 0; k < NUM_PREGS / IW; k++) begin
      idle_inputs();
      for (int i = 0; i < IW; i++) begin iss_v[i] = 1; iss_d[i] = preg_t'(k * IW + i); end
      for (int r = 0; r < RP; r++) begin rd_en[r] = 1; rd_preg[r] = preg_t'(map[(k * RP + r) % NLOG]); end
      @(negedge clk);
    end
    idle_inputs();
    repeat (10) @(negedge clk);

    // final architectural state through the read port (demand fetches)
    for (int l = 0; l < NLOG; l++) begin
      int tries;
      tries = 0;
      rd_en[0] = 1; rd_preg[0] = preg_t'(map[l]);
      #1;
      while (!rd_hit[0] && tries < 10) begin
        @(negedge clk);
        tries++;
      end
      check(rd_hit[0] && rd_data[0] == truth[map[l]], $sformatf("final value of logical r%0d", l));
      rd_en[0] = 0;
      @(negedge clk);
    end

    $display("[%s] cached results hit %0d, bypassed results %0d, results with a waiting ready consumer %0d",
             NAME, n_cached_hit, n_bypassed, n_ready_consumer);
    $display("[%s] demand fetches %0d (latency checked %0d), prefetches %0d, cycles with queued prefetches %0d, drops %0d",
             NAME, n_demand, n_lat_ok, n_prefetch, n_queued, n_drop);
    $display("[%s] evictions %0d, stale copies dropped at reallocation %0d, read misses (stalls) %0d",
             NAME, n_evict, n_realloc_inv, n_stall);
    done = 1;
  end
endmodule
