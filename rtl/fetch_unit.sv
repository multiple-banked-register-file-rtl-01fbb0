// fetch_unit: schedules the transfer buses that move values from the lowest to
// the uppermost level of the register file cache.
//
// Two kinds of request compete for the NB buses:
//   demand    an instruction has all operands ready but one of them is not in
//             the upper level (fetch-on-demand). Demands are served first,
//             only while a bus is free; a demand that finds no bus is not
//             remembered, the issue logic simply asks again next cycle.
//   prefetch  a register named by prefetch-first-pair when an instruction
//             issues. Prefetches use the buses left over by demands, oldest
//             first; those that find no bus wait in a queue of QD entries, and
//             are dropped when the queue is full.
// A request is filtered out when the register is already in the upper level,
// is already on a bus, is already queued, or (prefetch, demand) has not been
// written yet. Queued prefetches whose register reached the upper level in the
// meantime are discarded. With POLICY = FETCH_ON_DEMAND prefetches are ignored.
//
// Timing: a bus granted in cycle t drives bus_en_o/bus_preg_o (the lowest-level
// read port) in cycle t; fill_valid_o/fill_preg_o repeat it in cycle t+1, when
// the lowest level returns the data and the upper level is written, so the
// value can be read from the upper level in cycle t+2.
//
// The two fetch mechanisms and demand priority follow the published
// description ("provided that the bus between both levels is available"); the
// prefetch queue, its depth and the filters are this design's choices.
module fetch_unit
  import rfc_pkg::*;
#(
  parameter fetch_policy_e POLICY = FETCH_PREFETCH_FIRST,
  parameter int unsigned   REGS   = NUM_PREGS,
  parameter int unsigned   NB     = 2,   // buses between the levels
  parameter int unsigned   ND     = 4,   // demand request ports
  parameter int unsigned   NP     = 8,   // prefetch request ports
  parameter int unsigned   QD     = 8    // prefetch queue depth
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [ND-1:0]      dem_valid_i,
  input  preg_t [ND-1:0]      dem_preg_i,
  input  logic  [NP-1:0]      pf_valid_i,
  input  preg_t [NP-1:0]      pf_preg_i,
  input  logic  [REGS-1:0]    present_i,   // held by the upper level
  input  logic  [REGS-1:0]    written_i,   // value exists in the lowest level
  // lowest-level read ports, this cycle
  output logic  [NB-1:0]      bus_en_o,
  output preg_t [NB-1:0]      bus_preg_o,
  output logic  [NB-1:0]      bus_is_pf_o,
  // data of last cycle's grants arrives now
  output logic  [NB-1:0]      fill_valid_o,
  output preg_t [NB-1:0]      fill_preg_o,
  // activity
  output logic                pf_drop_o,    // a prefetch was lost, queue full
  output logic  [$clog2(QD+1)-1:0] q_count_o
);

  localparam int unsigned CW = $clog2(QD + 1);

  logic  [QD-1:0] q_valid_q, q_valid_d;
  preg_t [QD-1:0] q_preg_q,  q_preg_d;

  // Is register p already on a bus (now or returning now)?
  function automatic logic on_bus(input preg_t p, input logic [NB-1:0] en,
                                  input preg_t [NB-1:0] regs,
                                  input logic [NB-1:0] fen,
                                  input preg_t [NB-1:0] fregs);
    logic r;
    r = 1'b0;
    for (int b = 0; b < int'(NB); b++)
      if ((en[b] && regs[b] == p) || (fen[b] && fregs[b] == p)) r = 1'b1;
    return r;
  endfunction

  always_comb begin
    int unsigned used;
    int unsigned n;
    logic dup;
    used        = 0;
    n           = 0;
    bus_en_o    = '0;
    bus_preg_o  = '0;
    bus_is_pf_o = '0;
    q_valid_d   = '0;
    q_preg_d    = '0;
    pf_drop_o   = 1'b0;

    // demands first
    for (int d = 0; d < int'(ND); d++) begin
      if (dem_valid_i[d] && written_i[dem_preg_i[d]] && !present_i[dem_preg_i[d]] &&
          !on_bus(dem_preg_i[d], bus_en_o, bus_preg_o, fill_valid_o, fill_preg_o) &&
          used < NB) begin
        bus_en_o[used]   = 1'b1;
        bus_preg_o[used] = dem_preg_i[d];
        used++;
      end
    end

    // queued prefetches, oldest first; stale ones are discarded
    for (int i = 0; i < int'(QD); i++) begin
      if (q_valid_q[i] && !present_i[q_preg_q[i]] &&
          !on_bus(q_preg_q[i], bus_en_o, bus_preg_o, fill_valid_o, fill_preg_o)) begin
        if (used < NB) begin
          bus_en_o[used]    = 1'b1;
          bus_preg_o[used]  = q_preg_q[i];
          bus_is_pf_o[used] = 1'b1;
          used++;
        end else begin
          q_valid_d[n] = 1'b1;
          q_preg_d[n]  = q_preg_q[i];
          n++;
        end
      end
    end

    // new prefetches: straight onto a free bus, else into the queue
    if (POLICY == FETCH_PREFETCH_FIRST) begin
      for (int p = 0; p < int'(NP); p++) begin
        dup = 1'b0;
        for (int i = 0; i < int'(QD); i++)
          if (q_valid_d[i] && q_preg_d[i] == pf_preg_i[p]) dup = 1'b1;
        if (pf_valid_i[p] && written_i[pf_preg_i[p]] && !present_i[pf_preg_i[p]] && !dup &&
            !on_bus(pf_preg_i[p], bus_en_o, bus_preg_o, fill_valid_o, fill_preg_o)) begin
          if (used < NB) begin
            bus_en_o[used]    = 1'b1;
            bus_preg_o[used]  = pf_preg_i[p];
            bus_is_pf_o[used] = 1'b1;
            used++;
          end else if (n < QD) begin
            q_valid_d[n] = 1'b1;
            q_preg_d[n]  = pf_preg_i[p];
            n++;
          end else begin
            pf_drop_o = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid_q    <= '0;
      q_preg_q     <= '0;
      fill_valid_o <= '0;
      fill_preg_o  <= '0;
    end else begin
      q_valid_q    <= q_valid_d;
      q_preg_q     <= q_preg_d;
      fill_valid_o <= bus_en_o;
      fill_preg_o  <= bus_preg_o;
    end
  end

  always_comb begin
    q_count_o = '0;
    for (int i = 0; i < int'(QD); i++)
      q_count_o += CW'(q_valid_q[i]);
  end

endmodule
