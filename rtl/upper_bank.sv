// upper_bank: the uppermost level of the register file cache, a small
// fully-associative bank of registers tagged by physical register number.
//
// It is the only level that feeds the functional units. Reads are
// associative: each read port compares its register number against all tags
// and returns hit and data in the same cycle (single-cycle access). Writes come
// from two sources, results chosen by the caching policy and values brought up
// from the lowest level by the transfer buses; all writes of a cycle take
// effect at the clock edge. A write to a register already held updates that
// entry in place; otherwise it takes a victim chosen by the pseudo-LRU tree,
// invalid entries first. Invalidate ports drop a register's entry (used when a
// result for the register bypasses the cache, and when the register is
// reallocated at rename). Read hits and writes count as accesses for the
// replacement state. Writes win over an invalidate of the same register.
//
// present_o has one bit per physical register, set while the bank holds it;
// the fetch logic uses it to filter requests.
//
// Following the evaluated configuration: 16 entries, fully associative,
// pseudo-LRU, and (configuration C3) 4 read ports, 4 result write ports and one
// extra write port per transfer bus (2). Write-in-place and invalidation are
// this design's choices.
module upper_bank
  import rfc_pkg::*;
#(
  parameter int unsigned ENTRIES = NUM_CACHE,
  parameter int unsigned RP      = 4,   // read ports
  parameter int unsigned NW      = 6,   // write ports (results + buses)
  parameter int unsigned NI      = 12,  // invalidate ports
  localparam int unsigned EW     = $clog2(ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read ports
  input  logic  [RP-1:0]        rd_en_i,
  input  preg_t [RP-1:0]        rd_preg_i,
  output logic  [RP-1:0]        rd_hit_o,
  output data_t [RP-1:0]        rd_data_o,
  // write ports
  input  logic  [NW-1:0]        wr_en_i,
  input  preg_t [NW-1:0]        wr_preg_i,
  input  data_t [NW-1:0]        wr_data_i,
  // invalidate ports
  input  logic  [NI-1:0]        inv_en_i,
  input  preg_t [NI-1:0]        inv_preg_i,
  // which physical registers are held
  output logic  [NUM_PREGS-1:0] present_o
);

  logic  [ENTRIES-1:0] valid_q;
  preg_t [ENTRIES-1:0] tag_q;
  data_t [ENTRIES-1:0] data_q;

  // ---------------- associative reads ----------------
  logic [RP-1:0][EW-1:0] rd_way;
  always_comb begin
    rd_hit_o  = '0;
    rd_data_o = '0;
    rd_way    = '0;
    for (int r = 0; r < int'(RP); r++)
      for (int e = 0; e < int'(ENTRIES); e++)
        if (rd_en_i[r] && valid_q[e] && tag_q[e] == rd_preg_i[r]) begin
          rd_hit_o[r]  = 1'b1;
          rd_data_o[r] = data_q[e];
          rd_way[r]    = EW'(e);
        end
  end

  always_comb begin
    present_o = '0;
    for (int e = 0; e < int'(ENTRIES); e++)
      if (valid_q[e]) present_o[tag_q[e]] = 1'b1;
  end

  // ---------------- write lookup ----------------
  logic [NW-1:0]         wr_hit;
  logic [NW-1:0][EW-1:0] wr_way;
  logic [ENTRIES-1:0]    inplace;
  always_comb begin
    wr_hit  = '0;
    wr_way  = '0;
    inplace = '0;
    for (int w = 0; w < int'(NW); w++)
      for (int e = 0; e < int'(ENTRIES); e++)
        if (wr_en_i[w] && valid_q[e] && tag_q[e] == wr_preg_i[w]) begin
          wr_hit[w] = 1'b1;
          wr_way[w] = EW'(e);
          inplace[e] = 1'b1;
        end
  end

  // ---------------- replacement ----------------
  logic [RP+NW-1:0]         touch;
  logic [RP+NW-1:0][EW-1:0] touch_way;
  logic [NW-1:0]            vvalid;
  logic [NW-1:0][EW-1:0]    vway;

  always_comb begin
    for (int r = 0; r < int'(RP); r++) begin
      touch[r]     = rd_hit_o[r];
      touch_way[r] = rd_way[r];
    end
    for (int w = 0; w < int'(NW); w++) begin
      touch[RP+w]     = wr_hit[w];
      touch_way[RP+w] = wr_way[w];
    end
  end

  plru_tree #(.WAYS(ENTRIES), .NT(RP + NW), .NV(NW)) u_plru (
    .clk        (clk),
    .rst_n      (rst_n),
    .touch_i    (touch),
    .touch_way_i(touch_way),
    .invalid_i  (~valid_q),
    .exclude_i  (inplace),
    .vreq_i     (wr_en_i & ~wr_hit),
    .vvalid_o   (vvalid),
    .vway_o     (vway)
  );

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      tag_q   <= '0;
      data_q  <= '0;
    end else begin
      for (int i = 0; i < int'(NI); i++)
        for (int e = 0; e < int'(ENTRIES); e++)
          if (inv_en_i[i] && valid_q[e] && tag_q[e] == inv_preg_i[i])
            valid_q[e] <= 1'b0;
      for (int w = 0; w < int'(NW); w++) begin
        if (wr_en_i[w] && wr_hit[w]) begin
          valid_q[wr_way[w]] <= 1'b1;
          data_q[wr_way[w]]  <= wr_data_i[w];
        end else if (wr_en_i[w] && vvalid[w]) begin
          valid_q[vway[w]] <= 1'b1;
          tag_q[vway[w]]   <= wr_preg_i[w];
          data_q[vway[w]]  <= wr_data_i[w];
        end
      end
    end
  end

  // Two writes to the same register in one cycle would leave two entries.
  for (genvar a = 0; a < NW; a++) begin : g_one_write_a
    for (genvar b = a + 1; b < NW; b++) begin : g_one_write_b
      a_one_write : assert property (@(posedge clk) disable iff (!rst_n)
        !(wr_en_i[a] && wr_en_i[b] && wr_preg_i[a] == wr_preg_i[b]))
        else $error("upper_bank: two writes to register %0d in one cycle", wr_preg_i[a]);
    end
  end

endmodule
