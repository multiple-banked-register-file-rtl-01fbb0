// first_pair_table: the bookkeeping behind prefetch-first-pair.
//
// Prefetch-first-pair says: when an instruction issues, bring into the upper
// level the other source operand of the first instruction that uses its
// result. For "p1 = p2+p3; p4 = p3+p6; p7 = p1+p8", issuing the first
// instruction prefetches p8.
//
// The table has one entry per physical register p: `seen` (the first consumer
// of p has been renamed), `has_other` and `other` (that consumer's other source
// register, if it has one that differs from p). It is filled at rename,
// instruction by instruction in program order within a group: each source s of
// an instruction whose entry is not yet `seen` records the instruction's other
// source, then the instruction's destination entry is cleared, because its
// register now belongs to a new producer whose consumers come later.
//
// At issue, each issuing instruction's destination register looks up its entry
// combinationally; pf_valid_o/pf_preg_o give the register to prefetch in the
// same cycle. Rename updates take effect at the clock edge, so a lookup in the
// cycle its consumer is renamed sees the older state. Reset clears the table.
//
// The prefetch rule is the published one; keeping it as a per-register table
// filled at rename is this design's way of knowing the first consumer.
module first_pair_table
  import rfc_pkg::*;
#(
  parameter int unsigned REGS = NUM_PREGS,
  parameter int unsigned RW   = 8,   // instructions renamed per cycle
  parameter int unsigned IW   = 8    // instructions issued per cycle
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  renamed_t [RW-1:0]    ren_i,
  input  logic     [IW-1:0]    iss_valid_i,
  input  preg_t    [IW-1:0]    iss_dst_i,
  output logic     [IW-1:0]    pf_valid_o,
  output preg_t    [IW-1:0]    pf_preg_o
);

  logic  [REGS-1:0] seen_q, seen_d;
  logic  [REGS-1:0] other_v_q, other_v_d;
  preg_t [REGS-1:0] other_q, other_d;

  always_comb begin
    seen_d    = seen_q;
    other_v_d = other_v_q;
    other_d   = other_q;
    for (int i = 0; i < int'(RW); i++) begin
      if (ren_i[i].valid) begin
        if (ren_i[i].src1_valid && !seen_d[ren_i[i].src1]) begin
          seen_d[ren_i[i].src1]    = 1'b1;
          other_v_d[ren_i[i].src1] = ren_i[i].src2_valid && ren_i[i].src2 != ren_i[i].src1;
          other_d[ren_i[i].src1]   = ren_i[i].src2;
        end
        if (ren_i[i].src2_valid && !seen_d[ren_i[i].src2]) begin
          seen_d[ren_i[i].src2]    = 1'b1;
          other_v_d[ren_i[i].src2] = ren_i[i].src1_valid && ren_i[i].src2 != ren_i[i].src1;
          other_d[ren_i[i].src2]   = ren_i[i].src1;
        end
        if (ren_i[i].dst_valid) begin
          seen_d[ren_i[i].dst]    = 1'b0;
          other_v_d[ren_i[i].dst] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q    <= '0;
      other_v_q <= '0;
      other_q   <= '0;
    end else begin
      seen_q    <= seen_d;
      other_v_q <= other_v_d;
      other_q   <= other_d;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(IW); i++) begin
      pf_valid_o[i] = iss_valid_i[i] && seen_q[iss_dst_i[i]] && other_v_q[iss_dst_i[i]];
      pf_preg_o[i]  = other_q[iss_dst_i[i]];
    end
  end

endmodule
