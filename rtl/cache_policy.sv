// cache_policy: routes the results of a cycle and the values arriving on the
// transfer buses into the two levels of the register file cache.
//
// Every valid result is written into the lowest level. Whether it is also
// written into the uppermost level is the caching policy:
//   CACHE_NON_BYPASS  cache the result only if no consumer read it from the
//                     bypass network (most values are read at most once, so a
//                     bypassed value is unlikely to be needed again);
//   CACHE_READY       cache the result only if it is a source of an unissued
//                     instruction that now has all its operands ready.
// Non-bypass caching is the default, being the better and simpler of the two.
// A result that is not cached invalidates any older upper-level copy of its
// register. A value arriving on a bus is written into the upper level unless a
// result for the same register is written in the same cycle (the result is
// newer and wins).
//
// Purely combinational. Upper-level write ports are ordered results first
// (WP of them), then buses (NB). The `bypassed` and `ready_consumer` flags
// come from the issue and bypass logic outside the register file. The two
// policies follow the published description; the collision rule and the
// invalidation are this design's choices.
module cache_policy
  import rfc_pkg::*;
#(
  parameter cache_policy_e POLICY = CACHE_NON_BYPASS,
  parameter int unsigned   WP     = 4,
  parameter int unsigned   NB     = 2
) (
  input  result_t [WP-1:0]    result_i,
  input  logic    [NB-1:0]    fill_valid_i,
  input  preg_t   [NB-1:0]    fill_preg_i,
  input  data_t   [NB-1:0]    fill_data_i,
  // lowest level writes
  output logic    [WP-1:0]    low_wr_en_o,
  output preg_t   [WP-1:0]    low_wr_preg_o,
  output data_t   [WP-1:0]    low_wr_data_o,
  // uppermost level writes
  output logic    [WP+NB-1:0] up_wr_en_o,
  output preg_t   [WP+NB-1:0] up_wr_preg_o,
  output data_t   [WP+NB-1:0] up_wr_data_o,
  // uppermost level invalidations (results that are not cached)
  output logic    [WP-1:0]    up_inv_en_o,
  output preg_t   [WP-1:0]    up_inv_preg_o
);

  always_comb begin
    logic cache;
    logic clash;
    for (int i = 0; i < int'(WP); i++) begin
      cache = (POLICY == CACHE_NON_BYPASS) ? !result_i[i].bypassed
                                           : result_i[i].ready_consumer;
      low_wr_en_o[i]   = result_i[i].valid;
      low_wr_preg_o[i] = result_i[i].preg;
      low_wr_data_o[i] = result_i[i].data;
      up_wr_en_o[i]    = result_i[i].valid && cache;
      up_wr_preg_o[i]  = result_i[i].preg;
      up_wr_data_o[i]  = result_i[i].data;
      up_inv_en_o[i]   = result_i[i].valid && !cache;
      up_inv_preg_o[i] = result_i[i].preg;
    end
    for (int b = 0; b < int'(NB); b++) begin
      clash = 1'b0;
      for (int i = 0; i < int'(WP); i++)
        if (result_i[i].valid && result_i[i].preg == fill_preg_i[b]) clash = 1'b1;
      up_wr_en_o[WP+b]   = fill_valid_i[b] && !clash;
      up_wr_preg_o[WP+b] = fill_preg_i[b];
      up_wr_data_o[WP+b] = fill_data_i[b];
    end
  end

endmodule
