// rfc_pkg: shared sizes, types and policy encodings of the two-level register
// file cache.
//
// The register file cache keeps every value in a large, slow lowest-level bank
// and a copy of the values expected to be read soon in a small, fast,
// fully-associative uppermost-level bank, which alone feeds the functional
// units. The sizes below are the evaluated configuration: 128 physical
// registers at the lowest level and a 16-register cache at the upper level.
// The 64-bit data width is this design's choice (the evaluated machine is a
// 64-bit RISC, but the width is not stated).
package rfc_pkg;

  // Sizes of the evaluated configuration.
  localparam int unsigned NUM_PREGS = 128;  // physical registers, lowest level
  localparam int unsigned NUM_CACHE = 16;   // registers in the uppermost level
  localparam int unsigned DATA_W    = 64;   // register width (own choice)
  localparam int unsigned PREG_W    = $clog2(NUM_PREGS);

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [DATA_W-1:0] data_t;

  // Which results are also written into the uppermost level.
  typedef enum logic {
    CACHE_NON_BYPASS = 1'b0,  // cache results not read from the bypass network
    CACHE_READY      = 1'b1   // cache results that feed a ready, unissued instruction
  } cache_policy_e;

  // How values are brought from the lowest to the uppermost level.
  typedef enum logic {
    FETCH_ON_DEMAND      = 1'b0,  // only when a ready instruction misses
    FETCH_PREFETCH_FIRST = 1'b1   // on demand, plus prefetch-first-pair at issue
  } fetch_policy_e;

  // One result leaving a functional unit.
  typedef struct packed {
    logic  valid;
    preg_t preg;
    data_t data;
    logic  bypassed;        // read by some consumer from the bypass network
    logic  ready_consumer;  // a consumer in the window is now ready and unissued
  } result_t;

  // One renamed instruction, as the rename stage sees it (program order).
  typedef struct packed {
    logic  valid;
    logic  dst_valid;
    preg_t dst;
    logic  src1_valid;
    preg_t src1;
    logic  src2_valid;
    preg_t src2;
  } renamed_t;

endpackage
