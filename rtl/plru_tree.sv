// plru_tree: tree pseudo-LRU replacement state for a fully-associative bank,
// able to record several accesses and choose several distinct victims in one
// cycle.
//
// The state is a binary tree of WAYS-1 bits stored heap-style (node 1 is the
// root, node i has children 2i and 2i+1, leaf WAYS+w is way w). A node bit of 0
// points the victim search to its left half, 1 to its right half. Touching a
// way turns every bit on its path to point away from it.
//
// Victim choice, per request k in order: an invalid way that is not excluded
// wins (lowest index first); otherwise the tree is walked from the root, and a
// node whose preferred half holds no selectable way is passed the other way.
// Ways already given to an earlier request in the same cycle, and ways marked
// in `exclude_i`, are never selected, so the victims of one cycle are
// distinct. Each chosen victim counts as touched for the following requests
// and for the next state.
//
// Interface: touch_i/touch_way_i record hits (reads and in-place writes);
// vreq_i asks for up to NV victims; vvalid_o/vway_o answer combinationally in
// the same cycle; the tree updates at the clock edge. Reset clears the tree.
//
// The bank is pseudo-LRU as the evaluated configuration states; the tree
// variant, the preference for invalid ways and the multi-victim walk are this
// design's own choices.
module plru_tree #(
  parameter int unsigned WAYS = 16,   // power of two, at least 2
  parameter int unsigned NT   = 4,    // touches per cycle
  parameter int unsigned NV   = 6,    // victim requests per cycle
  localparam int unsigned WW  = $clog2(WAYS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NT-1:0]       touch_i,
  input  logic [NT-1:0][WW-1:0] touch_way_i,
  input  logic [WAYS-1:0]     invalid_i,   // ways holding nothing
  input  logic [WAYS-1:0]     exclude_i,   // ways that must not be chosen
  input  logic [NV-1:0]       vreq_i,
  output logic [NV-1:0]       vvalid_o,
  output logic [NV-1:0][WW-1:0] vway_o
);

  logic [WAYS-1:0] tree_q, tree_d;   // bit 0 unused

  // Point every node on the path of `way` away from it.
  function automatic logic [WAYS-1:0] touch(input logic [WAYS-1:0] t,
                                            input logic [WW-1:0] way);
    logic [WAYS-1:0] r;
    int unsigned node;
    r = t;
    node = 1;
    for (int l = WW - 1; l >= 0; l--) begin
      r[node] = ~way[l];           // way in right half -> point left, and back
      node = 2 * node + int'(way[l]);
    end
    return r;
  endfunction

  // Walk the tree from the root, skipping halves with nothing selectable.
  function automatic logic [WW-1:0] walk(input logic [WAYS-1:0] t,
                                         input logic [WAYS-1:0] avail);
    logic [WW-1:0] way;
    int unsigned node, lo, half;
    logic go_right;
    logic [WAYS-1:0] rmask;
    node = 1;
    lo   = 0;
    half = WAYS;
    way  = '0;
    for (int l = WW - 1; l >= 0; l--) begin
      half = half / 2;
      rmask = '0;
      for (int w = 0; w < int'(WAYS); w++)
        if (w >= int'(lo + half) && w < int'(lo + 2 * half)) rmask[w] = 1'b1;
      go_right = t[node];
      if (go_right && (avail & rmask) == '0) go_right = 1'b0;
      else if (!go_right && (avail & ~rmask & ((rmask >> half))) == '0) go_right = 1'b1;
      way[l] = go_right;
      if (go_right) lo = lo + half;
      node = 2 * node + int'(go_right);
    end
    return way;
  endfunction

  always_comb begin
    logic [WAYS-1:0] t;
    logic [WAYS-1:0] taken;
    logic [WAYS-1:0] free_ways;
    t     = tree_q;
    taken = exclude_i;
    free_ways = '0;
    vvalid_o = '0;
    vway_o   = '0;
    // Hits of this cycle count before this cycle's allocations.
    for (int i = 0; i < int'(NT); i++)
      if (touch_i[i]) t = touch(t, touch_way_i[i]);
    for (int k = 0; k < int'(NV); k++) begin
      if (vreq_i[k] && taken != '1) begin
        free_ways = invalid_i & ~taken;
        vvalid_o[k] = 1'b1;
        if (free_ways != '0) begin
          for (int w = int'(WAYS) - 1; w >= 0; w--)
            if (free_ways[w]) vway_o[k] = WW'(w);
        end else begin
          vway_o[k] = walk(t, ~taken);
        end
        taken[vway_o[k]] = 1'b1;
        t = touch(t, vway_o[k]);
      end
    end
    tree_d = t;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tree_q <= '0;
    else        tree_q <= tree_d;

endmodule
