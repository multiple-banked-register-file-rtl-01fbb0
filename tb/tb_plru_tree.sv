// tb_plru_tree: self-checking test of the multi-victim tree pseudo-LRU.
//
// Directed part: after reset all ways are invalid and six requests get ways
// 0..5; after touching every way once in index order the victim is way 0 (the
// least recently used). Random part: random touches, invalid and excluded
// ways and victim requests are compared, cycle by cycle, against a reference
// tree kept in the testbench (same policy, written as an explicit recursion
// over subtrees), and every answer is checked to be distinct and never an
// excluded way.
module tb_plru_tree;
  localparam int WAYS = 16, NT = 4, NV = 6, WW = 4;

  logic clk = 0, rst_n = 0;
  logic [NT-1:0] touch;
  logic [NT-1:0][WW-1:0] touch_way;
  logic [WAYS-1:0] invalid, exclude;
  logic [NV-1:0] vreq, vvalid;
  logic [NV-1:0][WW-1:0] vway;

  int checks = 0, failures = 0;

  plru_tree #(.WAYS(WAYS), .NT(NT), .NV(NV)) dut (
    .clk, .rst_n, .touch_i(touch), .touch_way_i(touch_way), .invalid_i(invalid),
    .exclude_i(exclude), .vreq_i(vreq), .vvalid_o(vvalid), .vway_o(vway));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference model: node bits m[1..15], 0 = left is the victim side ----
  bit m[1:WAYS-1];

  function automatic void ref_touch(int way);
    int node = 1, lo = 0, size = WAYS;
    while (size > 1) begin
      size /= 2;
      if (way >= lo + size) begin m[node] = 0; node = 2*node+1; lo += size; end
      else                  begin m[node] = 1; node = 2*node;   end
    end
  endfunction

  function automatic bit any_in(bit [WAYS-1:0] a, int lo, int size);
    for (int w = lo; w < lo + size; w++) if (a[w]) return 1;
    return 0;
  endfunction

  function automatic int ref_walk(bit [WAYS-1:0] avail);
    int node = 1, lo = 0, size = WAYS;
    bit right;
    while (size > 1) begin
      size /= 2;
      right = m[node];
      if (right && !any_in(avail, lo + size, size)) right = 0;
      else if (!right && !any_in(avail, lo, size)) right = 1;
      if (right) lo += size;
      node = 2*node + int'(right);
    end
    return lo;
  endfunction

  // expected outputs for the current inputs; updates m to the next state
  function automatic void ref_step(output bit [NV-1:0] ev, output int ew[NV]);
    bit [WAYS-1:0] taken = exclude;
    for (int i = 0; i < NT; i++) if (touch[i]) ref_touch(touch_way[i]);
    for (int k = 0; k < NV; k++) begin
      ev[k] = 0; ew[k] = 0;
      if (vreq[k] && taken != '1) begin
        ev[k] = 1;
        ew[k] = -1;
        for (int w = 0; w < WAYS; w++)
          if (ew[k] < 0 && invalid[w] && !taken[w]) ew[k] = w;
        if (ew[k] < 0) ew[k] = ref_walk(~taken);
        taken[ew[k]] = 1;
        ref_touch(ew[k]);
      end
    end
  endfunction

  bit [NV-1:0] ev;
  int ew[NV];

  initial begin
    touch = '0; touch_way = '0; invalid = '1; exclude = '0; vreq = '0;
    for (int n = 1; n < WAYS; n++) m[n] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // all invalid: six requests take ways 0..5
    vreq = '1;
    #1;
    for (int k = 0; k < NV; k++)
      check(vvalid[k] && vway[k] == WW'(k), $sformatf("invalid-first victim %0d = %0d", k, vway[k]));
    ref_step(ev, ew);
    @(negedge clk);
    // touch every way in index order, one per cycle
    vreq = '0; invalid = '0;
    for (int w = 0; w < WAYS; w++) begin
      touch = 4'b0001; touch_way[0] = WW'(w);
      ref_step(ev, ew);
      @(negedge clk);
    end
    touch = '0;
    vreq = 6'b000001;
    #1;
    check(vvalid[0] && vway[0] == 0, $sformatf("LRU after in-order touches is way 0, got %0d", vway[0]));
    // way 0 excluded -> the next pseudo-LRU candidate, never 0
    exclude = 16'h0001;
    #1;
    check(vvalid[0] && vway[0] != 0, "excluded way not chosen");
    exclude = '0;
    ref_step(ev, ew);
    @(negedge clk);

    // random comparison against the reference
    for (int c = 0; c < 3000; c++) begin
      bit [WAYS-1:0] seen;
      for (int i = 0; i < NT; i++) begin
        touch[i] = $urandom_range(0, 1);
        touch_way[i] = WW'($urandom_range(0, WAYS - 1));
      end
      invalid = ($urandom_range(0, 3) == 0) ? WAYS'($urandom) & WAYS'($urandom) : '0;
      exclude = WAYS'($urandom) & WAYS'($urandom) & WAYS'($urandom);
      if ($urandom_range(0, 20) == 0) exclude = '1;
      vreq = NV'($urandom);
      #1;
      ref_step(ev, ew);
      seen = '0;
      for (int k = 0; k < NV; k++) begin
        check(vvalid[k] == ev[k], $sformatf("cycle %0d req %0d valid %0b exp %0b", c, k, vvalid[k], ev[k]));
        if (ev[k]) begin
          check(int'(vway[k]) == ew[k], $sformatf("cycle %0d req %0d way %0d exp %0d", c, k, vway[k], ew[k]));
          check(!exclude[vway[k]] && !seen[vway[k]], "victim excluded or repeated");
          seen[vway[k]] = 1;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
