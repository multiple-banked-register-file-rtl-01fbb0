// tb_first_pair_table: self-checking test of the prefetch-first-pair table.
//
// Directed: the three-instruction example "p1 = p2+p3; p4 = p3+p6;
// p7 = p1+p8" renamed in one group; issuing the producer of p1 must name p8,
// the producer of p3 must name p2 (its first consumer is the first
// instruction), and p4 and p7, which have no consumer yet, name nothing.
// Random: groups of up to eight renamed instructions; the testbench keeps the
// whole renamed program and, for each issue lookup, searches it for the
// first instruction after the register's latest allocation that reads it, and
// expects that instruction's other source.
module tb_first_pair_table;
  import rfc_pkg::*;
  localparam int RW = 8, IW = 8;

  logic clk = 0, rst_n = 0;
  renamed_t [RW-1:0] ren;
  logic  [IW-1:0] iss_v, pf_v;
  preg_t [IW-1:0] iss_d, pf_p;

  int checks = 0, failures = 0;

  first_pair_table #(.RW(RW), .IW(IW)) dut (
    .clk, .rst_n, .ren_i(ren), .iss_valid_i(iss_v), .iss_dst_i(iss_d),
    .pf_valid_o(pf_v), .pf_preg_o(pf_p));

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
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic renamed_t mk(int d, int s1, int s2);
    renamed_t r;
    r.valid = 1;
    r.dst_valid = d >= 0;  r.dst = preg_t'(d < 0 ? 0 : d);
    r.src1_valid = s1 >= 0; r.src1 = preg_t'(s1 < 0 ? 0 : s1);
    r.src2_valid = s2 >= 0; r.src2 = preg_t'(s2 < 0 ? 0 : s2);
    return r;
  endfunction

  renamed_t prog[$];
  int       last_alloc[NUM_PREGS];

  // reference: other operand of the first reader of p since its allocation
  function automatic void ref_lookup(preg_t p, output bit v, output preg_t o);
    v = 0; o = '0;
    for (int i = last_alloc[p] + 1; i < prog.size(); i++) begin
      renamed_t r = prog[i];
      if (r.src1_valid && r.src1 == p) begin
        v = r.src2_valid && r.src2 != p; o = r.src2; return;
      end
      if (r.src2_valid && r.src2 == p) begin
        v = r.src1_valid && r.src1 != p; o = r.src1; return;
      end
    end
  endfunction

  int pf_seen = 0;

  initial begin
    ren = '0; iss_v = '0; iss_d = '0;
    for (int p = 0; p < NUM_PREGS; p++) last_alloc[p] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ren[0] = mk(1, 2, 3);
    ren[1] = mk(4, 3, 6);
    ren[2] = mk(7, 1, 8);
    @(negedge clk);
    ren = '0;
    iss_v = 4'b1111; iss_d[0] = 1; iss_d[1] = 3; iss_d[2] = 4; iss_d[3] = 7;
    #1;
    check(pf_v[0] && pf_p[0] == 8, "issue of p1 producer prefetches p8");
    check(pf_v[1] && pf_p[1] == 2, "issue of p3 producer prefetches p2");
    check(!pf_v[2], "p4 has no consumer");
    check(!pf_v[3], "p7 has no consumer");
    // reallocating p1 forgets its old first consumer
    ren[0] = mk(1, 9, 10);
    @(negedge clk);
    ren = '0;
    #1;
    check(!pf_v[0], "reallocated p1 has no consumer yet");
    iss_v = '0;

    // random program against the reference
    rst_n = 0; #1; rst_n = 1;
    prog.delete();
    for (int c = 0; c < 2000; c++) begin
      for (int i = 0; i < RW; i++) begin
        if ($urandom_range(0, 3) != 0)
          ren[i] = mk($urandom_range(0, 4) == 0 ? -1 : $urandom_range(0, 31),
                      $urandom_range(0, 5) == 0 ? -1 : $urandom_range(0, 31),
                      $urandom_range(0, 3) == 0 ? -1 : $urandom_range(0, 31));
        else ren[i] = '0;
      end
      for (int i = 0; i < IW; i++) begin
        iss_v[i] = $urandom_range(0, 1);
        iss_d[i] = preg_t'($urandom_range(0, 31));
      end
      #1;
      // lookups see the table before this cycle's renames
      for (int i = 0; i < IW; i++) begin
        bit v; preg_t o;
        ref_lookup(iss_d[i], v, o);
        check(pf_v[i] == (iss_v[i] && v), $sformatf("cycle %0d lookup %0d valid", c, iss_d[i]));
        if (iss_v[i] && v) begin
          check(pf_p[i] == o, $sformatf("cycle %0d lookup %0d other %0d exp %0d", c, iss_d[i], pf_p[i], o));
          pf_seen++;
        end
      end
      for (int i = 0; i < RW; i++)
        if (ren[i].valid) begin
          prog.push_back(ren[i]);
          if (ren[i].dst_valid) last_alloc[ren[i].dst] = prog.size() - 1;
        end
      @(negedge clk);
    end
    check(pf_seen > 100, "prefetches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
