// tb_upper_bank: self-checking test of the fully-associative upper bank.
//
// Directed: sixteen registers written one per cycle all hit afterwards with
// their data; a seventeenth evicts the least recently used one (the first
// written) and no other; a write to a held register updates it in place;
// an invalidate makes a register miss; reads of the same cycle see the old
// contents. Random: up to six distinct writes and several invalidates per
// cycle. A reference map in the testbench holds the last value of every
// register and whether it may still be cached. Every hit must return that
// value, invalidated registers must miss, every register written in the last
// cycle must hit, the bank never holds more than 16 registers, and present_o
// must agree with the read ports.
module tb_upper_bank;
  import rfc_pkg::*;
  localparam int RP = 4, NW = 6, NI = 12;

  logic clk = 0, rst_n = 0;
  logic  [RP-1:0] rd_en, rd_hit;
  preg_t [RP-1:0] rd_preg;
  data_t [RP-1:0] rd_data;
  logic  [NW-1:0] wr_en;
  preg_t [NW-1:0] wr_preg;
  data_t [NW-1:0] wr_data;
  logic  [NI-1:0] inv_en;
  preg_t [NI-1:0] inv_preg;
  logic  [NUM_PREGS-1:0] present;

  int checks = 0, failures = 0;

  upper_bank #(.RP(RP), .NW(NW), .NI(NI)) dut (
    .clk, .rst_n, .rd_en_i(rd_en), .rd_preg_i(rd_preg), .rd_hit_o(rd_hit), .rd_data_o(rd_data),
    .wr_en_i(wr_en), .wr_preg_i(wr_preg), .wr_data_i(wr_data),
    .inv_en_i(inv_en), .inv_preg_i(inv_preg), .present_o(present));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic idle();
    rd_en = '0; wr_en = '0; inv_en = '0;
  endtask

  // read one register on port 0, combinationally
  task automatic probe(input preg_t p, output bit hit, output data_t d);
    rd_en[0] = 1; rd_preg[0] = p;
    #1;
    hit = rd_hit[0]; d = rd_data[0];
    rd_en[0] = 0;
    #1;
  endtask

  data_t  last[NUM_PREGS];
  bit     maybe[NUM_PREGS];   // may be cached
  bit     hit;
  data_t  d;

  initial begin
    idle();
    rd_preg = '0; wr_preg = '0; wr_data = '0; inv_preg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill 16 registers, one per cycle: 10..25
    for (int i = 0; i < 16; i++) begin
      wr_en = 6'b000001; wr_preg[0] = preg_t'(10 + i); wr_data[0] = data_t'(1000 + i);
      @(negedge clk);
    end
    idle();
    for (int i = 0; i < 16; i++) begin
      probe(preg_t'(10 + i), hit, d);
      check(hit && d == data_t'(1000 + i), $sformatf("fill reg %0d hit=%0b d=%0d", 10 + i, hit, d));
    end
    probe(preg_t'(9), hit, d);
    check(!hit, "never-written register misses");
    // probes above touched 10..25 in order; 10 is now least recently used
    wr_en = 6'b000001; wr_preg[0] = preg_t'(40); wr_data[0] = data_t'(4000);
    @(negedge clk);
    idle();
    probe(preg_t'(10), hit, d);
    check(!hit, "LRU register 10 evicted");
    for (int i = 1; i < 16; i++) begin
      probe(preg_t'(10 + i), hit, d);
      check(hit, $sformatf("register %0d kept", 10 + i));
    end
    probe(preg_t'(40), hit, d);
    check(hit && d == 4000, "new register cached");
    // in-place update: count stays 16, value changes
    wr_en = 6'b000001; wr_preg[0] = preg_t'(12); wr_data[0] = data_t'(1212);
    rd_en[1] = 1; rd_preg[1] = preg_t'(12);
    #1;
    check(rd_hit[1] && rd_data[1] == 1002, "same-cycle read sees old value");
    @(negedge clk);
    idle();
    probe(preg_t'(12), hit, d);
    check(hit && d == 1212, "in-place update");
    check($countones(present) == 16, "16 registers held after in-place update");
    // invalidate
    inv_en = 12'h001; inv_preg[0] = preg_t'(13);
    @(negedge clk);
    idle();
    probe(preg_t'(13), hit, d);
    check(!hit, "invalidated register misses");
    check(!present[13] && $countones(present) == 15, "present_o after invalidate");

    // random part; reset the bank first
    rst_n = 0; #1; rst_n = 1;
    for (int p = 0; p < NUM_PREGS; p++) begin last[p] = '0; maybe[p] = 0; end
    @(negedge clk);
    for (int c = 0; c < 4000; c++) begin
      bit [NUM_PREGS-1:0] used;
      preg_t justw[$];
      used = '0;
      justw.delete();
      idle();
      for (int w = 0; w < NW; w++) begin
        preg_t p;
        p = preg_t'($urandom_range(0, 40));
        if ($urandom_range(0, 2) == 0 && !used[p]) begin
          used[p] = 1;
          wr_en[w] = 1; wr_preg[w] = p; wr_data[w] = {$urandom, $urandom};
        end
      end
      for (int i = 0; i < NI; i++) begin
        inv_preg[i] = preg_t'($urandom_range(0, 40));
        inv_en[i]   = ($urandom_range(0, 7) == 0);
      end
      for (int r = 0; r < RP; r++) begin
        rd_en[r] = $urandom_range(0, 1); rd_preg[r] = preg_t'($urandom_range(0, 40));
      end
      #1;
      for (int r = 0; r < RP; r++)
        if (rd_en[r]) begin
          if (rd_hit[r])
            check(maybe[rd_preg[r]] && rd_data[r] == last[rd_preg[r]],
                  $sformatf("cycle %0d read %0d: stale or wrong data", c, rd_preg[r]));
          else
            check(!present[rd_preg[r]], "miss on a present register");
        end
      check($countones(present) <= 16, "at most 16 registers held");
      // model update: invalidates first, writes win
      for (int i = 0; i < NI; i++) if (inv_en[i]) maybe[inv_preg[i]] = 0;
      for (int w = 0; w < NW; w++)
        if (wr_en[w]) begin
          maybe[wr_preg[w]] = 1; last[wr_preg[w]] = wr_data[w];
          justw.push_back(wr_preg[w]);
        end
      @(negedge clk);
      idle();
      #1;
      foreach (justw[j])
        check(present[justw[j]], $sformatf("register %0d written last cycle is held", justw[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
