// tb_lower_bank: self-checking test of the lowest-level bank.
//
// Random writes on the four write ports and reads on the two bus read ports
// are compared with a reference array; read data must appear exactly one
// cycle after the request. The `written` bits are checked against a reference
// too: set by a write, cleared by an allocation, write winning over an
// allocation of the same register in the same cycle.
module tb_lower_bank;
  import rfc_pkg::*;
  localparam int NW = 4, NR = 2, NA = 8;

  logic clk = 0, rst_n = 0;
  logic  [NW-1:0] wr_en;
  preg_t [NW-1:0] wr_preg;
  data_t [NW-1:0] wr_data;
  logic  [NR-1:0] rd_en;
  preg_t [NR-1:0] rd_preg;
  data_t [NR-1:0] rd_data;
  logic  [NA-1:0] alloc;
  preg_t [NA-1:0] alloc_preg;
  logic  [NUM_PREGS-1:0] written;

  int checks = 0, failures = 0;

  lower_bank #(.NW(NW), .NR(NR), .NA(NA)) dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_preg_i(wr_preg), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_preg_i(rd_preg), .rd_data_o(rd_data),
    .alloc_i(alloc), .alloc_preg_i(alloc_preg), .written_o(written));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  data_t ref_mem[NUM_PREGS];
  bit    ref_wr[NUM_PREGS];
  bit    known[NUM_PREGS];
  data_t exp_data[NR];
  bit    exp_v[NR];

  initial begin
    wr_en = '0; rd_en = '0; alloc = '0; wr_preg = '0; rd_preg = '0; alloc_preg = '0; wr_data = '0;
    for (int p = 0; p < NUM_PREGS; p++) begin ref_wr[p] = 0; known[p] = 0; end
    for (int r = 0; r < NR; r++) exp_v[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(written == '0, "nothing written after reset");
    for (int c = 0; c < 5000; c++) begin
      bit [NUM_PREGS-1:0] used;
      used = '0;
      for (int w = 0; w < NW; w++) begin
        preg_t p;
        p = preg_t'($urandom_range(0, NUM_PREGS - 1));
        wr_en[w] = ($urandom_range(0, 1) == 1) && !used[p];
        used[p] |= wr_en[w];
        wr_preg[w] = p; wr_data[w] = {$urandom, $urandom};
      end
      for (int a = 0; a < NA; a++) begin
        alloc[a] = ($urandom_range(0, 5) == 0);
        alloc_preg[a] = preg_t'($urandom_range(0, NUM_PREGS - 1));
      end
      for (int r = 0; r < NR; r++) begin
        rd_en[r] = $urandom_range(0, 1);
        rd_preg[r] = preg_t'($urandom_range(0, NUM_PREGS - 1));
      end
      // data requested last cycle is on the outputs now
      for (int r = 0; r < NR; r++)
        if (exp_v[r]) check(rd_data[r] == exp_data[r], $sformatf("cycle %0d port %0d read data", c, r));
      for (int r = 0; r < NR; r++) begin
        exp_v[r] = rd_en[r] && known[rd_preg[r]];
        exp_data[r] = ref_mem[rd_preg[r]];
      end
      for (int a = 0; a < NA; a++) if (alloc[a]) ref_wr[alloc_preg[a]] = 0;
      for (int w = 0; w < NW; w++)
        if (wr_en[w]) begin
          ref_mem[wr_preg[w]] = wr_data[w]; ref_wr[wr_preg[w]] = 1; known[wr_preg[w]] = 1;
        end
      @(negedge clk);
      for (int p = 0; p < NUM_PREGS; p++)
        check(written[p] == ref_wr[p], $sformatf("written bit %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
