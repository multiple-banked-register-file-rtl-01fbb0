// lower_bank: the lowest level of the register file cache, holding every
// physical register.
//
// Every result is written here, whatever the caching policy decides, so this
// level always holds all values and nothing is ever copied down from the upper
// level. Its only readers are the transfer buses to the upper level: each bus
// is one read port. Reads are synchronous (register number in cycle t, data in
// cycle t+1), reflecting that this larger bank is slower than the upper one;
// that one-cycle latency is this design's choice. A write in cycle t is seen
// by a read issued in cycle t+1 or later.
//
// The bank also keeps one `written` bit per register: cleared when rename
// allocates the register to a new producer, set when its result is written.
// The fetch logic uses it to move only values that exist. Write wins over an
// allocation of the same register in the same cycle.
//
// Following configuration C3 of the evaluation: 128 registers, 4 write ports,
// and 2 read ports (one per bus between the levels).
module lower_bank
  import rfc_pkg::*;
#(
  parameter int unsigned REGS = NUM_PREGS,
  parameter int unsigned NW   = 4,   // result write ports
  parameter int unsigned NR   = 2,   // read ports = transfer buses
  parameter int unsigned NA   = 8,   // allocation ports (rename width)
  localparam int unsigned AW  = $clog2(REGS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic  [NW-1:0]        wr_en_i,
  input  logic  [NW-1:0][AW-1:0] wr_preg_i,
  input  data_t [NW-1:0]        wr_data_i,
  input  logic  [NR-1:0]        rd_en_i,
  input  logic  [NR-1:0][AW-1:0] rd_preg_i,
  output data_t [NR-1:0]        rd_data_o,
  input  logic  [NA-1:0]        alloc_i,
  input  logic  [NA-1:0][AW-1:0] alloc_preg_i,
  output logic  [REGS-1:0]      written_o
);

  data_t mem [REGS];

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(NW); w++)
      if (wr_en_i[w]) mem[wr_preg_i[w]] <= wr_data_i[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data_o <= '0;
    else
      for (int r = 0; r < int'(NR); r++)
        if (rd_en_i[r]) rd_data_o[r] <= mem[rd_preg_i[r]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) written_o <= '0;
    else begin
      for (int a = 0; a < int'(NA); a++)
        if (alloc_i[a]) written_o[alloc_preg_i[a]] <= 1'b0;
      for (int w = 0; w < int'(NW); w++)
        if (wr_en_i[w]) written_o[wr_preg_i[w]] <= 1'b1;
    end
  end

endmodule
