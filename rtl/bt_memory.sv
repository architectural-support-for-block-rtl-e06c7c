// Local memory of one node: a single-port array of WORDS 32-bit words with
// a synchronous write and a registered read (rdata is valid the cycle after
// en with we low). The memory controller in front of it sets how many
// cycles an access occupies. The source design names the memory but gives
// neither its size nor its organisation; both are this design's choice.
module bt_memory
  import bt_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic   clk,
  input  logic   en,
  input  logic   we,
  input  laddr_t addr,
  input  word_t  wdata,
  output word_t  rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr[AW-1:0]] <= wdata;
      else    rdata <= mem[addr[AW-1:0]];
    end
  end
endmodule
