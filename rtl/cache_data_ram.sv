// cache_data_ram: dual-port data memory of one cache way, 32-bit words.
//
// Port A serves the processor side (hit reads, byte-enabled hit writes and
// the reads of an evicted block); port B serves the bus side (responses to
// snooped requests, block refills and update writes). Both ports read
// synchronously: the word addressed in one cycle is on rdata in the next,
// like a block RAM. Reads return the old contents when the same word is
// written in the same cycle; if both ports write one word, port B wins.
// Words of a line sit at consecutive addresses: address = {set, word offset}.
module cache_data_ram #(
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic [3:0]               a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [31:0]              b_wdata,
  output logic [31:0]              b_rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    for (int i = 0; i < 4; i++)
      if (a_en && a_we[i] && !(b_en && b_we && b_addr == a_addr))
        mem[a_addr][i*8 +: 8] <= a_wdata[i*8 +: 8];
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end
endmodule
