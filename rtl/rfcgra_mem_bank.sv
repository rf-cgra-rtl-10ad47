// One bank of the RF-CGRA data memory.
//
// A synchronous memory of DEPTH words written as an array (an SRAM macro in
// silicon). Port A serves the PE array through the crossbar, port B is a host
// port for loading inputs and reading results. Both ports read with one cycle
// of latency (read data is registered, old data on a same-cycle write) and
// write on the rising edge; if both write the same word, port A wins. Depth and
// the second port are this design's choices.
module rfcgra_mem_bank
  import rfcgra_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  data_t         a_wdata,
  output data_t         a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  data_t         b_wdata,
  output data_t         b_rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
