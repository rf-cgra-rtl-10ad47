// Configuration memory of the RF-CGRA.
//
// Holds CTX_DEPTH configuration contexts for each of the NUM_PE processing
// elements. The host writes one context word of one PE per cycle (synchronous
// write). The array side reads context rctx of all PEs at once,
// combinationally, so the PEs' configuration registers can be loaded with the
// next context on every clock edge. The depth is this design's choice.
module rfcgra_config_mem
  import rfcgra_pkg::*;
#(
  parameter int unsigned NUM_PE    = 16,
  parameter int unsigned CTX_DEPTH = 16,
  localparam int unsigned PEW      = $clog2(NUM_PE),
  localparam int unsigned CW       = $clog2(CTX_DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [PEW-1:0] wpe,
  input  logic [CW-1:0]  wctx,
  input  pe_cfg_t        wdata,
  input  logic [CW-1:0]  rctx,
  output pe_cfg_t        rdata [NUM_PE]
);

  pe_cfg_t mem [NUM_PE][CTX_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wpe][wctx] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NUM_PE; p++) rdata[p] = mem[p][rctx];
  end

endmodule
