// PE array of the RF-CGRA: ROWS x COLS processing elements in a 2-D mesh.
//
// Each PE's N/S/W/E output drives the opposite input of its neighbour (a PE's
// N output arrives at the S input of the PE above it). Inputs at the array
// edge are tied to zero and edge outputs go nowhere. PE p = row*COLS + col
// takes configuration word cfg[p]; every PE of a row sees that row's load
// bus. Memory requests of all PEs are brought out for the row LSUs.
//
// Combinational paths: because a PE can bypass its registers, a value can
// cross several PEs in one cycle (single-cycle multi-hop). The mesh therefore
// contains structural combinational loops (east through one PE and back west
// through its neighbour, for instance). They are inherent to this kind of
// interconnect and stand on purpose: a valid configuration never closes one,
// and the design's timing limit of four hops per cycle is left to the mapper.
module rfcgra_array
  import rfcgra_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_cfg_t cfg       [ROWS*COLS],
  input  logic    cfg_load,
  input  logic    cfg_clear,
  input  data_t   row_bus   [ROWS],
  output logic    mem_req   [ROWS*COLS],
  output logic    mem_we    [ROWS*COLS],
  output data_t   mem_addr  [ROWS*COLS],
  output data_t   mem_wdata [ROWS*COLS]
);

  data_t pe_dout [ROWS*COLS][NUM_DIRS];
  data_t pe_din  [ROWS*COLS][NUM_DIRS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int P = r*COLS + c;

      if (r > 0) begin : g_n
        assign pe_din[P][DIR_N] = pe_dout[P-COLS][DIR_S];
      end else begin : g_n0
        assign pe_din[P][DIR_N] = '0;
      end
      if (r < ROWS-1) begin : g_s
        assign pe_din[P][DIR_S] = pe_dout[P+COLS][DIR_N];
      end else begin : g_s0
        assign pe_din[P][DIR_S] = '0;
      end
      if (c > 0) begin : g_w
        assign pe_din[P][DIR_W] = pe_dout[P-1][DIR_E];
      end else begin : g_w0
        assign pe_din[P][DIR_W] = '0;
      end
      if (c < COLS-1) begin : g_e
        assign pe_din[P][DIR_E] = pe_dout[P+1][DIR_W];
      end else begin : g_e0
        assign pe_din[P][DIR_E] = '0;
      end

      rfcgra_pe u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .cfg_in    (cfg[P]),
        .cfg_load  (cfg_load),
        .cfg_clear (cfg_clear),
        .din       (pe_din[P]),
        .dout      (pe_dout[P]),
        .lsu_rdata (row_bus[r]),
        .mem_req   (mem_req[P]),
        .mem_we    (mem_we[P]),
        .mem_addr  (mem_addr[P]),
        .mem_wdata (mem_wdata[P])
      );
    end
  end

endmodule
