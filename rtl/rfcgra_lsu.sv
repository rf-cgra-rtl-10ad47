// Row load/store unit (LSU) of the RF-CGRA.
//
// The PEs of one row share one LSU and one data bus, so at most one load or
// store per row and cycle reaches the memory crossbar. The mapper is expected
// to schedule no more; if several PEs of the row request in the same cycle the
// lowest column wins and conflict is raised (this arbitration is this design's
// choice). Load data returned by the crossbar is driven onto the row bus,
// which every PE of the row sees on its "From LSU" input; the bus is zero when
// no load data is returning. Purely combinational: request in, request out in
// the same cycle; the one-cycle load latency lives in the memory.
module rfcgra_lsu
  import rfcgra_pkg::*;
#(
  parameter int unsigned COLS = 4
) (
  input  logic [COLS-1:0] pe_req,
  input  logic [COLS-1:0] pe_we,
  input  data_t           pe_addr  [COLS],
  input  data_t           pe_wdata [COLS],
  output logic            req,
  output logic            we,
  output data_t           addr,
  output data_t           wdata,
  input  logic            rvalid,
  input  data_t           rdata,
  output data_t           bus,
  output logic            conflict
);

  always_comb begin
    req   = 1'b0;
    we    = 1'b0;
    addr  = '0;
    wdata = '0;
    for (int c = COLS-1; c >= 0; c--) begin
      if (pe_req[c]) begin
        req   = 1'b1;
        we    = pe_we[c];
        addr  = pe_addr[c];
        wdata = pe_wdata[c];
      end
    end
  end

  assign conflict = (pe_req & (pe_req - 1'b1)) != '0;
  assign bus      = rvalid ? rdata : '0;

endmodule
