// Input crossbar switch CW1 of an RF-CGRA processing element.
//
// Any of the four neighbour inputs (N, S, W, E) or the row load bus can be
// steered to any of the four register lanes; lane k feeds the 2x2 switch in
// front of register Rk. Because the register chain inside the PE is longest
// when it starts at R0, this crossbar lets data from every direction start
// there. It is four independent multiplexers, purely combinational; the zero
// source is this design's addition for unused lanes.
module rfcgra_in_xbar
  import rfcgra_pkg::*;
(
  input  data_t   din       [NUM_DIRS],  // N, S, W, E
  input  data_t   lsu_rdata,             // row load bus
  input  in_src_e sel       [NUM_REGS],
  output data_t   lane      [NUM_REGS]
);

  always_comb begin
    for (int k = 0; k < NUM_REGS; k++) begin
      unique case (sel[k])
        IN_N:    lane[k] = din[DIR_N];
        IN_S:    lane[k] = din[DIR_S];
        IN_W:    lane[k] = din[DIR_W];
        IN_E:    lane[k] = din[DIR_E];
        IN_LSU:  lane[k] = lsu_rdata;
        default: lane[k] = '0;
      endcase
    end
  end

endmodule
