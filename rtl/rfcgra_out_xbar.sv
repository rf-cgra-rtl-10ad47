// Output crossbar switch CW2 of an RF-CGRA processing element.
//
// Drives the seven PE-internal destinations - the N, S, W and E outputs, the
// two FU operands and the store-data path to the row LSU - each from any of
// the outputs of multiplexers M1..M4, from the result register RES, or from
// zero. Purely combinational; one select per output. The set of destinations
// follows the PE structure; the zero source is this design's addition.
module rfcgra_out_xbar
  import rfcgra_pkg::*;
(
  input  data_t    m_out [NUM_REGS],
  input  data_t    res,
  input  out_src_e sel   [NUM_XOUT],
  output data_t    xout  [NUM_XOUT]
);

  always_comb begin
    for (int j = 0; j < NUM_XOUT; j++) begin
      unique case (sel[j])
        XS_M1:   xout[j] = m_out[0];
        XS_M2:   xout[j] = m_out[1];
        XS_M3:   xout[j] = m_out[2];
        XS_M4:   xout[j] = m_out[3];
        XS_RES:  xout[j] = res;
        default: xout[j] = '0;
      endcase
    end
  end

endmodule
