// Processing element (PE) of the RF-CGRA.
//
// Data enters from the four mesh neighbours (N, S, W, E) and from the row
// load bus, passes the input crossbar CW1 onto four register lanes, then the
// register chain block (switches CW3-CW6, registers R0-R3, multiplexers M1-M4),
// and finally the output crossbar CW2, which feeds the four mesh outputs, the
// two FU operands and the store data to the row LSU. The FU result is written
// into the result register RES, which is also the head of the intra-PE
// register chain (RES -> R0 -> R1 -> R2 -> R3).
//
// The configuration register holds the current context (pe_cfg_t). It loads
// cfg_in when cfg_load is set and the all-zero idle context when cfg_clear is
// set, so the whole PE switches function and routing every cycle. Timing: a
// path din -> CW1 -> bypass -> M -> CW2 -> dout is combinational (single-cycle
// multi-hop); RES and R0-R3 update on the rising edge. LOAD and STORE raise
// mem_req with address operand A + imm; STORE takes its data from the CW2 LSU
// output; load data comes back on lsu_rdata one cycle later.
//
// The block structure follows the PE of the design. The sign-extended
// immediate as operand B, the address computation in the FU and the load bus
// as a CW1 source are this design's choices.
module rfcgra_pe
  import rfcgra_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  pe_cfg_t cfg_in,
  input  logic    cfg_load,
  input  logic    cfg_clear,
  input  data_t   din  [NUM_DIRS],
  output data_t   dout [NUM_DIRS],
  input  data_t   lsu_rdata,
  output logic    mem_req,
  output logic    mem_we,
  output data_t   mem_addr,
  output data_t   mem_wdata
);

  pe_cfg_t cfg_q;
  data_t   res_q;
  data_t   lane  [NUM_REGS];
  data_t   m_out [NUM_REGS];
  data_t   xout  [NUM_XOUT];
  data_t   imm, fu_b, fu_y;
  in_src_e  cw1_sel [NUM_REGS];
  out_src_e cw2_sel [NUM_XOUT];

  // Configuration register.
  always_ff @(posedge clk) begin
    if (!rst_n || cfg_clear) cfg_q <= '0;
    else if (cfg_load)       cfg_q <= cfg_in;
  end

  always_comb begin
    for (int k = 0; k < NUM_REGS; k++) cw1_sel[k] = cfg_q.cw1_sel[k];
    for (int j = 0; j < NUM_XOUT; j++) cw2_sel[j] = cfg_q.cw2_sel[j];
  end

  rfcgra_in_xbar u_cw1 (
    .din       (din),
    .lsu_rdata (lsu_rdata),
    .sel       (cw1_sel),
    .lane      (lane)
  );

  rfcgra_reg_chain u_rf (
    .clk           (clk),
    .rst_n         (rst_n),
    .chain_in      (res_q),
    .lane          (lane),
    .reg_from_lane (cfg_q.reg_from_lane),
    .byp_from_lane (cfg_q.byp_from_lane),
    .reg_we        (cfg_q.reg_we),
    .m_byp         (cfg_q.m_byp),
    .m_out         (m_out)
  );

  rfcgra_out_xbar u_cw2 (
    .m_out (m_out),
    .res   (res_q),
    .sel   (cw2_sel),
    .xout  (xout)
  );

  assign imm  = sext_imm(cfg_q.imm);
  assign fu_b = cfg_q.imm_b ? imm : xout[XO_FU_B];

  rfcgra_fu u_fu (
    .op  (cfg_q.op),
    .a   (xout[XO_FU_A]),
    .b   (fu_b),
    .imm (imm),
    .y   (fu_y)
  );

  // Result register RES.
  always_ff @(posedge clk) begin
    if (!rst_n)            res_q <= '0;
    else if (cfg_q.res_we) res_q <= fu_y;
  end

  assign dout[DIR_N] = xout[XO_N];
  assign dout[DIR_S] = xout[XO_S];
  assign dout[DIR_W] = xout[XO_W];
  assign dout[DIR_E] = xout[XO_E];

  assign mem_req   = (cfg_q.op == OP_LOAD) || (cfg_q.op == OP_STORE);
  assign mem_we    = (cfg_q.op == OP_STORE);
  assign mem_addr  = fu_y;
  assign mem_wdata = xout[XO_LSU];

endmodule
