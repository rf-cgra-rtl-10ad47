// Self-checking testbench of the 4x4 PE mesh with one static context.
//  * Single-cycle multi-hop: a counter in PE(0,0) RES crosses PE(0,1) and
//    PE(0,2) (both bypassed) into PE(1,2), which uses it as a LOAD address in
//    the same cycle: three links, no register.
//  * Inter-PE register chain: the row-2 bus value enters R0 of PE(2,0), moves
//    to R1 of the same PE (intra-PE), then to R0 of PE(2,1) (inter-PE) and is
//    used there as a LOAD address: exactly three cycles of delay.
//  * STORE from PE(3,3): address is its N input (PE(2,3) RES counter) + 8,
//    store data the row-3 bus.
module tb_rfcgra_array;
  import rfcgra_pkg::*;
  localparam int ROWS = 4, COLS = 4, NP = ROWS*COLS;

  logic    clk = 0, rst_n = 0;
  pe_cfg_t cfg [NP];
  logic    cfg_load = 0, cfg_clear = 0;
  data_t   row_bus [ROWS];
  logic    mem_req [NP], mem_we [NP];
  data_t   mem_addr [NP], mem_wdata [NP];
  int      checks = 0, failures = 0;

  rfcgra_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(data_t got, data_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic pe_cfg_t idle();
    pe_cfg_t c = '0;
    for (int j = 0; j < NUM_XOUT; j++) c.cw2_sel[j] = XS_ZERO;
    return c;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) cfg[p] = idle();
    for (int r = 0; r < ROWS; r++) row_bus[r] = '0;
    // PE(0,0): counter RES = RES + 1, RES to E.
    cfg[0].op = OP_ADD; cfg[0].imm_b = 1; cfg[0].imm = 1; cfg[0].res_we = 1;
    cfg[0].cw2_sel[XO_FU_A] = XS_RES; cfg[0].cw2_sel[XO_E] = XS_RES;
    // PE(0,1): W -> lane2 -> bypass -> M3 -> E.
    cfg[1].cw1_sel[2] = IN_W; cfg[1].byp_from_lane[2] = 1; cfg[1].m_byp[2] = 1;
    cfg[1].cw2_sel[XO_E] = XS_M3;
    // PE(0,2): W -> lane3 -> bypass -> M4 -> S.
    cfg[2].cw1_sel[3] = IN_W; cfg[2].byp_from_lane[3] = 1; cfg[2].m_byp[3] = 1;
    cfg[2].cw2_sel[XO_S] = XS_M4;
    // PE(1,2): N -> lane0 -> bypass -> M1 -> FU_A; LOAD A + 0.
    cfg[6].cw1_sel[0] = IN_N; cfg[6].byp_from_lane[0] = 1; cfg[6].m_byp[0] = 1;
    cfg[6].cw2_sel[XO_FU_A] = XS_M1; cfg[6].op = OP_LOAD;
    // PE(2,0): bus -> lane0 -> R0; R0 -> R1 (chain); R1 (M2) -> E.
    cfg[8].cw1_sel[0] = IN_LSU; cfg[8].reg_from_lane[0] = 1; cfg[8].reg_we = 4'b0011;
    cfg[8].cw2_sel[XO_E] = XS_M2;
    // PE(2,1): W -> lane0 -> R0; M1 (register) -> FU_A; LOAD A + 0.
    cfg[9].cw1_sel[0] = IN_W; cfg[9].reg_from_lane[0] = 1; cfg[9].reg_we = 4'b0001;
    cfg[9].cw2_sel[XO_FU_A] = XS_M1; cfg[9].op = OP_LOAD;
    // PE(2,3): counter RES = RES + 2, RES to S.
    cfg[11].op = OP_ADD; cfg[11].imm_b = 1; cfg[11].imm = 2; cfg[11].res_we = 1;
    cfg[11].cw2_sel[XO_FU_A] = XS_RES; cfg[11].cw2_sel[XO_S] = XS_RES;
    // PE(3,3): STORE address N + 8, data from bus via lane1 bypass -> M2 -> LSU.
    cfg[15].cw1_sel[0] = IN_N; cfg[15].byp_from_lane[0] = 1; cfg[15].m_byp[0] = 1;
    cfg[15].cw1_sel[1] = IN_LSU; cfg[15].byp_from_lane[1] = 1; cfg[15].m_byp[1] = 1;
    cfg[15].cw2_sel[XO_FU_A] = XS_M1; cfg[15].cw2_sel[XO_LSU] = XS_M2;
    cfg[15].op = OP_STORE; cfg[15].imm = 8;

    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    cfg_load = 1;
    @(posedge clk); #1;
    // Cycle t = 0 executes now; counters hold 0 and 0.
    for (int t = 0; t < 20; t++) begin
      row_bus[2] = 32'd1000 + t;
      row_bus[3] = 32'hABC0 + t;
      #1;
      check(data_t'(mem_req[6]), 1, "PE(1,2) load");
      check(mem_addr[6], t, "multi-hop 3 links same cycle");
      check(data_t'(mem_req[9]), 1, "PE(2,1) load");
      if (t >= 3) check(mem_addr[9], 32'd1000 + t - 3, "intra+inter chain delay 3");
      check(data_t'(mem_we[15]), 1, "PE(3,3) store");
      check(mem_addr[15], 2*t + 8, "store address");
      check(mem_wdata[15], 32'hABC0 + t, "store data from bus");
      for (int p = 0; p < NP; p++)
        if (p != 6 && p != 9 && p != 15) check(data_t'(mem_req[p]), 0, "no request");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
