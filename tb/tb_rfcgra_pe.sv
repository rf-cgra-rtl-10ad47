// Self-checking testbench of one RF-CGRA processing element.
// Directed contexts, each checked against values worked out by hand:
//  * single-cycle hop: W input bypassed through lane 0 to the E output in the
//    same cycle;
//  * ADD of N and S inputs through two bypassed lanes into RES, visible one
//    cycle later on the S output through CW2;
//  * intra-PE chain: RES -> R0 -> R1 -> R2 -> R3, so a RES value reaches the
//    R3 output three cycles after it leaves RES (R0 holds it in the first);
//  * immediate operand and RES feedback (a counter);
//  * LOAD and STORE requests: address operand A + imm, store data from CW2;
//  * cfg_clear returns to the idle context.
module tb_rfcgra_pe;
  import rfcgra_pkg::*;

  logic    clk = 0, rst_n = 0;
  pe_cfg_t cfg_in;
  logic    cfg_load = 0, cfg_clear = 0;
  data_t   din [NUM_DIRS];
  data_t   dout [NUM_DIRS];
  data_t   lsu_rdata;
  logic    mem_req, mem_we;
  data_t   mem_addr, mem_wdata;
  int      checks = 0, failures = 0;

  rfcgra_pe dut (.*);

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
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic pe_cfg_t idle();
    pe_cfg_t c = '0;
    for (int j = 0; j < NUM_XOUT; j++) c.cw2_sel[j] = XS_ZERO;
    return c;
  endfunction

  // Load a context: it is active after the next clock edge.
  task automatic load(pe_cfg_t c);
    cfg_in = c; cfg_load = 1;
    @(posedge clk); #1;
    cfg_load = 0;
  endtask

  initial begin
    pe_cfg_t c;
    for (int d = 0; d < NUM_DIRS; d++) din[d] = '0;
    lsu_rdata = '0;
    cfg_in = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;

    // Single-cycle hop W -> lane0 -> bypass -> M1 -> E.
    c = idle();
    c.cw1_sel[0] = IN_W; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
    c.cw2_sel[XO_E] = XS_M1;
    load(c);
    for (int n = 0; n < 5; n++) begin
      din[DIR_W] = $urandom; #1;
      check(dout[DIR_E], din[DIR_W], "single-cycle hop");
    end

    // ADD N + S via lanes 1 and 2 (bypass), into RES; RES to S output.
    c = idle();
    c.cw1_sel[1] = IN_N; c.byp_from_lane[1] = 1; c.m_byp[1] = 1;
    c.cw1_sel[2] = IN_S; c.byp_from_lane[2] = 1; c.m_byp[2] = 1;
    c.cw2_sel[XO_FU_A] = XS_M2; c.cw2_sel[XO_FU_B] = XS_M3;
    c.cw2_sel[XO_S] = XS_RES;
    c.op = OP_ADD; c.res_we = 1;
    load(c);
    din[DIR_N] = 32'd1000; din[DIR_S] = 32'd234;
    @(posedge clk); #1;
    check(dout[DIR_S], 32'd1234, "ADD into RES");
    din[DIR_N] = 32'd7; din[DIR_S] = -32'sd10;
    @(posedge clk); #1;
    check(dout[DIR_S], -32'sd3, "ADD negative");

    // Counter in RES (RES + imm) with the chain RES->R0->R1->R2->R3 enabled.
    c = idle();
    c.op = OP_ADD; c.imm_b = 1; c.imm = 16'd5; c.res_we = 1;
    c.cw2_sel[XO_FU_A] = XS_RES;
    c.reg_we = 4'hF;                           // all registers take the chain
    c.cw2_sel[XO_N] = XS_M4;                   // R3 out to N
    c.cw2_sel[XO_E] = XS_RES;
    load(c);
    // RES was -3 when the context became active.
    for (int t = 0; t < 10; t++) begin
      check(dout[DIR_E], data_t'(-3 + 5*t), "counter RES");
      // R3 holds the RES value of 4 cycles earlier (when available).
      if (t >= 4) check(dout[DIR_N], data_t'(-3 + 5*(t-4)), "intra-PE chain length 4");
      @(posedge clk); #1;
    end

    // LOAD with address E input + 16, store data not used.
    c = idle();
    c.op = OP_LOAD; c.imm = 16'd16;
    c.cw1_sel[3] = IN_E; c.byp_from_lane[3] = 1; c.m_byp[3] = 1;
    c.cw2_sel[XO_FU_A] = XS_M4;
    load(c);
    din[DIR_E] = 32'd100; #1;
    check(data_t'(mem_req), 1, "load req"); check(data_t'(mem_we), 0, "load we");
    check(mem_addr, 32'd116, "load addr");

    // STORE: address from W + (-4), data from the row bus via lane 0 bypass.
    c = idle();
    c.op = OP_STORE; c.imm = 16'hFFFC;
    c.cw1_sel[1] = IN_W; c.byp_from_lane[1] = 1; c.m_byp[1] = 1;
    c.cw1_sel[0] = IN_LSU; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
    c.cw2_sel[XO_FU_A] = XS_M2; c.cw2_sel[XO_LSU] = XS_M1;
    load(c);
    din[DIR_W] = 32'd40; lsu_rdata = 32'hCAFE_F00D; #1;
    check(data_t'(mem_req), 1, "store req"); check(data_t'(mem_we), 1, "store we");
    check(mem_addr, 32'd36, "store addr"); check(mem_wdata, 32'hCAFE_F00D, "store data");

    // Clear to idle.
    cfg_clear = 1; @(posedge clk); #1; cfg_clear = 0;
    check(data_t'(mem_req), 0, "idle no req");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
