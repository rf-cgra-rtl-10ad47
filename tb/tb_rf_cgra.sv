// End-to-end testbench of the RF-CGRA at its default size (4x4 PEs, 4 banks).
//
// It runs the loop  y[i] = abs(x[i+4]) + x[i]  after data reuse: x is loaded
// once per iteration and the value loaded as x[i+4] is kept in registers
// until iteration i+4 uses it as x[i] (a loop-carried dependence of distance
// 4). Placement (PE p = row*4 + col):
//   PE0 counter i (RES + 1)        PE1 LOAD x[i+4], start of the long chain
//   PE2 ABS of the row-0 load bus  PE6 bypass hop N -> W
//   PE5 ADD b = a + x[i]           PE4 STORE y[i]
// The long dependence travels row-0 bus -> R1 -> R2 -> R3 of PE1 (intra-PE
// chain) -> R0 of PE5 (inter-PE chain) -> R1 of PE5 (intra-PE chain). The
// value of a reaches PE5 in the same cycle over two links (PE2 -> PE6 -> PE5,
// single-cycle multi-hop).
//
// Phase 1 runs it at II = 1 (one context, one iteration per cycle, the
// result of the first iteration stored 3 cycles after its load). Phase 2 runs
// the same placement at II = 2 with two contexts: chain registers load once
// every two cycles and hold in between. The first four results have no x[i]
// yet (the registers start at zero), so y[i] = abs(x[i+4]) for i < 4.
// Checks: every y word, the run lengths, the number of loads and stores, no
// LSU or bank conflict, and that each mechanism happened at least once.
module tb_rf_cgra;
  import rfcgra_pkg::*;

  localparam int N      = 40;    // iterations per phase
  localparam int YBASE1 = 128;
  localparam int YBASE2 = 256;

  logic          clk = 0, rst_n = 0;
  logic          cfg_we = 0;
  logic [3:0]    cfg_pe = 0, cfg_ctx = 0;
  pe_cfg_t       cfg_wdata = '0;
  logic          hmem_en = 0, hmem_we = 0;
  logic [11:0]   hmem_addr = 0;
  data_t         hmem_wdata = 0, hmem_rdata;
  logic          start = 0;
  logic [4:0]    ii = 1;
  logic [31:0]   run_cycles = 0;
  logic          busy, done;
  logic [3:0]    lsu_conflict, bank_conflict;

  int checks = 0, failures = 0;
  data_t x [N+8];

  // Mechanism counters.
  int n_intra = 0, n_inter = 0, n_hop = 0, n_coexist = 0, n_hold = 0;
  int n_load = 0, n_store = 0, n_ctxsw = 0, n_conf = 0, n_busy = 0;

  rf_cgra dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(data_t got, data_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  // ---------------------------------------------------------------- monitor
  logic [3:0] prev_ctx = 0;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      n_busy++;
      if (dut.rctx != prev_ctx) n_ctxsw++;
      prev_ctx <= dut.rctx;
      for (int p = 0; p < 16; p++) begin
        n_load  += (dut.pe_req[p] && !dut.pe_we[p]) ? 1 : 0;
        n_store += (dut.pe_req[p] &&  dut.pe_we[p]) ? 1 : 0;
      end
      n_conf += (lsu_conflict != 0 || bank_conflict != 0) ? 1 : 0;
    end
  end

  // Register mechanisms, read from the active context of every PE.
  for (genvar r = 0; r < 4; r++) begin : g_r
    for (genvar c = 0; c < 4; c++) begin : g_c
      pe_cfg_t q;
      assign q = dut.u_array.g_row[r].g_col[c].u_pe.cfg_q;
      always @(posedge clk) begin
        if (rst_n && busy) begin
          for (int k = 0; k < NUM_REGS; k++) begin
            if (q.reg_we[k] && !q.reg_from_lane[k]) n_intra++;
            if (q.reg_we[k] && q.reg_from_lane[k] && q.cw1_sel[k] <= IN_E) n_inter++;
            if (q.m_byp[k] && q.byp_from_lane[k] && q.cw1_sel[k] <= IN_E) n_hop++;
            if (q.reg_we[k] && q.m_byp[k] && q.reg_from_lane[k] != q.byp_from_lane[k]) n_coexist++;
          end
          if (q.reg_we == 0 && ii > 1 && (r*4+c == 1 || r*4+c == 5)) n_hold++;
        end
      end
    end
  end

  // ------------------------------------------------------------ host access
  task automatic write_cfg(int p, int ctx, pe_cfg_t w);
    cfg_we = 1; cfg_pe = 4'(p); cfg_ctx = 4'(ctx); cfg_wdata = w;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  task automatic mem_write(int a, data_t d);
    hmem_en = 1; hmem_we = 1; hmem_addr = 12'(a); hmem_wdata = d;
    @(posedge clk); #1;
    hmem_en = 0; hmem_we = 0;
  endtask

  task automatic mem_read(int a, output data_t d);
    hmem_en = 1; hmem_we = 0; hmem_addr = 12'(a);
    @(posedge clk); #1;
    hmem_en = 0;
    d = hmem_rdata;
  endtask

  function automatic pe_cfg_t idle();
    pe_cfg_t c = '0;
    for (int j = 0; j < NUM_XOUT; j++) c.cw2_sel[j] = XS_ZERO;
    return c;
  endfunction

  // Routing of the placement; identical in every context.
  function automatic pe_cfg_t route(int p);
    pe_cfg_t c = idle();
    case (p)
      0: begin c.cw2_sel[XO_FU_A] = XS_RES; c.imm_b = 1; c.imm = 1;
               c.cw2_sel[XO_E] = XS_RES; c.cw2_sel[XO_S] = XS_RES; end
      1: begin c.cw1_sel[0] = IN_W; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
               c.cw2_sel[XO_FU_A] = XS_M1; c.imm = 4;
               c.cw1_sel[1] = IN_LSU; c.reg_from_lane[1] = 1;   // bus -> R1
               c.cw2_sel[XO_S] = XS_M4; end                      // R3 -> S
      2: begin c.cw1_sel[0] = IN_LSU; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
               c.cw2_sel[XO_FU_A] = XS_M1; c.cw2_sel[XO_S] = XS_RES; end
      6: begin c.cw1_sel[0] = IN_N; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
               c.cw2_sel[XO_W] = XS_M1; end
      5: begin c.cw1_sel[0] = IN_N; c.reg_from_lane[0] = 1;     // PE1.R3 -> R0
               c.cw1_sel[2] = IN_E; c.byp_from_lane[2] = 1; c.m_byp[2] = 1;
               c.cw2_sel[XO_FU_A] = XS_M3; c.cw2_sel[XO_FU_B] = XS_M2;
               c.cw2_sel[XO_W] = XS_RES; end
      4: begin c.cw1_sel[0] = IN_N; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
               c.cw1_sel[1] = IN_E; c.byp_from_lane[1] = 1; c.m_byp[1] = 1;
               c.cw2_sel[XO_FU_A] = XS_M1; c.cw2_sel[XO_LSU] = XS_M2; end
      default: ;
    endcase
    return c;
  endfunction

  task automatic program_ii1();
    pe_cfg_t c;
    for (int p = 0; p < 16; p++) begin
      c = route(p);
      case (p)
        0: begin c.op = OP_ADD; c.res_we = 1; end
        1: begin c.op = OP_LOAD; c.reg_we = 4'b1110; end
        2: begin c.op = OP_ABS; c.res_we = 1; end
        5: begin c.op = OP_ADD; c.res_we = 1; c.reg_we = 4'b0111; end  // R2 latches while lane 2 hops
        4: begin c.op = OP_STORE; c.imm = 16'(YBASE1 - 3); end
        default: ;
      endcase
      write_cfg(p, 0, c);
    end
  endtask

  task automatic program_ii2();
    pe_cfg_t c0, c1;
    for (int p = 0; p < 16; p++) begin
      c0 = route(p); c1 = route(p);
      case (p)
        0: begin c0.op = OP_ADD; c0.res_we = 1; end
        1: begin c0.op = OP_LOAD; c1.reg_we = 4'b1110; end
        2: begin c1.op = OP_ABS; c1.res_we = 1; end
        5: begin c0.op = OP_ADD; c0.res_we = 1; c1.reg_we = 4'b0011; end
        4: begin c1.op = OP_STORE; c1.imm = 16'(YBASE2 - 2); end
        default: ;
      endcase
      write_cfg(p, 0, c0);
      write_cfg(p, 1, c1);
    end
  endtask

  task automatic run(int ii_v, int cycles);
    int t0, t1;
    rst_n = 0; @(posedge clk); #1; rst_n = 1;     // clear RES and registers
    ii = 5'(ii_v); run_cycles = cycles; start = 1;
    @(posedge clk); #1;
    start = 0;
    t0 = n_busy;
    while (!done) @(posedge clk);
    #1;
    t1 = n_busy;
    check(t1 - t0, cycles, "run length in cycles");
  endtask

  task automatic check_y(int base, string what);
    data_t d, e;
    for (int i = 0; i < N; i++) begin
      mem_read(base + i, d);
      e = ($signed(x[i+4]) < 0 ? -x[i+4] : x[i+4]) + (i >= 4 ? x[i] : 0);
      check(d, e, what);
    end
  endtask

  initial begin
    int l0, s0;
    for (int i = 0; i < N+8; i++) x[i] = data_t'($urandom_range(0, 2000)) - 1000;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < N+8; i++) mem_write(i, x[i]);

    // Phase 1: II = 1.
    program_ii1();
    l0 = n_load; s0 = n_store;
    run(1, N + 3);
    check(n_load - l0, N + 3, "II=1 loads: one per cycle");
    check(n_store - s0, N + 3, "II=1 stores: one per cycle");
    check_y(YBASE1, "II=1 y");

    // Phase 2: II = 2, two contexts.
    program_ii2();
    l0 = n_load; s0 = n_store;
    run(2, 2*N + 2);
    check(n_load - l0, N + 1, "II=2 loads: one per two cycles");
    check(n_store - s0, N + 1, "II=2 stores: one per two cycles");
    check_y(YBASE2, "II=2 y");

    check(n_conf, 0, "no LSU or bank conflict");
    $display("mechanisms: intra=%0d inter=%0d hop=%0d coexist=%0d hold=%0d ctx_switch=%0d loads=%0d stores=%0d",
             n_intra, n_inter, n_hop, n_coexist, n_hold, n_ctxsw, n_load, n_store);
    checks++; if (n_intra   == 0) failures++;
    checks++; if (n_inter   == 0) failures++;
    checks++; if (n_hop     == 0) failures++;
    checks++; if (n_coexist == 0) failures++;
    checks++; if (n_hold    == 0) failures++;
    checks++; if (n_ctxsw   == 0) failures++;
    checks++; if (n_load    == 0) failures++;
    checks++; if (n_store   == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
