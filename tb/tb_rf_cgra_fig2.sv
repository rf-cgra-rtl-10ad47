// Workload testbench: the motivating loop on a 2x2 RF-CGRA with two banks.
//
// Loop: y[i] = abs(x[i+4]) + x[i], after data reuse: one load per iteration
// (L1), a = abs, b = a + x[i], one store (S1), and a loop-carried dependence
// of distance 4 from L1 to b. Placement as in the 2x2 example, with PE0..PE3
// numbered clockwise from the top left (PE0 = (0,0), PE1 = (0,1),
// PE2 = (1,1), PE3 = (1,0)):
//   PE0: L1, LOAD RES + 1 (the address register counts itself up)
//   PE1: a,  ABS of R1
//   PE2: b,  ADD a + R3
//   PE3: S1, STORE RES + 1, data from PE2
// The loaded value travels the row-0 bus -> R1, R2, R3 of PE1 (intra-PE
// chain) -> R1, R2, R3 of PE2 (inter-PE link, then intra-PE chain) and is
// consumed by b from R3 of PE2; R1 of PE1 is shared by the chain and by a.
// a reaches b in one cycle over PE0 and PE3 (bypassed lanes, three links).
// A one-cycle set-up run first puts the base addresses in the RES of PE0 and
// PE3. Timing at II = 1: load of iteration i in cycle i, y[i] stored in cycle
// i + 4; N iterations take N + 4 cycles. Checks: all y, run length, one load
// and one store per cycle, no memory conflict, and no reads of x beyond the
// loop. The registers start at zero, so y[i] = abs(x[i+4]) for i < 4.
module tb_rf_cgra_fig2;
  import rfcgra_pkg::*;

  localparam int N  = 24;
  localparam int XB = 10;     // x[k] lives at XB + k - 3
  localparam int YB = 201;    // y[i] lives at YB + i + 5 (odd offset: other bank)

  logic          clk = 0, rst_n = 0;
  logic          cfg_we = 0;
  logic [1:0]    cfg_pe = 0;
  logic [3:0]    cfg_ctx = 0;
  pe_cfg_t       cfg_wdata = '0;
  logic          hmem_en = 0, hmem_we = 0;
  logic [10:0]   hmem_addr = 0;
  data_t         hmem_wdata = 0, hmem_rdata;
  logic          start = 0;
  logic [4:0]    ii = 1;
  logic [31:0]   run_cycles = 0;
  logic          busy, done;
  logic [1:0]    lsu_conflict, bank_conflict;

  int checks = 0, failures = 0;
  int n_busy = 0, n_load = 0, n_store = 0, n_conf = 0;
  data_t x [N+8];

  rf_cgra #(.ROWS(2), .COLS(2), .NUM_BANKS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && busy) begin
      n_busy++;
      for (int p = 0; p < 4; p++) begin
        n_load  += (dut.pe_req[p] && !dut.pe_we[p]) ? 1 : 0;
        n_store += (dut.pe_req[p] &&  dut.pe_we[p]) ? 1 : 0;
      end
      n_conf += (lsu_conflict != 0 || bank_conflict != 0) ? 1 : 0;
    end
  end

  task automatic check(data_t got, data_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  task automatic write_cfg(int p, pe_cfg_t w);
    cfg_we = 1; cfg_pe = 2'(p); cfg_ctx = 0; cfg_wdata = w;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  task automatic mem_write(int a, data_t d);
    hmem_en = 1; hmem_we = 1; hmem_addr = 11'(a); hmem_wdata = d;
    @(posedge clk); #1;
    hmem_en = 0; hmem_we = 0;
  endtask

  task automatic mem_read(int a, output data_t d);
    hmem_en = 1; hmem_we = 0; hmem_addr = 11'(a);
    @(posedge clk); #1;
    hmem_en = 0;
    d = hmem_rdata;
  endtask

  function automatic pe_cfg_t idle();
    pe_cfg_t c = '0;
    for (int j = 0; j < NUM_XOUT; j++) c.cw2_sel[j] = XS_ZERO;
    return c;
  endfunction

  task automatic run(int cycles);
    int t0;
    ii = 1; run_cycles = cycles; start = 1;
    @(posedge clk); #1;
    start = 0;
    t0 = n_busy;
    while (!done) @(posedge clk);
    #1;
    check(n_busy - t0, cycles, "run length");
  endtask

  initial begin
    pe_cfg_t c;
    data_t d, e;
    int l0, s0;
    for (int i = 0; i < N+8; i++) x[i] = data_t'($urandom_range(0, 600)) - 300;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int k = 3; k < N+8; k++) mem_write(XB + k - 3, x[k]);

    // Set-up: RES of PE0 = XB, RES of PE3 = YB.
    c = idle(); c.op = OP_ADD; c.imm_b = 1; c.imm = XB; c.res_we = 1;
    c.cw2_sel[XO_FU_A] = XS_ZERO;
    write_cfg(0, c);
    c.imm = YB; write_cfg(2, c);
    write_cfg(1, idle()); write_cfg(3, idle());
    run(1);

    // PE0 (index 0): L1. LOAD RES + 1, RES <- address. a's hop E -> S on lane 0.
    c = idle(); c.op = OP_LOAD; c.imm = 1; c.res_we = 1; c.cw2_sel[XO_FU_A] = XS_RES;
    c.cw1_sel[0] = IN_E; c.byp_from_lane[0] = 1; c.m_byp[0] = 1; c.cw2_sel[XO_S] = XS_M1;
    write_cfg(0, c);
    // PE1 (index 1): a = ABS(R1). bus -> R1 -> R2 -> R3; R3 -> S; RES -> W.
    c = idle(); c.op = OP_ABS; c.res_we = 1;
    c.cw1_sel[1] = IN_LSU; c.reg_from_lane[1] = 1; c.reg_we = 4'b1110;
    c.cw2_sel[XO_FU_A] = XS_M2; c.cw2_sel[XO_S] = XS_M4; c.cw2_sel[XO_W] = XS_RES;
    write_cfg(1, c);
    // PE2 (index 3): b = a + R3. N -> R1 -> R2 -> R3; a from W by bypass; RES -> W.
    c = idle(); c.op = OP_ADD; c.res_we = 1;
    c.cw1_sel[1] = IN_N; c.reg_from_lane[1] = 1; c.reg_we = 4'b1110;
    c.cw1_sel[0] = IN_W; c.byp_from_lane[0] = 1; c.m_byp[0] = 1;
    c.cw2_sel[XO_FU_A] = XS_M1; c.cw2_sel[XO_FU_B] = XS_M4; c.cw2_sel[XO_W] = XS_RES;
    write_cfg(3, c);
    // PE3 (index 2): S1. STORE RES + 1, data from E by bypass; a's hop N -> E.
    c = idle(); c.op = OP_STORE; c.imm = 1; c.res_we = 1; c.cw2_sel[XO_FU_A] = XS_RES;
    c.cw1_sel[1] = IN_E; c.byp_from_lane[1] = 1; c.m_byp[1] = 1; c.cw2_sel[XO_LSU] = XS_M2;
    c.cw1_sel[0] = IN_N; c.byp_from_lane[0] = 1; c.m_byp[0] = 1; c.cw2_sel[XO_E] = XS_M1;
    write_cfg(2, c);

    l0 = n_load; s0 = n_store;
    run(N + 4);
    check(n_load - l0, N + 4, "one load per cycle");
    check(n_store - s0, N + 4, "one store per cycle");
    check(n_conf, 0, "no memory conflict");
    for (int i = 0; i < N; i++) begin
      mem_read(YB + i + 5, d);
      e = ($signed(x[i+4]) < 0 ? -x[i+4] : x[i+4]) + (i >= 4 ? x[i] : 0);
      check(d, e, "y");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
