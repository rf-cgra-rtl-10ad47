// Self-checking testbench of the distributed register file with hierarchical
// register chain.
//  1. Intra-PE chain: a new value enters from chain_in (RES) every cycle with
//     R0..R3 chained; the value leaving R3 must be the one that entered four
//     cycles earlier, i.e. a chain of length 4 delays by 4 cycles.
//  2. Hold: with enables low the registers keep their value.
//  3. Random: random lanes and selects every cycle against a cycle model of
//     four registers behind 2x2 switches and output multiplexers, including a
//     register latching the chain while its lane is bypassed.
module tb_rfcgra_reg_chain;
  import rfcgra_pkg::*;

  logic clk = 0, rst_n = 0;
  data_t chain_in;
  data_t lane [NUM_REGS];
  logic [NUM_REGS-1:0] reg_from_lane, byp_from_lane, reg_we, m_byp;
  data_t m_out [NUM_REGS];
  data_t model [NUM_REGS];
  int checks = 0, failures = 0;

  rfcgra_reg_chain dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic data_t mdl_out(int k);
    data_t ch = (k == 0) ? chain_in : model[k-1];
    data_t by = byp_from_lane[k] ? lane[k] : ch;
    return m_byp[k] ? by : model[k];
  endfunction

  initial begin
    chain_in = '0;
    for (int k = 0; k < NUM_REGS; k++) lane[k] = '0;
    reg_from_lane = '0; byp_from_lane = '0; reg_we = '0; m_byp = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < NUM_REGS; k++) model[k] = '0;

    // 1. Chain of length 4 from RES: value t enters at cycle t.
    reg_we = 4'hF;
    for (int t = 0; t < 12; t++) begin
      chain_in = 32'h100 + t;
      #1;
      if (t >= 4) check(m_out[3], 32'h100 + t - 4, "chain R3 delay");
      if (t >= 2) check(m_out[1], 32'h100 + t - 2, "chain R1 delay");
      @(posedge clk); #1;
    end
    // 2. Hold.
    reg_we = 4'h0;
    chain_in = 32'hDEAD;
    repeat (3) @(posedge clk); #1;
    #1;
    for (int k = 0; k < NUM_REGS; k++) check(m_out[k], 32'h100 + 11 - k, "hold");
    for (int k = 0; k < NUM_REGS; k++) model[k] = 32'h100 + 11 - k;

    // 3. Random against a model.
    for (int n = 0; n < 1000; n++) begin
      chain_in = $urandom;
      for (int k = 0; k < NUM_REGS; k++) lane[k] = $urandom;
      reg_from_lane = 4'($urandom); byp_from_lane = 4'($urandom);
      reg_we = 4'($urandom); m_byp = 4'($urandom);
      #1;
      for (int k = 0; k < NUM_REGS; k++) check(m_out[k], mdl_out(k), "random");
      @(posedge clk); #1;
      for (int k = NUM_REGS-1; k >= 0; k--)
        if (reg_we[k]) model[k] = reg_from_lane[k] ? lane[k] : ((k == 0) ? chain_in : model[k-1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
