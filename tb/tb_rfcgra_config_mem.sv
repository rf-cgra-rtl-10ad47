// Self-checking testbench of the configuration memory: writes random context
// words for every PE and context slot, then reads every slot and compares all
// PEs' words, and checks that a write changes only its own word.
module tb_rfcgra_config_mem;
  import rfcgra_pkg::*;
  localparam int NUM_PE = 16, CTX = 16;

  logic clk = 0, we = 0;
  logic [3:0] wpe = 0, wctx = 0, rctx = 0;
  pe_cfg_t wdata, rdata [NUM_PE];
  pe_cfg_t model [NUM_PE][CTX];
  int checks = 0, failures = 0;

  rfcgra_config_mem #(.NUM_PE(NUM_PE), .CTX_DEPTH(CTX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pe_cfg_t rnd();
    logic [$bits(pe_cfg_t)-1:0] v;
    for (int i = 0; i < $bits(pe_cfg_t); i += 32) v = {v, 32'($urandom)};
    return pe_cfg_t'(v);
  endfunction

  task automatic read_all();
    for (int c = 0; c < CTX; c++) begin
      rctx = 4'(c); #1;
      for (int p = 0; p < NUM_PE; p++) begin
        checks++;
        if (rdata[p] !== model[p][c]) begin
          failures++;
          if (failures < 10) $display("FAIL pe %0d ctx %0d", p, c);
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NUM_PE; p++)
      for (int c = 0; c < CTX; c++) begin
        we = 1; wpe = 4'(p); wctx = 4'(c); wdata = rnd(); model[p][c] = wdata;
        @(posedge clk); #1;
      end
    we = 0;
    read_all();
    for (int n = 0; n < 20; n++) begin
      we = 1; wpe = 4'($urandom); wctx = 4'($urandom); wdata = rnd();
      model[wpe][wctx] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
