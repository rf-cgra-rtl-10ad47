// Self-checking testbench of the context sequencer. For several initiation
// intervals and run lengths it follows the context that the PEs would latch on
// each edge: the first executed cycle must use context 0, cycle k context
// k mod ii, exactly run_cycles cycles must execute, cfg_clear must come on
// the last one, and done must then be set and busy cleared.
module tb_rfcgra_ctrl;
  localparam int CTX = 16;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] ii;
  logic [31:0] run_cycles;
  logic [3:0] rctx;
  logic cfg_load, cfg_clear, busy, done;
  int checks = 0, failures = 0;

  rfcgra_ctrl #(.CTX_DEPTH(CTX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(int i, int n);
    int executed = 0, ctx_cur = -1;
    ii = 5'(i); run_cycles = n; start = 1; #1;
    check(int'(cfg_load), 1, "load on start");
    ctx_cur = int'(rctx);
    @(posedge clk); #1;
    start = 0;
    while (busy) begin
      // The cycle now executing uses ctx_cur.
      check(ctx_cur, executed % i, "context order");
      executed++;
      if (executed == n) check(int'(cfg_clear), 1, "clear on last");
      else check(int'(cfg_load), 1, "load each cycle");
      ctx_cur = int'(rctx);
      @(posedge clk); #1;
      if (executed > n + 2) break;
    end
    check(executed, n, "cycles executed");
    check(int'(done), 1, "done");
    repeat (2) @(posedge clk); #1;
    check(int'(cfg_load), 0, "idle");
  endtask

  initial begin
    ii = 1; run_cycles = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    check(int'(done), 0, "done after reset");
    run(1, 5);
    run(2, 9);
    run(3, 10);
    run(4, 17);
    run(16, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
