// Self-checking testbench of the row-to-bank crossbar, with four model banks
// in the testbench. Random requests from the four rows: each granted request
// must reach bank (addr mod 4) at address (addr div 4), the lower row must win
// a bank conflict and the loser be flagged, and load data must return to the
// right row one cycle later with row_rvalid.
module tb_rfcgra_mem_xbar;
  import rfcgra_pkg::*;
  localparam int ROWS = 4, NB = 4, DEPTH = 64, BAW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0] row_req, row_we, row_rvalid, conflict;
  data_t row_addr [ROWS], row_wdata [ROWS], row_rdata [ROWS];
  logic [NB-1:0] bank_en, bank_we;
  logic [BAW-1:0] bank_addr [NB];
  data_t bank_wdata [NB], bank_rdata [NB];
  data_t mem [NB][DEPTH];
  int checks = 0, failures = 0;

  rfcgra_mem_xbar #(.ROWS(ROWS), .NUM_BANKS(NB), .BANK_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // Behavioural banks: one-cycle read latency.
  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++)
      if (bank_en[b]) begin
        if (bank_we[b]) mem[b][bank_addr[b]] <= bank_wdata[b];
        bank_rdata[b] <= mem[b][bank_addr[b]];
      end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    data_t exp_rd [ROWS];
    logic [ROWS-1:0] exp_v;
    for (int b = 0; b < NB; b++) for (int i = 0; i < DEPTH; i++) mem[b][i] = $urandom;
    row_req = 0; row_we = 0;
    for (int r = 0; r < ROWS; r++) begin row_addr[r] = 0; row_wdata[r] = 0; end
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    exp_v = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic logic [NB-1:0] taken = 0;
      automatic logic [ROWS-1:0] nv = 0;
      data_t nrd [ROWS];
      row_req = 4'($urandom); row_we = 4'($urandom);
      for (int r = 0; r < ROWS; r++) begin
        row_addr[r] = data_t'($urandom_range(0, NB*DEPTH-1)); row_wdata[r] = $urandom;
      end
      #1;
      // Responses of the previous cycle.
      for (int r = 0; r < ROWS; r++) begin
        check(row_rvalid[r], exp_v[r], "rvalid");
        if (exp_v[r]) check(row_rdata[r], exp_rd[r], "rdata");
      end
      for (int r = 0; r < ROWS; r++) begin
        automatic int b = int'(row_addr[r]) % NB;
        automatic int a = int'(row_addr[r]) / NB;
        nrd[r] = 0;
        if (row_req[r]) begin
          if (!taken[b]) begin
            taken[b] = 1;
            check(conflict[r], 0, "no conflict");
            check(bank_en[b], 1, "bank en");
            check(bank_addr[b], a, "bank addr");
            check(bank_we[b], row_we[r], "bank we");
            if (row_we[r]) check(bank_wdata[b], row_wdata[r], "bank wdata");
            nv[r] = !row_we[r];
            nrd[r] = mem[b][a];
          end else begin
            check(conflict[r], 1, "conflict");
          end
        end
      end
      for (int b = 0; b < NB; b++) if (!taken[b]) check(bank_en[b], 0, "bank idle");
      exp_v = nv; exp_rd = nrd;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
