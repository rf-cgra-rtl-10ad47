// Self-checking testbench of one data-memory bank: random writes and reads on
// both ports against an array model; read data must appear exactly one clock
// after the read request.
module tb_rfcgra_mem_bank;
  import rfcgra_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  data_t a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  data_t model [DEPTH];
  int checks = 0, failures = 0;

  rfcgra_mem_bank #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t ea, eb;
    logic ca, cb;
    // Fill through port B.
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = $urandom; model[i] = b_wdata;
      @(posedge clk); #1;
    end
    b_en = 0; b_we = 0;
    for (int n = 0; n < 2000; n++) begin
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = AW'($urandom); a_wdata = $urandom;
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = AW'($urandom); b_wdata = $urandom;
      ca = a_en && !a_we; cb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      @(posedge clk); #1;
      if (b_en && b_we) model[b_addr] = b_wdata;
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (ca) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL A rd"); end end
      if (cb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL B rd"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
