// Self-checking testbench of the row LSU: random request patterns from the
// PEs of a row. The forwarded request must be the lowest requesting column,
// conflict must be set exactly when more than one PE requests, and the row
// bus must carry the load data only while it is valid.
module tb_rfcgra_lsu;
  import rfcgra_pkg::*;
  localparam int COLS = 4;

  logic [COLS-1:0] pe_req, pe_we;
  data_t pe_addr [COLS], pe_wdata [COLS];
  logic req, we, rvalid, conflict;
  data_t addr, wdata, rdata, bus;
  int checks = 0, failures = 0;

  rfcgra_lsu #(.COLS(COLS)) dut (.*);

  initial begin
    #100000;
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
    for (int n = 0; n < 1000; n++) begin
      automatic int win = -1, cnt = 0;
      pe_req = 4'($urandom); pe_we = 4'($urandom);
      if (n % 3 == 0) pe_req = 4'(1 << (n % 4));
      for (int c = 0; c < COLS; c++) begin
        pe_addr[c] = $urandom; pe_wdata[c] = $urandom;
        if (pe_req[c]) begin cnt++; if (win < 0) win = c; end
      end
      rvalid = 1'($urandom); rdata = $urandom;
      #1;
      check(req, cnt > 0, "req");
      check(conflict, cnt > 1, "conflict");
      if (win >= 0) begin
        check(addr, pe_addr[win], "addr");
        check(wdata, pe_wdata[win], "wdata");
        check(we, pe_we[win], "we");
      end
      check(bus, rvalid ? rdata : 0, "bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
