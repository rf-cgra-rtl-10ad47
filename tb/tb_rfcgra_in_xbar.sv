// Self-checking testbench of the input crossbar CW1: random inputs and random
// lane selects; each lane must carry exactly the selected source.
module tb_rfcgra_in_xbar;
  import rfcgra_pkg::*;

  data_t   din [NUM_DIRS];
  data_t   lsu;
  in_src_e sel [NUM_REGS];
  data_t   lane [NUM_REGS];
  int      checks = 0, failures = 0;

  rfcgra_in_xbar dut (.din(din), .lsu_rdata(lsu), .sel(sel), .lane(lane));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      data_t e;
      for (int d = 0; d < NUM_DIRS; d++) din[d] = $urandom;
      lsu = $urandom;
      for (int k = 0; k < NUM_REGS; k++) sel[k] = in_src_e'($urandom_range(0, 5));
      #1;
      for (int k = 0; k < NUM_REGS; k++) begin
        e = (sel[k] <= IN_E) ? din[int'(sel[k])] : (sel[k] == IN_LSU) ? lsu : '0;
        checks++;
        if (lane[k] !== e) begin
          failures++;
          $display("FAIL lane %0d sel %0d got %h exp %h", k, sel[k], lane[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
