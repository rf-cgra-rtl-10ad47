// Self-checking testbench of the output crossbar CW2: random M1..M4 and RES
// values with random selects; each of the seven outputs must carry the
// selected source.
module tb_rfcgra_out_xbar;
  import rfcgra_pkg::*;

  data_t    m [NUM_REGS];
  data_t    res;
  out_src_e sel [NUM_XOUT];
  data_t    xo [NUM_XOUT];
  int       checks = 0, failures = 0;

  rfcgra_out_xbar dut (.m_out(m), .res(res), .sel(sel), .xout(xo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      data_t e;
      for (int k = 0; k < NUM_REGS; k++) m[k] = $urandom;
      res = $urandom;
      for (int j = 0; j < NUM_XOUT; j++) sel[j] = out_src_e'($urandom_range(0, 5));
      #1;
      for (int j = 0; j < NUM_XOUT; j++) begin
        e = (sel[j] <= XS_M4) ? m[int'(sel[j])] : (sel[j] == XS_RES) ? res : '0;
        checks++;
        if (xo[j] !== e) begin
          failures++;
          $display("FAIL out %0d sel %0d got %h exp %h", j, sel[j], xo[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
