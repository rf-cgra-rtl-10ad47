// Self-checking testbench of the RF-CGRA function unit: random operands for
// every operation, compared with a reference written directly from the
// operation definitions (add, sub, mul, logic, shifts, signed compare, abs,
// address = a + imm for LOAD/STORE).
module tb_rfcgra_fu;
  import rfcgra_pkg::*;

  op_e   op;
  data_t a, b, imm, y, exp_y;
  int    checks = 0, failures = 0;

  rfcgra_fu dut (.op(op), .a(a), .b(b), .imm(imm), .y(y));

  function automatic data_t ref_fu(op_e o, data_t x, data_t z, data_t i);
    logic signed [DATA_W-1:0] sx = x, sz = z;
    case (o)
      OP_PASS:  return x;
      OP_ADD:   return x + z;
      OP_SUB:   return x - z;
      OP_MUL:   return data_t'(longint'(x) * longint'(z));
      OP_AND:   return x & z;
      OP_OR:    return x | z;
      OP_XOR:   return x ^ z;
      OP_SHL:   return x << (z % 32);
      OP_SRL:   return x >> (z % 32);
      OP_SRA:   return data_t'(sx >>> (z % 32));
      OP_LT:    return (sx < sz) ? 1 : 0;
      OP_EQ:    return (x == z) ? 1 : 0;
      OP_ABS:   return (sx < 0) ? data_t'(0 - sx) : x;
      OP_LOAD, OP_STORE: return x + i;
      default:  return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      op  = op_e'(n % 16);
      a   = $urandom;
      b   = (n % 7 == 0) ? a : $urandom;
      imm = data_t'(signed'(16'($urandom)));
      if (n % 5 == 0) a = -a;
      #1;
      exp_y = ref_fu(op, a, b, imm);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    // A few fixed values.
    op = OP_ABS; a = 32'hFFFF_FFF9; #1; checks++; if (y !== 32'd7) failures++;
    op = OP_MUL; a = 32'd1234; b = 32'd5678; #1; checks++; if (y !== 32'd7006652) failures++;
    op = OP_SRA; a = 32'h8000_0000; b = 32'd4; #1; checks++; if (y !== 32'hF800_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
