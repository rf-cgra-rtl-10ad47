// Function unit (FU) of an RF-CGRA processing element.
//
// A combinational ALU on DATA_W-bit two's-complement words. Addition,
// subtraction and multiplication are the operations the design names; the
// logic, shift, compare and absolute-value operations are this design's
// choice (the absolute value is what the motivating loop needs). For LOAD and
// STORE the FU produces the memory word address a + imm. Shifts use b[4:0].
// The result is written into the PE's result register RES by the PE, so the
// FU itself adds no cycle.
module rfcgra_fu
  import rfcgra_pkg::*;
(
  input  op_e   op,
  input  data_t a,
  input  data_t b,
  input  data_t imm,
  output data_t y
);

  always_comb begin
    unique case (op)
      OP_NOP:   y = '0;
      OP_PASS:  y = a;
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_MUL:   y = a * b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SHL:   y = a << b[4:0];
      OP_SRL:   y = a >> b[4:0];
      OP_SRA:   y = data_t'($signed(a) >>> b[4:0]);
      OP_LT:    y = data_t'($signed(a) < $signed(b));
      OP_EQ:    y = data_t'(a == b);
      OP_ABS:   y = a[DATA_W-1] ? data_t'(-a) : a;
      OP_LOAD,
      OP_STORE: y = a + imm;
      default:  y = '0;
    endcase
  end

endmodule
