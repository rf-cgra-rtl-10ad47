// Distributed register file with hierarchical register chain (CW3-CW6,
// R0-R3, M1-M4) of an RF-CGRA processing element.
//
// In front of each register Rk sits a 2x2 switch CW(k+3) with two inputs:
// the chain input (RES for R0, R(k-1) for the others) and lane k from the
// input crossbar. One switch output loads Rk, the other is the bypass wire.
// Multiplexer M(k+1) then passes either the registered value or the bypass
// wire on to the output crossbar.
//   * Intra-PE chain: Rk loads from the chain input, so data walks
//     RES -> R0 -> R1 -> R2 -> R3 and stays in the PE for up to 4 x II cycles.
//   * Inter-PE chain: Rk loads from its lane, i.e. from a neighbour.
//   * Single-cycle hop: M(k+1) selects the bypass, so a value crosses the PE in
//     the same cycle; since the two switch outputs have separate selects, Rk
//     can latch the chain while its lane is bypassed.
// A register loads only when its enable is set and otherwise holds, so under
// modulo scheduling each register keeps a value for II cycles. Registers reset
// to zero (a choice of this design). Outputs are combinational from lane and
// chain_in; registers update on the rising clock edge.
module rfcgra_reg_chain
  import rfcgra_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  data_t               chain_in,        // RES
  input  data_t               lane   [NUM_REGS],
  input  logic [NUM_REGS-1:0] reg_from_lane,
  input  logic [NUM_REGS-1:0] byp_from_lane,
  input  logic [NUM_REGS-1:0] reg_we,
  input  logic [NUM_REGS-1:0] m_byp,
  output data_t               m_out  [NUM_REGS]
);

  data_t r_q    [NUM_REGS];
  data_t chain  [NUM_REGS];
  data_t r_d    [NUM_REGS];
  data_t byp    [NUM_REGS];

  always_comb begin
    for (int k = 0; k < NUM_REGS; k++) begin
      chain[k] = (k == 0) ? chain_in : r_q[(k == 0) ? 0 : k-1];
      r_d[k]   = reg_from_lane[k] ? lane[k] : chain[k];
      byp[k]   = byp_from_lane[k] ? lane[k] : chain[k];
      m_out[k] = m_byp[k] ? byp[k] : r_q[k];
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NUM_REGS; k++) begin
      if (!rst_n)        r_q[k] <= '0;
      else if (reg_we[k]) r_q[k] <= r_d[k];
    end
  end

endmodule
