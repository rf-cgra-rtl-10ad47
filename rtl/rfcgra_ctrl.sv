// Context sequencer of the RF-CGRA.
//
// Runs the modulo-scheduled kernel: after start it executes run_cycles cycles,
// cycling through contexts 0, 1, ..., ii-1, 0, ... so that a new loop
// iteration begins every ii cycles. rctx is the context to be used in the
// next cycle; cfg_load makes every PE latch that context at the clock edge,
// so in the cycle after start the array executes context 0. At the end of the
// run cfg_clear loads the idle context, busy falls and done is set until the
// next start. ii = 0 is treated as 1; ii above CTX_DEPTH is flagged by an
// assertion. The start/stop protocol is this design's
// choice.
module rfcgra_ctrl #(
  parameter int unsigned CTX_DEPTH = 16,
  localparam int unsigned CW       = $clog2(CTX_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW:0]   ii,
  input  logic [31:0]   run_cycles,
  output logic [CW-1:0] rctx,
  output logic          cfg_load,
  output logic          cfg_clear,
  output logic          busy,
  output logic          done
);

  typedef enum logic {IDLE, RUN} state_e;

  state_e        state_q;
  logic [31:0]   cnt_q;
  logic [CW-1:0] ctx_q;
  logic [CW-1:0] ctx_next;
  logic          last;

  assign ctx_next  = (32'(ctx_q) + 1 >= 32'(ii)) ? '0 : ctx_q + 1'b1;
  assign last      = (cnt_q + 1 >= run_cycles);
  assign busy      = (state_q == RUN);
  assign rctx      = (state_q == RUN) ? ctx_next : '0;
  assign cfg_load  = (state_q == IDLE) ? (start && run_cycles != 0) : !last;
  assign cfg_clear = (state_q == RUN) && last;

  // Only contexts that exist can be cycled through.
  a_ii_range: assert property (@(posedge clk) disable iff (!rst_n)
                               (start && state_q == IDLE) |-> (32'(ii) <= CTX_DEPTH))
    else $error("ii larger than CTX_DEPTH");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cnt_q   <= '0;
      ctx_q   <= '0;
      done    <= 1'b0;
    end else if (state_q == IDLE) begin
      if (start) begin
        done <= (run_cycles == 0);
        if (run_cycles != 0) begin
          state_q <= RUN;
          cnt_q   <= '0;
          ctx_q   <= '0;
        end
      end
    end else begin
      if (last) begin
        state_q <= IDLE;
        done    <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1;
        ctx_q <= ctx_next;
      end
    end
  end

endmodule
