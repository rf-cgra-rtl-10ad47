// RF-CGRA: a coarse-grained reconfigurable array whose PE registers form
// hierarchical register chains.
//
// A ROWS x COLS mesh of processing elements runs a modulo-scheduled loop: the
// context sequencer steps through ii configuration contexts, one per cycle,
// and every PE reloads its configuration register each cycle from the
// configuration memory. Long data dependences are routed through the four
// distributed registers of each PE, chained inside a PE or from PE to PE. Each
// row has one LSU on a shared row bus; a crossbar connects the row LSUs to
// NUM_BANKS interleaved data-memory banks.
//
// Interface (all synchronous to clk, rst_n active low):
//   * cfg_we/cfg_pe/cfg_ctx/cfg_wdata write one context of one PE.
//   * hmem_* is a host port to the data memory; bank = hmem_addr mod
//     NUM_BANKS; read data appears one cycle after the request. Use it only
//     while the array is idle for words the array writes.
//   * start begins a run of run_cycles cycles with initiation interval ii;
//     busy is high during the run and done is set when it ends.
//   * lsu_conflict/bank_conflict flag requests that were dropped because the
//     mapping put two memory operations on one row or one bank in a cycle.
// Timing: a load issued in cycle t returns on the row bus in cycle t+1.
//
// The array size, the four banks, the per-row LSUs and the crossbar follow the
// design; word width, depths, interleaving and the host interface are this
// design's choices.
module rf_cgra
  import rfcgra_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned COLS       = 4,
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned BANK_DEPTH = 1024,
  parameter int unsigned CTX_DEPTH  = 16,
  localparam int unsigned NUM_PE    = ROWS*COLS,
  localparam int unsigned PEW       = $clog2(NUM_PE),
  localparam int unsigned CW        = $clog2(CTX_DEPTH),
  localparam int unsigned BAW       = $clog2(BANK_DEPTH),
  localparam int unsigned BW        = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned AW        = BAW + $clog2(NUM_BANKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [PEW-1:0]  cfg_pe,
  input  logic [CW-1:0]   cfg_ctx,
  input  pe_cfg_t         cfg_wdata,
  input  logic            hmem_en,
  input  logic            hmem_we,
  input  logic [AW-1:0]   hmem_addr,
  input  data_t           hmem_wdata,
  output data_t           hmem_rdata,
  input  logic            start,
  input  logic [CW:0]     ii,
  input  logic [31:0]     run_cycles,
  output logic            busy,
  output logic            done,
  output logic [ROWS-1:0] lsu_conflict,
  output logic [ROWS-1:0] bank_conflict
);

  logic [CW-1:0] rctx;
  logic          cfg_load, cfg_clear;
  pe_cfg_t       cfg_rd [NUM_PE];

  logic  pe_req   [NUM_PE];
  logic  pe_we    [NUM_PE];
  data_t pe_addr  [NUM_PE];
  data_t pe_wdata [NUM_PE];
  data_t row_bus  [ROWS];

  logic [ROWS-1:0] row_req, row_we, row_rvalid;
  data_t           row_addr [ROWS], row_wdata [ROWS], row_rdata [ROWS];

  logic [NUM_BANKS-1:0] bank_en, bank_we;
  logic [BAW-1:0]       bank_addr  [NUM_BANKS];
  data_t                bank_wdata [NUM_BANKS];
  data_t                bank_rdata [NUM_BANKS];
  data_t                host_rdata [NUM_BANKS];
  logic [BW-1:0]        hsel_q;

  rfcgra_ctrl #(.CTX_DEPTH(CTX_DEPTH)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .ii         (ii),
    .run_cycles (run_cycles),
    .rctx       (rctx),
    .cfg_load   (cfg_load),
    .cfg_clear  (cfg_clear),
    .busy       (busy),
    .done       (done)
  );

  rfcgra_config_mem #(.NUM_PE(NUM_PE), .CTX_DEPTH(CTX_DEPTH)) u_cfgmem (
    .clk   (clk),
    .we    (cfg_we),
    .wpe   (cfg_pe),
    .wctx  (cfg_ctx),
    .wdata (cfg_wdata),
    .rctx  (rctx),
    .rdata (cfg_rd)
  );

  rfcgra_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg       (cfg_rd),
    .cfg_load  (cfg_load),
    .cfg_clear (cfg_clear),
    .row_bus   (row_bus),
    .mem_req   (pe_req),
    .mem_we    (pe_we),
    .mem_addr  (pe_addr),
    .mem_wdata (pe_wdata)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_lsu
    logic [COLS-1:0] req_v, we_v;
    data_t           addr_v [COLS], wdata_v [COLS];
    for (genvar c = 0; c < COLS; c++) begin : g_c
      assign req_v[c]   = pe_req[r*COLS+c];
      assign we_v[c]    = pe_we[r*COLS+c];
      assign addr_v[c]  = pe_addr[r*COLS+c];
      assign wdata_v[c] = pe_wdata[r*COLS+c];
    end
    rfcgra_lsu #(.COLS(COLS)) u_lsu (
      .pe_req   (req_v),
      .pe_we    (we_v),
      .pe_addr  (addr_v),
      .pe_wdata (wdata_v),
      .req      (row_req[r]),
      .we       (row_we[r]),
      .addr     (row_addr[r]),
      .wdata    (row_wdata[r]),
      .rvalid   (row_rvalid[r]),
      .rdata    (row_rdata[r]),
      .bus      (row_bus[r]),
      .conflict (lsu_conflict[r])
    );
  end

  rfcgra_mem_xbar #(.ROWS(ROWS), .NUM_BANKS(NUM_BANKS), .BANK_DEPTH(BANK_DEPTH)) u_xbar (
    .clk        (clk),
    .rst_n      (rst_n),
    .row_req    (row_req),
    .row_we     (row_we),
    .row_addr   (row_addr),
    .row_wdata  (row_wdata),
    .row_rvalid (row_rvalid),
    .row_rdata  (row_rdata),
    .bank_en    (bank_en),
    .bank_we    (bank_we),
    .bank_addr  (bank_addr),
    .bank_wdata (bank_wdata),
    .bank_rdata (bank_rdata),
    .conflict   (bank_conflict)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rfcgra_mem_bank #(.DEPTH(BANK_DEPTH)) u_bank (
      .clk     (clk),
      .a_en    (bank_en[b]),
      .a_we    (bank_we[b]),
      .a_addr  (bank_addr[b]),
      .a_wdata (bank_wdata[b]),
      .a_rdata (bank_rdata[b]),
      .b_en    (hmem_en && (BW'(hmem_addr % NUM_BANKS) == BW'(b))),
      .b_we    (hmem_we),
      .b_addr  (BAW'(hmem_addr / NUM_BANKS)),
      .b_wdata (hmem_wdata),
      .b_rdata (host_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       hsel_q <= '0;
    else if (hmem_en) hsel_q <= BW'(hmem_addr % NUM_BANKS);
  end

  assign hmem_rdata = host_rdata[hsel_q];

endmodule
