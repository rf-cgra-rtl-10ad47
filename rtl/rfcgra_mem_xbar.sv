// Crossbar between the row LSUs and the banks of the RF-CGRA data memory.
//
// Every row can reach every bank. Words are interleaved over the banks: the
// bank is the word address modulo NUM_BANKS and the address inside the bank
// is the quotient (this mapping is this design's choice). When two rows
// address the same bank in one cycle the lower row wins; the other request is
// dropped and its conflict bit is set - a modulo-scheduled array cannot stall,
// so the mapper must avoid it. Requests pass combinationally to the banks; the
// bank read data returns to the requesting row one cycle later with
// row_rvalid, steered by a registered record of which bank served the row.
module rfcgra_mem_xbar
  import rfcgra_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned BANK_DEPTH = 1024,
  localparam int unsigned BW        = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned BAW       = $clog2(BANK_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ROWS-1:0]      row_req,
  input  logic [ROWS-1:0]      row_we,
  input  data_t                row_addr   [ROWS],
  input  data_t                row_wdata  [ROWS],
  output logic [ROWS-1:0]      row_rvalid,
  output data_t                row_rdata  [ROWS],
  output logic [NUM_BANKS-1:0] bank_en,
  output logic [NUM_BANKS-1:0] bank_we,
  output logic [BAW-1:0]       bank_addr  [NUM_BANKS],
  output data_t                bank_wdata [NUM_BANKS],
  input  data_t                bank_rdata [NUM_BANKS],
  output logic [ROWS-1:0]      conflict
);

  logic [BW-1:0] row_bank   [ROWS];
  logic [BW-1:0] rsel_q     [ROWS];
  logic [ROWS-1:0] granted;
  logic [ROWS-1:0] rd_q;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      row_bank[r] = BW'(row_addr[r] % NUM_BANKS);
  end

  always_comb begin
    bank_en  = '0;
    bank_we  = '0;
    granted  = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_addr[b]  = '0;
      bank_wdata[b] = '0;
    end
    for (int r = 0; r < ROWS; r++) begin
      if (row_req[r] && !bank_en[row_bank[r]]) begin
        bank_en[row_bank[r]]    = 1'b1;
        bank_we[row_bank[r]]    = row_we[r];
        bank_addr[row_bank[r]]  = BAW'(row_addr[r] / NUM_BANKS);
        bank_wdata[row_bank[r]] = row_wdata[r];
        granted[r]              = 1'b1;
      end
    end
  end

  assign conflict = row_req & ~granted;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q <= '0;
      for (int r = 0; r < ROWS; r++) rsel_q[r] <= '0;
    end else begin
      rd_q <= granted & ~row_we;
      for (int r = 0; r < ROWS; r++) rsel_q[r] <= row_bank[r];
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      row_rvalid[r] = rd_q[r];
      row_rdata[r]  = bank_rdata[rsel_q[r]];
    end
  end

endmodule
