// msp_rf: multi-banked physical register file, 4 write / 8 read ports.
//
// The register file of a 4-way core needs 4 write and 8 read ports. Building
// every cell with 12 ports is costly in area and power, so this file is made
// of 32 sub-banks of 16 entries that each have only one write and one read
// port. Every sub-bank stands for one architectural register, and its 16
// rows hold physical versions of that register, so in normal operation one
// cycle writes a sub-bank at most once. The global ports reach a sub-bank
// through a 4:1 write multiplexer and a 1:8 read demultiplexer.
//
// Organisation (from the document): 4 banks x 8 sub-banks x 16 rows x 64
// bits = 512 words; 12 independent address decoders, one per global port;
// global write buses feed every sub-bank's write multiplexer, global read
// buses are driven by every sub-bank's read demultiplexer.
//
// Interface: each write port p presents wr_valid[p], wr_addr[p] and
// wr_data[p]; each read port q presents rd_req_valid[q] and rd_req_addr[q].
// Address = {bank, sub-bank, row}, most significant field first.
//
// Timing: cycle 0, requests are sampled by the decoders (one clock of
// decode latency, as in the document) together with the write data.
// Cycle 1, the access cycle: rd_data[q] and rd_valid[q] are valid for the
// read requested in cycle 0, and the writes of cycle 0 are stored at the
// rising edge that ends cycle 1. A read issued in the cycle after a write
// to the same entry therefore sees the new word; a read issued in the same
// cycle sees the old one. wr_conflict[p] and rd_conflict[q] are valid in
// the access cycle and flag ports that lost a sub-bank to a lower-numbered
// port (collision rules are this design's choice, see port_enable_array).
// rd_data of a port that is not served is 0.
module msp_rf
  import msp_rf_pkg::*;
#(
  parameter int unsigned DATA_W     = msp_rf_pkg::RF_DATA_W,
  parameter int unsigned N_BANKS    = msp_rf_pkg::RF_N_BANKS,
  parameter int unsigned N_SUBBANKS = msp_rf_pkg::RF_N_SUBBANKS,
  parameter int unsigned N_ROWS     = msp_rf_pkg::RF_N_ROWS,
  parameter int unsigned N_WR       = msp_rf_pkg::RF_N_WR,
  parameter int unsigned N_RD       = msp_rf_pkg::RF_N_RD,
  localparam int unsigned A_W       = addr_w(N_BANKS, N_SUBBANKS, N_ROWS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_WR-1:0]             wr_valid,
  input  logic [N_WR-1:0][A_W-1:0]    wr_addr,
  input  logic [N_WR-1:0][DATA_W-1:0] wr_data,
  input  logic [N_RD-1:0]             rd_req_valid,
  input  logic [N_RD-1:0][A_W-1:0]    rd_req_addr,
  output logic [N_RD-1:0][DATA_W-1:0] rd_data,
  output logic [N_RD-1:0]             rd_valid,
  output logic [N_RD-1:0]             rd_conflict,
  output logic [N_WR-1:0]             wr_conflict
);

  // Decoded selects of every port, valid in the access cycle.
  logic [N_WR-1:0]                 wr_dv;
  logic [N_WR-1:0][N_BANKS-1:0]    wr_bank;
  logic [N_WR-1:0][N_SUBBANKS-1:0] wr_sb;
  logic [N_WR-1:0][N_ROWS-1:0]     wr_row;
  logic [N_RD-1:0]                 rd_dv;
  logic [N_RD-1:0][N_BANKS-1:0]    rd_bank;
  logic [N_RD-1:0][N_SUBBANKS-1:0] rd_sb;
  logic [N_RD-1:0][N_ROWS-1:0]     rd_row;
  // Write data, registered alongside the write decoders.
  logic [N_WR-1:0][DATA_W-1:0]     wr_data_q;

  for (genvar p = 0; p < N_WR; p++) begin : g_wdec
    port_decoder #(.N_BANKS(N_BANKS), .N_SUBBANKS(N_SUBBANKS), .N_ROWS(N_ROWS)) u_dec (
      .clk, .rst_n, .req_valid(wr_valid[p]), .req_addr(wr_addr[p]),
      .dec_valid(wr_dv[p]), .dec_bank(wr_bank[p]), .dec_sb(wr_sb[p]), .dec_row(wr_row[p])
    );
  end

  for (genvar q = 0; q < N_RD; q++) begin : g_rdec
    port_decoder #(.N_BANKS(N_BANKS), .N_SUBBANKS(N_SUBBANKS), .N_ROWS(N_ROWS)) u_dec (
      .clk, .rst_n, .req_valid(rd_req_valid[q]), .req_addr(rd_req_addr[q]),
      .dec_valid(rd_dv[q]), .dec_bank(rd_bank[q]), .dec_sb(rd_sb[q]), .dec_row(rd_row[q])
    );
  end

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < N_WR; p++)
      if (wr_valid[p]) wr_data_q[p] <= wr_data[p];
  end

  logic [N_BANKS-1:0][N_RD-1:0][DATA_W-1:0] bk_bus;
  logic [N_BANKS-1:0][N_RD-1:0]             bk_rd_en;
  logic [N_BANKS-1:0][N_WR-1:0]             bk_wr_conf;
  logic [N_BANKS-1:0][N_RD-1:0]             bk_rd_conf;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    bank #(
      .BANK_ID(b), .DATA_W(DATA_W), .N_BANKS(N_BANKS), .N_SUBBANKS(N_SUBBANKS),
      .N_ROWS(N_ROWS), .N_WR(N_WR), .N_RD(N_RD)
    ) u_bank (
      .clk, .wr_bank, .wr_sb, .wr_row, .wr_data(wr_data_q), .rd_bank, .rd_sb, .rd_row,
      .rd_bus(bk_bus[b]), .rd_en(bk_rd_en[b]),
      .wr_conflict(bk_wr_conf[b]), .rd_conflict(bk_rd_conf[b])
    );
  end

  // Global read buses: OR of all banks' drivers (tri-state bus in logic form).
  always_comb begin
    rd_data     = '0;
    rd_valid    = '0;
    rd_conflict = '0;
    wr_conflict = '0;
    for (int unsigned b = 0; b < N_BANKS; b++) begin
      rd_data     |= bk_bus[b];
      rd_valid    |= bk_rd_en[b];
      rd_conflict |= bk_rd_conf[b];
      wr_conflict |= bk_wr_conf[b];
    end
  end

  // Every decoded read port is either served or refused, never both.
  a_rd_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    ((rd_valid | rd_conflict) == rd_dv) && ((rd_valid & rd_conflict) == '0));
  // Only decoded write ports can be refused.
  a_wr_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_conflict & ~wr_dv) == '0);

endmodule
