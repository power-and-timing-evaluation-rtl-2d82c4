// bank: one register-file bank of N_SUBBANKS sub-banks.
//
// All sub-banks of a bank see the same global write buses and decoded port
// selects; each one reacts only to ports that select its own bank and
// sub-bank number. Their read-demultiplexer outputs are joined per global
// read bus by an OR, the logic form of the tri-state bus the document
// uses; at most one sub-bank drives a given bus in a cycle, because each
// read port selects one entry. The structure (8 sub-banks per bank) follows
// the document. Timing is that of subbank: combinational read in the access
// cycle, write at the edge that ends it.
module bank
  import msp_rf_pkg::*;
#(
  parameter int unsigned BANK_ID    = 0,
  parameter int unsigned DATA_W     = msp_rf_pkg::RF_DATA_W,
  parameter int unsigned N_BANKS    = msp_rf_pkg::RF_N_BANKS,
  parameter int unsigned N_SUBBANKS = msp_rf_pkg::RF_N_SUBBANKS,
  parameter int unsigned N_ROWS     = msp_rf_pkg::RF_N_ROWS,
  parameter int unsigned N_WR       = msp_rf_pkg::RF_N_WR,
  parameter int unsigned N_RD       = msp_rf_pkg::RF_N_RD
) (
  input  logic                            clk,
  input  logic [N_WR-1:0][N_BANKS-1:0]    wr_bank,
  input  logic [N_WR-1:0][N_SUBBANKS-1:0] wr_sb,
  input  logic [N_WR-1:0][N_ROWS-1:0]     wr_row,
  input  logic [N_WR-1:0][DATA_W-1:0]     wr_data,
  input  logic [N_RD-1:0][N_BANKS-1:0]    rd_bank,
  input  logic [N_RD-1:0][N_SUBBANKS-1:0] rd_sb,
  input  logic [N_RD-1:0][N_ROWS-1:0]     rd_row,
  output logic [N_RD-1:0][DATA_W-1:0]     rd_bus,
  output logic [N_RD-1:0]                 rd_en,
  output logic [N_WR-1:0]                 wr_conflict,
  output logic [N_RD-1:0]                 rd_conflict
);

  logic [N_SUBBANKS-1:0][N_RD-1:0][DATA_W-1:0] sb_bus;
  logic [N_SUBBANKS-1:0][N_RD-1:0]             sb_rd_en;
  logic [N_SUBBANKS-1:0][N_WR-1:0]             sb_wr_conf;
  logic [N_SUBBANKS-1:0][N_RD-1:0]             sb_rd_conf;

  for (genvar s = 0; s < N_SUBBANKS; s++) begin : g_sb
    subbank #(
      .BANK_ID(BANK_ID), .SB_ID(s), .DATA_W(DATA_W), .N_BANKS(N_BANKS),
      .N_SUBBANKS(N_SUBBANKS), .N_ROWS(N_ROWS), .N_WR(N_WR), .N_RD(N_RD)
    ) u_sb (
      .clk, .wr_bank, .wr_sb, .wr_row, .wr_data, .rd_bank, .rd_sb, .rd_row,
      .rd_bus(sb_bus[s]), .rd_en(sb_rd_en[s]),
      .wr_conflict(sb_wr_conf[s]), .rd_conflict(sb_rd_conf[s])
    );
  end

  always_comb begin
    rd_bus      = '0;
    rd_en       = '0;
    wr_conflict = '0;
    rd_conflict = '0;
    for (int unsigned s = 0; s < N_SUBBANKS; s++) begin
      rd_bus      |= sb_bus[s];
      rd_en       |= sb_rd_en[s];
      wr_conflict |= sb_wr_conf[s];
      rd_conflict |= sb_rd_conf[s];
    end
  end

endmodule
