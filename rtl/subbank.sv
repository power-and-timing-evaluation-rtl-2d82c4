// subbank: one 16-entry, single-write / single-read sub-bank.
//
// The sub-bank is the unit the whole register file is tiled from: 32 of
// them (4 banks x 8) make the 512-entry file. It stores N_ROWS words of
// DATA_W bits behind one local write port and one local read port, and
// reaches the N_WR global write buses through a write_mux and the N_RD
// global read buses through a read_demux. Its port_enable_array picks which
// global ports are connected in a cycle. This structure follows the
// document; the collision rules are this design's (see port_enable_array).
//
// Timing: the decoded selects (wr_*, rd_*) and the write data arrive from the
// decoder register stage and are valid for a whole access cycle. The read
// is combinational through the read word line, so rd_bus is valid in that
// same cycle. The write takes effect at the rising edge that ends the access
// cycle. A read and a write of the same row in the same cycle return the old
// word (read before write); the document does not cover that case.
// The storage is not reset, like the SRAM it stands for.
module subbank
  import msp_rf_pkg::*;
#(
  parameter int unsigned BANK_ID    = 0,
  parameter int unsigned SB_ID      = 0,
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

  logic [N_WR-1:0]   wr_sel;
  logic [N_ROWS-1:0] wr_wl;
  logic [N_ROWS-1:0] rd_wl;
  logic [DATA_W-1:0] local_wdata;
  logic [DATA_W-1:0] local_rdata;
  logic [DATA_W-1:0] mem [N_ROWS];

  port_enable_array #(
    .BANK_ID(BANK_ID), .SB_ID(SB_ID), .N_BANKS(N_BANKS), .N_SUBBANKS(N_SUBBANKS),
    .N_ROWS(N_ROWS), .N_WR(N_WR), .N_RD(N_RD)
  ) u_enable (
    .wr_bank, .wr_sb, .wr_row, .rd_bank, .rd_sb, .rd_row,
    .wr_sel, .wr_wl, .rd_wl, .rd_en, .wr_conflict, .rd_conflict
  );

  write_mux #(.DATA_W(DATA_W), .N_WR(N_WR)) u_wmux (
    .sel(wr_sel), .din(wr_data), .dout(local_wdata)
  );

  // Storage: the write word line selects the row that captures the data.
  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < N_ROWS; r++)
      if (wr_wl[r]) mem[r] <= local_wdata;
  end

  // Read: the read word line gates one row onto the local bit lines.
  always_comb begin
    local_rdata = '0;
    for (int unsigned r = 0; r < N_ROWS; r++)
      if (rd_wl[r]) local_rdata |= mem[r];
  end

  read_demux #(.DATA_W(DATA_W), .N_RD(N_RD)) u_rdemux (
    .en(rd_en), .din(local_rdata), .dout(rd_bus)
  );

  // One local port each: never more than one row written or read at once.
  a_one_row: assert property (@(posedge clk) $onehot0(wr_wl) && $onehot0(rd_wl));

endmodule
