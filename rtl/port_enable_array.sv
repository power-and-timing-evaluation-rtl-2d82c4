// port_enable_array: port-enable logic of one sub-bank.
//
// Each sub-bank has a single local write port and a single local read port,
// while the register file has N_WR global write ports and N_RD global read
// ports, each with its own decoder. This block sits between the decoders and
// one sub-bank. A global port "hits" the sub-bank when its decoded bank line
// BANK_ID and sub-bank line SB_ID are both active. From the hits it makes:
//   * wr_sel - the one-hot select of the sub-bank's 4:1 write multiplexer,
//   * wr_wl  - the local write word line (the row lines of the chosen port),
//   * rd_wl  - the local read word line,
//   * rd_en  - the enables of the sub-bank's 1:8 read demultiplexer.
// The document names one such enable array per sub-bank and states its job;
// the gating below is the simplest logic that does that job.
//
// Collisions are this design's choice. The document expects the issue logic
// to send at most one write per sub-bank per cycle. If two write ports hit
// the same sub-bank anyway, the lowest-numbered one wins and the others are
// flagged in wr_conflict and dropped. Reads of the same row share the single
// local read: every port asking for that row is enabled. A port asking for a
// different row than the lowest-numbered reader is refused (rd_conflict).
//
// Purely combinational; the inputs are the registered decoder outputs, so
// all outputs are valid during the access cycle. In the original circuit the
// select-rail drivers switch while the address is still being decoded, so
// port selection costs no time of its own. Here the selection is logic
// placed at the start of the access cycle.
module port_enable_array
  import msp_rf_pkg::*;
#(
  parameter int unsigned BANK_ID    = 0,
  parameter int unsigned SB_ID      = 0,
  parameter int unsigned N_BANKS    = msp_rf_pkg::RF_N_BANKS,
  parameter int unsigned N_SUBBANKS = msp_rf_pkg::RF_N_SUBBANKS,
  parameter int unsigned N_ROWS     = msp_rf_pkg::RF_N_ROWS,
  parameter int unsigned N_WR       = msp_rf_pkg::RF_N_WR,
  parameter int unsigned N_RD       = msp_rf_pkg::RF_N_RD
) (
  input  logic [N_WR-1:0][N_BANKS-1:0]    wr_bank,
  input  logic [N_WR-1:0][N_SUBBANKS-1:0] wr_sb,
  input  logic [N_WR-1:0][N_ROWS-1:0]     wr_row,
  input  logic [N_RD-1:0][N_BANKS-1:0]    rd_bank,
  input  logic [N_RD-1:0][N_SUBBANKS-1:0] rd_sb,
  input  logic [N_RD-1:0][N_ROWS-1:0]     rd_row,
  output logic [N_WR-1:0]                 wr_sel,
  output logic [N_ROWS-1:0]               wr_wl,
  output logic [N_ROWS-1:0]               rd_wl,
  output logic [N_RD-1:0]                 rd_en,
  output logic [N_WR-1:0]                 wr_conflict,
  output logic [N_RD-1:0]                 rd_conflict
);

  logic [N_WR-1:0] wr_hit;
  logic [N_RD-1:0] rd_hit;
  logic [N_RD-1:0] rd_first;

  always_comb begin
    for (int unsigned p = 0; p < N_WR; p++)
      wr_hit[p] = wr_bank[p][BANK_ID] && wr_sb[p][SB_ID];
    for (int unsigned p = 0; p < N_RD; p++)
      rd_hit[p] = rd_bank[p][BANK_ID] && rd_sb[p][SB_ID];
  end

  // Lowest-numbered hitting port wins: x & -x isolates the lowest set bit.
  assign wr_sel      = wr_hit & (~wr_hit + 1'b1);
  assign wr_conflict = wr_hit & ~wr_sel;
  assign rd_first    = rd_hit & (~rd_hit + 1'b1);

  always_comb begin
    wr_wl = '0;
    rd_wl = '0;
    for (int unsigned p = 0; p < N_WR; p++)
      if (wr_sel[p]) wr_wl |= wr_row[p];
    for (int unsigned p = 0; p < N_RD; p++)
      if (rd_first[p]) rd_wl |= rd_row[p];
    for (int unsigned p = 0; p < N_RD; p++)
      rd_en[p] = rd_hit[p] && (rd_row[p] == rd_wl);
  end

  assign rd_conflict = rd_hit & ~rd_en;

endmodule
