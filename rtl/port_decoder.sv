// port_decoder: address decoder of one global register-file port.
//
// Every global port (4 write, 8 read) owns one decoder. The decoder splits
// the register address into bank, sub-bank and row fields and turns each
// field into a one-hot select: N_BANKS bank lines, N_SUBBANKS sub-bank lines
// and N_ROWS row lines. A sub-bank uses the row lines of a port only while
// that port's bank line and sub-bank line both point at it, so the three
// groups together select exactly one of N_BANKS*N_SUBBANKS*N_ROWS entries.
// This predecoded bank / sub-bank / row structure follows the document;
// so does the latency of one clock, which the document spends on precharge
// and evaluation of a dynamic-logic decoder. Here it is a register stage.
//
// Interface: req_valid/req_addr are sampled on the rising edge of clk; the
// one-hot outputs hold the decode during the next cycle. With req_valid low
// all select lines are 0 (a precharged decoder selects nothing).
// Reset (synchronous, active low) clears the selects.
module port_decoder
  import msp_rf_pkg::*;
#(
  parameter int unsigned N_BANKS    = msp_rf_pkg::RF_N_BANKS,
  parameter int unsigned N_SUBBANKS = msp_rf_pkg::RF_N_SUBBANKS,
  parameter int unsigned N_ROWS     = msp_rf_pkg::RF_N_ROWS,
  localparam int unsigned BANK_W    = idx_w(N_BANKS),
  localparam int unsigned SB_W      = idx_w(N_SUBBANKS),
  localparam int unsigned ROW_W     = idx_w(N_ROWS),
  localparam int unsigned A_W       = BANK_W + SB_W + ROW_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  input  logic [A_W-1:0]        req_addr,
  output logic                  dec_valid,
  output logic [N_BANKS-1:0]    dec_bank,
  output logic [N_SUBBANKS-1:0] dec_sb,
  output logic [N_ROWS-1:0]     dec_row
);

  logic [BANK_W-1:0] f_bank;
  logic [SB_W-1:0]   f_sb;
  logic [ROW_W-1:0]  f_row;
  logic [N_BANKS-1:0]    n_bank;
  logic [N_SUBBANKS-1:0] n_sb;
  logic [N_ROWS-1:0]     n_row;

  assign {f_bank, f_sb, f_row} = req_addr;

  // Predecode: each group is a plain field-to-one-hot decoder.
  always_comb begin
    n_bank = '0;
    n_sb   = '0;
    n_row  = '0;
    for (int unsigned i = 0; i < N_BANKS; i++)
      n_bank[i] = req_valid && (int'(f_bank) == int'(i));
    for (int unsigned i = 0; i < N_SUBBANKS; i++)
      n_sb[i] = req_valid && (int'(f_sb) == int'(i));
    for (int unsigned i = 0; i < N_ROWS; i++)
      n_row[i] = req_valid && (int'(f_row) == int'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_bank  <= '0;
      dec_sb    <= '0;
      dec_row   <= '0;
    end else begin
      dec_valid <= req_valid && (int'(f_bank) < int'(N_BANKS))
                 && (int'(f_sb) < int'(N_SUBBANKS)) && (int'(f_row) < int'(N_ROWS));
      dec_bank  <= n_bank;
      dec_sb    <= n_sb;
      dec_row   <= n_row;
    end
  end

  // A decoded port selects at most one line in each group, and exactly one
  // in each group while it is valid.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(dec_bank) && $onehot0(dec_sb) && $onehot0(dec_row)
    && (dec_valid == (|dec_bank && |dec_sb && |dec_row)));

endmodule
