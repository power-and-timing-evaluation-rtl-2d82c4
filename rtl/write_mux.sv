// write_mux: N_WR:1 multiplexer in front of a sub-bank's local write port.
//
// The document builds this as 64 one-bit 4:1 transmission-gate multiplexers
// whose true and complement select rails come from a fork amplifier; at
// most one of the four global write buses is selected at a time. In logic
// that is an AND-OR of a one-hot select: each input word is gated by its
// select bit and the gated words are ORed. The complement rail is an
// electrical detail and is not modelled. With no select bit set the output
// is 0. Purely combinational.
module write_mux
  import msp_rf_pkg::*;
#(
  parameter int unsigned DATA_W = msp_rf_pkg::RF_DATA_W,
  parameter int unsigned N_WR   = msp_rf_pkg::RF_N_WR
) (
  input  logic [N_WR-1:0]             sel,   // one-hot or zero
  input  logic [N_WR-1:0][DATA_W-1:0] din,   // global write buses
  output logic [DATA_W-1:0]           dout   // local write data
);

  always_comb begin
    dout = '0;
    for (int unsigned p = 0; p < N_WR; p++)
      dout |= din[p] & {DATA_W{sel[p]}};
  end

endmodule
