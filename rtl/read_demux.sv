// read_demux: 1:N_RD demultiplexer behind a sub-bank's local read port.
//
// The document builds it as 64 one-bit 1:8 demultiplexers, each a set of
// tri-state inverters whose inputs are tied together and whose outputs drive
// the 8 global read buses, enabled by the true/complement rails E[7:0] of a
// fork amplifier. Several enables may be on at once, so one local read can
// feed several global read ports. Tri-state drive is modelled as an AND:
// an output word is the local read word when its enable is set and 0
// otherwise, so the global bus can OR the drivers of all sub-banks. The
// inversion is electrical and not modelled. Purely combinational.
module read_demux
  import msp_rf_pkg::*;
#(
  parameter int unsigned DATA_W = msp_rf_pkg::RF_DATA_W,
  parameter int unsigned N_RD   = msp_rf_pkg::RF_N_RD
) (
  input  logic [N_RD-1:0]             en,    // output enables
  input  logic [DATA_W-1:0]           din,   // local read data
  output logic [N_RD-1:0][DATA_W-1:0] dout   // drive onto each global bus
);

  always_comb begin
    for (int unsigned p = 0; p < N_RD; p++)
      dout[p] = din & {DATA_W{en[p]}};
  end

endmodule
