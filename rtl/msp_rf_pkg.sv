// msp_rf_pkg: shared sizes of the multi-banked register file.
//
// The register file holds 512 words of 64 bits. It is split into 4 banks,
// each bank into 8 sub-banks, and each sub-bank holds 16 rows behind one
// local write port and one local read port. A 4-way core reaches it through
// 4 global write ports and 8 global read ports. These numbers are the
// defaults of every module's parameters; the helper functions derive the
// address fields from them.
//
// A 9-bit register address is split, most significant field first, into
// bank (2 bits), sub-bank (3 bits) and row (4 bits). The field order is this
// design's choice.
package msp_rf_pkg;

  localparam int unsigned RF_DATA_W     = 64;  // word width
  localparam int unsigned RF_N_BANKS    = 4;   // banks in the register file
  localparam int unsigned RF_N_SUBBANKS = 8;   // sub-banks per bank
  localparam int unsigned RF_N_ROWS     = 16;  // rows (entries) per sub-bank
  localparam int unsigned RF_N_WR       = 4;   // global write ports
  localparam int unsigned RF_N_RD       = 8;   // global read ports

  // Width of an index into n things, at least 1.
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Width of a full register address for a given geometry.
  function automatic int unsigned addr_w(int unsigned banks, int unsigned subbanks,
                                         int unsigned rows);
    return idx_w(banks) + idx_w(subbanks) + idx_w(rows);
  endfunction

endpackage
