// tb_bank: self-checking test of one bank of eight sub-banks.
//
// The unit under test is bank 2. Each cycle the testbench
// draws random write and read requests, mostly aimed at a few rows of two of its sub-banks so that
// port collisions and shared reads happen often, decodes them itself into
// bank / sub-bank / row one-hots and drives those (the decoder stage is not
// part of this unit). A reference array predicts every read: the read of a
// cycle sees the writes of earlier cycles only (read before write), the
// lowest-numbered write port of a sub-bank wins it, read ports asking for
// the row of the lowest-numbered reader of a sub-bank share that read and the
// others are refused. The rows are first filled with known data.
module tb_bank;
  localparam int BID = 2;
  logic clk = 1'b0;
  logic [3:0][3:0]  wr_bank;
  logic [3:0][7:0]  wr_sb;
  logic [3:0][15:0] wr_row;
  logic [3:0][63:0] wr_data;
  logic [7:0][3:0]  rd_bank;
  logic [7:0][7:0]  rd_sb;
  logic [7:0][15:0] rd_row;
  logic [7:0][63:0] rd_bus;
  logic [7:0] rd_en, rd_conflict;
  logic [3:0] wr_conflict;
  logic [63:0] ref_mem [512];
  int checks = 0, failures = 0;
  int n_wconf = 0, n_rconf = 0, n_share = 0, n_raw = 0;

  bank #(.BANK_ID(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // True when entry a belongs to the unit under test.
  function automatic bit mine(logic [8:0] a);
    return a[8:7] == 2'd2;
  endfunction

  function automatic logic [8:0] pick();
    if ($urandom_range(0, 3) != 0) return {2'd2, 2'b0, 1'($urandom), 4'($urandom_range(0, 3))};
    return 9'($urandom);
  endfunction

  task automatic drive(input logic [3:0] wv, input logic [3:0][8:0] wa, input logic [3:0][63:0] wd,
                       input logic [7:0] rv, input logic [7:0][8:0] ra);
    for (int p = 0; p < 4; p++) begin
      wr_bank[p] = wv[p] ? 4'(1 << wa[p][8:7]) : '0;
      wr_sb[p]   = wv[p] ? 8'(1 << wa[p][6:4]) : '0;
      wr_row[p]  = wv[p] ? 16'(1 << wa[p][3:0]) : '0;
      wr_data[p] = wd[p];
    end
    for (int q = 0; q < 8; q++) begin
      rd_bank[q] = rv[q] ? 4'(1 << ra[q][8:7]) : '0;
      rd_sb[q]   = rv[q] ? 8'(1 << ra[q][6:4]) : '0;
      rd_row[q]  = rv[q] ? 16'(1 << ra[q][3:0]) : '0;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] wv; logic [7:0] rv;
    logic [3:0][8:0] wa; logic [7:0][8:0] ra;
    logic [3:0][63:0] wd;
    logic [3:0] e_wc; logic [7:0] e_ren, e_rc;
    logic [7:0][63:0] e_bus;
    int first;
    drive('0, '0, '0, '0, '0);
    // Fill: one entry per cycle through port 0.
    for (int a = 0; a < 512; a++) begin
      if (!mine(9'(a))) continue;
      @(negedge clk);
      ref_mem[a] = {$urandom, $urandom};
      drive(4'b0001, {27'b0, 9'(a)}, {192'b0, ref_mem[a]}, 8'b0, '0);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wv = 4'($urandom); rv = 8'($urandom);
      for (int p = 0; p < 4; p++) begin wa[p] = pick(); wd[p] = {$urandom, $urandom}; end
      for (int q = 0; q < 8; q++) ra[q] = pick();
      drive(wv, wa, wd, rv, ra);
      // Reference for this access cycle.
      e_wc = '0; e_ren = '0; e_rc = '0; e_bus = '0;
      for (int p = 0; p < 4; p++)
        if (wv[p] && mine(wa[p]))
          for (int p2 = 0; p2 < p; p2++)
            if (wv[p2] && wa[p2][8:4] == wa[p][8:4]) e_wc[p] = 1'b1;
      for (int q = 0; q < 8; q++)
        if (rv[q] && mine(ra[q])) begin
          first = q;
          for (int q2 = q - 1; q2 >= 0; q2--)
            if (rv[q2] && ra[q2][8:4] == ra[q][8:4]) first = q2;
          e_ren[q] = (ra[first] == ra[q]);
          e_rc[q] = !e_ren[q];
          if (e_ren[q]) e_bus[q] = ref_mem[ra[q]];
          if (e_ren[q] && first != q) n_share++;
          if (e_rc[q]) n_rconf++;
          for (int p = 0; p < 4; p++)
            if (e_ren[q] && wv[p] && wa[p] == ra[q] && !e_wc[p]) n_raw++;
        end
      #1;
      check(wr_conflict == e_wc, "write conflicts");
      check(rd_conflict == e_rc, "read conflicts");
      check(rd_en == e_ren, "read enables");
      for (int q = 0; q < 8; q++) check(rd_bus[q] == e_bus[q], $sformatf("read bus %0d", q));
      for (int p = 0; p < 4; p++) begin
        if (e_wc[p]) n_wconf++;
        if (wv[p] && mine(wa[p]) && !e_wc[p]) ref_mem[wa[p]] = wd[p];
      end
    end
    check(n_wconf > 0, "write conflicts exercised");
    check(n_rconf > 0, "read conflicts exercised");
    check(n_share > 0, "shared reads exercised");
    check(n_raw > 0, "same-cycle read and write exercised");
    $display("write conflicts %0d, read conflicts %0d, shared reads %0d, read-before-write %0d",
             n_wconf, n_rconf, n_share, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
