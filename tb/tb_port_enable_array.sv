// tb_port_enable_array: self-checking test of a sub-bank's port-enable logic.
//
// The array under test belongs to bank 2, sub-bank 5. Random sets of write
// and read requests are decoded in the testbench into bank / sub-bank / row
// one-hots. Addresses are drawn mostly from a few rows of the array's own
// sub-bank so that collisions are frequent. The expected outputs follow the
// rules: lowest-numbered write hit wins the write port, the lowest-numbered
// read hit fixes the row that is read, every read hit of that row is enabled,
// other read hits are refused.
module tb_port_enable_array;
  localparam int BID = 2, SID = 5;
  logic [3:0][3:0]  wr_bank;
  logic [3:0][7:0]  wr_sb;
  logic [3:0][15:0] wr_row;
  logic [7:0][3:0]  rd_bank;
  logic [7:0][7:0]  rd_sb;
  logic [7:0][15:0] rd_row;
  logic [3:0]  wr_sel, wr_conflict;
  logic [15:0] wr_wl, rd_wl;
  logic [7:0]  rd_en, rd_conflict;
  int checks = 0, failures = 0;
  int n_wconf = 0, n_rconf = 0, n_share = 0;

  port_enable_array #(.BANK_ID(BID), .SB_ID(SID)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [8:0] pick();
    if ($urandom_range(0, 3) != 0) return {2'(BID), 3'(SID), 4'($urandom_range(0, 2))};
    return 9'($urandom);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] wv; logic [7:0] rv;
    logic [3:0][8:0] wa; logic [7:0][8:0] ra;
    logic [3:0] e_wsel; logic [15:0] e_wwl, e_rwl; logic [7:0] e_ren;
    int first;
    for (int i = 0; i < 2000; i++) begin
      wv = 4'($urandom); rv = 8'($urandom);
      for (int p = 0; p < 4; p++) begin
        wa[p] = pick();
        wr_bank[p] = wv[p] ? 4'(1 << wa[p][8:7]) : '0;
        wr_sb[p]   = wv[p] ? 8'(1 << wa[p][6:4]) : '0;
        wr_row[p]  = wv[p] ? 16'(1 << wa[p][3:0]) : '0;
      end
      for (int q = 0; q < 8; q++) begin
        ra[q] = pick();
        rd_bank[q] = rv[q] ? 4'(1 << ra[q][8:7]) : '0;
        rd_sb[q]   = rv[q] ? 8'(1 << ra[q][6:4]) : '0;
        rd_row[q]  = rv[q] ? 16'(1 << ra[q][3:0]) : '0;
      end
      // Reference.
      e_wsel = '0; e_wwl = '0; e_rwl = '0; e_ren = '0; first = -1;
      for (int p = 0; p < 4; p++)
        if (wv[p] && wa[p][8:4] == 5'({2'(BID), 3'(SID)}) && e_wsel == 0) begin
          e_wsel[p] = 1'b1;
          e_wwl = 16'(1 << wa[p][3:0]);
        end
      for (int q = 0; q < 8; q++)
        if (rv[q] && ra[q][8:4] == 5'({2'(BID), 3'(SID)})) begin
          if (first < 0) begin
            first = q;
            e_rwl = 16'(1 << ra[q][3:0]);
          end
          e_ren[q] = (ra[q][3:0] == ra[first][3:0]);
          if (e_ren[q] && q != first) n_share++;
          if (!e_ren[q]) n_rconf++;
        end
      #1;
      check(wr_sel == e_wsel, "write select");
      check(wr_wl == e_wwl, "write word line");
      check(rd_wl == e_rwl, "read word line");
      check(rd_en == e_ren, "read enables");
      for (int p = 0; p < 4; p++) begin
        logic hit;
        hit = wv[p] && wa[p][8:4] == 5'({2'(BID), 3'(SID)});
        check(wr_conflict[p] == (hit && !e_wsel[p]), "write conflict flag");
        if (hit && !e_wsel[p]) n_wconf++;
      end
      for (int q = 0; q < 8; q++)
        check(rd_conflict[q] == (rv[q] && ra[q][8:4] == 5'({2'(BID), 3'(SID)}) && !e_ren[q]),
              "read conflict flag");
      #1;
    end
    check(n_wconf > 0, "write conflicts exercised");
    check(n_rconf > 0, "read conflicts exercised");
    check(n_share > 0, "shared reads exercised");
    $display("write conflicts %0d, read conflicts %0d, shared reads %0d", n_wconf, n_rconf, n_share);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
