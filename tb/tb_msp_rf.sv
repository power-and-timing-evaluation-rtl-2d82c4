// tb_msp_rf: end-to-end test of the 512 x 64-bit, 4-write / 8-read register
// file at its default size.
//
// Phase 1 fills all 512 entries, four per cycle, one write port per bank so
// that no two writes share a sub-bank. Phase 2 runs random traffic on all 12
// ports: half of the addresses come from a small pool of entries in two
// sub-banks, so write collisions, refused reads and shared reads are common.
// A reference array, updated one cycle late, predicts rd_data, rd_valid,
// rd_conflict and wr_conflict in the access cycle, one clock after each
// request, and also checks that nothing answers before that clock.
// Phase 3 issues, in one cycle, 4 writes and 8 reads to 12 different
// sub-banks, the full-bandwidth case the design is sized for.
// Every mechanism is counted and must occur at least once: plain reads and
// writes, write collision, refused read, shared read, read and write of the
// same entry in one cycle (old word returned), read of a word written in
// the cycle before (new word returned), full 12-port cycle, and reset.
module tb_msp_rf;
  logic clk = 1'b0;
  logic rst_n;
  logic [3:0]       wr_valid;
  logic [3:0][8:0]  wr_addr;
  logic [3:0][63:0] wr_data;
  logic [7:0]       rd_req_valid;
  logic [7:0][8:0]  rd_req_addr;
  logic [7:0][63:0] rd_data;
  logic [7:0]       rd_valid, rd_conflict;
  logic [3:0]       wr_conflict;

  msp_rf dut (.*);

  always #5 clk = ~clk;

  logic [63:0] ref_mem [512];
  bit          written_last [512];   // written by the previous cycle's requests
  int checks = 0, failures = 0, cycles = 0;
  int n_wr = 0, n_rd = 0, n_wconf = 0, n_rconf = 0, n_share = 0, n_raw_same = 0;
  int n_raw_next = 0, n_full = 0, n_reset = 0;
  logic [8:0] pool [8];

  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Requests of the previous cycle, whose results show in this cycle.
  logic [3:0]       p_wv;
  logic [3:0][8:0]  p_wa;
  logic [3:0][63:0] p_wd;
  logic [7:0]       p_rv;
  logic [7:0][8:0]  p_ra;

  // Check the access cycle of the previous requests, then commit its writes
  // to the reference.
  task automatic check_access();
    logic [3:0] e_wc; logic [7:0] e_rv, e_rc;
    int first;
    e_wc = '0; e_rv = '0; e_rc = '0;
    for (int p = 0; p < 4; p++)
      if (p_wv[p])
        for (int p2 = 0; p2 < p; p2++)
          if (p_wv[p2] && p_wa[p2][8:4] == p_wa[p][8:4]) e_wc[p] = 1'b1;
    for (int q = 0; q < 8; q++)
      if (p_rv[q]) begin
        first = q;
        for (int q2 = q - 1; q2 >= 0; q2--)
          if (p_rv[q2] && p_ra[q2][8:4] == p_ra[q][8:4]) first = q2;
        e_rv[q] = (p_ra[first] == p_ra[q]);
        e_rc[q] = !e_rv[q];
        if (e_rv[q] && first != q) n_share++;
        if (e_rc[q]) n_rconf++;
      end
    check(wr_conflict == e_wc, "wr_conflict");
    check(rd_valid == e_rv, "rd_valid");
    check(rd_conflict == e_rc, "rd_conflict");
    for (int q = 0; q < 8; q++) begin
      check(rd_data[q] == (e_rv[q] ? ref_mem[p_ra[q]] : 64'b0), $sformatf("rd_data[%0d]", q));
      if (e_rv[q]) begin
        n_rd++;
        if (written_last[p_ra[q]]) n_raw_next++;
        for (int p = 0; p < 4; p++)
          if (p_wv[p] && !e_wc[p] && p_wa[p] == p_ra[q]) n_raw_same++;
      end
    end
    if (&p_wv && &p_rv && e_wc == 0 && e_rc == 0) n_full++;
    for (int a = 0; a < 512; a++) written_last[a] = 1'b0;
    for (int p = 0; p < 4; p++) begin
      if (e_wc[p]) n_wconf++;
      if (p_wv[p] && !e_wc[p]) begin
        ref_mem[p_wa[p]] = p_wd[p];
        written_last[p_wa[p]] = 1'b1;
        n_wr++;
      end
    end
  endtask

  // Apply a new set of requests (at the falling edge).
  task automatic issue(input logic [3:0] wv, input logic [3:0][8:0] wa, input logic [3:0][63:0] wd,
                       input logic [7:0] rv, input logic [7:0][8:0] ra);
    logic [7:0][63:0] prev_data;
    prev_data = rd_data;
    wr_valid = wv; wr_addr = wa; wr_data = wd;
    rd_req_valid = rv; rd_req_addr = ra;
    #1;
    // One clock of latency: new requests change nothing before the edge.
    check(rd_data == prev_data, "no answer before the clock edge");
    p_wv = wv; p_wa = wa; p_wd = wd; p_rv = rv; p_ra = ra;
  endtask

  function automatic logic [8:0] pick();
    if ($urandom_range(0, 1) == 0) return pool[$urandom_range(0, 7)];
    return 9'($urandom);
  endfunction

  initial begin
    logic [3:0] wv; logic [7:0] rv;
    logic [3:0][8:0] wa; logic [7:0][8:0] ra;
    logic [3:0][63:0] wd;
    for (int a = 0; a < 512; a++) written_last[a] = 1'b0;
    for (int i = 0; i < 8; i++) pool[i] = {2'd1, 2'd0, 1'(i / 4), 4'(i % 4)};

    // Reset with requests pending: nothing may be served.
    rst_n = 1'b0;
    wr_valid = '1; wr_addr = '0; wr_data = '1;
    rd_req_valid = '1; rd_req_addr = '0;
    repeat (2) @(posedge clk);
    #1;
    check(rd_valid == 0 && rd_conflict == 0 && wr_conflict == 0 && rd_data == 0, "reset");
    n_reset++;
    @(negedge clk);
    wr_valid = '0; rd_req_valid = '0;
    rst_n = 1'b1;
    p_wv = '0; p_rv = '0; p_wa = '0; p_ra = '0; p_wd = '0;

    // Phase 1: fill.
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      check_access();
      for (int p = 0; p < 4; p++) begin
        wa[p] = 9'(p * 128 + i);
        wd[p] = {$urandom, $urandom};
      end
      issue(4'hf, wa, wd, 8'h00, '0);
    end
    // Phase 2: random traffic.
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check_access();
      wv = 4'($urandom); rv = 8'($urandom);
      for (int p = 0; p < 4; p++) begin wa[p] = pick(); wd[p] = {$urandom, $urandom}; end
      for (int q = 0; q < 8; q++) ra[q] = pick();
      issue(wv, wa, wd, rv, ra);
    end
    // Phase 3: all 12 ports on 12 different sub-banks, twice, then read back.
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      check_access();
      for (int p = 0; p < 4; p++) begin
        wa[p] = {5'(p + 4 * k), 4'($urandom)};
        wd[p] = {$urandom, $urandom};
      end
      for (int q = 0; q < 8; q++) ra[q] = {5'(16 + q), 4'($urandom)};
      issue(4'hf, wa, wd, 8'hff, ra);
    end
    @(negedge clk);
    check_access();
    for (int q = 0; q < 8; q++) ra[q] = {5'(q), 4'($urandom)};
    issue(4'h0, wa, wd, 8'hff, ra);
    @(negedge clk);
    check_access();
    issue(4'h0, wa, wd, 8'h00, ra);
    @(negedge clk);
    check_access();

    $display("writes %0d reads %0d write-collisions %0d refused-reads %0d shared-reads %0d",
             n_wr, n_rd, n_wconf, n_rconf, n_share);
    $display("same-cycle read/write %0d read-after-write %0d full-port cycles %0d resets %0d",
             n_raw_same, n_raw_next, n_full, n_reset);
    check(n_wr > 0, "writes happened");
    check(n_rd > 0, "reads happened");
    check(n_wconf > 0, "write collision happened");
    check(n_rconf > 0, "refused read happened");
    check(n_share > 0, "shared read happened");
    check(n_raw_same > 0, "same-cycle read and write happened");
    check(n_raw_next > 0, "read after write happened");
    check(n_full > 0, "full 12-port cycle happened");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
