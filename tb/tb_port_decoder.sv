// tb_port_decoder: self-checking test of the port address decoder.
//
// Drives random requests (valid and idle) at the default geometry and checks,
// one clock later, that bank, sub-bank and row selects are the one-hot
// codes of the address fields {bank[8:7], sub-bank[6:4], row[3:0]}, that an
// idle request selects nothing, that the decode appears exactly one clock
// after the request and not earlier, and that reset clears the selects.
module tb_port_decoder;
  logic clk = 1'b0;
  logic rst_n;
  logic req_valid;
  logic [8:0] req_addr;
  logic dec_valid;
  logic [3:0] dec_bank;
  logic [7:0] dec_sb;
  logic [15:0] dec_row;
  int checks = 0, failures = 0;

  port_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pv;
    logic [8:0] pa;
    logic prev_v = 1'b0;
    logic [15:0] prev_row = '0;
    rst_n = 1'b0;
    req_valid = 1'b1;
    req_addr = 9'h1ff;
    @(posedge clk); #1;
    check(!dec_valid && dec_bank == 0 && dec_sb == 0 && dec_row == 0, "reset clears selects");
    rst_n = 1'b1;
    req_valid = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < 400; i++) begin
      pv = ($urandom_range(0, 3) != 0);
      pa = 9'($urandom);
      req_valid = pv;
      req_addr = pa;
      #2;
      // Nothing changes before the clock edge: one clock of decode latency.
      check(dec_valid == prev_v && dec_row == prev_row, "no early decode");
      @(posedge clk); #1;
      check(dec_valid == pv, "valid follows request one clock later");
      check(dec_bank == (pv ? (4'b1 << pa[8:7]) : 4'b0), "bank one-hot");
      check(dec_sb == (pv ? (8'b1 << pa[6:4]) : 8'b0), "sub-bank one-hot");
      check(dec_row == (pv ? (16'b1 << pa[3:0]) : 16'b0), "row one-hot");
      prev_v = pv;
      prev_row = pv ? (16'b1 << pa[3:0]) : 16'b0;
    end
    // Latency: a request held for one cycle shows for exactly one cycle.
    req_valid = 1'b1; req_addr = 9'h0a5;
    @(posedge clk); #1;
    req_valid = 1'b0;
    check(dec_row == 16'h0020 && dec_sb == 8'h04 && dec_bank == 4'h2, "decode of 0x0a5");
    @(posedge clk); #1;
    check(!dec_valid && dec_row == 0, "decode gone after one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
