// tb_write_mux: self-checking test of the 4:1 one-hot write multiplexer.
//
// For random 64-bit inputs it applies every one-hot select and the empty
// select, and compares the output with the selected input (or 0).
module tb_write_mux;
  logic [3:0] sel;
  logic [3:0][63:0] din;
  logic [63:0] dout;
  int checks = 0, failures = 0;

  write_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int p = 0; p < 4; p++) din[p] = {$urandom, $urandom};
      for (int s = -1; s < 4; s++) begin
        sel = (s < 0) ? 4'b0 : (4'b1 << s);
        #1;
        checks++;
        if (dout !== ((s < 0) ? 64'b0 : din[s])) begin
          failures++;
          $display("FAIL sel=%b dout=%h", sel, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
