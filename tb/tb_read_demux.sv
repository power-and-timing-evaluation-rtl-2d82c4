// tb_read_demux: self-checking test of the 1:8 read demultiplexer.
//
// Applies random data and random enable patterns (including several enables
// at once) and checks that every enabled bus carries the data and every
// other bus carries 0.
module tb_read_demux;
  logic [7:0] en;
  logic [63:0] din;
  logic [7:0][63:0] dout;
  int checks = 0, failures = 0;

  read_demux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      din = {$urandom, $urandom};
      en = (i < 8) ? (8'b1 << i) : 8'($urandom);
      #1;
      for (int q = 0; q < 8; q++) begin
        checks++;
        if (dout[q] !== (en[q] ? din : 64'b0)) begin
          failures++;
          $display("FAIL en=%b bus %0d = %h", en, q, dout[q]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
