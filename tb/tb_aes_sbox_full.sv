// tb_aes_sbox_full: the S-box at its default configuration, as delivered.
// One instance with no parameter overrides, all 256 inputs, each compared with
// the S-box computed from GF(2^8) inversion and the AES affine map.
module tb_aes_sbox_full;
  import sbox_ref_pkg::*;

  localparam int WATCHDOG = 2000;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // Watchdog: the exhaustive sweep needs far fewer cycles than this.
  initial begin
    wait (cycles == WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask
  logic [7:0] g, s;

  aes_sbox dut (.g(g), .s(s));

  initial begin
    g = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      g = 8'(i);
      #1;
      check(s == sbox(g), $sformatf("g=%02h s=%02h want %02h", g, s, sbox(g)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
