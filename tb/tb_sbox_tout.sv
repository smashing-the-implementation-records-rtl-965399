// tb_sbox_tout: exhaustive test of the output matrix.
// For all 1024 (w, z) it checks s = affine(W*Y + Z*Y^16), with the 5-bit
// redundant halves expanded in GF(2^8) and the AES affine map (constant
// included) applied there.
module tb_sbox_tout;
  import sbox_pkg::*;
  import sbox_ref_pkg::*;

  localparam int WATCHDOG = 3000;
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

  gf16r_t     w, z;
  logic [7:0] s;

  sbox_tout dut (.w(w), .z(z), .s(s));

  initial begin
    logic [7:0] want;
    w = '0; z = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      w = 5'(i); z = 5'(i >> 5);
      #1;
      want = affine(compose(red(w), red(z)));
      check(s == want, $sformatf("w=%b z=%b s=%02h want %02h", w, z, s, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
