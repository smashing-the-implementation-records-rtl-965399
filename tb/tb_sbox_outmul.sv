// tb_sbox_outmul: exhaustive test of the two shared output multipliers.
// For all 4096 (a, b, e) the 5-bit redundant results are expanded to GF(2^8)
// and compared with b*e and a*e computed there.
module tb_sbox_outmul;
  import sbox_pkg::*;
  import sbox_ref_pkg::*;

  localparam int WATCHDOG = 10000;
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

  gf16_t   a, b, e;
  shared_t sh;
  gf16r_t  w, z;

  sbox_outmul dut (.a(a), .b(b), .sh(sh), .e(e), .w(w), .z(z));

  initial begin
    a = '0; b = '0; e = '0; sh = '0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      a = 4'(i); b = 4'(i >> 4); e = 4'(i >> 8);
      sh.a = pairs(a); sh.b = pairs(b);
      #1;
      check(red(w) == gmul(nb(b), nb(e)), $sformatf("b=%h e=%h w=%b", b, e, w));
      check(red(z) == gmul(nb(a), nb(e)), $sformatf("a=%h e=%h z=%b", a, e, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
