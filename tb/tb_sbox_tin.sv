// tb_sbox_tin: exhaustive test of the input matrix.
// For all 256 bytes g it rebuilds g from the outputs, g = a*Y + b*Y^16 with the
// subfield coordinates expanded over beta, using field arithmetic only, and
// checks that the twelve shared outputs are the pairwise sums of a and b.
module tb_sbox_tin;
  import sbox_pkg::*;
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

  logic [7:0] g;
  gf16_t      a, b;
  shared_t    sh;

  sbox_tin dut (.g(g), .a(a), .b(b), .sh(sh));

  initial begin
    g = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      g = 8'(i);
      #1;
      check(compose(nb(a), nb(b)) == g, $sformatf("g=%02h a=%h b=%h", g, a, b));
      check(sh.a == pairs(a), $sformatf("g=%02h a_ij=%b", g, sh.a));
      check(sh.b == pairs(b), $sformatf("g=%02h b_ij=%b", g, sh.b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
