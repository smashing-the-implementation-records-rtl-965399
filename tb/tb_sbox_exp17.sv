// tb_sbox_exp17: exhaustive test of the x^17 stage, both forms.
// For all 256 (a, b) it compares d with (a*Y + b*Y^16)^17 computed in GF(2^8);
// the fast instance must deliver the complement of the same value.
module tb_sbox_exp17;
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

  gf16_t   a, b, d_lw, d_fast;
  shared_t sh;

  sbox_exp17 #(.INV_OUT(1'b0)) dut_lw   (.a(a), .b(b), .sh(sh), .d(d_lw));
  sbox_exp17 #(.INV_OUT(1'b1)) dut_fast (.a(a), .b(b), .sh(sh), .d(d_fast));

  initial begin
    logic [7:0] want;
    a = '0; b = '0; sh = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 4'(i); b = 4'(i >> 4);
      sh.a = pairs(a); sh.b = pairs(b);
      #1;
      want = gpow(compose(nb(a), nb(b)), 17);
      check(nb(d_lw) == want, $sformatf("a=%h b=%h d=%h want %02h", a, b, d_lw, want));
      check(nb(~d_fast) == want, $sformatf("fast a=%h b=%h d'=%h want %02h", a, b, d_fast, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
