// tb_sbox_cfinv: exhaustive test of the composite-field inverter, both forms.
// For all 256 (a, b) it checks W*Y + Z*Y^16 = (a*Y + b*Y^16)^-1 in GF(2^8).
module tb_sbox_cfinv;
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

  gf16_t   a, b;
  shared_t sh;
  gf16r_t  w_lw, z_lw, w_fast, z_fast;

  sbox_cfinv #(.FAST(1'b0)) dut_lw   (.a(a), .b(b), .sh(sh), .w(w_lw),   .z(z_lw));
  sbox_cfinv #(.FAST(1'b1)) dut_fast (.a(a), .b(b), .sh(sh), .w(w_fast), .z(z_fast));

  initial begin
    logic [7:0] want;
    a = '0; b = '0; sh = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 4'(i); b = 4'(i >> 4);
      sh.a = pairs(a); sh.b = pairs(b);
      #1;
      want = ginv(compose(nb(a), nb(b)));
      check(compose(red(w_lw), red(z_lw)) == want, $sformatf("a=%h b=%h", a, b));
      check(compose(red(w_fast), red(z_fast)) == want, $sformatf("fast a=%h b=%h", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
