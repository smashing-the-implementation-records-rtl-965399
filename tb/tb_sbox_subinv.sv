// tb_sbox_subinv: exhaustive test of the GF(2^4) inverter, both forms.
// Checks d * e = 1 in GF(2^8) for every nonzero d and e = 0 for d = 0; the
// fast instance gets the complemented input.
module tb_sbox_subinv;
  import sbox_pkg::*;
  import sbox_ref_pkg::*;

  localparam int WATCHDOG = 200;
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

  gf16_t d, dn, e_lw, e_fast;

  assign dn = ~d;
  sbox_subinv #(.INV_IN(1'b0)) dut_lw   (.d(d),  .e(e_lw));
  sbox_subinv #(.INV_IN(1'b1)) dut_fast (.d(dn), .e(e_fast));

  initial begin
    d = '0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      d = 4'(i);
      #1;
      if (d == 0) begin
        check(e_lw == 0, "inverse of 0");
        check(e_fast == 0, "fast inverse of 0");
      end else begin
        check(gmul(nb(d), nb(e_lw)) == 8'h01, $sformatf("d=%h e=%h", d, e_lw));
        check(gmul(nb(d), nb(e_fast)) == 8'h01, $sformatf("fast d=%h e=%h", d, e_fast));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
