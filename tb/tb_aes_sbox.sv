// tb_aes_sbox: end-to-end test of the S-box in both formulations.
// Drives all 256 input bytes into a lightweight (default) and a fast instance
// and compares both with the S-box computed from GF(2^8) inversion and the
// affine map; also checks a few published AES table entries. The output must
// be valid in the same cycle the input is applied (the design has no
// registers). Counts how often each formulation and the zero input, which the
// inversion maps to zero, were exercised, and fails if one never was.
module tb_aes_sbox;
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
  logic [7:0] g, s_lw, s_fast;
  int n_lw = 0, n_fast = 0, n_zero = 0, n_known = 0;

  aes_sbox                 dut_lw   (.g(g), .s(s_lw));
  aes_sbox #(.FAST(1'b1))  dut_fast (.g(g), .s(s_fast));

  // A few entries of the published AES S-box table.
  function automatic logic [7:0] known(logic [7:0] x, output bit hit);
    hit = 1'b1;
    case (x)
      8'h00: return 8'h63;
      8'h01: return 8'h7C;
      8'h53: return 8'hED;
      8'h10: return 8'hCA;
      8'hFF: return 8'h16;
      8'hC9: return 8'hDD;
      default: begin hit = 1'b0; return 8'h00; end
    endcase
  endfunction

  initial begin
    logic [7:0] want, k;
    bit hit;
    g = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      g = 8'(i);
      #1;  // same cycle: purely combinational
      want = sbox(g);
      check(s_lw == want, $sformatf("lightweight g=%02h s=%02h want %02h", g, s_lw, want));
      n_lw++;
      check(s_fast == want, $sformatf("fast g=%02h s=%02h want %02h", g, s_fast, want));
      n_fast++;
      k = known(g, hit);
      if (hit) begin
        check(s_lw == k && s_fast == k, $sformatf("table entry g=%02h", g));
        n_known++;
      end
      if (g == 0) n_zero++;
    end
    $display("exercised: lightweight=%0d fast=%0d zero_input=%0d table_entries=%0d",
             n_lw, n_fast, n_zero, n_known);
    check(n_lw > 0,   "lightweight form never exercised");
    check(n_fast > 0, "fast form never exercised");
    check(n_zero > 0, "zero input never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
