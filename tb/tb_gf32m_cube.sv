// tb_gf32m_cube: self-checking test of GF(3^2m) cubing (M = 97) against a*a*a computed
// with the reference GF(3^2m) product.
module tb_gf32m_cube;
  import gf_ref_pkg::*;

  f2_t a, c;
  int  checks = 0, failures = 0;

  gf32m_cube dut (.a, .c);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60) begin
      a[0] = rnd_fm();
      a[1] = rnd_fm();
      #1;
      checks++;
      if (c !== r_mul2(r_mul2(a, a), a)) begin
        failures++;
        $display("FAIL cube2 a=%h got %h", a, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
