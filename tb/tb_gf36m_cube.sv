// tb_gf36m_cube: self-checking test of GF(3^6m) cubing (M = 97) against a*a*a computed
// with the reference GF(3^6m) product. r, r^2 and random elements are used.
module tb_gf36m_cube;
  import gf_ref_pkg::*;

  f6_t a, c;
  int  checks = 0, failures = 0;

  gf36m_cube dut (.a, .c);

  task automatic check();
    #1;
    checks++;
    if (c !== r_cube6(a)) begin
      failures++;
      $display("FAIL cube6 a=%h got %h", a, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; a[1][0][0] = 2'b01; check();
    a = '0; a[2][0][0] = 2'b01; check();
    a = '0; a[2][1][0] = 2'b10; check();
    repeat (30) begin
      a = rnd_f6();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
