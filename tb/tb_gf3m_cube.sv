// tb_gf3m_cube: self-checking test of the GF(3^97) cubing circuit.
// Checks single-digit inputs x^i for every i (which exercise each fold of the reduction
// on its own) and random elements against the reference a*a*a mod x^97 + x^16 + 2.
module tb_gf3m_cube;
  import gf_ref_pkg::*;

  fm_t a, c;
  int  checks = 0, failures = 0;

  gf3m_cube dut (.a, .c);

  task automatic check();
    #1;
    checks++;
    if (c !== r_cube(a)) begin
      failures++;
      $display("FAIL cube a=%h got %h", a, c);
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
    for (int i = 0; i < M; i++) begin
      a = '0;
      a[i] = (i % 2) ? 2'b10 : 2'b01;
      check();
    end
    repeat (100) begin
      a = rnd_fm();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
