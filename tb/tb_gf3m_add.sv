// tb_gf3m_add: self-checking test of the GF(3^m) adder/subtractor at M = 97.
// All nine digit pairs are placed in every digit position once, then random vectors
// follow; sums and differences are checked against integer arithmetic mod 3.
module tb_gf3m_add;
  import gf_ref_pkg::*;

  fm_t a, b, sum, diff;
  int  checks = 0, failures = 0;

  gf3m_add #(.M(M))             dut_add (.a, .b, .c(sum));
  gf3m_add #(.M(M), .SUB(1'b1)) dut_sub (.a, .b, .c(diff));

  task automatic check();
    #1;
    checks++;
    if (sum !== r_add(a, b)) begin
      failures++;
      $display("FAIL add a=%h b=%h got %h", a, b, sum);
    end
    checks++;
    if (diff !== r_sub(a, b)) begin
      failures++;
      $display("FAIL sub a=%h b=%h got %h", a, b, diff);
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
    for (int s = 0; s < 9; s++) begin
      for (int i = 0; i < M; i++) begin
        a[i] = enc((i + s) % 3);
        b[i] = enc(((i + s) / 3) % 3);
      end
      check();
    end
    repeat (200) begin
      a = rnd_fm();
      b = rnd_fm();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
