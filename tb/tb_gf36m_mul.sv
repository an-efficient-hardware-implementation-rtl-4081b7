// tb_gf36m_mul: self-checking test of the GF(3^6m) Karatsuba multiplier (M = 97).
// Random products are compared with a schoolbook product over GF(3^2m) reduced by
// r^3 = r + 1. Multiplication by 1 and by r^2 (which exercises both reduction rules) are
// included; the latency of M cycles is checked.
module tb_gf36m_mul;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  f6_t  a, b, c;
  logic busy, done;
  int   checks = 0, failures = 0;

  gf36m_mul dut (.clk, .rst_n, .start, .a, .b, .c, .busy, .done);

  always #5 clk = ~clk;

  task automatic run(f6_t ta, f6_t tb);
    int lat;
    @(negedge clk);
    a = ta; b = tb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0;
    lat = 1;
    while (!done && lat < 3 * M) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != M) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    checks++;
    if (c !== r_mul6(ta, tb)) begin
      failures++;
      $display("FAIL mul6 got %h", c);
    end
  endtask

  initial begin
    repeat (100 * (M + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f6_t one, rr;
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one = '0; one[0][0][0] = 2'b01;
    rr  = '0; rr[2][0][0]  = 2'b01;
    run(one, rnd_f6());
    run(rr, rnd_f6());
    run(rr, rr);
    repeat (12) run(rnd_f6(), rnd_f6());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
