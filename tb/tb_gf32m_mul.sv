// tb_gf32m_mul: self-checking test of the GF(3^2m) multiplier (M = 97).
// Random products are compared with (a0 b0 - a1 b1) + (a0 b1 + a1 b0) s computed by the
// reference, and the latency of M cycles from start to done is checked.
module tb_gf32m_mul;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  f2_t  a, b, c;
  logic busy, done;
  int   checks = 0, failures = 0;

  gf32m_mul dut (.clk, .rst_n, .start, .a, .b, .c, .busy, .done);

  always #5 clk = ~clk;

  task automatic run(f2_t ta, f2_t tb);
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
    if (c !== r_mul2(ta, tb)) begin
      failures++;
      $display("FAIL mul2 got %h", c);
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
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (25) begin
      f2_t ta, tb;
      ta[0] = rnd_fm(); ta[1] = rnd_fm();
      tb[0] = rnd_fm(); tb[1] = rnd_fm();
      run(ta, tb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
