// tb_gf3m_mul_lse: self-checking test of the serial GF(3^97) multiplier.
// Random products, plus 1*b, a*0 and x^96*x^96, are compared with the reference. The
// latency is checked too: done must rise exactly M cycles after the start cycle, and
// busy must be high in between.
module tb_gf3m_mul_lse;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fm_t  a, b, c;
  logic busy, done;
  int   checks = 0, failures = 0;

  gf3m_mul_lse dut (.clk, .rst_n, .start, .a, .b, .c, .busy, .done);

  always #5 clk = ~clk;

  task automatic run(fm_t ta, fm_t tb);
    int lat;
    @(negedge clk);
    a = ta; b = tb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = rnd_fm(); b = rnd_fm();  // operands only matter in the start cycle
    lat = 1;
    while (!done && lat < 3 * M) begin
      if (!busy) begin
        failures++;
        $display("FAIL busy low at cycle %0d", lat);
      end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != M) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, M);
    end
    checks++;
    if (c !== r_mul(ta, tb)) begin
      failures++;
      $display("FAIL mul a=%h b=%h got %h", ta, tb, c);
    end
  endtask

  initial begin
    repeat (200 * (M + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fm_t one, xt;
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one = '0; one[0] = 2'b01;
    xt = '0; xt[M-1] = 2'b10;
    run(one, rnd_fm());
    run(rnd_fm(), '0);
    run(xt, xt);
    repeat (40) run(rnd_fm(), rnd_fm());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
