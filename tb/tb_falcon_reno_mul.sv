// Test of the RENO complex multiplier L10 (.) out1, including the most negative operand values: result against a 128-bit reference product rescaled by 2^-16, err low, three clock edges from start to done.
module tb_falcon_reno_mul;
  import saber_pkg::*;
  import falcon_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  int checks = 0, failures = 0;
  cfx_t l10, out1, out;
  function automatic cfx_t ref_mul(input cfx_t a, input cfx_t b);
    logic signed [127:0] re, im;
    cfx_t r;
    re = (128'(a.re) * 128'(b.re) - 128'(a.im) * 128'(b.im)) >>> 16;
    im = (128'(a.re) * 128'(b.im) + 128'(a.im) * 128'(b.re)) >>> 16;
    r.re = re[31:0];
    r.im = im[31:0];
    return r;
  endfunction
  falcon_reno_mul dut (.clk, .rst_n, .start, .busy, .done, .err, .l10, .out1, .out);
  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // random signed value of the given number of bits
  function automatic fx_t rnd(input int bits);
    logic [31:0] v;
    v = $urandom;
    return fx_t'($signed(v) >>> (32 - bits));
  endfunction

  function automatic cfx_t crnd(input int bits);
    cfx_t c;
    c.re = rnd(bits);
    c.im = rnd(bits);
    return c;
  endfunction

  task automatic run(output int lat);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 50) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      l10 = crnd(n % 4 == 0 ? 32 : 24); out1 = crnd(24);
      if (n == 7) begin l10.re = 32'sh8000_0000; out1.im = 32'sh8000_0000; end
      run(lat);
      check("L10 * out1", out == ref_mul(l10, out1));
      check("no error flagged", !err);
      // edges: operands taken, Norm result stored, compare -> done
      check("latency", lat == 3);
      check("idle after done", !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
