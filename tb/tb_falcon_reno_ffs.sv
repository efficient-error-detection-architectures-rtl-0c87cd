// Test of the RENO ffSampling step t0' = t0 + (t1 - z1) (.) L10: random complex fixed-point operands, result against a 128-bit reference, err low, three clock edges from start to done.
module tb_falcon_reno_ffs;
  import saber_pkg::*;
  import falcon_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  int checks = 0, failures = 0;
  cfx_t t0, t1, z1, l10, out;
  function automatic cfx_t ref_mac(input cfx_t t, input cfx_t a, input cfx_t b);
    logic signed [127:0] re, im;
    cfx_t r;
    re = (128'(a.re) * 128'(b.re) - 128'(a.im) * 128'(b.im) + (128'(t.re) <<< 16)) >>> 16;
    im = (128'(a.re) * 128'(b.im) + 128'(a.im) * 128'(b.re) + (128'(t.im) <<< 16)) >>> 16;
    r.re = re[31:0];
    r.im = im[31:0];
    return r;
  endfunction
  falcon_reno_ffs dut (.clk, .rst_n, .start, .busy, .done, .err, .t0, .t1, .z1, .l10, .out);
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
      cfx_t d;
      t0 = crnd(28); t1 = crnd(24); z1 = crnd(24); l10 = crnd(20);
      d.re = t1.re - z1.re; d.im = t1.im - z1.im;
      run(lat);
      check("t0 + (t1 - z1) * L10", out == ref_mac(t0, l10, d));
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
