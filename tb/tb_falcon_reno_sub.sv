// Test of the RENO subtractor t1 - z1: random complex fixed-point operands, result against integer subtraction, err low, three clock edges from start to done.
module tb_falcon_reno_sub;
  import saber_pkg::*;
  import falcon_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  int checks = 0, failures = 0;
  cfx_t t1, z1, out;
  falcon_reno_sub dut (.clk, .rst_n, .start, .busy, .done, .err, .t1, .z1, .out);
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
      cfx_t e;
      int bits;
      bits = (n % 4 == 0) ? 32 : 24;
      t1 = crnd(bits); z1 = crnd(bits);
      e.re = t1.re - z1.re; e.im = t1.im - z1.im;
      run(lat);
      check("t1 - z1", out == e);
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
