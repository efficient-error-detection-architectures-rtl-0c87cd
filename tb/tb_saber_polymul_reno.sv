// Test of the RENO polynomial multiplier at full size (N = 256, q = 2^13).
// Random secrets in [-4, 4] (and once in [-5, 5], LightSABER) and random a(x) are placed in two memory models
// (one cycle read latency). Each product is checked coefficient by coefficient
// against a negacyclic schoolbook product computed here; err must stay low
// without faults, and done must come S_WORDS + 2N + 5 clock edges after start
// (load, run1, run2, compare). Then stuck-at faults are forced onto the a
// operand (LSB stuck-at-0, two bits stuck-at-1, six bits stuck-at-0) and err
// must rise each time.
module tb_saber_polymul_reno;
  import saber_pkg::*;
  localparam int NC = 256;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err, s_rd_en, a_rd_en;
  logic [12:0] result [NC];
  logic [3:0]  s_rd_addr;
  logic [5:0]  a_rd_addr;
  logic [63:0] s_rd_data, a_rd_data;
  logic [12:0] fi_and = '1, fi_or = '0;
  logic [63:0] s_mem [NC/16];
  logic [63:0] a_mem [NC/4];
  int   s_ref [NC];
  int   a_ref [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    s_rd_data <= s_mem[s_rd_addr];
    a_rd_data <= a_mem[a_rd_addr];
  end

  saber_polymul_reno dut (
    .clk, .rst_n, .start, .busy, .done, .err, .result,
    .s_rd_en, .s_rd_addr, .s_rd_data, .a_rd_en, .a_rd_addr, .a_rd_data, .fi_and, .fi_or
  );

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic fill(input int bound = 4);
    for (int k = 0; k < NC; k++) begin
      s_ref[k] = int'($urandom_range(2 * bound)) - bound;
      a_ref[k] = int'($urandom_range(8191));
      s_mem[k/16][4*(k%16) +: 4] = {s_ref[k] < 0 ? 1'b1 : 1'b0, 3'(s_ref[k] < 0 ? -s_ref[k] : s_ref[k])};
      a_mem[k/4][16*(k%4) +: 16] = 16'(a_ref[k]);
    end
  endtask

  task automatic run(output int lat);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 2000) begin
      @(negedge clk);
      lat++;
    end
  endtask

  task automatic check_product();
    int expv [NC];
    int bad = 0;
    for (int k = 0; k < NC; k++) expv[k] = 0;
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < NC; j++)
        if (i + j < NC) expv[i+j] += a_ref[i] * s_ref[j];
        else            expv[i+j-NC] -= a_ref[i] * s_ref[j];
    for (int k = 0; k < NC; k++)
      if (result[k] != 13'(expv[k])) bad++;
    check("product", bad == 0);
    if (bad != 0) $display("  %0d coefficients wrong, c0 got %0d exp %0d", bad, result[0], 13'(expv[0]));
  endtask

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      fill();
      run(lat);
      check_product();
      check("no error flagged", !err);
      check("latency", lat == NC/16 + 2*NC + 5);
      if (lat != NC/16 + 2*NC + 5) $display("  latency %0d", lat);
    end
    // LightSABER secrets, in [-5, 5]
    fill(5); run(lat);
    check_product();
    check("no error flagged, LightSABER secret", !err);
    // stuck-at fault campaign on the a operand
    fi_and = 13'h1ffe;                 // LSB stuck-at-0
    fill(); run(lat);
    check("LSB stuck-at-0 detected", err);
    fi_and = '1; fi_or = 13'h0110;    // two bits stuck-at-1
    fill(); run(lat);
    check("two-bit stuck-at-1 detected", err);
    fi_and = 13'h1f81; fi_or = '0;    // six bits stuck-at-0
    fill(); run(lat);
    check("six-bit stuck-at-0 detected", err);
    fi_and = '1;
    fill(); run(lat);
    check("fault removed, no error", !err);
    check_product();
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
