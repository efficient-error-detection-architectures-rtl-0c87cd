// Test of the RENO matrix-vector accelerator at full size (N = 256, L = 3).
// A random row of A and a random secret vector in [-4, 4] (sign-extended to
// 13 bits) sit in two memory models. The result must equal
// sum_j A_ij * s_j + h mod (x^256 + 1, 2^13), computed here; err must stay low
// and done must come L*2*(N/4 + N + 2) + 2 clock edges after start. Stuck-at
// faults forced onto the A operand must raise err.
module tb_saber_accel_reno;
  import saber_pkg::*;
  localparam int NC = 256;
  localparam int LL = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  logic [12:0] result [NC];
  logic [7:0]  s_rd_addr, a_rd_addr;
  logic [63:0] s_rd_data, a_rd_data;
  logic [12:0] fi_and = '1, fi_or = '0;
  logic [63:0] s_mem [LL*NC/4];
  logic [63:0] a_mem [LL*NC/4];
  int   s_ref [LL][NC];
  int   a_ref [LL][NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    s_rd_data <= s_mem[s_rd_addr];
    a_rd_data <= a_mem[a_rd_addr];
  end

  saber_accel_reno dut (
    .clk, .rst_n, .start, .busy, .done, .err, .result,
    .s_rd_addr, .s_rd_data, .a_rd_addr, .a_rd_data, .fi_and, .fi_or
  );

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic fill();
    for (int j = 0; j < LL; j++)
      for (int k = 0; k < NC; k++) begin
        s_ref[j][k] = int'($urandom_range(8)) - 4;
        a_ref[j][k] = int'($urandom_range(8191));
        s_mem[j*NC/4 + k/4][16*(k%4) +: 16] = 16'(13'(s_ref[j][k]));
        a_mem[j*NC/4 + k/4][16*(k%4) +: 16] = 16'(a_ref[j][k]);
      end
  endtask

  task automatic run(output int lat);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 5000) begin
      @(negedge clk);
      lat++;
    end
  endtask

  task automatic check_row();
    int expv [NC];
    int bad = 0;
    for (int k = 0; k < NC; k++) expv[k] = 4;   // h
    for (int j = 0; j < LL; j++)
      for (int i = 0; i < NC; i++)
        for (int m = 0; m < NC; m++)
          if (i + m < NC) expv[i+m]    += a_ref[j][i] * s_ref[j][m];
          else            expv[i+m-NC] -= a_ref[j][i] * s_ref[j][m];
    for (int k = 0; k < NC; k++)
      if (result[k] != 13'(expv[k])) bad++;
    check("row of b'", bad == 0);
    if (bad != 0) $display("  %0d coefficients wrong, c0 got %0d exp %0d", bad, result[0], 13'(expv[0]));
  endtask

  initial begin
    int lat;
    int exp_lat;
    exp_lat = LL * 2 * (NC/4 + NC + 2) + 2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2; n++) begin
      fill();
      run(lat);
      check_row();
      check("no error flagged", !err);
      check("latency", lat == exp_lat);
      if (lat != exp_lat) $display("  latency %0d exp %0d", lat, exp_lat);
    end
    fi_and = 13'h1ffe;
    fill(); run(lat);
    check("LSB stuck-at-0 detected", err);
    fi_and = '1; fi_or = 13'h0021;
    fill(); run(lat);
    check("two-bit stuck-at-1 detected", err);
    fi_or = '0;
    fill(); run(lat);
    check("fault removed, no error", !err);
    check_row();
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
