// Test of the binomial sampler (MU = 8): random 64-bit word pairs go in, the
// 16 sign-magnitude samples coming out are checked against HW(lo) - HW(hi) of
// each byte of the 128-bit buffer, err must stay low, and out_valid must come
// exactly two cycles after the second word is taken (Norm + RESwO cycle).
// A second instance with MU = 10 (LightSABER) gets the same words and must
// give 12 samples in [-5, 5] from the low 120 bits of the buffer.
module tb_binomial_sampler;
  import saber_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, err;
  logic [63:0] in_word = '0, out_word;
  int checks = 0, failures = 0;

  logic out_valid10, err10, in_ready10;
  logic [63:0] out_word10;

  always #5 clk = ~clk;

  binomial_sampler #(.MU(10)) dut10 (
    .clk, .rst_n, .in_valid, .in_ready(in_ready10), .in_word,
    .out_valid(out_valid10), .out_word(out_word10), .err(err10)
  );

  function automatic logic [3:0] ref_sample10(input logic [9:0] v);
    int d;
    d = $countones(v[4:0]) - $countones(v[9:5]);
    return {d < 0 ? 1'b1 : 1'b0, 3'(d < 0 ? -d : d)};
  endfunction

  binomial_sampler #(.MU(8)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_word, .out_valid, .out_word, .err
  );

  function automatic logic [3:0] ref_sample(input logic [7:0] v);
    int d;
    d = $countones(v[3:0]) - $countones(v[7:4]);
    return {d < 0 ? 1'b1 : 1'b0, 3'(d < 0 ? -d : d)};
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [127:0] buf_v;
      logic [63:0]  expw;
      int lat;
      buf_v = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      check("ready0", in_ready);
      in_valid = 1; in_word = buf_v[63:0];
      @(negedge clk);
      check("ready1", in_ready);
      in_word = buf_v[127:64];
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      for (int k = 0; k < 16; k++) expw[4*k +: 4] = ref_sample(buf_v[8*k +: 8]);
      check("samples", out_word == expw);
      expw = '0;
      for (int k = 0; k < 12; k++) expw[4*k +: 4] = ref_sample10(buf_v[10*k +: 10]);
      check("LightSABER samples", out_valid10 && out_word10 == expw && !err10);
      check("no error flagged", !err);
      // edges: second word taken, Norm result stored, RESwO compare -> out_valid
      check("latency", lat == 3);
      if (out_word != expw) $display("  got %h exp %h", out_word, expw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
