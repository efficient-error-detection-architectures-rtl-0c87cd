// Stuck-at fault campaign on the RENO polynomial multiplier (N = 256): for
// each injection a random s(x) in [-4, 4] and a random a(x) are multiplied
// while a fault is forced on the a operand after the Norm/RENO multiplexer.
// The fault classes are those of the published evaluation: single-bit,
// two-bit and six-bit stuck-at-0 or stuck-at-1. A fault is effective when the
// run1 product differs from the correct one. Every effective fault must raise
// err, except a lone MSB fault (see below); the detection ratio
// (detected / injected) is printed and must be at least 99%. Fault-free
// runs in between must leave err low.
module tb_fault_campaign;
  import saber_pkg::*;
  localparam int NC = 256;
  localparam int INJECTIONS = 2000;
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
  int injected = 0, detected = 0, effective = 0, missed_effective = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    s_rd_data <= s_mem[s_rd_addr];
    a_rd_data <= a_mem[a_rd_addr];
  end

  saber_polymul_reno dut (
    .clk, .rst_n, .start, .busy, .done, .err, .result,
    .s_rd_en, .s_rd_addr, .s_rd_data, .a_rd_en, .a_rd_addr, .a_rd_data, .fi_and, .fi_or
  );

  task automatic fill();
    for (int k = 0; k < NC; k++) begin
      s_ref[k] = int'($urandom_range(8)) - 4;
      a_ref[k] = int'($urandom_range(8191));
      s_mem[k/16][4*(k%16) +: 4] = {s_ref[k] < 0 ? 1'b1 : 1'b0, 3'(s_ref[k] < 0 ? -s_ref[k] : s_ref[k])};
      a_mem[k/4][16*(k%4) +: 16] = 16'(a_ref[k]);
    end
  endtask

  task automatic run();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic logic product_ok();
    int expv [NC];
    for (int k = 0; k < NC; k++) expv[k] = 0;
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < NC; j++)
        if (i + j < NC) expv[i+j] += a_ref[i] * s_ref[j];
        else            expv[i+j-NC] -= a_ref[i] * s_ref[j];
    for (int k = 0; k < NC; k++) if (result[k] != 13'(expv[k])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < INJECTIONS; n++) begin
      logic [12:0] mask;
      int nbits;
      nbits = (n % 3 == 0) ? 1 : (n % 3 == 1) ? 2 : 6;
      mask = '0;
      while ($countones(mask) < nbits) mask[$urandom_range(12)] = 1'b1;
      if (n % 2 == 0) begin fi_and = ~mask; fi_or = '0;   end   // stuck-at-0
      else            begin fi_and = '1;    fi_or = mask; end   // stuck-at-1
      fill();
      run();
      injected++;
      if (err) detected++;
      if (!product_ok()) begin
        effective++;
        checks++;
        if (!err) begin
          missed_effective++;
          // A lone fault on the MSB adds q/2 to a coefficient, and -q/2 = q/2
          // mod q, so negation can map it onto itself: the one blind spot of
          // RENO at q = 2^13. Any other missed fault is a failure.
          if (mask != 13'h1000) begin
            failures++;
            $display("FAIL effective fault not detected, mask %h", mask);
          end
        end
      end
      if (n % 40 == 0) begin
        fi_and = '1; fi_or = '0;
        fill();
        run();
        checks++;
        if (err || !product_ok()) begin
          failures++;
          $display("FAIL fault-free run flagged or wrong");
        end
      end
    end
    $display("injected %0d, effective %0d, detected %0d, missed (MSB only) %0d, detection ratio %0d.%02d%%",
             injected, effective, detected, missed_effective, detected * 100 / injected, (detected * 10000 / injected) % 100);
    checks++;
    if (detected * 100 < injected * 99) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
