// Exhaustive test of one binomial sampler lane (MU = 8): every 8-bit input in
// both the Norm and the RESwO cycle must give the sign-magnitude form of
// HW(r[3:0]) - HW(r[7:4]), zero always with a positive sign.
module tb_cbd_lane;
  import saber_pkg::*;
  logic [7:0] r;
  rc_sel_t    sel;
  sm4_t       sample;
  int checks = 0, failures = 0;

  cbd_lane #(.MU(8)) dut (.r(r), .sel(sel), .sample(sample));

  function automatic sm4_t ref_sample(input logic [7:0] v);
    int d;
    sm4_t s;
    d = $countones(v[3:0]) - $countones(v[7:4]);
    s.sign = (d < 0);
    s.mag  = 3'(d < 0 ? -d : d);
    return s;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int m = 0; m < 2; m++) begin
        r   = 8'(v);
        sel = rc_sel_t'(m);
        #1;
        checks++;
        if (sample !== ref_sample(r)) begin
          failures++;
          $display("FAIL r=%h sel=%0d got %b exp %b", r, m, sample, ref_sample(r));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
