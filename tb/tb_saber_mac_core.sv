// Random test of the MAC core: acc + s*a mod 2^13 for sign-magnitude s,
// against integer arithmetic, with every magnitude 0..7 and both signs.
module tb_saber_mac_core;
  import saber_pkg::*;
  logic [12:0] acc_in, a, acc_out;
  sm4_t        s;
  int checks = 0, failures = 0;

  saber_mac_core dut (.acc_in(acc_in), .a(a), .s(s), .acc_out(acc_out));

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int sv;
      logic [12:0] expv;
      acc_in = 13'($urandom);
      a      = 13'($urandom);
      s.sign = n[0];
      s.mag  = 3'(n >> 1);
      sv     = s.sign ? -int'(s.mag) : int'(s.mag);
      expv   = 13'(int'(acc_in) + sv * int'(a));
      #1;
      checks++;
      if (acc_out !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL acc=%0d a=%0d s=%0d got %0d exp %0d", acc_in, a, sv, acc_out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
