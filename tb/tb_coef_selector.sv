// Test of the coefficient selector: slot extraction and modular negation.
module tb_coef_selector;
  import saber_pkg::*;
  logic [63:0] word;
  logic [1:0]  idx;
  rc_sel_t     sel;
  logic [12:0] coef;
  int checks = 0, failures = 0;

  coef_selector dut (.word(word), .idx(idx), .sel(sel), .coef(coef));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [12:0] raw, expv;
      word = {$urandom, $urandom};
      idx  = 2'(n);
      sel  = rc_sel_t'(n[2]);
      raw  = 13'(word >> (16 * idx));
      expv = (sel == RECOMP) ? 13'((8192 - int'(raw)) % 8192) : raw;
      #1;
      checks++;
      if (coef !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL idx=%0d sel=%0d got %0d exp %0d", idx, sel, coef, expv);
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
