// Test of the data memory: random writes, then reads of every word with one
// cycle of latency, and a write and a read of the same word in one cycle
// (the read returns the old contents).
module tb_saber_data_mem;
  import saber_pkg::*;
  logic clk = 0, we = 0;
  logic [6:0]  waddr = '0, raddr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [63:0] model [128];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  saber_data_mem #(.DEPTH(128)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      we = 1; waddr = 7'(k); wdata = {$urandom, $urandom};
      model[k] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 128; k++) begin
      raddr = 7'(127 - k);
      @(negedge clk);
      checks++;
      if (rdata !== model[127 - k]) begin
        failures++;
        $display("FAIL word %0d", 127 - k);
      end
    end
    // read-during-write of the same word
    raddr = 7'd5; waddr = 7'd5; we = 1; wdata = ~model[5];
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== model[5]) failures++;
    @(negedge clk);
    checks++;
    if (rdata !== ~model[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
