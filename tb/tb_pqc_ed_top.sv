// End-to-end test of the whole design at its default size (N = 256, MU = 8,
// L = 3). SABER hardware path: the host writes a random a(x) into the data
// memory while 32 random words stream into the binomial sampler, whose 16
// output words land in the same memory (host writes must wait while the
// sampler writes). The multiplier then computes s(x) * a(x); the secret is
// rebuilt here from the random words and the product computed here. A stuck-at
// fault injected on the multiplier's operand must raise its error flag. The
// HW/SW accelerator computes one row of A s' + h from memory models here, with
// and without an injected fault. Each Falcon, ModFalcon and SamplerZ unit runs
// on random operands against a reference computed here. Every mechanism (RESwO
// comparison, host write stall, negacyclic run pair, fault detection of both
// SABER multipliers, each Falcon unit) is counted and must occur.
module tb_pqc_ed_top;
  import saber_pkg::*;
  import falcon_pkg::*;
  localparam int NC = 256;
  localparam int LL = 3;

  logic clk = 0, rst_n = 0;
  logic rnd_valid = 0, rnd_ready, smp_valid, smp_err;
  logic [63:0] rnd_word = '0;
  logic host_we = 0, host_wready;
  logic [6:0]  host_waddr = '0;
  logic [63:0] host_wdata = '0;
  logic pm_start = 0, pm_busy, pm_done, pm_err;
  logic [12:0] pm_result [NC];
  logic [12:0] pm_fi_and = '1, pm_fi_or = '0;
  logic acc_start = 0, acc_busy, acc_done, acc_err;
  logic [12:0] acc_result [NC];
  logic [7:0]  acc_s_rd_addr, acc_a_rd_addr;
  logic [63:0] acc_s_rd_data, acc_a_rd_data;
  logic [12:0] acc_fi_and = '1, acc_fi_or = '0;
  cfx_t f_t0, f_t1, f_z1, f_l10, f_out1;
  logic [4:0] f_start = '0, f_busy, f_done, f_err;
  cfx_t f_sub_out, f_reswo_out, f_renomul_out, f_mac_out, f_ffs_out;
  logic mf_start = 0, mf_busy, mf_done, mf_err;
  fx_t  mf_t [3];
  fx_t  mf_z [3];
  fx_t  mf_out [3];
  logic sz_start = 0, sz_busy, sz_done, sz_err;
  logic [4:0] sz_z0 = '0;
  logic sz_b = 0;
  logic signed [6:0] sz_z;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_reswo_cmp = 0, n_host_stall = 0, n_pm_runs = 0, n_pm_detect = 0;
  int n_acc_runs = 0, n_acc_detect = 0, n_falcon [5], n_mf = 0, n_sz = 0;

  int s_ref [NC];
  int a_ref [NC];
  int as_ref [LL][NC];
  int aa_ref [LL][NC];
  logic [63:0] acc_s_mem [LL*NC/4];
  logic [63:0] acc_a_mem [LL*NC/4];

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    acc_s_rd_data <= acc_s_mem[acc_s_rd_addr];
    acc_a_rd_data <= acc_a_mem[acc_a_rd_addr];
  end

  pqc_ed_top dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  function automatic cfx_t ref_mac(input cfx_t t, input cfx_t a, input cfx_t b);
    logic signed [127:0] re, im;
    cfx_t r;
    re = (128'(a.re) * 128'(b.re) - 128'(a.im) * 128'(b.im) + (128'(t.re) <<< 16)) >>> 16;
    im = (128'(a.re) * 128'(b.im) + 128'(a.im) * 128'(b.re) + (128'(t.im) <<< 16)) >>> 16;
    r.re = re[31:0];
    r.im = im[31:0];
    return r;
  endfunction

  function automatic int cbd(input logic [7:0] v);
    return $countones(v[3:0]) - $countones(v[7:4]);
  endfunction

  // count the sampler's Norm/RESwO comparisons and check each flag
  always @(negedge clk) if (rst_n && smp_valid) begin
    n_reswo_cmp++;
    check("sampler comparator quiet", !smp_err);
  end

  task automatic feed_sampler();
    for (int w = 0; w < 2 * NC / 16; w++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) s_ref[(w/2)*16 + (w%2)*8 + k] = cbd(v[8*k +: 8]);
      rnd_valid = 1;
      rnd_word  = v;
      @(negedge clk);
      while (!rnd_ready) @(negedge clk);
    end
    rnd_valid = 0;
  endtask

  task automatic host_write_a();
    for (int w = 0; w < NC / 4; w++) begin
      logic [63:0] v;
      for (int k = 0; k < 4; k++) begin
        a_ref[4*w + k] = int'($urandom_range(8191));
        v[16*k +: 16]  = 16'(a_ref[4*w + k]);
      end
      host_we = 1;
      host_waddr = 7'(NC/16 + w);
      host_wdata = v;
      while (!host_wready) begin
        n_host_stall++;
        @(negedge clk);
      end
      @(negedge clk);
    end
    host_we = 0;
  endtask

  task automatic run_pm();
    pm_start = 1;
    @(negedge clk);
    pm_start = 0;
    while (!pm_done) @(negedge clk);
    n_pm_runs++;
  endtask

  task automatic check_pm();
    int expv [NC];
    int bad = 0;
    for (int k = 0; k < NC; k++) expv[k] = 0;
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < NC; j++)
        if (i + j < NC) expv[i+j] += a_ref[i] * s_ref[j];
        else            expv[i+j-NC] -= a_ref[i] * s_ref[j];
    for (int k = 0; k < NC; k++) if (pm_result[k] != 13'(expv[k])) bad++;
    check("s(x) * a(x) from sampled secret", bad == 0);
  endtask

  task automatic run_acc();
    acc_start = 1;
    @(negedge clk);
    acc_start = 0;
    while (!acc_done) @(negedge clk);
    n_acc_runs++;
  endtask

  task automatic fill_acc();
    for (int j = 0; j < LL; j++)
      for (int k = 0; k < NC; k++) begin
        as_ref[j][k] = int'($urandom_range(8)) - 4;
        aa_ref[j][k] = int'($urandom_range(8191));
        acc_s_mem[j*NC/4 + k/4][16*(k%4) +: 16] = 16'(13'(as_ref[j][k]));
        acc_a_mem[j*NC/4 + k/4][16*(k%4) +: 16] = 16'(aa_ref[j][k]);
      end
  endtask

  task automatic check_acc();
    int expv [NC];
    int bad = 0;
    for (int k = 0; k < NC; k++) expv[k] = 4;
    for (int j = 0; j < LL; j++)
      for (int i = 0; i < NC; i++)
        for (int m = 0; m < NC; m++)
          if (i + m < NC) expv[i+m]    += aa_ref[j][i] * as_ref[j][m];
          else            expv[i+m-NC] -= aa_ref[j][i] * as_ref[j][m];
    for (int k = 0; k < NC; k++) if (acc_result[k] != 13'(expv[k])) bad++;
    check("row of A s' + h", bad == 0);
  endtask

  task automatic run_falcon(input int u);
    f_start[u] = 1'b1;
    @(negedge clk);
    f_start[u] = 1'b0;
    while (!f_done[u]) @(negedge clk);
    n_falcon[u]++;
    check("falcon comparator quiet", !f_err[u]);
  endtask

  initial begin
    for (int u = 0; u < 5; u++) n_falcon[u] = 0;
    for (int k = 0; k < 3; k++) begin mf_t[k] = '0; mf_z[k] = '0; end
    f_t0 = '0; f_t1 = '0; f_z1 = '0; f_l10 = '0; f_out1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- SABER hardware path ----
    fork
      feed_sampler();
      host_write_a();
    join
    repeat (4) @(negedge clk);
    run_pm();
    check_pm();
    check("multiplier comparator quiet", !pm_err);
    pm_fi_and = 13'h1ffe;                       // LSB stuck-at-0
    run_pm();
    if (pm_err) n_pm_detect++;
    check("multiplier fault detected", pm_err);
    pm_fi_and = '1;
    run_pm();
    check_pm();
    check("multiplier quiet after fault removed", !pm_err);

    // ---- HW/SW co-design accelerator ----
    fill_acc();
    run_acc();
    check_acc();
    check("accelerator comparator quiet", !acc_err);
    acc_fi_or = 13'h0102;                       // two bits stuck-at-1
    run_acc();
    if (acc_err) n_acc_detect++;
    check("accelerator fault detected", acc_err);
    acc_fi_or = '0;

    // ---- Falcon ffSampling line 13 ----
    for (int n = 0; n < 20; n++) begin
      cfx_t d, e0;
      f_t0 = crnd(28); f_t1 = crnd(24); f_z1 = crnd(24); f_l10 = crnd(20);
      d.re = f_t1.re - f_z1.re; d.im = f_t1.im - f_z1.im;
      f_out1 = d;
      e0 = '0;
      run_falcon(0); check("t1 - z1", f_sub_out == d);
      run_falcon(1); check("RESwO L10 * out1", f_reswo_out == ref_mac(e0, f_l10, d));
      run_falcon(2); check("RENO L10 * out1", f_renomul_out == ref_mac(e0, f_l10, d));
      run_falcon(3); check("RENO MAC", f_mac_out == ref_mac(f_t0, f_l10, d));
      run_falcon(4); check("RENO ffSampling step", f_ffs_out == ref_mac(f_t0, f_l10, d));
      // whole step built from the pieces agrees with the fused unit
      check("sub + MAC equals fused step", f_mac_out == f_ffs_out);
    end

    // ---- ModFalcon t - z and SamplerZ ----
    for (int n = 0; n < 20; n++) begin
      int e;
      for (int k = 0; k < 3; k++) begin mf_t[k] = rnd(32); mf_z[k] = rnd(32); end
      mf_start = 1; @(negedge clk); mf_start = 0;
      while (!mf_done) @(negedge clk);
      n_mf++;
      check("ModFalcon comparator quiet", !mf_err);
      for (int k = 0; k < 3; k++) check("ModFalcon t - z", mf_out[k] == fx_t'(mf_t[k] - mf_z[k]));
      sz_z0 = 5'($urandom_range(18)); sz_b = 1'($urandom);
      e = (sz_b ? 1 : -1) * int'(sz_z0) + int'(sz_b);
      sz_start = 1; @(negedge clk); sz_start = 0;
      while (!sz_done) @(negedge clk);
      n_sz++;
      check("SamplerZ comparator quiet", !sz_err);
      check("SamplerZ z", int'(sz_z) == e);
    end

    $display("mechanisms: RESwO compares %0d, host write stalls %0d, multiplier runs %0d, multiplier faults detected %0d",
             n_reswo_cmp, n_host_stall, n_pm_runs, n_pm_detect);
    $display("            accelerator rows %0d, accelerator faults detected %0d, falcon units %0d %0d %0d %0d %0d, ModFalcon %0d, SamplerZ %0d",
             n_acc_runs, n_acc_detect, n_falcon[0], n_falcon[1], n_falcon[2], n_falcon[3], n_falcon[4], n_mf, n_sz);
    check("RESwO comparisons happened", n_reswo_cmp == NC / 16);
    check("host write stall happened", n_host_stall > 0);
    check("multiplier runs happened", n_pm_runs > 0);
    check("multiplier fault detection happened", n_pm_detect > 0);
    check("accelerator rows happened", n_acc_runs > 0);
    check("accelerator fault detection happened", n_acc_detect > 0);
    for (int u = 0; u < 5; u++) check("falcon unit used", n_falcon[u] > 0);
    check("ModFalcon used", n_mf > 0);
    check("SamplerZ used", n_sz > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
