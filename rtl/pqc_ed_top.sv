// Error-detecting datapaths for the post-quantum schemes SABER (KEM) and
// Falcon / ModFalcon (signatures), side by side.
// SABER, hardware-only path: the binomial sampler (RESwO) turns pseudorandom
// 64-bit words into secret coefficients and writes each 64-bit output word to
// the data memory (words 0 .. N/16-1, wrapping). The host writes a(x) into the
// same memory (words N/16 .. N/16+N/4-1, four 16-bit coefficient slots per
// word); host writes wait while the sampler writes (host_wready low). The RENO
// polynomial multiplier then reads s(x) and a(x) through the memory's single
// read port and returns s(x)*a(x) with its error flag.
// SABER, HW/SW co-design path: the RENO matrix-vector accelerator, with its two
// memory ports brought out to the host side.
// Falcon: the recomputing units of ffSampling line 13 (RENO subtractor, RESwO
// and RENO multipliers, RENO MAC, RENO on the whole step), ModFalcon's RENO
// t - z and SamplerZ's RENO line 4, each with its own start/done/err ports.
// Every err output is the comparator flag of one unit: high after a run whose
// normal and recomputed results differ. fi_* inputs are stuck-at fault
// injection hooks on the multipliers' public operand (all ones / all zeros in
// normal use).
// The units and their schemes follow the published designs. Own choices: the
// memory map and the write arbitration of the data memory, placing the SABER
// and Falcon parts side by side, and the fault-injection ports.
module pqc_ed_top
  import saber_pkg::*;
  import falcon_pkg::*;
#(
  parameter int unsigned N_COEF = N,
  parameter int unsigned MU     = 8,
  parameter int unsigned L      = 3,
  parameter int unsigned MOD_K  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // binomial sampler
  input  logic                 rnd_valid,
  output logic                 rnd_ready,
  input  logic [WORD_W-1:0]    rnd_word,
  output logic                 smp_valid,     // a secret word was written
  output logic                 smp_err,
  // host write port of the data memory
  input  logic                 host_we,
  output logic                 host_wready,
  input  logic [$clog2(N_COEF/16 + N_COEF/4)-1:0] host_waddr,
  input  logic [WORD_W-1:0]    host_wdata,
  // polynomial multiplier
  input  logic                 pm_start,
  output logic                 pm_busy,
  output logic                 pm_done,
  output logic                 pm_err,
  output logic [EQ-1:0]        pm_result [N_COEF],
  input  logic [EQ-1:0]        pm_fi_and,
  input  logic [EQ-1:0]        pm_fi_or,
  // HW/SW co-design accelerator
  input  logic                 acc_start,
  output logic                 acc_busy,
  output logic                 acc_done,
  output logic                 acc_err,
  output logic [EQ-1:0]        acc_result [N_COEF],
  output logic [$clog2(L*N_COEF/4)-1:0] acc_s_rd_addr,
  input  logic [WORD_W-1:0]    acc_s_rd_data,
  output logic [$clog2(L*N_COEF/4)-1:0] acc_a_rd_addr,
  input  logic [WORD_W-1:0]    acc_a_rd_data,
  input  logic [EQ-1:0]        acc_fi_and,
  input  logic [EQ-1:0]        acc_fi_or,
  // Falcon ffSampling line 13 operands, shared by its units
  input  cfx_t                 f_t0,
  input  cfx_t                 f_t1,
  input  cfx_t                 f_z1,
  input  cfx_t                 f_l10,
  input  cfx_t                 f_out1,        // t1 - z1, for the product units
  input  logic [4:0]           f_start,       // sub, reswo_mul, reno_mul, mac, ffs
  output logic [4:0]           f_busy,
  output logic [4:0]           f_done,
  output logic [4:0]           f_err,
  output cfx_t                 f_sub_out,
  output cfx_t                 f_reswo_out,
  output cfx_t                 f_renomul_out,
  output cfx_t                 f_mac_out,
  output cfx_t                 f_ffs_out,
  // ModFalcon t - z
  input  logic                 mf_start,
  output logic                 mf_busy,
  output logic                 mf_done,
  output logic                 mf_err,
  input  fx_t                  mf_t [MOD_K],
  input  fx_t                  mf_z [MOD_K],
  output fx_t                  mf_out [MOD_K],
  // SamplerZ line 4
  input  logic                 sz_start,
  output logic                 sz_busy,
  output logic                 sz_done,
  output logic                 sz_err,
  input  logic [4:0]           sz_z0,
  input  logic                 sz_b,
  output logic signed [6:0]    sz_z
);
  localparam int unsigned S_WORDS = N_COEF / 16;
  localparam int unsigned DM_AW   = $clog2(N_COEF/16 + N_COEF/4);
  localparam int unsigned DEPTH   = 1 << DM_AW;

  // ---------------- SABER hardware path ----------------
  logic [WORD_W-1:0] smp_word;
  logic [$clog2(S_WORDS)-1:0] smp_wptr;
  logic               dm_we;
  logic [DM_AW-1:0]   dm_waddr, dm_raddr;
  logic [WORD_W-1:0]  dm_wdata, dm_rdata;
  logic               pm_s_rd_en, pm_a_rd_en;
  logic [$clog2(S_WORDS)-1:0]  pm_s_rd_addr;
  logic [$clog2(N_COEF/4)-1:0] pm_a_rd_addr;

  binomial_sampler #(.MU(MU)) u_sampler (
    .clk, .rst_n,
    .in_valid  (rnd_valid),
    .in_ready  (rnd_ready),
    .in_word   (rnd_word),
    .out_valid (smp_valid),
    .out_word  (smp_word),
    .err       (smp_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         smp_wptr <= '0;
    else if (smp_valid) smp_wptr <= smp_wptr + 1'b1;
  end

  // write arbitration: sampler first, host waits
  assign host_wready = !smp_valid;
  assign dm_we    = smp_valid || host_we;
  assign dm_waddr = smp_valid ? DM_AW'(smp_wptr) : host_waddr;
  assign dm_wdata = smp_valid ? smp_word : host_wdata;
  assign dm_raddr = pm_s_rd_en ? DM_AW'(pm_s_rd_addr) : DM_AW'(S_WORDS + pm_a_rd_addr);

  saber_data_mem #(.DEPTH(DEPTH)) u_dmem (
    .clk,
    .we    (dm_we),
    .waddr (dm_waddr),
    .wdata (dm_wdata),
    .raddr (dm_raddr),
    .rdata (dm_rdata)
  );

  saber_polymul_reno #(.N_COEF(N_COEF), .EQ_W(EQ)) u_polymul (
    .clk, .rst_n,
    .start     (pm_start),
    .busy      (pm_busy),
    .done      (pm_done),
    .err       (pm_err),
    .result    (pm_result),
    .s_rd_en   (pm_s_rd_en),
    .s_rd_addr (pm_s_rd_addr),
    .s_rd_data (dm_rdata),
    .a_rd_en   (pm_a_rd_en),
    .a_rd_addr (pm_a_rd_addr),
    .a_rd_data (dm_rdata),
    .fi_and    (pm_fi_and),
    .fi_or     (pm_fi_or)
  );

  // ---------------- SABER HW/SW co-design accelerator ----------------
  saber_accel_reno #(.N_COEF(N_COEF), .L(L), .EQ_W(EQ)) u_accel (
    .clk, .rst_n,
    .start     (acc_start),
    .busy      (acc_busy),
    .done      (acc_done),
    .err       (acc_err),
    .result    (acc_result),
    .s_rd_addr (acc_s_rd_addr),
    .s_rd_data (acc_s_rd_data),
    .a_rd_addr (acc_a_rd_addr),
    .a_rd_data (acc_a_rd_data),
    .fi_and    (acc_fi_and),
    .fi_or     (acc_fi_or)
  );

  // ---------------- Falcon ffSampling line 13 ----------------
  falcon_reno_sub u_f_sub (
    .clk, .rst_n, .start(f_start[0]), .busy(f_busy[0]), .done(f_done[0]), .err(f_err[0]),
    .t1(f_t1), .z1(f_z1), .out(f_sub_out)
  );
  falcon_reswo_mul u_f_reswo (
    .clk, .rst_n, .start(f_start[1]), .busy(f_busy[1]), .done(f_done[1]), .err(f_err[1]),
    .l10(f_l10), .out1(f_out1), .out(f_reswo_out)
  );
  falcon_reno_mul u_f_renomul (
    .clk, .rst_n, .start(f_start[2]), .busy(f_busy[2]), .done(f_done[2]), .err(f_err[2]),
    .l10(f_l10), .out1(f_out1), .out(f_renomul_out)
  );
  falcon_reno_mac u_f_mac (
    .clk, .rst_n, .start(f_start[3]), .busy(f_busy[3]), .done(f_done[3]), .err(f_err[3]),
    .t0(f_t0), .out1(f_out1), .l10(f_l10), .out(f_mac_out)
  );
  falcon_reno_ffs u_f_ffs (
    .clk, .rst_n, .start(f_start[4]), .busy(f_busy[4]), .done(f_done[4]), .err(f_err[4]),
    .t0(f_t0), .t1(f_t1), .z1(f_z1), .l10(f_l10), .out(f_ffs_out)
  );

  // ---------------- ModFalcon and SamplerZ ----------------
  modfalcon_reno_sub #(.K(MOD_K)) u_modfalcon (
    .clk, .rst_n, .start(mf_start), .busy(mf_busy), .done(mf_done), .err(mf_err),
    .t(mf_t), .z(mf_z), .out(mf_out)
  );
  samplerz_reno #(.Z0_W(5)) u_samplerz (
    .clk, .rst_n, .start(sz_start), .busy(sz_busy), .done(sz_done), .err(sz_err),
    .z0(sz_z0), .b(sz_b), .z(sz_z)
  );

  // the multiplier uses the shared read port for one polynomial at a time
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(pm_s_rd_en && pm_a_rd_en));
endmodule
