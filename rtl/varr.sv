// varr: FPGA kernel for the ECAL amplitude weights sum.
//
// The kernel computes, for N calorimeter crystals at once, the weighted sums
// of each crystal's digitised pulse samples:
//   outA[j] = sum_i in0a[i] * (float)in1a[j*size+i] * (float)in2a[j*size+i]
//   outT[j] = sum_i in0t[i] * (float)in1a[j*size+i] * (float)in2a[j*size+i]
//   outG[j] = 1 if some in2a[j*size+i] == 1 (otherwise left unchanged)
// in0a and in0t are `size` float weights shared by all crystals; in1a (samples)
// and in2a (gain words) are N*size ints, crystal-major. All arrays live in
// card memory and are reached through four AXI4 master bundles, grouped as the
// kernel's interface groups its arguments:
//   m0: in0a          (read)
//   m1: in1a          (read)
//   m2: in2a, in0t    (read, shared)
//   m3: outA, outT, outG (write)
// Only the channels each bundle uses are brought out (AR/R on m0..m2,
// AW/W/B on m3).
//
// Structure: varr_ctrl runs the loops and fetches operands through three
// axi_rd_master ports, varr_datapath does the float arithmetic (two int->float
// casts, four multipliers, two accumulating adders), and axi_wr_master stores
// the per-crystal results.
//
// Call interface (in place of the host runtime's control registers): the
// byte base addresses, N and size are sampled with ap_start while ap_idle is
// high; ap_done pulses when the results are in memory; axi_err reports a
// non-OKAY response during the call. ap_rst_n is a synchronous active-low
// reset. Each sample costs at least 5 cycles with a zero-wait memory (the
// two reads on bundle 2 are serial); each crystal adds its drain and two or
// three writes.
module varr
  import varr_pkg::*;
(
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        axi_err,
  // kernel arguments
  input  addr_t       in0a,
  input  addr_t       in1a,
  input  addr_t       in2a,
  input  addr_t       in0t,
  input  addr_t       outA,
  input  addr_t       outT,
  input  addr_t       outG,
  input  logic [31:0] N,
  input  logic [31:0] size,
  // m_axi bundle 0 (in0a)
  output axi_ax_t     m0_ar,
  output logic        m0_arvalid,
  input  logic        m0_arready,
  input  axi_r_t      m0_r,
  input  logic        m0_rvalid,
  output logic        m0_rready,
  // m_axi bundle 1 (in1a)
  output axi_ax_t     m1_ar,
  output logic        m1_arvalid,
  input  logic        m1_arready,
  input  axi_r_t      m1_r,
  input  logic        m1_rvalid,
  output logic        m1_rready,
  // m_axi bundle 2 (in2a, in0t)
  output axi_ax_t     m2_ar,
  output logic        m2_arvalid,
  input  logic        m2_arready,
  input  axi_r_t      m2_r,
  input  logic        m2_rvalid,
  output logic        m2_rready,
  // m_axi bundle 3 (outA, outT, outG)
  output axi_ax_t     m3_aw,
  output logic        m3_awvalid,
  input  logic        m3_awready,
  output axi_w_t      m3_w,
  output logic        m3_wvalid,
  input  logic        m3_wready,
  input  axi_b_t      m3_b,
  input  logic        m3_bvalid,
  output logic        m3_bready
);

  logic  rd_req_valid [3];
  logic  rd_req_ready [3];
  addr_t rd_req_addr  [3];
  logic  rd_rsp_valid [3];
  data_t rd_rsp_data  [3];
  logic  rd_rsp_err   [3];

  logic  wr_req_valid, wr_req_ready, wr_done, wr_err;
  addr_t wr_req_addr;
  data_t wr_req_data;

  logic        dp_clear, dp_valid, dp_gain_flag, dp_busy;
  fp32_t       dp_w_a, dp_w_t, dp_sum_a, dp_sum_t;
  logic [31:0] dp_digi, dp_gain;

  varr_ctrl u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .start(ap_start), .done(ap_done), .idle(ap_idle), .axi_err(axi_err),
    .a_in0a(in0a), .a_in1a(in1a), .a_in2a(in2a), .a_in0t(in0t),
    .a_outa(outA), .a_outt(outT), .a_outg(outG),
    .n_crystals(N), .n_samples(size),
    .rd_req_valid, .rd_req_ready, .rd_req_addr,
    .rd_rsp_valid, .rd_rsp_data, .rd_rsp_err,
    .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data,
    .wr_done, .wr_err,
    .dp_clear, .dp_valid, .dp_w_a, .dp_w_t, .dp_digi, .dp_gain,
    .dp_sum_a, .dp_sum_t, .dp_gain_flag, .dp_busy
  );

  varr_datapath u_dp (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .clear(dp_clear), .in_valid(dp_valid),
    .w_a(dp_w_a), .w_t(dp_w_t), .digi(dp_digi), .gain(dp_gain),
    .sum_a(dp_sum_a), .sum_t(dp_sum_t), .gain_flag(dp_gain_flag), .busy(dp_busy)
  );

  axi_rd_master u_m0 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .req_valid(rd_req_valid[0]), .req_ready(rd_req_ready[0]), .req_addr(rd_req_addr[0]),
    .rsp_valid(rd_rsp_valid[0]), .rsp_data(rd_rsp_data[0]), .rsp_err(rd_rsp_err[0]),
    .m_ar(m0_ar), .m_arvalid(m0_arvalid), .m_arready(m0_arready),
    .m_r(m0_r), .m_rvalid(m0_rvalid), .m_rready(m0_rready)
  );

  axi_rd_master u_m1 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .req_valid(rd_req_valid[1]), .req_ready(rd_req_ready[1]), .req_addr(rd_req_addr[1]),
    .rsp_valid(rd_rsp_valid[1]), .rsp_data(rd_rsp_data[1]), .rsp_err(rd_rsp_err[1]),
    .m_ar(m1_ar), .m_arvalid(m1_arvalid), .m_arready(m1_arready),
    .m_r(m1_r), .m_rvalid(m1_rvalid), .m_rready(m1_rready)
  );

  axi_rd_master u_m2 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .req_valid(rd_req_valid[2]), .req_ready(rd_req_ready[2]), .req_addr(rd_req_addr[2]),
    .rsp_valid(rd_rsp_valid[2]), .rsp_data(rd_rsp_data[2]), .rsp_err(rd_rsp_err[2]),
    .m_ar(m2_ar), .m_arvalid(m2_arvalid), .m_arready(m2_arready),
    .m_r(m2_r), .m_rvalid(m2_rvalid), .m_rready(m2_rready)
  );

  axi_wr_master u_m3 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .req_valid(wr_req_valid), .req_ready(wr_req_ready),
    .req_addr(wr_req_addr), .req_data(wr_req_data),
    .done(wr_done), .err(wr_err),
    .m_aw(m3_aw), .m_awvalid(m3_awvalid), .m_awready(m3_awready),
    .m_w(m3_w), .m_wvalid(m3_wvalid), .m_wready(m3_wready),
    .m_b(m3_b), .m_bvalid(m3_bvalid), .m_bready(m3_bready)
  );

endmodule
