// tb_varr: end-to-end test of the varr kernel.
//
// Four behavioural AXI memories stand in for card memory, one per bundle.
// Each call fills the input arrays, pre-fills outG with a marker, starts the
// kernel and waits for ap_done; the results in memory are then compared with
// a reference computed with fp_ref_pkg in the loop order of the algorithm:
//   outA[j] = sum_i (in0a[i] * float(in1a[j*size+i])) * float(in2a[j*size+i])
//   outT[j] = the same with in0t[i]
//   outG[j] = 1 if some in2a[j*size+i] == 1, else the marker is untouched.
// Weights are floats of magnitude around 2^-27..2^3, samples are 12-bit ADC
// counts, gain words are 0..3.
//
// Mechanisms that must each occur at least once (a failure is counted if one
// never does): back-pressure on every bundle, the second (serial) read on
// bundle 2 for every sample, a crystal with outG written and one without, a
// call with N = 0, a call with size = 0, an AXI error response reported on
// axi_err, and back-to-back calls. With zero-wait memories the run time is
// checked against the controller's schedule, given 5-cycle reads and writes
// from these memory models: 13 cycles per sample (two serial reads on
// bundle 2 plus 3 of bookkeeping), 18 per crystal with samples (16 with none)
// for the clear, the drain and the outA/outT writes, 6 more when outG is
// written, and 1 per call.
module tb_varr;
  import varr_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ap_start, ap_done, ap_idle, axi_err;
  addr_t in0a, in1a, in2a, in0t, outA, outT, outG;
  logic [31:0] N, size;
  axi_ax_t m0_ar, m1_ar, m2_ar, m3_aw;
  logic m0_arvalid, m0_arready, m0_rvalid, m0_rready;
  logic m1_arvalid, m1_arready, m1_rvalid, m1_rready;
  logic m2_arvalid, m2_arready, m2_rvalid, m2_rready;
  axi_r_t m0_r, m1_r, m2_r;
  axi_w_t m3_w;
  axi_b_t m3_b;
  logic m3_awvalid, m3_awready, m3_wvalid, m3_wready, m3_bvalid, m3_bready;

  int checks = 0, failures = 0, cyc = 0;
  int n_gwritten = 0, n_gskipped = 0, n_zero_n = 0, n_zero_size = 0, n_err = 0, n_b2b = 0;
  logic [31:0] MARK = 32'h0bad_cafe;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  varr dut (.ap_clk(clk), .ap_rst_n(rst_n), .*);

  // unused channels of each memory model
  axi_ax_t nul_ax; axi_w_t nul_w; axi_r_t nul_r; axi_b_t nul_b [3];
  logic nul_rdy [8];
  assign nul_ax = '0; assign nul_w = '0;

  axi_mem_model #(.STALL_PCT(0)) u_m0 (.clk, .rst_n,
    .s_ar(m0_ar), .s_arvalid(m0_arvalid), .s_arready(m0_arready),
    .s_r(m0_r), .s_rvalid(m0_rvalid), .s_rready(m0_rready),
    .s_aw(nul_ax), .s_awvalid(1'b0), .s_awready(nul_rdy[0]),
    .s_w(nul_w), .s_wvalid(1'b0), .s_wready(nul_rdy[1]),
    .s_b(nul_b[0]), .s_bvalid(nul_rdy[2]), .s_bready(1'b0));
  axi_mem_model #(.STALL_PCT(0)) u_m1 (.clk, .rst_n,
    .s_ar(m1_ar), .s_arvalid(m1_arvalid), .s_arready(m1_arready),
    .s_r(m1_r), .s_rvalid(m1_rvalid), .s_rready(m1_rready),
    .s_aw(nul_ax), .s_awvalid(1'b0), .s_awready(nul_rdy[3]),
    .s_w(nul_w), .s_wvalid(1'b0), .s_wready(nul_rdy[4]),
    .s_b(nul_b[1]), .s_bvalid(nul_rdy[5]), .s_bready(1'b0));
  axi_mem_model #(.STALL_PCT(0), .ERR_BASE(64'h8000_0000)) u_m2 (.clk, .rst_n,
    .s_ar(m2_ar), .s_arvalid(m2_arvalid), .s_arready(m2_arready),
    .s_r(m2_r), .s_rvalid(m2_rvalid), .s_rready(m2_rready),
    .s_aw(nul_ax), .s_awvalid(1'b0), .s_awready(nul_rdy[6]),
    .s_w(nul_w), .s_wvalid(1'b0), .s_wready(nul_rdy[7]),
    .s_b(nul_b[2]), .s_bvalid(), .s_bready(1'b0));
  axi_mem_model #(.STALL_PCT(0)) u_m3 (.clk, .rst_n,
    .s_ar(nul_ax), .s_arvalid(1'b0), .s_arready(),
    .s_r(nul_r), .s_rvalid(), .s_rready(1'b0),
    .s_aw(m3_aw), .s_awvalid(m3_awvalid), .s_awready(m3_awready),
    .s_w(m3_w), .s_wvalid(m3_wvalid), .s_wready(m3_wready),
    .s_b(m3_b), .s_bvalid(m3_bvalid), .s_bready(m3_bready));

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] rd(int b, longint a);
    case (b)
      0: return u_m0.mem.exists(a) ? u_m0.mem[a] : 32'd0;
      1: return u_m1.mem.exists(a) ? u_m1.mem[a] : 32'd0;
      2: return u_m2.mem.exists(a) ? u_m2.mem[a] : 32'd0;
      default: return u_m3.mem.exists(a) ? u_m3.mem[a] : 32'd0;
    endcase
  endfunction

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One kernel call. stall: memory stall percentage; bad: make one in0t read fail.
  task automatic call(int n, int sz, int stall, bit bad, bit b2b);
    logic [31:0] w_a [], w_t [], ra, rt;
    int unsigned t0, exp_cycles, ng;
    bit flag;
    in0a = 64'h0010_0000; in1a = 64'h0100_0000; in2a = 64'h0200_0000;
    in0t = bad ? 64'h8000_0000 : 64'h0020_0000;
    outA = 64'h0300_0000; outT = 64'h0400_0000; outG = 64'h0500_0000;
    u_m0.stall_pct = stall; u_m1.stall_pct = stall;
    u_m2.stall_pct = stall; u_m3.stall_pct = stall;
    w_a = new[sz > 0 ? sz : 0];
    w_t = new[sz > 0 ? sz : 0];
    foreach (w_a[i]) begin
      w_a[i] = rand_fp(100, 130);
      w_t[i] = rand_fp(100, 130);
      u_m0.mem[longint'(in0a >> 2) + i] = w_a[i];
      u_m2.mem[longint'(in0t >> 2) + i] = w_t[i];
    end
    for (int k = 0; k < n * sz; k++) begin
      u_m1.mem[longint'(in1a >> 2) + k] = $urandom % 4096;
      u_m2.mem[longint'(in2a >> 2) + k] = ($urandom % 4 == 0) ? 1 : (($urandom % 2 == 0) ? 2 : ($urandom % 2) * 3);
    end
    for (int j = 0; j < n; j++) u_m3.mem[longint'(outG >> 2) + j] = MARK;
    N = n; size = sz;
    if (!b2b) repeat (3) @(posedge clk);
    expect_eq("idle", 64'(ap_idle), 64'd1);
    ap_start <= 1'b1;
    @(posedge clk);
    t0 = cyc;
    ap_start <= 1'b0;
    do @(posedge clk); while (!ap_done);
    exp_cycles = 1;
    ng = 0;
    for (int j = 0; j < n; j++) begin
      ra = 0; rt = 0; flag = 0;
      for (int i = 0; i < sz; i++) begin
        logic [31:0] fd, fg, g;
        fd = ref_i2f(rd(1, longint'(in1a >> 2) + j * sz + i));
        g  = rd(2, longint'(in2a >> 2) + j * sz + i);
        fg = ref_i2f(g);
        ra = ref_add(ra, ref_mul(ref_mul(w_a[i], fd), fg));
        rt = ref_add(rt, ref_mul(ref_mul(bad ? 32'd0 : w_t[i], fd), fg));
        if (g == 1) flag = 1;
      end
      expect_eq($sformatf("outA[%0d]", j), 64'(rd(3, longint'(outA >> 2) + j)), 64'(ra));
      expect_eq($sformatf("outT[%0d]", j), 64'(rd(3, longint'(outT >> 2) + j)), 64'(rt));
      expect_eq($sformatf("outG[%0d]", j), 64'(rd(3, longint'(outG >> 2) + j)), flag ? 64'd1 : 64'(MARK));
      if (flag) begin n_gwritten++; ng++; end else n_gskipped++;
      exp_cycles += (sz > 0 ? 18 : 16) + 13 * (sz > 0 ? sz : 0) + (flag ? 6 : 0);
    end
    if (n <= 0) exp_cycles = 1;
    if (stall == 0) expect_eq("cycles", 64'(cyc - t0), 64'(exp_cycles));
    expect_eq("axi_err", 64'(axi_err), 64'(bad));
    if (bad && axi_err) n_err++;
    if (n <= 0) n_zero_n++;
    if (n > 0 && sz <= 0) n_zero_size++;
    if (b2b) n_b2b++;
  endtask

  initial begin
    int s0;
    ap_start = 1'b0; N = 0; size = 0;
    in0a = '0; in1a = '0; in2a = '0; in0t = '0; outA = '0; outT = '0; outG = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    call(1, 10, 0, 0, 0);
    call(4, 10, 0, 0, 0);
    call(0, 10, 0, 0, 0);
    call(-3, 10, 0, 0, 1);
    call(3, 0, 0, 0, 0);
    call(20, 10, 0, 0, 1);
    s0 = int'(u_m0.n_stalls + u_m1.n_stalls + u_m2.n_stalls + u_m3.n_stalls);
    call(2, 10, 0, 1, 0);
    call(30, 10, 40, 0, 0);
    call(10, 7, 70, 0, 1);
    call(5, 1, 20, 0, 0);
    // every mechanism seen at least once
    expect_eq("zero stalls at stall 0", 64'(s0), 64'd0);
    expect_eq("m0 stalled", 64'(u_m0.n_stalls > 0), 64'd1);
    expect_eq("m1 stalled", 64'(u_m1.n_stalls > 0), 64'd1);
    expect_eq("m2 stalled", 64'(u_m2.n_stalls > 0), 64'd1);
    expect_eq("m3 stalled", 64'(u_m3.n_stalls > 0), 64'd1);
    expect_eq("bundle 2 reads twice per sample",
              64'(u_m2.n_reads), 64'(2 * u_m1.n_reads));
    expect_eq("outG written", 64'(n_gwritten > 0), 64'd1);
    expect_eq("outG skipped", 64'(n_gskipped > 0), 64'd1);
    expect_eq("N <= 0 call", 64'(n_zero_n > 0), 64'd1);
    expect_eq("size 0 call", 64'(n_zero_size > 0), 64'd1);
    expect_eq("AXI error seen", 64'(n_err > 0), 64'd1);
    expect_eq("back-to-back calls", 64'(n_b2b > 0), 64'd1);
    $display("mechanisms: outG written %0d, skipped %0d, N<=0 calls %0d, size 0 calls %0d, errors %0d, b2b %0d, stalls m0 %0d m1 %0d m2 %0d m3 %0d",
             n_gwritten, n_gskipped, n_zero_n, n_zero_size, n_err, n_b2b,
             u_m0.n_stalls, u_m1.n_stalls, u_m2.n_stalls, u_m3.n_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
