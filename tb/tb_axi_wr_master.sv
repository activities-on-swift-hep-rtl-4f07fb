// tb_axi_wr_master: self-checking test of axi_wr_master on a behavioural AXI
// memory. Writes random words to random addresses, first with no memory
// stalls (checking the request-to-done latency: 5 cycles, the master's 3 plus
// one cycle each for the model's registered AWREADY/WREADY and BVALID) and
// then with random stalls, so that AW and W are accepted in different cycles.
// Memory contents are compared with a reference copy; a write above the
// model's error base must report err and leave memory alone.
module tb_axi_wr_master;
  import varr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, done, err;
  addr_t req_addr;
  data_t req_data;
  axi_ax_t ar, aw;  axi_r_t r;  axi_w_t w;  axi_b_t b;
  logic arready, rvalid, awvalid, awready, wvalid, wready, bvalid, bready;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] ref_mem [128];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  axi_wr_master dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_data, .done, .err,
    .m_aw(aw), .m_awvalid(awvalid), .m_awready(awready),
    .m_w(w), .m_wvalid(wvalid), .m_wready(wready),
    .m_b(b), .m_bvalid(bvalid), .m_bready(bready)
  );

  axi_mem_model #(.STALL_PCT(0), .ERR_BASE(64'h1_0000_0000)) u_mem (
    .clk, .rst_n,
    .s_ar(ar), .s_arvalid(1'b0), .s_arready(arready),
    .s_r(r), .s_rvalid(rvalid), .s_rready(1'b0),
    .s_aw(aw), .s_awvalid(awvalid), .s_awready(awready),
    .s_w(w), .s_wvalid(wvalid), .s_wready(wready),
    .s_b(b), .s_bvalid(bvalid), .s_bready(bready)
  );
  assign ar = '0;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_write(addr_t a, data_t d, output logic e, output int lat);
    int t0;
    req_addr  <= a;
    req_data  <= d;
    req_valid <= 1'b1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    req_valid <= 1'b0;
    do @(posedge clk); while (!done);
    e   = err;
    lat = cyc - t0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e; int lat, k; data_t d;
    req_valid = 1'b0; req_addr = '0; req_data = '0;
    foreach (ref_mem[i]) ref_mem[i] = 32'hdead_0000 + 32'(i);
    foreach (ref_mem[i]) u_mem.mem[longint'(i) + 64'h200] = ref_mem[i];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int n = 0; n < 100; n++) begin
      k = int'($urandom % 128); d = $urandom;
      do_write(64'h800 + 64'(k) * 4, d, e, lat);
      ref_mem[k] = d;
      expect_eq("err", 64'(e), 64'd0);
      expect_eq("latency", 64'(lat), 64'd5);
    end
    u_mem.stall_pct = 60;
    for (int n = 0; n < 500; n++) begin
      k = int'($urandom % 128); d = $urandom;
      do_write(64'h800 + 64'(k) * 4, d, e, lat);
      ref_mem[k] = d;
      expect_eq("err/stall", 64'(e), 64'd0);
    end
    foreach (ref_mem[i]) expect_eq("mem", 64'(u_mem.mem[longint'(i) + 64'h200]), 64'(ref_mem[i]));
    do_write(64'h1_0000_0000, 32'h1234_5678, e, lat);
    expect_eq("slverr", 64'(e), 64'd1);
    expect_eq("not written", 64'(u_mem.mem.exists(64'h4000_0000)), 64'd0);
    expect_eq("writes counted", 64'(u_mem.n_writes), 64'd601);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
