// tb_axi_rd_master: self-checking test of axi_rd_master on a behavioural AXI
// memory. Reads random preloaded words, first with no memory stalls (checking
// the request-to-response latency: 5 cycles, the master's 3 plus one cycle
// each for the model's registered ARREADY and RVALID) and then with random stalls on every channel (checking data and
// that AR is held). Reads above the memory's error base must report rsp_err.
module tb_axi_rd_master;
  import varr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, rsp_valid, rsp_err;
  addr_t req_addr;
  data_t rsp_data;
  axi_ax_t ar;  logic arvalid, arready;
  axi_r_t  r;   logic rvalid, rready;
  axi_ax_t aw;  axi_w_t w;  axi_b_t b;
  logic awready, wready, bvalid;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] ref_mem [256];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  axi_rd_master dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr,
    .rsp_valid, .rsp_data, .rsp_err,
    .m_ar(ar), .m_arvalid(arvalid), .m_arready(arready),
    .m_r(r), .m_rvalid(rvalid), .m_rready(rready)
  );

  axi_mem_model #(.STALL_PCT(0), .ERR_BASE(64'h1_0000_0000)) u_mem (
    .clk, .rst_n,
    .s_ar(ar), .s_arvalid(arvalid), .s_arready(arready),
    .s_r(r), .s_rvalid(rvalid), .s_rready(rready),
    .s_aw(aw), .s_awvalid(1'b0), .s_awready(awready),
    .s_w(w), .s_wvalid(1'b0), .s_wready(wready),
    .s_b(b), .s_bvalid(bvalid), .s_bready(1'b0)
  );
  assign aw = '0;
  assign w  = '0;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One read; returns data, error and cycles from request to response.
  task automatic do_read(addr_t a, output data_t d, output logic e, output int lat);
    int t0;
    req_addr  <= a;
    req_valid <= 1'b1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    req_valid <= 1'b0;
    do @(posedge clk); while (!rsp_valid);
    d   = rsp_data;
    e   = rsp_err;
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
    data_t d; logic e; int lat, k;
    req_valid = 1'b0; req_addr = '0;
    foreach (ref_mem[i]) begin
      ref_mem[i] = $urandom;
      u_mem.mem[longint'(i) + 64'h100] = ref_mem[i];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // no stalls: data and latency
    for (int n = 0; n < 100; n++) begin
      k = int'($urandom % 256);
      do_read(64'h400 + 64'(k) * 4, d, e, lat);
      expect_eq("data", 64'(d), 64'(ref_mem[k]));
      expect_eq("err", 64'(e), 64'd0);
      expect_eq("latency", 64'(lat), 64'd5);
    end
    // stalls on every channel
    u_mem.stall_pct = 60;
    for (int n = 0; n < 500; n++) begin
      k = int'($urandom % 256);
      do_read(64'h400 + 64'(k) * 4, d, e, lat);
      expect_eq("data/stall", 64'(d), 64'(ref_mem[k]));
      expect_eq("err/stall", 64'(e), 64'd0);
    end
    // error response
    do_read(64'h1_0000_0010, d, e, lat);
    expect_eq("slverr", 64'(e), 64'd1);
    do_read(64'h400, d, e, lat);
    expect_eq("err clears", 64'(e), 64'd0);
    expect_eq("stalls seen", 64'(u_mem.n_stalls > 100), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
