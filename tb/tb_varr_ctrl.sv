// tb_varr_ctrl: self-checking test of the loop controller on its own.
//
// The three read ports and the write port are answered by simple word-level
// responders with random ready and response delays over one shared sparse
// memory. A stand-in datapath keeps integer checksums of the operands fed to
// it since the last clear (so every operand and its order matter) and is busy
// for 2 cycles after each sample. The test checks, for several calls
// (including N = 0 and size = 0): the exact sequence of written addresses and
// data (outA[j], outT[j], and outG[j] = 1 only for crystals with a gain word
// equal to 1), that done pulses once per call, that idle is low while busy,
// and that a read error sets axi_err until the next start.
module tb_varr_ctrl;
  import varr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, done, idle, axi_err;
  addr_t a_in0a, a_in1a, a_in2a, a_in0t, a_outa, a_outt, a_outg;
  logic [31:0] n_crystals, n_samples;
  logic  rd_req_valid [3], rd_req_ready [3], rd_rsp_valid [3], rd_rsp_err [3];
  addr_t rd_req_addr [3];
  data_t rd_rsp_data [3];
  logic  wr_req_valid, wr_req_ready, wr_done, wr_err;
  addr_t wr_req_addr;
  data_t wr_req_data;
  logic  dp_clear, dp_valid, dp_gain_flag, dp_busy;
  fp32_t dp_w_a, dp_w_t, dp_sum_a, dp_sum_t;
  logic [31:0] dp_digi, dp_gain;

  int checks = 0, failures = 0, dones = 0;
  logic [31:0] mem [longint];
  addr_t err_addr = '1;

  always #5 clk = ~clk;

  varr_ctrl dut (.*);

  // ---------------- read responders ----------------
  for (genvar p = 0; p < 3; p++) begin : g_rd
    logic  busy_p;
    int    wait_p;
    addr_t a_p;
    assign rd_req_ready[p] = !busy_p;
    always @(posedge clk) begin
      rd_rsp_valid[p] <= 1'b0;
      if (!rst_n) begin
        busy_p <= 1'b0; rd_rsp_data[p] <= '0; rd_rsp_err[p] <= 1'b0;
      end else if (!busy_p && rd_req_valid[p]) begin
        busy_p <= 1'b1; a_p <= rd_req_addr[p]; wait_p <= int'($urandom % 4);
      end else if (busy_p) begin
        if (wait_p == 0) begin
          busy_p          <= 1'b0;
          rd_rsp_valid[p] <= 1'b1;
          rd_rsp_data[p]  <= mem.exists(longint'(a_p)) ? mem[longint'(a_p)] : 32'd0;
          rd_rsp_err[p]   <= (a_p == err_addr);
        end else wait_p <= wait_p - 1;
      end
    end
  end

  // ---------------- write responder ----------------
  logic  wbusy;
  int    wwait;
  addr_t wlog_a [$];
  data_t wlog_d [$];
  assign wr_req_ready = !wbusy && ($urandom % 2 == 0);
  always @(posedge clk) begin
    wr_done <= 1'b0;
    wr_err  <= 1'b0;
    if (!rst_n) wbusy <= 1'b0;
    else if (!wbusy && wr_req_valid && wr_req_ready) begin
      wbusy <= 1'b1; wwait <= int'($urandom % 4);
      wlog_a.push_back(wr_req_addr); wlog_d.push_back(wr_req_data);
      mem[longint'(wr_req_addr)] = wr_req_data;
    end else if (wbusy) begin
      if (wwait == 0) begin wbusy <= 1'b0; wr_done <= 1'b1; end
      else wwait <= wwait - 1;
    end
  end

  // ---------------- stand-in datapath ----------------
  logic [1:0] dbusy;
  assign dp_busy = dbusy != 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      dbusy <= 0; dp_sum_a <= 0; dp_sum_t <= 0; dp_gain_flag <= 0;
    end else begin
      dbusy <= dp_valid ? 2'd2 : (dbusy != 0 ? dbusy - 2'd1 : 2'd0);
      if (dp_clear) begin
        dp_sum_a <= 0; dp_sum_t <= 0; dp_gain_flag <= 0;
      end else if (dp_valid) begin
        dp_sum_a <= dp_sum_a * 31 + dp_w_a + dp_digi * 7;
        dp_sum_t <= dp_sum_t * 37 + dp_w_t + dp_gain * 11;
        if (dp_gain == 1) dp_gain_flag <= 1'b1;
      end
    end
  end

  always @(posedge clk) if (done) dones++;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one call and check what it wrote.
  task automatic call(int n, int size, bit with_err);
    addr_t ea [$];
    data_t ed [$];
    logic [31:0] sa, st;
    bit flag;
    int d0;
    a_in0a = 64'h1_0000; a_in1a = 64'h2_0000; a_in2a = 64'h3_0000; a_in0t = 64'h4_0000;
    a_outa = 64'h5_0000; a_outt = 64'h6_0000; a_outg = 64'h7_0000;
    for (int i = 0; i < (size > 0 ? size : 0); i++) begin
      mem[longint'(a_in0a + 4*i)] = $urandom;
      mem[longint'(a_in0t + 4*i)] = $urandom;
    end
    for (int k = 0; k < (n > 0 && size > 0 ? n * size : 0); k++) begin
      mem[longint'(a_in1a + 4*k)] = $urandom % 4096;
      mem[longint'(a_in2a + 4*k)] = ($urandom % 5 == 0) ? 1 : 2 + $urandom % 2;
    end
    for (int j = 0; j < (n > 0 ? n : 0); j++) mem[longint'(a_outg + 4*j)] = 32'hbad;
    err_addr = with_err ? a_in1a + 4 : '1;
    // expected writes
    for (int j = 0; j < n; j++) begin
      sa = 0; st = 0; flag = 0;
      for (int i = 0; i < size; i++) begin
        sa = sa * 31 + mem[longint'(a_in0a + 4*i)] + mem[longint'(a_in1a + 4*(j*size+i))] * 7;
        st = st * 37 + mem[longint'(a_in0t + 4*i)] + mem[longint'(a_in2a + 4*(j*size+i))] * 11;
        if (mem[longint'(a_in2a + 4*(j*size+i))] == 1) flag = 1;
      end
      ea.push_back(a_outa + 64'(4*j)); ed.push_back(sa);
      ea.push_back(a_outt + 64'(4*j)); ed.push_back(st);
      if (flag) begin ea.push_back(a_outg + 64'(4*j)); ed.push_back(1); end
    end
    wlog_a.delete(); wlog_d.delete();
    n_crystals = n; n_samples = size;
    d0 = dones;
    expect_eq("idle before", 64'(idle), 64'd1);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    if (n > 0) expect_eq("busy while running", 64'(idle), 64'd0);
    while (!idle) @(posedge clk);
    repeat (2) @(posedge clk);
    expect_eq("one done", 64'(dones - d0), 64'd1);
    expect_eq("write count", 64'(wlog_a.size()), 64'(ea.size()));
    for (int k = 0; k < ea.size() && k < wlog_a.size(); k++) begin
      expect_eq("write addr", wlog_a[k], ea[k]);
      expect_eq("write data", 64'(wlog_d[k]), 64'(ed[k]));
    end
    expect_eq("axi_err", 64'(axi_err), 64'(with_err));
  endtask

  initial begin
    start = 1'b0; n_crystals = 0; n_samples = 0;
    a_in0a = '0; a_in1a = '0; a_in2a = '0; a_in0t = '0; a_outa = '0; a_outt = '0; a_outg = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    call(0, 10, 0);
    call(1, 1, 0);
    call(3, 0, 0);
    call(5, 10, 1);
    call(20, 10, 0);
    call(7, 3, 0);
    repeat (10) call(1 + int'($urandom % 10), 1 + int'($urandom % 12), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
