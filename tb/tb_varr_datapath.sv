// tb_varr_datapath: self-checking test of varr_datapath.
//
// Each trial clears the datapath and feeds one crystal of `size` samples,
// back to back or with random gaps, then waits for busy to fall. The
// reference sums are built in sample order from fp_ref_pkg, rounding after
// every operation: sumA = sumA + (w_a*float(digi))*float(gain), likewise
// for sumT. The gain flag must be set exactly when a gain word equals 1. The
// pipeline latency is checked: the sums are final 3 cycles after the last
// sample enters, when busy falls.
module tb_varr_datapath;
  import varr_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, in_valid, gain_flag, busy;
  fp32_t w_a, w_t, sum_a, sum_t;
  logic [31:0] digi, gain;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  varr_datapath dut (.*);

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic crystal(int size, bit gaps, bit wide);
    logic [31:0] ra, rt, wa, wt, dg, gn, fd, fg;
    bit flag;
    int lat;
    ra = 32'd0; rt = 32'd0; flag = 0;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int i = 0; i < size; i++) begin
      if (gaps) while ($urandom % 3 == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      wa = rand_fp(100, 130);
      wt = rand_fp(100, 130);
      dg = wide ? $urandom : 32'($urandom % 4096);
      gn = wide ? $urandom % 8 : 32'($urandom % 4);
      fd = ref_i2f(dg);
      fg = ref_i2f(gn);
      ra = ref_add(ra, ref_mul(ref_mul(wa, fd), fg));
      rt = ref_add(rt, ref_mul(ref_mul(wt, fd), fg));
      if (gn == 32'd1) flag = 1;
      in_valid <= 1'b1; w_a <= wa; w_t <= wt; digi <= dg; gain <= gn;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    lat = 0;
    @(posedge clk);
    while (busy) begin
      lat++;
      @(posedge clk);
    end
    // the sample taken at the last edge above takes 3 cycles: 1 here + 2 busy
    if (size > 0) expect_eq("busy cycles", 64'(lat), 64'd2);
    expect_eq("sumA", 64'(sum_a), 64'(ra));
    expect_eq("sumT", 64'(sum_t), 64'(rt));
    expect_eq("gain flag", 64'(gain_flag), 64'(flag));
  endtask

  initial begin
    clear = 1'b0; in_valid = 1'b0; w_a = '0; w_t = '0; digi = '0; gain = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    crystal(0, 0, 0);
    crystal(1, 0, 0);
    crystal(10, 0, 0);
    repeat (300) crystal(10, 0, 0);
    repeat (300) crystal(1 + int'($urandom % 20), 1, 0);
    repeat (100) crystal(10, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
