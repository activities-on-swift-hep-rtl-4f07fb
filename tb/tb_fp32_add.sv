// tb_fp32_add: self-checking test of fp32_add against a reference computed in
// 64-bit reals (fp_ref_pkg). Directed cases cover zeros, infinities, NaN,
// overflow, underflow, cancellation and ties (operands with short
// significands make exact ties frequent); random cases cover the full
// exponent range and a narrow range where exponents are close. One operation
// is applied per clock of a local clock; the watchdog ends the run if it hangs.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    a = ta; b = tb_;
    @(posedge clk);
    exp_y = ref_add(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h add %h: got %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] dir [14];
    dir = '{32'h0000_0000, 32'h8000_0000, 32'h3f80_0000, 32'hbf80_0000,
            32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000, 32'h7f7f_ffff,
            32'hff7f_ffff, 32'h0080_0000, 32'h8080_0000, 32'h3f80_0001,
            32'h3fff_ffff, 32'h0000_0001};
    foreach (dir[i]) foreach (dir[k]) check(dir[i], dir[k]);
    // x + (-x) and near-cancellation
    repeat (2000) begin
      logic [31:0] r;
      r = rand_fp(1, 254);
      check(r, {~r[31], r[30:0]});
      check(r, {~r[31], r[30:1], ~r[0]});
    end
    repeat (40000) check(rand_fp(1, 254), rand_fp(1, 254));
    repeat (40000) check(rand_fp(120, 135), rand_fp(120, 135));
    repeat (20000) check(rand_fp(100, 150), rand_fp(100, 150));
    repeat (5000)  check(rand_fp(1, 30), rand_fp(1, 130));
    repeat (5000)  check(rand_fp(200, 254), rand_fp(120, 254));
    // rounding ties
    for (int bits = 1; bits <= 16; bits++)
      repeat (2000) check(rand_fp_short(110, 140, bits), rand_fp_short(110, 140, bits));
    repeat (5000) check(rand_fp_short(120, 130, 12), rand_fp_short(100, 130, 23));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
