// tb_int_to_fp32: self-checking test of int_to_fp32 against real'(int)
// rounded to binary32 in fp_ref_pkg. Covers zero, +-1, the extreme ints,
// rounding ties at 2^24..2^31 and random values of every magnitude.
module tb_int_to_fp32;
  import fp_ref_pkg::*;

  logic [31:0] x, y, exp_y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  int_to_fp32 dut (.x(x), .y(y));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] tx);
    x = tx;
    @(posedge clk);
    exp_y = ref_i2f(tx);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h: got %h expected %h", tx, y, exp_y);
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
    check(32'd0); check(32'd1); check(32'hffff_ffff); check(32'h7fff_ffff);
    check(32'h8000_0000); check(32'h8000_0001); check(32'd16777217);
    check(32'd16777219); check(32'd16777218); check(-32'sd16777217);
    for (int k = 0; k < 32; k++) begin
      check(32'd1 << k); check((32'd1 << k) + 32'd1); check((32'd1 << k) - 32'd1);
      check((32'd3 << k) + 32'd1); check(-(32'd1 << k));
    end
    for (int k = 0; k < 32; k++)
      repeat (500) check($urandom >> k);
    repeat (20000) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
