// varr_datapath: the weighted sums of one ECAL crystal.
//
// For every sample i of a crystal the kernel forms, in C's left-to-right order
// and with binary32 rounding after each operation,
//   sumA += (in0a[i] * (float)in1a) * (float)in2a
//   sumT += (in0t[i] * (float)in1a) * (float)in2a
// where in0a/in0t are the per-sample weights shared by all crystals and
// in1a/in2a are the crystal's integer sample and gain words. It also raises a
// gain flag if any in2a of the crystal equals 1 (the algorithm then sets
// outG). This is the arithmetic of the kernel's inner loop; the structure
// below is this design's own.
//
// Pipeline (one sample may enter per cycle):
//   stage 1: both int->float casts; w_a*digi and w_t*digi; registered
//   stage 2: the two products times the gain; registered
//   stage 3: the two accumulators add their product; flag ORed
// Two float adders run in parallel, each adding into its own register, so the
// sum of a crystal is built in sample order, as in the sequential loop.
//
// Interface: clear zeroes both sums and the flag (issue it only while busy is
// low, before the first sample of a crystal). in_valid with w_a, w_t, digi and
// gain enters one sample. sum_a, sum_t and gain_flag are final three cycles
// after the last sample entered, which is when busy falls.
module varr_datapath
  import varr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  fp32_t       w_a,        // in0a[i]
  input  fp32_t       w_t,        // in0t[i]
  input  logic [31:0] digi,       // in1a[j*size+i], int
  input  logic [31:0] gain,       // in2a[j*size+i], int
  output fp32_t       sum_a,
  output fp32_t       sum_t,
  output logic        gain_flag,
  output logic        busy
);

  // stage 1
  fp32_t f_digi, f_gain, p1a, p1t;
  fp32_t s1_a, s1_t, s1_gain;
  logic  s1_v, s1_is1;
  // stage 2
  fp32_t p2a, p2t;
  fp32_t s2_a, s2_t;
  logic  s2_v, s2_is1;
  // stage 3
  fp32_t acc_a_next, acc_t_next;

  int_to_fp32 u_cvt_digi (.x(digi), .y(f_digi));
  int_to_fp32 u_cvt_gain (.x(gain), .y(f_gain));
  fp32_mul    u_mul_a1   (.a(w_a),  .b(f_digi), .y(p1a));
  fp32_mul    u_mul_t1   (.a(w_t),  .b(f_digi), .y(p1t));
  fp32_mul    u_mul_a2   (.a(s1_a), .b(s1_gain), .y(p2a));
  fp32_mul    u_mul_t2   (.a(s1_t), .b(s1_gain), .y(p2t));
  fp32_add    u_add_a    (.a(sum_a), .b(s2_a), .y(acc_a_next));
  fp32_add    u_add_t    (.a(sum_t), .b(s2_t), .y(acc_t_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
      s1_a <= '0; s1_t <= '0; s1_gain <= '0; s1_is1 <= 1'b0;
      s2_a <= '0; s2_t <= '0; s2_is1 <= 1'b0;
      sum_a <= '0; sum_t <= '0; gain_flag <= 1'b0;
    end else begin
      s1_v    <= in_valid;
      s1_a    <= p1a;
      s1_t    <= p1t;
      s1_gain <= f_gain;
      s1_is1  <= in_valid && (gain == 32'd1);

      s2_v    <= s1_v;
      s2_a    <= p2a;
      s2_t    <= p2t;
      s2_is1  <= s1_is1;

      if (clear) begin
        sum_a     <= '0;
        sum_t     <= '0;
        gain_flag <= 1'b0;
      end else if (s2_v) begin
        sum_a     <= acc_a_next;
        sum_t     <= acc_t_next;
        gain_flag <= gain_flag | s2_is1;
      end
    end
  end

  assign busy = s1_v || s2_v;

  // clear must not discard a sample that is still in flight.
  a_clear_idle: assert property (@(posedge clk) disable iff (!rst_n)
    clear |-> !busy && !in_valid);

endmodule
