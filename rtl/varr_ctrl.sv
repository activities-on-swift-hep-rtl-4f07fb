// varr_ctrl: loop controller of the varr kernel.
//
// It runs the kernel's two nested loops, over the N crystals j and, for each
// crystal, over its `size` samples i. For each sample it reads four 32-bit
// words from card memory:
//   in0a[i]            (float weight, bundle 0)
//   in1a[j*size + i]   (int sample,   bundle 1)
//   in2a[j*size + i]   (int gain,     bundle 2)
//   in0t[i]            (float weight, bundle 2, after in2a: same bundle)
// and hands them to the datapath as one sample. After the last sample of a
// crystal it waits for the datapath to drain and writes outA[j] and outT[j],
// and outG[j] = 1 only if a gain word of that crystal was 1 (outG[j] is
// otherwise left untouched, as in the C source), all on bundle 3.
//
// Control: start is sampled while idle; the arguments are latched then.
// done pulses for one cycle when the last write of the last crystal has
// completed, and idle is high whenever no call is running. N <= 0 ends the
// call at once; size <= 0 writes zero sums for every crystal. axi_err is set
// when any read or write response was not OKAY and is cleared by the next
// start. Reads for a sample start as soon as the previous sample has been
// handed over, so the datapath works on one sample while the next is fetched.
//
// The loops and the data each one touches follow the algorithm; the word-wide
// fetch order, start/done/idle handshake, and error flag are this design's.
module varr_ctrl
  import varr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // call
  input  logic        start,
  output logic        done,
  output logic        idle,
  output logic        axi_err,
  input  addr_t       a_in0a,
  input  addr_t       a_in1a,
  input  addr_t       a_in2a,
  input  addr_t       a_in0t,
  input  addr_t       a_outa,
  input  addr_t       a_outt,
  input  addr_t       a_outg,
  input  logic [31:0] n_crystals,   // N
  input  logic [31:0] n_samples,    // size
  // read ports (bundles 0, 1, 2)
  output logic        rd_req_valid [3],
  input  logic        rd_req_ready [3],
  output addr_t       rd_req_addr  [3],
  input  logic        rd_rsp_valid [3],
  input  data_t       rd_rsp_data  [3],
  input  logic        rd_rsp_err   [3],
  // write port (bundle 3)
  output logic        wr_req_valid,
  input  logic        wr_req_ready,
  output addr_t       wr_req_addr,
  output data_t       wr_req_data,
  input  logic        wr_done,
  input  logic        wr_err,
  // datapath
  output logic        dp_clear,
  output logic        dp_valid,
  output fp32_t       dp_w_a,
  output fp32_t       dp_w_t,
  output logic [31:0] dp_digi,
  output logic [31:0] dp_gain,
  input  fp32_t       dp_sum_a,
  input  fp32_t       dp_sum_t,
  input  logic        dp_gain_flag,
  input  logic        dp_busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_CRYSTAL, S_FETCH, S_DRAIN, S_WR_A, S_WR_T, S_WR_G, S_NEXT
  } state_e;

  state_e      state;
  addr_t       base_in0a, base_in1a, base_in2a, base_in0t, base_outa, base_outt, base_outg;
  logic [31:0] n_r, size_r;
  logic [31:0] j, i;
  logic [63:0] row;                 // j*size, in elements
  // fetch bookkeeping: bit 0 in0a, 1 in1a, 2 in2a, 3 in0t
  logic [3:0]  issued, got;
  data_t       v_in0a, v_in1a, v_in2a, v_in0t;

  function automatic addr_t elem(addr_t base, logic [63:0] idx);
    return base + idx * ELEM_BYTES;
  endfunction

  // Read requests are combinational on the fetch bookkeeping.
  always_comb begin
    rd_req_valid[0] = (state == S_FETCH) && !issued[0];
    rd_req_valid[1] = (state == S_FETCH) && !issued[1];
    rd_req_valid[2] = (state == S_FETCH) && (!issued[2] || (got[2] && !issued[3]));
    rd_req_addr[0]  = elem(base_in0a, 64'(i));
    rd_req_addr[1]  = elem(base_in1a, row + 64'(i));
    rd_req_addr[2]  = !issued[2] ? elem(base_in2a, row + 64'(i)) : elem(base_in0t, 64'(i));
  end

  assign idle = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      axi_err   <= 1'b0;
      base_in0a <= '0; base_in1a <= '0; base_in2a <= '0; base_in0t <= '0;
      base_outa <= '0; base_outt <= '0; base_outg <= '0;
      n_r <= '0; size_r <= '0; j <= '0; i <= '0; row <= '0;
      v_in0a <= '0; v_in1a <= '0; v_in2a <= '0; v_in0t <= '0;
      dp_clear <= 1'b0; dp_valid <= 1'b0;
      dp_w_a <= '0; dp_w_t <= '0; dp_digi <= '0; dp_gain <= '0;
      wr_req_valid <= 1'b0; wr_req_addr <= '0; wr_req_data <= '0;
    end else begin
      done     <= 1'b0;
      dp_clear <= 1'b0;
      dp_valid <= 1'b0;

      // collect read responses and errors
      if (rd_rsp_valid[0]) begin v_in0a <= rd_rsp_data[0]; got[0] <= 1'b1; end
      if (rd_rsp_valid[1]) begin v_in1a <= rd_rsp_data[1]; got[1] <= 1'b1; end
      if (rd_rsp_valid[2]) begin
        if (!got[2]) begin v_in2a <= rd_rsp_data[2]; got[2] <= 1'b1; end
        else         begin v_in0t <= rd_rsp_data[2]; got[3] <= 1'b1; end
      end
      for (int p = 0; p < 3; p++)
        if (rd_rsp_valid[p] && rd_rsp_err[p]) axi_err <= 1'b1;
      if (wr_done && wr_err) axi_err <= 1'b1;

      // a write request is held until the write port takes it
      if (wr_req_valid && wr_req_ready) wr_req_valid <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          base_in0a <= a_in0a; base_in1a <= a_in1a; base_in2a <= a_in2a;
          base_in0t <= a_in0t; base_outa <= a_outa; base_outt <= a_outt;
          base_outg <= a_outg;
          n_r       <= n_crystals;
          size_r    <= n_samples;
          axi_err   <= 1'b0;
          j         <= '0;
          row       <= '0;
          if ($signed(n_crystals) <= 0) begin
            done  <= 1'b1;
          end else begin
            state <= S_CRYSTAL;
          end
        end

        S_CRYSTAL: begin
          dp_clear <= 1'b1;
          i        <= '0;
          issued   <= '0;
          got      <= '0;
          state    <= ($signed(size_r) <= 0) ? S_DRAIN : S_FETCH;
        end

        S_FETCH: begin
          if (rd_req_valid[0] && rd_req_ready[0]) issued[0] <= 1'b1;
          if (rd_req_valid[1] && rd_req_ready[1]) issued[1] <= 1'b1;
          if (rd_req_valid[2] && rd_req_ready[2]) begin
            if (!issued[2]) issued[2] <= 1'b1;
            else            issued[3] <= 1'b1;
          end
          if (got == 4'b1111) begin
            dp_valid <= 1'b1;
            dp_w_a   <= v_in0a;
            dp_w_t   <= v_in0t;
            dp_digi  <= v_in1a;
            dp_gain  <= v_in2a;
            issued   <= '0;
            got      <= '0;
            i        <= i + 32'd1;
            if (i + 32'd1 == size_r) state <= S_DRAIN;
          end
        end

        S_DRAIN: if (!dp_busy && !dp_valid && !dp_clear) begin
          wr_req_valid <= 1'b1;
          wr_req_addr  <= elem(base_outa, 64'(j));
          wr_req_data  <= dp_sum_a;
          state        <= S_WR_A;
        end

        S_WR_A: if (wr_done) begin
          wr_req_valid <= 1'b1;
          wr_req_addr  <= elem(base_outt, 64'(j));
          wr_req_data  <= dp_sum_t;
          state        <= S_WR_T;
        end

        S_WR_T: if (wr_done) begin
          if (dp_gain_flag) begin
            wr_req_valid <= 1'b1;
            wr_req_addr  <= elem(base_outg, 64'(j));
            wr_req_data  <= 32'd1;
            state        <= S_WR_G;
          end else begin
            state <= S_NEXT;
          end
        end

        S_WR_G: if (wr_done) state <= S_NEXT;

        S_NEXT: begin
          j   <= j + 32'd1;
          row <= row + 64'(size_r);
          if (j + 32'd1 == n_r) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_CRYSTAL;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: a write request holds until taken; reads are issued only
  // while fetching.
  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wr_req_valid && !wr_req_ready |=> wr_req_valid && $stable(wr_req_addr) && $stable(wr_req_data));
  a_one_sample: assert property (@(posedge clk) disable iff (!rst_n)
    dp_valid |-> !dp_clear);

endmodule
