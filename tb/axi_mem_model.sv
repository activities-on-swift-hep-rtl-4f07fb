// axi_mem_model: behavioural AXI4 slave memory for the testbenches.
//
// Stands in for the card's DDR (and its memory controller) on one master
// bundle. Storage is a sparse word array indexed by byte address / 4, which
// testbenches fill and inspect directly (mem). Single-beat reads and writes
// only, matching the masters in this design. Each handshake is delayed at
// random: ARREADY, AWREADY and WREADY are withheld, and RVALID/BVALID come
// late, each with probability stall_pct percent per cycle (STALL_PCT at
// start; a testbench may change it). Any access at an
// address at or above ERR_BASE answers SLVERR (a read then returns zero). Counters record the number of
// reads, writes and stall cycles seen.
module axi_mem_model
  import varr_pkg::*;
#(
  parameter int unsigned STALL_PCT = 30,
  parameter logic [63:0] ERR_BASE  = 64'hffff_0000_0000_0000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  axi_ax_t s_ar,
  input  logic    s_arvalid,
  output logic    s_arready,
  output axi_r_t  s_r,
  output logic    s_rvalid,
  input  logic    s_rready,
  input  axi_ax_t s_aw,
  input  logic    s_awvalid,
  output logic    s_awready,
  input  axi_w_t  s_w,
  input  logic    s_wvalid,
  output logic    s_wready,
  output axi_b_t  s_b,
  output logic    s_bvalid,
  input  logic    s_bready
);

  logic [31:0] mem [longint];
  int unsigned stall_pct = STALL_PCT;   // may be changed at run time
  int unsigned n_reads = 0, n_writes = 0, n_stalls = 0, n_errs = 0;

  logic    r_pend, aw_have, w_have;
  axi_ax_t aw_q;
  axi_w_t  w_q;

  function automatic bit stall();
    return ($urandom % 100) < stall_pct;
  endfunction

  function automatic logic [31:0] rd(longint a);
    if (mem.exists(a)) return mem[a];
    return 32'd0;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      s_arready <= 1'b0; s_rvalid <= 1'b0; s_r <= '0;
      s_awready <= 1'b0; s_wready <= 1'b0; s_bvalid <= 1'b0; s_b <= '0;
      r_pend <= 1'b0; aw_have <= 1'b0; w_have <= 1'b0; aw_q <= '0; w_q <= '0;
    end else begin
      // read: address, then the data beat after a random delay
      if (s_arvalid && s_arready) begin
        s_arready <= 1'b0;
        r_pend    <= 1'b1;
        s_r.data  <= (s_ar.addr >= ERR_BASE) ? 32'd0 : rd(longint'(s_ar.addr >> 2));
        s_r.resp  <= (s_ar.addr >= ERR_BASE) ? RESP_SLVERR : RESP_OKAY;
        s_r.last  <= 1'b1;
        n_reads++;
        if (s_ar.addr >= ERR_BASE) n_errs++;
      end else if (s_arvalid && !r_pend && !s_arready) begin
        if (stall()) n_stalls++; else s_arready <= 1'b1;
      end
      if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
        r_pend   <= 1'b0;
      end else if (r_pend && !s_rvalid) begin
        if (stall()) n_stalls++; else s_rvalid <= 1'b1;
      end

      // write address and data
      if (s_awvalid && s_awready) begin
        s_awready <= 1'b0; aw_have <= 1'b1; aw_q <= s_aw;
      end else if (s_awvalid && !aw_have && !s_awready) begin
        if (stall()) n_stalls++; else s_awready <= 1'b1;
      end
      if (s_wvalid && s_wready) begin
        s_wready <= 1'b0; w_have <= 1'b1; w_q <= s_w;
      end else if (s_wvalid && !w_have && !s_wready) begin
        if (stall()) n_stalls++; else s_wready <= 1'b1;
      end
      if (aw_have && w_have && !s_bvalid) begin
        if (!stall()) begin
          if (aw_q.addr >= ERR_BASE) begin
            s_b.resp <= RESP_SLVERR;
            n_errs++;
          end else begin
            s_b.resp <= RESP_OKAY;
            mem[longint'(aw_q.addr >> 2)] = w_q.data;
          end
          n_writes++;
          s_bvalid <= 1'b1;
          aw_have  <= 1'b0;
          w_have   <= 1'b0;
        end else n_stalls++;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
    end
  end

endmodule
