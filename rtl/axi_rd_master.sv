// axi_rd_master: single-beat AXI4 read master, one transaction in flight.
//
// Each argument bundle of the kernel that it reads from (in0a, in1a, and the
// shared in2a/in0t bundle) is an AXI4 memory-mapped master port into card
// memory. This block turns a word request from the controller into one AXI
// read: it drives AR with the address (len 0, full-width INCR), holds it until
// ARREADY, then waits with RREADY high for the data beat.
//
// Request side: req_valid/req_ready handshake with req_addr (byte address).
// Response side: rsp_valid is a one-cycle pulse carrying rsp_data and rsp_err
// (RRESP not OKAY); the requester must take it, there is no back-pressure.
// Reset: rst_n is synchronous and active low, like a Vitis kernel's ap_rst_n.
// Timing: a request is accepted while idle; AR is valid from the next cycle;
// the response pulses the cycle after the R beat is accepted. With ARREADY
// already high and the R beat in the cycle after AR, a read takes 3 cycles
// from request to response.
//
// The burst fields (len 0, size 4 bytes, INCR) are
// constant outputs, since every transfer is one full word.
//
// Single beats and one outstanding read are this design's choices; the
// algorithm only names the AXI master interface and its bundles.
module axi_rd_master
  import varr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // word request
  input  logic    req_valid,
  output logic    req_ready,
  input  addr_t   req_addr,
  output logic    rsp_valid,
  output data_t   rsp_data,
  output logic    rsp_err,
  // AXI4 read address / data channels
  output axi_ax_t m_ar,
  output logic    m_arvalid,
  input  logic    m_arready,
  input  axi_r_t  m_r,
  input  logic    m_rvalid,
  output logic    m_rready
);

  typedef enum logic [1:0] {RD_IDLE, RD_ADDR, RD_DATA} rd_state_e;
  rd_state_e state;

  assign req_ready = (state == RD_IDLE);
  assign m_arvalid = (state == RD_ADDR);
  assign m_rready  = (state == RD_DATA);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RD_IDLE;
      m_ar      <= single_beat('0);
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      rsp_err   <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        RD_IDLE: if (req_valid) begin
          m_ar  <= single_beat(req_addr);
          state <= RD_ADDR;
        end
        RD_ADDR: if (m_arready) state <= RD_DATA;
        RD_DATA: if (m_rvalid) begin
          rsp_valid <= 1'b1;
          rsp_data  <= m_r.data;
          rsp_err   <= (m_r.resp != RESP_OKAY) || !m_r.last;
          state     <= RD_IDLE;
        end
        default: state <= RD_IDLE;
      endcase
    end
  end

  // AXI rule: once ARVALID is raised, it and the AR payload hold until ARREADY.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_ar));

endmodule
