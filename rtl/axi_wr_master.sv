// axi_wr_master: single-beat AXI4 write master, one transaction in flight.
//
// The kernel's outputs (outA, outT, outG) share one AXI4 memory-mapped master
// bundle. This block turns a word write from the controller into one AXI
// write: AW (len 0, full-width INCR) and the single W beat (all strobes, LAST
// set) are raised together and each is dropped as soon as it is accepted;
// then BREADY is held until the write response arrives.
//
// Request side: req_valid/req_ready handshake with req_addr and req_data.
// Completion: done is a one-cycle pulse when B is received; err is set with it
// if BRESP is not OKAY.
// Reset: rst_n is synchronous and active low, like a Vitis kernel's ap_rst_n.
// Timing: with a memory that accepts AW and W at once and answers B in the
// next cycle, a write takes 3 cycles from acceptance to done.
//
// The burst fields (len 0, size 4 bytes, INCR) and the W strobes/last are
// constant outputs, since every transfer is one full word.
//
// Single beats and one outstanding write are this design's choices; the
// algorithm only names the AXI master interface and its bundles.
module axi_wr_master
  import varr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // word request
  input  logic    req_valid,
  output logic    req_ready,
  input  addr_t   req_addr,
  input  data_t   req_data,
  output logic    done,
  output logic    err,
  // AXI4 write address / data / response channels
  output axi_ax_t m_aw,
  output logic    m_awvalid,
  input  logic    m_awready,
  output axi_w_t  m_w,
  output logic    m_wvalid,
  input  logic    m_wready,
  input  axi_b_t  m_b,
  input  logic    m_bvalid,
  output logic    m_bready
);

  typedef enum logic [1:0] {WR_IDLE, WR_SEND, WR_RESP} wr_state_e;
  wr_state_e state;

  assign req_ready = (state == WR_IDLE);
  assign m_bready  = (state == WR_RESP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= WR_IDLE;
      m_aw      <= single_beat('0);
      m_w       <= '0;
      m_awvalid <= 1'b0;
      m_wvalid  <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        WR_IDLE: if (req_valid) begin
          m_aw      <= single_beat(req_addr);
          m_w.data  <= req_data;
          m_w.strb  <= '1;
          m_w.last  <= 1'b1;
          m_awvalid <= 1'b1;
          m_wvalid  <= 1'b1;
          state     <= WR_SEND;
        end
        WR_SEND: begin
          if (m_awready) m_awvalid <= 1'b0;
          if (m_wready)  m_wvalid  <= 1'b0;
          if ((m_awready || !m_awvalid) && (m_wready || !m_wvalid)) state <= WR_RESP;
        end
        WR_RESP: if (m_bvalid) begin
          done  <= 1'b1;
          err   <= (m_b.resp != RESP_OKAY);
          state <= WR_IDLE;
        end
        default: state <= WR_IDLE;
      endcase
    end
  end

  // AXI rules: a raised AWVALID / WVALID and its payload hold until accepted.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_aw));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_w));

endmodule
