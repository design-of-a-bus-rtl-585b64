// axi_master_ctrl: master-side multiplexer of the interconnect.
//
// The master granted the write group (wr_granted, wr_idx) has its AW and W
// outputs and its BREADY placed on the shared bus; the master granted the read
// group (rd_granted, rd_idx) has its AR output and RREADY placed there. In the
// other direction AWREADY, WREADY, BVALID, ARREADY and RVALID from the shared bus
// are steered to the granted master only; the B and R payloads go to all masters
// and are qualified by each master's own VALID. Masters without a grant see
// every READY and VALID low. Purely combinational, no added latency. The
// document describes the multiplexing and demultiplexing under the arbiter's
// grant; the port layout is this design's own.
module axi_master_ctrl
  import axi_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic                 wr_granted,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  logic                 rd_granted,
  input  logic [$clog2(N)-1:0] rd_idx,
  // masters
  input  logic [N-1:0]         m_aw_valid,
  output logic [N-1:0]         m_aw_ready,
  input  ax_t                  m_aw [N],
  input  logic [N-1:0]         m_w_valid,
  output logic [N-1:0]         m_w_ready,
  input  w_t                   m_w [N],
  output logic [N-1:0]         m_b_valid,
  input  logic [N-1:0]         m_b_ready,
  output b_t                   m_b,
  input  logic [N-1:0]         m_ar_valid,
  output logic [N-1:0]         m_ar_ready,
  input  ax_t                  m_ar [N],
  output logic [N-1:0]         m_r_valid,
  input  logic [N-1:0]         m_r_ready,
  output r_t                   m_r,
  // shared bus
  output logic                 bus_aw_valid,
  input  logic                 bus_aw_ready,
  output ax_t                  bus_aw,
  output logic                 bus_w_valid,
  input  logic                 bus_w_ready,
  output w_t                   bus_w,
  input  logic                 bus_b_valid,
  output logic                 bus_b_ready,
  input  b_t                   bus_b,
  output logic                 bus_ar_valid,
  input  logic                 bus_ar_ready,
  output ax_t                  bus_ar,
  input  logic                 bus_r_valid,
  output logic                 bus_r_ready,
  input  r_t                   bus_r
);

  always_comb begin
    bus_aw_valid = wr_granted && m_aw_valid[wr_idx];
    bus_aw       = wr_granted ? m_aw[wr_idx] : '0;
    bus_w_valid  = wr_granted && m_w_valid[wr_idx];
    bus_w        = wr_granted ? m_w[wr_idx] : '0;
    bus_b_ready  = wr_granted && m_b_ready[wr_idx];
    bus_ar_valid = rd_granted && m_ar_valid[rd_idx];
    bus_ar       = rd_granted ? m_ar[rd_idx] : '0;
    bus_r_ready  = rd_granted && m_r_ready[rd_idx];

    m_aw_ready = '0;
    m_w_ready  = '0;
    m_b_valid  = '0;
    m_ar_ready = '0;
    m_r_valid  = '0;
    if (wr_granted) begin
      m_aw_ready[wr_idx] = bus_aw_ready;
      m_w_ready[wr_idx]  = bus_w_ready;
      m_b_valid[wr_idx]  = bus_b_valid;
    end
    if (rd_granted) begin
      m_ar_ready[rd_idx] = bus_ar_ready;
      m_r_valid[rd_idx]  = bus_r_valid;
    end
  end

  assign m_b = bus_b;
  assign m_r = bus_r;

endmodule
