// axi_soc_top: AXI bus system with a performance monitor.
//
// NUM_MASTERS AXI masters (axi_master) share one interconnect
// (axi_interconnect: master controller, write and read arbiters, address
// decoders, slave controller) in front of NUM_SLAVES memory slaves (axi_slave,
// MEM_BYTES bytes each). The bus monitor (axi_bus_monitor) watches the shared
// bus between the two controllers, so it sees every transaction that any master
// makes, and keeps one write and one read counter bank per slave.
//
// Address map: bits [31:28] select the slave (0x0..., 0x1..., 0x2...); other
// regions answer DECERR. Each master is driven from outside through its user
// ports: write and read commands, a write-data stream, write completions and a
// read-data stream, indexed by master. The monitor's control register and its
// counters are ports too. All parts share one clock (aclk, 100 MHz in the
// document's simulations) and the active-low reset aresetn.
module axi_soc_top
  import axi_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 2,
  parameter int unsigned NUM_SLAVES  = 3,
  parameter int unsigned MEM_BYTES   = 128
) (
  input  logic                      aclk,
  input  logic                      aresetn,
  // per-master user ports
  input  logic [NUM_MASTERS-1:0]    wcmd_valid,
  output logic [NUM_MASTERS-1:0]    wcmd_ready,
  input  ax_t                       wcmd [NUM_MASTERS],
  input  logic [NUM_MASTERS-1:0]    wd_valid,
  output logic [NUM_MASTERS-1:0]    wd_ready,
  input  logic [DATA_W-1:0]         wd_data [NUM_MASTERS],
  input  logic [STRB_W-1:0]         wd_strb [NUM_MASTERS],
  output logic [NUM_MASTERS-1:0]    b_done,
  output resp_e                     b_resp [NUM_MASTERS],
  output logic [ID_W-1:0]           b_id [NUM_MASTERS],
  input  logic [NUM_MASTERS-1:0]    rcmd_valid,
  output logic [NUM_MASTERS-1:0]    rcmd_ready,
  input  ax_t                       rcmd [NUM_MASTERS],
  output logic [NUM_MASTERS-1:0]    rd_valid,
  input  logic [NUM_MASTERS-1:0]    rd_ready,
  output r_t                        rd [NUM_MASTERS],
  // bus monitor
  input  logic                      mon_cfg_we,
  input  logic [1:0]                mon_cfg_wdata,
  output logic                      mon_enable,
  output perf_cnt_t                 mon_wr_pc [NUM_SLAVES],
  output perf_cnt_t                 mon_rd_pc [NUM_SLAVES],
  // current grants of the write and read arbiters (one-hot, for observation)
  output logic [NUM_MASTERS-1:0]    wr_grant,
  output logic [NUM_MASTERS-1:0]    rd_grant
);

  // master side
  logic [NUM_MASTERS-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic [NUM_MASTERS-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t m_aw [NUM_MASTERS];
  ax_t m_ar [NUM_MASTERS];
  w_t  m_w  [NUM_MASTERS];
  b_t  m_b;
  r_t  m_r;
  // slave side
  logic [NUM_SLAVES-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic [NUM_SLAVES-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t s_aw, s_ar;
  w_t  s_w;
  b_t  s_b [NUM_SLAVES];
  r_t  s_r [NUM_SLAVES];
  // shared bus taps
  logic mon_aw_valid, mon_aw_ready, mon_w_valid, mon_w_ready, mon_b_valid, mon_b_ready;
  logic mon_ar_valid, mon_ar_ready, mon_r_valid, mon_r_ready;
  ax_t  mon_aw, mon_ar;
  w_t   mon_w;
  b_t   mon_b;
  r_t   mon_r;

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    axi_master u_master (
      .aclk, .aresetn,
      .wcmd_valid(wcmd_valid[m]), .wcmd_ready(wcmd_ready[m]), .wcmd(wcmd[m]),
      .wd_valid(wd_valid[m]), .wd_ready(wd_ready[m]), .wd_data(wd_data[m]), .wd_strb(wd_strb[m]),
      .b_done(b_done[m]), .b_resp(b_resp[m]), .b_id(b_id[m]),
      .rcmd_valid(rcmd_valid[m]), .rcmd_ready(rcmd_ready[m]), .rcmd(rcmd[m]),
      .rd_valid(rd_valid[m]), .rd_ready(rd_ready[m]), .rd(rd[m]),
      .aw_valid(m_aw_valid[m]), .aw_ready(m_aw_ready[m]), .aw(m_aw[m]),
      .w_valid(m_w_valid[m]), .w_ready(m_w_ready[m]), .w(m_w[m]),
      .b_valid(m_b_valid[m]), .b_ready(m_b_ready[m]), .b(m_b),
      .ar_valid(m_ar_valid[m]), .ar_ready(m_ar_ready[m]), .ar(m_ar[m]),
      .r_valid(m_r_valid[m]), .r_ready(m_r_ready[m]), .r(m_r)
    );
  end

  axi_interconnect #(.N(NUM_MASTERS), .S(NUM_SLAVES)) u_ic (
    .clk(aclk), .rst_n(aresetn),
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_b_valid, .m_b_ready, .m_b, .m_ar_valid, .m_ar_ready, .m_ar,
    .m_r_valid, .m_r_ready, .m_r,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b, .s_ar_valid, .s_ar_ready, .s_ar,
    .s_r_valid, .s_r_ready, .s_r,
    .mon_aw_valid, .mon_aw_ready, .mon_aw, .mon_w_valid, .mon_w_ready, .mon_w,
    .mon_b_valid, .mon_b_ready, .mon_b, .mon_ar_valid, .mon_ar_ready, .mon_ar,
    .mon_r_valid, .mon_r_ready, .mon_r, .wr_grant, .rd_grant
  );

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    axi_slave #(.MEM_BYTES(MEM_BYTES)) u_slave (
      .aclk, .aresetn,
      .aw_valid(s_aw_valid[s]), .aw_ready(s_aw_ready[s]), .aw(s_aw),
      .w_valid(s_w_valid[s]), .w_ready(s_w_ready[s]), .w(s_w),
      .b_valid(s_b_valid[s]), .b_ready(s_b_ready[s]), .b(s_b[s]),
      .ar_valid(s_ar_valid[s]), .ar_ready(s_ar_ready[s]), .ar(s_ar),
      .r_valid(s_r_valid[s]), .r_ready(s_r_ready[s]), .r(s_r[s])
    );
  end

  axi_bus_monitor #(.NUM_PC(NUM_SLAVES)) u_mon (
    .clk(aclk), .rst_n(aresetn),
    .cfg_we(mon_cfg_we), .cfg_wdata(mon_cfg_wdata), .enable(mon_enable),
    .aw_valid(mon_aw_valid), .aw_ready(mon_aw_ready), .aw_addr(mon_aw.addr),
    .aw_len(mon_aw.len), .aw_size(mon_aw.size),
    .w_valid(mon_w_valid), .w_ready(mon_w_ready), .w_last(mon_w.last),
    .ar_valid(mon_ar_valid), .ar_ready(mon_ar_ready), .ar_addr(mon_ar.addr),
    .ar_len(mon_ar.len), .ar_size(mon_ar.size),
    .r_valid(mon_r_valid), .r_ready(mon_r_ready), .r_last(mon_r.last),
    .wr_pc(mon_wr_pc), .rd_pc(mon_rd_pc)
  );

endmodule
