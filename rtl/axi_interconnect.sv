// axi_interconnect: shared-bus AXI interconnect between N masters and S slaves.
//
// It is built from the four parts the document names: a master controller
// (axi_master_ctrl), two arbiters (axi_arbiter, one for the write group AW/W/B
// and one for the read group AR/R), address decoders (axi_addr_decoder, on
// AWADDR and ARADDR; the W, B and R channels follow the index decoded on their
// address channel) and a slave controller (axi_slave_ctrl). One master can
// write while another reads, each group carrying one transaction at a time.
//
// A master's AWVALID or ARVALID is its request; the grant is registered, so an
// address reaches the slave at the earliest two cycles after the master raises
// VALID (one to arbitrate, then the combinational path through both
// controllers). The group is released one cycle after the write response or the
// last read beat is accepted. The shared bus between the two controllers is
// also brought out (mon_* ports) so that a bus monitor can watch it.
module axi_interconnect
  import axi_pkg::*;
#(
  parameter int unsigned N = 2,
  parameter int unsigned S = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // master ports
  input  logic [N-1:0]  m_aw_valid,
  output logic [N-1:0]  m_aw_ready,
  input  ax_t           m_aw [N],
  input  logic [N-1:0]  m_w_valid,
  output logic [N-1:0]  m_w_ready,
  input  w_t            m_w [N],
  output logic [N-1:0]  m_b_valid,
  input  logic [N-1:0]  m_b_ready,
  output b_t            m_b,
  input  logic [N-1:0]  m_ar_valid,
  output logic [N-1:0]  m_ar_ready,
  input  ax_t           m_ar [N],
  output logic [N-1:0]  m_r_valid,
  input  logic [N-1:0]  m_r_ready,
  output r_t            m_r,
  // slave ports
  output logic [S-1:0]  s_aw_valid,
  input  logic [S-1:0]  s_aw_ready,
  output ax_t           s_aw,
  output logic [S-1:0]  s_w_valid,
  input  logic [S-1:0]  s_w_ready,
  output w_t            s_w,
  input  logic [S-1:0]  s_b_valid,
  output logic [S-1:0]  s_b_ready,
  input  b_t            s_b [S],
  output logic [S-1:0]  s_ar_valid,
  input  logic [S-1:0]  s_ar_ready,
  output ax_t           s_ar,
  input  logic [S-1:0]  s_r_valid,
  output logic [S-1:0]  s_r_ready,
  input  r_t            s_r [S],
  // shared bus, for monitoring
  output logic          mon_aw_valid,
  output logic          mon_aw_ready,
  output ax_t           mon_aw,
  output logic          mon_w_valid,
  output logic          mon_w_ready,
  output w_t            mon_w,
  output logic          mon_b_valid,
  output logic          mon_b_ready,
  output b_t            mon_b,
  output logic          mon_ar_valid,
  output logic          mon_ar_ready,
  output ax_t           mon_ar,
  output logic          mon_r_valid,
  output logic          mon_r_ready,
  output r_t            mon_r,
  output logic [N-1:0]  wr_grant,
  output logic [N-1:0]  rd_grant
);

  localparam int unsigned IW = $clog2(N);

  logic          wr_granted, rd_granted, wr_done, rd_done;
  logic [IW-1:0] wr_idx, rd_idx;
  logic [REGION_W-1:0] aw_idx, ar_idx;
  logic          aw_hit, ar_hit;

  logic bus_aw_valid, bus_aw_ready, bus_w_valid, bus_w_ready, bus_b_valid, bus_b_ready;
  logic bus_ar_valid, bus_ar_ready, bus_r_valid, bus_r_ready;
  ax_t  bus_aw, bus_ar;
  w_t   bus_w;
  b_t   bus_b;
  r_t   bus_r;

  axi_arbiter #(.N(N)) u_wr_arb (
    .clk, .rst_n, .req(m_aw_valid), .done(wr_done),
    .grant(wr_grant), .grant_idx(wr_idx), .granted(wr_granted)
  );

  axi_arbiter #(.N(N)) u_rd_arb (
    .clk, .rst_n, .req(m_ar_valid), .done(rd_done),
    .grant(rd_grant), .grant_idx(rd_idx), .granted(rd_granted)
  );

  axi_addr_decoder #(.NUM_SLAVES(S)) u_aw_dec (.addr(bus_aw.addr), .idx(aw_idx), .hit(aw_hit));
  axi_addr_decoder #(.NUM_SLAVES(S)) u_ar_dec (.addr(bus_ar.addr), .idx(ar_idx), .hit(ar_hit));

  axi_master_ctrl #(.N(N)) u_mctrl (
    .wr_granted, .wr_idx, .rd_granted, .rd_idx,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_b_valid, .m_b_ready, .m_b, .m_ar_valid, .m_ar_ready, .m_ar,
    .m_r_valid, .m_r_ready, .m_r,
    .bus_aw_valid, .bus_aw_ready, .bus_aw, .bus_w_valid, .bus_w_ready, .bus_w,
    .bus_b_valid, .bus_b_ready, .bus_b, .bus_ar_valid, .bus_ar_ready, .bus_ar,
    .bus_r_valid, .bus_r_ready, .bus_r
  );

  axi_slave_ctrl #(.S(S)) u_sctrl (
    .clk, .rst_n, .aw_idx, .aw_hit, .ar_idx, .ar_hit, .wr_done, .rd_done,
    .bus_aw_valid, .bus_aw_ready, .bus_aw, .bus_w_valid, .bus_w_ready, .bus_w,
    .bus_b_valid, .bus_b_ready, .bus_b, .bus_ar_valid, .bus_ar_ready, .bus_ar,
    .bus_r_valid, .bus_r_ready, .bus_r,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b, .s_ar_valid, .s_ar_ready, .s_ar,
    .s_r_valid, .s_r_ready, .s_r
  );

  assign mon_aw_valid = bus_aw_valid;
  assign mon_aw_ready = bus_aw_ready;
  assign mon_aw       = bus_aw;
  assign mon_w_valid  = bus_w_valid;
  assign mon_w_ready  = bus_w_ready;
  assign mon_w        = bus_w;
  assign mon_b_valid  = bus_b_valid;
  assign mon_b_ready  = bus_b_ready;
  assign mon_b        = bus_b;
  assign mon_ar_valid = bus_ar_valid;
  assign mon_ar_ready = bus_ar_ready;
  assign mon_ar       = bus_ar;
  assign mon_r_valid  = bus_r_valid;
  assign mon_r_ready  = bus_r_ready;
  assign mon_r        = bus_r;

endmodule
