// axi_slave_ctrl: slave-side multiplexer of the interconnect.
//
// Write group: in W_ADDR the shared AW goes to the slave chosen by the write
// address decoder (aw_idx, aw_hit); the chosen index is kept when AW is
// accepted. In W_DATA the shared W goes to that slave until the beat with WLAST
// is accepted; in W_RESP that slave's B comes back to the shared bus, and its
// acceptance ends the transaction (wr_done, one cycle, to the write arbiter).
// Read group: in R_ADDR the shared AR goes to the slave chosen by the read
// address decoder; in R_DATA that slave's R beats come back until RLAST is
// accepted (rd_done to the read arbiter). So the W, B and R channels are routed
// by the index decoded on their address channel.
//
// An address that maps to no slave is answered here: its AW is accepted, its
// write beats are taken and dropped and the response is DECERR; a read gets
// ARLEN+1 beats of zero data with DECERR. The document describes the
// multiplexing by the decoder's control signals; the phase tracking and the
// error response are this design's own. Slaves are addressed one transaction at
// a time per group.
module axi_slave_ctrl
  import axi_pkg::*;
#(
  parameter int unsigned S = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // decoders
  input  logic [REGION_W-1:0] aw_idx,
  input  logic                aw_hit,
  input  logic [REGION_W-1:0] ar_idx,
  input  logic                ar_hit,
  output logic                wr_done,
  output logic                rd_done,
  // shared bus
  input  logic                bus_aw_valid,
  output logic                bus_aw_ready,
  input  ax_t                 bus_aw,
  input  logic                bus_w_valid,
  output logic                bus_w_ready,
  input  w_t                  bus_w,
  output logic                bus_b_valid,
  input  logic                bus_b_ready,
  output b_t                  bus_b,
  input  logic                bus_ar_valid,
  output logic                bus_ar_ready,
  input  ax_t                 bus_ar,
  output logic                bus_r_valid,
  input  logic                bus_r_ready,
  output r_t                  bus_r,
  // slaves
  output logic [S-1:0]        s_aw_valid,
  input  logic [S-1:0]        s_aw_ready,
  output ax_t                 s_aw,
  output logic [S-1:0]        s_w_valid,
  input  logic [S-1:0]        s_w_ready,
  output w_t                  s_w,
  input  logic [S-1:0]        s_b_valid,
  output logic [S-1:0]        s_b_ready,
  input  b_t                  s_b [S],
  output logic [S-1:0]        s_ar_valid,
  input  logic [S-1:0]        s_ar_ready,
  output ax_t                 s_ar,
  input  logic [S-1:0]        s_r_valid,
  output logic [S-1:0]        s_r_ready,
  input  r_t                  s_r [S]
);

  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1;

  typedef enum logic [1:0] {W_ADDR, W_DATA, W_RESP} wph_e;
  typedef enum logic       {R_ADDR, R_DATA} rph_e;

  wph_e                wph;
  rph_e                rph;
  logic [SW-1:0]       wsel, rsel;       // slave kept from the address phase
  logic                werr, rerr;     // address mapped to no slave
  logic [ID_W-1:0]     wid_q, rid_q;
  logic [LEN_W-1:0]    rlen_q, rcnt;   // for the DECERR read beats

  logic aw_hs, w_hs, b_hs, ar_hs, r_hs;
  assign aw_hs = bus_aw_valid && bus_aw_ready;
  assign w_hs  = bus_w_valid  && bus_w_ready;
  assign b_hs  = bus_b_valid  && bus_b_ready;
  assign ar_hs = bus_ar_valid && bus_ar_ready;
  assign r_hs  = bus_r_valid  && bus_r_ready;

  assign wr_done = (wph == W_RESP) && b_hs;
  assign rd_done = (rph == R_DATA) && r_hs && bus_r.last;

  assign s_aw = bus_aw;
  assign s_w  = bus_w;
  assign s_ar = bus_ar;

  // ---------------- write group routing ----------------
  always_comb begin
    s_aw_valid   = '0;
    s_w_valid    = '0;
    s_b_ready    = '0;
    bus_aw_ready = 1'b0;
    bus_w_ready  = 1'b0;
    bus_b_valid  = 1'b0;
    bus_b        = '0;
    unique case (wph)
      W_ADDR: begin
        if (aw_hit) begin
          s_aw_valid[SW'(aw_idx)] = bus_aw_valid;
          bus_aw_ready       = s_aw_ready[SW'(aw_idx)];
        end else begin
          bus_aw_ready = 1'b1;
        end
      end
      W_DATA: begin
        if (werr) begin
          bus_w_ready = 1'b1;
        end else begin
          s_w_valid[wsel] = bus_w_valid;
          bus_w_ready     = s_w_ready[wsel];
        end
      end
      W_RESP: begin
        if (werr) begin
          bus_b_valid = 1'b1;
          bus_b.id    = wid_q;
          bus_b.resp  = RESP_DECERR;
        end else begin
          bus_b_valid     = s_b_valid[wsel];
          bus_b           = s_b[wsel];
          s_b_ready[wsel] = bus_b_ready;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wph   <= W_ADDR;
      wsel  <= '0;
      werr  <= 1'b0;
      wid_q <= '0;
    end else begin
      unique case (wph)
        W_ADDR: if (aw_hs) begin
          wsel  <= SW'(aw_idx);
          werr  <= !aw_hit;
          wid_q <= bus_aw.id;
          wph   <= W_DATA;
        end
        W_DATA: if (w_hs && bus_w.last) wph <= W_RESP;
        W_RESP: if (b_hs) wph <= W_ADDR;
        default: wph <= W_ADDR;
      endcase
    end
  end

  // ---------------- read group routing ----------------
  always_comb begin
    s_ar_valid   = '0;
    s_r_ready    = '0;
    bus_ar_ready = 1'b0;
    bus_r_valid  = 1'b0;
    bus_r        = '0;
    unique case (rph)
      R_ADDR: begin
        if (ar_hit) begin
          s_ar_valid[SW'(ar_idx)] = bus_ar_valid;
          bus_ar_ready       = s_ar_ready[SW'(ar_idx)];
        end else begin
          bus_ar_ready = 1'b1;
        end
      end
      R_DATA: begin
        if (rerr) begin
          bus_r_valid = 1'b1;
          bus_r.id    = rid_q;
          bus_r.resp  = RESP_DECERR;
          bus_r.last  = (rcnt == rlen_q);
        end else begin
          bus_r_valid     = s_r_valid[rsel];
          bus_r           = s_r[rsel];
          s_r_ready[rsel] = bus_r_ready;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rph    <= R_ADDR;
      rsel   <= '0;
      rerr   <= 1'b0;
      rid_q  <= '0;
      rlen_q <= '0;
      rcnt   <= '0;
    end else begin
      unique case (rph)
        R_ADDR: if (ar_hs) begin
          rsel   <= SW'(ar_idx);
          rerr   <= !ar_hit;
          rid_q  <= bus_ar.id;
          rlen_q <= bus_ar.len;
          rcnt   <= '0;
          rph    <= R_DATA;
        end
        R_DATA: if (r_hs) begin
          rcnt <= rcnt + 1'b1;
          if (bus_r.last) rph <= R_ADDR;
        end
        default: rph <= R_ADDR;
      endcase
    end
  end

endmodule
