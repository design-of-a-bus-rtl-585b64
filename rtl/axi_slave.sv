// axi_slave: AXI memory slave holding MEM_BYTES bytes (mem[0:127][7:0] by
// default).
//
// Write side: in WIDLE it accepts one write address; in WDATA it accepts beats,
// writing the bytes whose WSTRB bit is set and stepping the address by the burst
// rule (FIXED, INCR or WRAP, see axi_pkg::next_addr); when WLAST is seen it
// drives BVALID with BID equal to WID and holds the response until BREADY, then
// returns all B signals to zero. Read side: in ARIDLE it accepts one read
// address; in RDATA it drives RDATA for the current address with RID equal to
// ARID and RVALID high, holding each beat until RREADY, with RLAST on beat
// ARLEN+1; each beat's data is read from memory into a register when the
// previous handshake completes, so it stays stable while RVALID waits. While ARESETn is low all outputs are zero.
//
// Byte lane k of a beat at address A is memory byte ((A & ~3) + k) mod
// MEM_BYTES, so narrow and unaligned transfers use the AXI byte lanes. Bursts
// whose beat size exceeds the 32-bit bus get SLVERR and change nothing. The
// address wraps modulo MEM_BYTES; the slave handles one write and one read burst
// at a time. Memory contents are not reset. The mapping of lanes to bytes, the
// SLVERR case and the one-burst-at-a-time limit are this design's choices.
module axi_slave
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 128
) (
  input  logic aclk,
  input  logic aresetn,
  input  logic aw_valid,
  output logic aw_ready,
  input  ax_t  aw,
  input  logic w_valid,
  output logic w_ready,
  input  w_t   w,
  output logic b_valid,
  input  logic b_ready,
  output b_t   b,
  input  logic ar_valid,
  output logic ar_ready,
  input  ax_t  ar,
  output logic r_valid,
  input  logic r_ready,
  output r_t   r
);

  localparam int unsigned IDX_W = $clog2(MEM_BYTES);

  typedef enum logic [1:0] {WIDLE, WDATA, WRESP} wstate_e;
  typedef enum logic [1:0] {ARIDLE, RDATA} rstate_e;

  logic [7:0] mem [MEM_BYTES];

  function automatic logic [IDX_W-1:0] lane_idx(logic [ADDR_W-1:0] a, int unsigned k);
    return IDX_W'((a & ~ADDR_W'(STRB_W - 1)) + ADDR_W'(k));
  endfunction

  wstate_e           wstate;
  rstate_e           rstate;
  ax_t               wcmd, rcmd;          // accepted commands
  logic [ADDR_W-1:0] waddr, raddr;        // address of the current beat
  logic [LEN_W-1:0]  rbeat;               // read beats sent so far
  logic              werr, rerr;
  logic [DATA_W-1:0] rdata_q;             // data of the beat on R

  function automatic logic [DATA_W-1:0] read_word(logic [ADDR_W-1:0] a);
    logic [DATA_W-1:0] d;
    for (int unsigned k = 0; k < STRB_W; k++) d[8*k +: 8] = mem[lane_idx(a, k)];
    return d;
  endfunction

  logic aw_hs, w_hs, b_hs, ar_hs, r_hs;
  assign aw_hs = aw_valid && aw_ready;
  assign w_hs  = w_valid && w_ready;
  assign b_hs  = b_valid && b_ready;
  assign ar_hs = ar_valid && ar_ready;
  assign r_hs  = r_valid && r_ready;

  assign aw_ready = (wstate == WIDLE);
  assign w_ready  = (wstate == WDATA);
  assign ar_ready = (rstate == ARIDLE);

  // ---------------- write address, write data, write response ----------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wstate  <= WIDLE;
      wcmd    <= '0;
      waddr   <= '0;
      werr    <= 1'b0;
      b_valid <= 1'b0;
      b       <= '0;
    end else begin
      unique case (wstate)
        WIDLE: if (aw_hs) begin
          wcmd   <= aw;
          waddr  <= aw.addr;
          werr   <= (aw.size > SIZE_W'($clog2(STRB_W)));
          wstate <= WDATA;
        end
        WDATA: if (w_hs) begin
          waddr <= next_addr(waddr, wcmd.addr, wcmd.len, wcmd.size, wcmd.burst);
          if (w.last) begin
            b_valid <= 1'b1;
            b.id    <= w.id;
            b.resp  <= werr ? RESP_SLVERR : RESP_OKAY;
            wstate  <= WRESP;
          end
        end
        WRESP: if (b_hs) begin
          b_valid <= 1'b0;
          b       <= '0;
          wstate  <= WIDLE;
        end
        default: wstate <= WIDLE;
      endcase
    end
  end

  always_ff @(posedge aclk) begin
    if (wstate == WDATA && w_hs && !werr) begin
      for (int unsigned k = 0; k < STRB_W; k++) begin
        if (w.strb[k]) mem[lane_idx(waddr, k)] <= w.data[8*k +: 8];
      end
    end
  end

  // ---------------- read address, read data ----------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      rstate  <= ARIDLE;
      rcmd    <= '0;
      raddr   <= '0;
      rbeat   <= '0;
      rerr    <= 1'b0;
      rdata_q <= '0;
      r_valid <= 1'b0;
    end else begin
      unique case (rstate)
        ARIDLE: if (ar_hs) begin
          rcmd    <= ar;
          raddr   <= ar.addr;
          rbeat   <= '0;
          rerr    <= (ar.size > SIZE_W'($clog2(STRB_W)));
          rdata_q <= read_word(ar.addr);
          r_valid <= 1'b1;
          rstate  <= RDATA;
        end
        RDATA: if (r_hs) begin
          raddr   <= next_addr(raddr, rcmd.addr, rcmd.len, rcmd.size, rcmd.burst);
          rdata_q <= read_word(next_addr(raddr, rcmd.addr, rcmd.len, rcmd.size, rcmd.burst));
          rbeat <= rbeat + 1'b1;
          if (rbeat == rcmd.len) begin
            r_valid <= 1'b0;
            rstate  <= ARIDLE;
          end
        end
        default: rstate <= ARIDLE;
      endcase
    end
  end

  always_comb begin
    r = '0;
    if (r_valid) begin
      r.id   = rcmd.id;
      r.last = (rbeat == rcmd.len);
      r.resp = rerr ? RESP_SLVERR : RESP_OKAY;
      r.data = rerr ? '0 : rdata_q;
    end
  end

  a_b_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                             b_valid && !b_ready |=> b_valid && $stable(b));
  a_r_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                             r_valid && !r_ready |=> r_valid && $stable(r));

endmodule
