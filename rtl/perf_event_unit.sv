// perf_event_unit: transfer detector and per-transaction counters for one
// direction (write or read) of a monitored AXI bus.
//
// It watches one address channel (AxVALID, AxREADY, AxLEN, AxSIZE and the bank
// index the address decoder gives for AxADDR) and the matching data channel
// (xVALID, xREADY, xLAST), and each cycle emits the counter increments of a
// perf_ev_t record:
//   xfer/size  an address handshake, with its size (AxLEN+1) * 2**AxSIZE bytes;
//   beat       a data handshake (the "valid count": beats actually moved);
//   busy       a transaction is open: from its address handshake to the
//              handshake of its last beat, both cycles included;
//   lat        latency of a finished transaction. A write is counted from the
//              first cycle WVALID is high to the WLAST handshake, a read from
//              the first cycle ARVALID is high to the RLAST handshake, both
//              ends included.
// Events of the data phase carry the bank index kept at the address handshake.
// Outputs are combinational from registers and the current bus signals. The
// document defines the quantities; the exact cycle boundaries (both ends
// counted) are this design's choice. The monitored bus must carry one
// transaction at a time per direction, as the shared-bus interconnect does.
module perf_event_unit
  import axi_pkg::*;
#(
  parameter bit IS_READ = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                a_valid,
  input  logic                a_ready,
  input  logic [LEN_W-1:0]    a_len,
  input  logic [SIZE_W-1:0]   a_size,
  input  logic [REGION_W-1:0] a_bank,
  input  logic                a_hit,
  input  logic                d_valid,
  input  logic                d_ready,
  input  logic                d_last,
  output perf_ev_t            ev
);

  logic                active;    // address accepted, last beat not yet
  logic                started;   // write latency window has opened
  logic [REGION_W-1:0] bank_q;
  logic                hit_q;
  logic [CNT_W-1:0]    lat_q;     // cycles counted so far

  logic a_hs, d_hs, done, counting;
  assign a_hs = a_valid && a_ready;
  assign d_hs = d_valid && d_ready && active;
  assign done = d_hs && d_last;
  assign counting = IS_READ ? (active || a_valid) : (active && (started || d_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      started <= 1'b0;
      bank_q  <= '0;
      hit_q   <= 1'b0;
      lat_q   <= '0;
    end else begin
      if (a_hs) begin
        active <= 1'b1;
        bank_q <= a_bank;
        hit_q  <= a_hit;
      end
      if (active && d_valid) started <= 1'b1;
      if (done) begin
        active  <= 1'b0;
        started <= 1'b0;
        lat_q   <= '0;
      end else if (counting) begin
        lat_q <= lat_q + 1'b1;
      end
    end
  end

  always_comb begin
    ev           = '0;
    ev.xfer      = a_hs;
    ev.size      = burst_bytes(a_len, a_size);
    ev.xfer_bank = a_bank;
    ev.xfer_hit  = a_hit;
    ev.beat      = d_hs;
    ev.busy      = active || a_hs;
    ev.lat_done  = done;
    ev.lat       = lat_q + 1'b1;
    ev.data_bank = active ? bank_q : a_bank;
    ev.data_hit  = active ? hit_q : a_hit;
  end

endmodule
