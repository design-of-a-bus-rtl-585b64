// perf_counter_bank: one performance-counter register set (PC_n) of the bus
// monitor: transfer count, transfer size, total valid count, total busy count
// and latency count, each CNT_W (32) bits.
//
// The demultiplexer in front of the banks is the bank-index compare here: an
// event from perf_event_unit is added only by the bank whose BANK_ID equals the
// event's bank index. The counters add while `enable` is high, clear to zero on
// `clear` (which wins over an increment) and on reset, and wrap on overflow.
// Updated on the clock edge after the event; `cnt` is the register output. The
// register list follows the document; the latency register accumulates (so the
// mean latency is lat_cnt / xfer_cnt), which is this design's choice.
module perf_counter_bank
  import axi_pkg::*;
#(
  parameter int unsigned BANK_ID = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      enable,
  input  perf_ev_t  ev,
  output perf_cnt_t cnt
);

  logic sel_xfer, sel_data;
  assign sel_xfer = ev.xfer_hit && (32'(ev.xfer_bank) == BANK_ID);
  assign sel_data = ev.data_hit && (32'(ev.data_bank) == BANK_ID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (clear) begin
      cnt <= '0;
    end else if (enable) begin
      if (sel_xfer && ev.xfer) begin
        cnt.xfer_cnt <= cnt.xfer_cnt + 1'b1;
        cnt.size_cnt <= cnt.size_cnt + ev.size;
      end
      if (sel_data && ev.beat)     cnt.valid_cnt <= cnt.valid_cnt + 1'b1;
      if (sel_data && ev.busy)     cnt.busy_cnt  <= cnt.busy_cnt + 1'b1;
      if (sel_data && ev.lat_done) cnt.lat_cnt   <= cnt.lat_cnt + ev.lat;
    end
  end

endmodule
