// axi_bus_monitor: performance monitor for an AXI bus.
//
// Per direction, a transfer detector with its counters (perf_event_unit) turns
// the handshakes on the bus into counter increments; an address decoder
// (axi_addr_decoder, the same address map as the interconnect) turns AWADDR or
// ARADDR into a bank index; and the increments are steered to one of NUM_PC
// counter banks (perf_counter_bank): PC_0..PC_2 for writes, PC_4..PC_6 for
// reads in the document's numbering, wr_pc[0..2] and rd_pc[0..2] here. Each
// bank holds transfer count, transfer size, total valid count, total busy count
// and latency count, so traffic to each slave is measured separately. A
// control register (perf_ctrl_reg) enables counting and clears all banks.
//
// Inputs are the monitored VALID/READY handshakes, AxADDR, AxLEN, AxSIZE and
// xLAST; nothing is driven onto the bus. Counters change on the clock edge after
// the event. The block structure and counter list follow the document; the
// exact cycle boundaries of the busy and latency counts are described in
// perf_event_unit.
module axi_bus_monitor
  import axi_pkg::*;
#(
  parameter int unsigned NUM_PC = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // control register write port
  input  logic              cfg_we,
  input  logic [1:0]        cfg_wdata,
  output logic              enable,
  // monitored write direction
  input  logic              aw_valid,
  input  logic              aw_ready,
  input  logic [ADDR_W-1:0] aw_addr,
  input  logic [LEN_W-1:0]  aw_len,
  input  logic [SIZE_W-1:0] aw_size,
  input  logic              w_valid,
  input  logic              w_ready,
  input  logic              w_last,
  // monitored read direction
  input  logic              ar_valid,
  input  logic              ar_ready,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [LEN_W-1:0]  ar_len,
  input  logic [SIZE_W-1:0] ar_size,
  input  logic              r_valid,
  input  logic              r_ready,
  input  logic              r_last,
  // counter banks
  output perf_cnt_t         wr_pc [NUM_PC],
  output perf_cnt_t         rd_pc [NUM_PC]
);

  logic                clear;
  logic [REGION_W-1:0] aw_bank, ar_bank;
  logic                aw_hit, ar_hit;
  perf_ev_t            wr_ev, rd_ev;

  perf_ctrl_reg u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_wdata, .enable, .clear
  );

  axi_addr_decoder #(.NUM_SLAVES(NUM_PC)) u_aw_dec (.addr(aw_addr), .idx(aw_bank), .hit(aw_hit));
  axi_addr_decoder #(.NUM_SLAVES(NUM_PC)) u_ar_dec (.addr(ar_addr), .idx(ar_bank), .hit(ar_hit));

  perf_event_unit #(.IS_READ(1'b0)) u_wr_ev (
    .clk, .rst_n, .a_valid(aw_valid), .a_ready(aw_ready), .a_len(aw_len),
    .a_size(aw_size), .a_bank(aw_bank), .a_hit(aw_hit),
    .d_valid(w_valid), .d_ready(w_ready), .d_last(w_last), .ev(wr_ev)
  );

  perf_event_unit #(.IS_READ(1'b1)) u_rd_ev (
    .clk, .rst_n, .a_valid(ar_valid), .a_ready(ar_ready), .a_len(ar_len),
    .a_size(ar_size), .a_bank(ar_bank), .a_hit(ar_hit),
    .d_valid(r_valid), .d_ready(r_ready), .d_last(r_last), .ev(rd_ev)
  );

  for (genvar g = 0; g < NUM_PC; g++) begin : g_pc
    perf_counter_bank #(.BANK_ID(g)) u_wr_pc (
      .clk, .rst_n, .clear, .enable, .ev(wr_ev), .cnt(wr_pc[g])
    );
    perf_counter_bank #(.BANK_ID(g)) u_rd_pc (
      .clk, .rst_n, .clear, .enable, .ev(rd_ev), .cnt(rd_pc[g])
    );
  end

endmodule
