// tb_perf_event_unit: drives random AXI address and data phases, with random
// VALID and READY stalls, into a write-direction and a read-direction event
// unit at once. For every transaction the testbench notes the cycle numbers of
// the first AxVALID, the address handshake, the first data VALID and the last
// beat, derives the expected size, beat count, busy cycles and latencies from
// them, and compares these with the sum of the units' per-cycle events.
module tb_perf_event_unit;
  import axi_pkg::*;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                a_valid = 0, a_ready = 0, d_valid = 0, d_ready = 0, d_last = 0;
  logic [LEN_W-1:0]    a_len = '0;
  logic [SIZE_W-1:0]   a_size = '0;
  logic [REGION_W-1:0] a_bank = '0;
  logic                a_hit = 0;
  perf_ev_t            ev_w, ev_r;
  int                  checks = 0, failures = 0;
  int                  cyc = 0;

  always #5 clk = ~clk;

  perf_event_unit #(.IS_READ(1'b0)) dut_w (.clk, .rst_n, .a_valid, .a_ready, .a_len,
    .a_size, .a_bank, .a_hit, .d_valid, .d_ready, .d_last, .ev(ev_w));
  perf_event_unit #(.IS_READ(1'b1)) dut_r (.clk, .rst_n, .a_valid, .a_ready, .a_len,
    .a_size, .a_bank, .a_hit, .d_valid, .d_ready, .d_last, .ev(ev_r));

  // sums of events over the current transaction, per unit
  longint s_xfer[2], s_size[2], s_beat[2], s_busy[2], s_done[2], s_lat[2], s_badbank[2];

  task automatic accumulate(input int u, input perf_ev_t e, input int exp_bank);
    if (e.xfer) begin
      s_xfer[u]++; s_size[u] += e.size;
      if (int'(e.xfer_bank) != exp_bank) s_badbank[u]++;
    end
    if (e.beat) s_beat[u]++;
    if (e.busy) begin
      s_busy[u]++;
      if (int'(e.data_bank) != exp_bank || e.data_hit != (exp_bank < 3)) s_badbank[u]++;
    end
    if (e.lat_done) begin
      s_done[u]++; s_lat[u] += e.lat;
    end
  endtask

  int cur_bank;

  // one clock cycle: sample the events just before the edge
  task automatic step();
    #4;
    accumulate(0, ev_w, cur_bank);
    accumulate(1, ev_r, cur_bank);
    @(posedge clk);
    cyc++;
    @(negedge clk);
  endtask

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int t_av, t_ahs, t_dv, t_last, len, size, beats;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      for (int u = 0; u < 2; u++) begin
        s_xfer[u] = 0; s_size[u] = 0; s_beat[u] = 0; s_busy[u] = 0;
        s_done[u] = 0; s_lat[u] = 0; s_badbank[u] = 0;
      end
      len  = $urandom_range(0, 7);
      size = $urandom_range(0, 4);
      cur_bank = $urandom_range(0, 4);
      repeat ($urandom_range(0, 3)) step();
      // address phase
      a_valid = 1; a_len = LEN_W'(len); a_size = SIZE_W'(size);
      a_bank = REGION_W'(cur_bank); a_hit = (cur_bank < 3);
      t_av = cyc;
      forever begin
        a_ready = ($urandom_range(0, 1) == 1);
        if (a_ready) begin
          t_ahs = cyc;
          step();
          break;
        end
        step();
      end
      a_valid = 0; a_ready = 0; a_len = '0; a_size = '0;
      a_bank = REGION_W'($urandom_range(0, 15)); a_hit = $urandom_range(0, 1);
      // data phase
      repeat ($urandom_range(0, 3)) step();
      t_dv = -1;
      beats = 0;
      while (beats <= len) begin
        if (!d_valid) d_valid = ($urandom_range(0, 3) != 0);
        d_ready = ($urandom_range(0, 2) != 0);
        d_last  = d_valid && (beats == len);
        if (d_valid && t_dv < 0) t_dv = cyc;
        if (d_valid && d_ready) begin
          beats++;
          if (beats > len) t_last = cyc;
          step();
          d_valid = 0;
        end else begin
          step();
        end
      end
      d_valid = 0; d_ready = 0; d_last = 0;
      for (int u = 0; u < 2; u++) begin
        string n;
        n = u == 0 ? "write" : "read";
        expect_eq($sformatf("%s xfer t%0d", n, t), s_xfer[u], 1);
        expect_eq($sformatf("%s size t%0d", n, t), s_size[u], (len + 1) << size);
        expect_eq($sformatf("%s beats t%0d", n, t), s_beat[u], len + 1);
        expect_eq($sformatf("%s busy t%0d", n, t), s_busy[u], t_last - t_ahs + 1);
        expect_eq($sformatf("%s done t%0d", n, t), s_done[u], 1);
        expect_eq($sformatf("%s bank t%0d", n, t), s_badbank[u], 0);
      end
      expect_eq($sformatf("write latency t%0d", t), s_lat[0], t_last - t_dv + 1);
      expect_eq($sformatf("read latency t%0d", t), s_lat[1], t_last - t_av + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
