// tb_perf_counter_bank: feeds random events to a bank with BANK_ID 1 and
// compares its five counters with totals kept by the testbench, including
// events for other banks, disabled periods and a clear.
module tb_perf_counter_bank;
  import axi_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      clear = 1'b0, enable = 1'b0;
  perf_ev_t  ev;
  perf_cnt_t cnt;
  int        checks = 0, failures = 0;
  longint    e_xfer, e_size, e_valid, e_busy, e_lat;

  always #5 clk = ~clk;

  perf_counter_bank #(.BANK_ID(1)) dut (.clk, .rst_n, .clear, .enable, .ev, .cnt);

  task automatic compare(input string when);
    checks++;
    if (cnt.xfer_cnt != 32'(e_xfer) || cnt.size_cnt != 32'(e_size) ||
        cnt.valid_cnt != 32'(e_valid) || cnt.busy_cnt != 32'(e_busy) ||
        cnt.lat_cnt != 32'(e_lat)) begin
      failures++;
      $display("FAIL %s: got %0d %0d %0d %0d %0d expected %0d %0d %0d %0d %0d", when,
               cnt.xfer_cnt, cnt.size_cnt, cnt.valid_cnt, cnt.busy_cnt, cnt.lat_cnt,
               e_xfer, e_size, e_valid, e_busy, e_lat);
    end
  endtask

  initial begin
    ev = '0;
    e_xfer = 0; e_size = 0; e_valid = 0; e_busy = 0; e_lat = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    compare("after reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ev.xfer      = $urandom_range(0, 1);
      ev.size      = $urandom_range(1, 256);
      ev.xfer_bank = REGION_W'($urandom_range(0, 3));
      ev.xfer_hit  = ($urandom_range(0, 7) != 0);
      ev.beat      = $urandom_range(0, 1);
      ev.busy      = $urandom_range(0, 1);
      ev.lat_done  = $urandom_range(0, 1);
      ev.lat       = $urandom_range(1, 40);
      ev.data_bank = REGION_W'($urandom_range(0, 3));
      ev.data_hit  = ($urandom_range(0, 7) != 0);
      enable       = (i % 100) < 80;
      clear        = (i == 250);
      @(posedge clk);
      #1;
      if (clear) begin
        e_xfer = 0; e_size = 0; e_valid = 0; e_busy = 0; e_lat = 0;
      end else if (enable) begin
        if (ev.xfer && ev.xfer_hit && ev.xfer_bank == 1) begin
          e_xfer++; e_size += ev.size;
        end
        if (ev.data_hit && ev.data_bank == 1) begin
          if (ev.beat) e_valid++;
          if (ev.busy) e_busy++;
          if (ev.lat_done) e_lat += ev.lat;
        end
      end
      compare($sformatf("cycle %0d", i));
    end
    checks++;
    if (e_xfer == 0 || e_lat == 0) begin
      failures++;
      $display("FAIL no events reached the bank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
