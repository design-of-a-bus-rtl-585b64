// tb_axi_bus_monitor: drives write and read transactions, with random VALID and
// READY stalls, on the monitored bus to the three mapped regions and to an
// unmapped one. For each transaction the testbench derives the expected
// transfer count, size, valid (beat) count, busy cycles and latency from the
// cycle numbers it recorded, adds them to the bank of the transaction's address,
// and compares all six banks after each phase: counting enabled, a clear,
// counting disabled, then enabled again.
module tb_axi_bus_monitor;
  import axi_pkg::*;
  localparam int NPC = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 0;
  logic [1:0] cfg_wdata = '0;
  logic enable;
  logic aw_valid = 0, aw_ready = 0, w_valid = 0, w_ready = 0, w_last = 0;
  logic ar_valid = 0, ar_ready = 0, r_valid = 0, r_ready = 0, r_last = 0;
  logic [31:0] aw_addr = '0, ar_addr = '0;
  logic [3:0] aw_len = '0, ar_len = '0;
  logic [2:0] aw_size = '0, ar_size = '0;
  perf_cnt_t wr_pc [NPC];
  perf_cnt_t rd_pc [NPC];
  int checks = 0, failures = 0, cyc = 0;
  longint exp_cnt [2][NPC][5];   // [dir][bank][xfer,size,valid,busy,lat]
  bit counting = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  axi_bus_monitor #(.NUM_PC(NPC)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare(input string phase);
    for (int b = 0; b < NPC; b++) begin
      check(wr_pc[b].xfer_cnt == 32'(exp_cnt[0][b][0]) && wr_pc[b].size_cnt == 32'(exp_cnt[0][b][1]) &&
            wr_pc[b].valid_cnt == 32'(exp_cnt[0][b][2]) && wr_pc[b].busy_cnt == 32'(exp_cnt[0][b][3]) &&
            wr_pc[b].lat_cnt == 32'(exp_cnt[0][b][4]),
            $sformatf("%s write bank %0d: %0d %0d %0d %0d %0d expected %0d %0d %0d %0d %0d", phase, b,
                      wr_pc[b].xfer_cnt, wr_pc[b].size_cnt, wr_pc[b].valid_cnt, wr_pc[b].busy_cnt,
                      wr_pc[b].lat_cnt, exp_cnt[0][b][0], exp_cnt[0][b][1], exp_cnt[0][b][2],
                      exp_cnt[0][b][3], exp_cnt[0][b][4]));
      check(rd_pc[b].xfer_cnt == 32'(exp_cnt[1][b][0]) && rd_pc[b].size_cnt == 32'(exp_cnt[1][b][1]) &&
            rd_pc[b].valid_cnt == 32'(exp_cnt[1][b][2]) && rd_pc[b].busy_cnt == 32'(exp_cnt[1][b][3]) &&
            rd_pc[b].lat_cnt == 32'(exp_cnt[1][b][4]),
            $sformatf("%s read bank %0d: %0d %0d %0d %0d %0d expected %0d %0d %0d %0d %0d", phase, b,
                      rd_pc[b].xfer_cnt, rd_pc[b].size_cnt, rd_pc[b].valid_cnt, rd_pc[b].busy_cnt,
                      rd_pc[b].lat_cnt, exp_cnt[1][b][0], exp_cnt[1][b][1], exp_cnt[1][b][2],
                      exp_cnt[1][b][3], exp_cnt[1][b][4]));
    end
  endtask

  task automatic cfg_write(input logic [1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
    @(negedge clk);
  endtask

  // one transaction on direction dir (0 write, 1 read)
  task automatic transaction(input int dir);
    int len, size, bank, t_av, t_ahs, t_dv, t_last, beats;
    logic [31:0] addr;
    len = $urandom_range(0, 15);
    size = $urandom_range(0, 7);
    bank = $urandom_range(0, 3);
    addr = {4'(bank == 3 ? 9 : bank), 28'($urandom())};
    repeat ($urandom_range(0, 3)) @(negedge clk);
    t_av = cyc;
    if (dir == 0) begin aw_valid = 1; aw_addr = addr; aw_len = 4'(len); aw_size = 3'(size); end
    else          begin ar_valid = 1; ar_addr = addr; ar_len = 4'(len); ar_size = 3'(size); end
    forever begin
      bit rdy;
      rdy = ($urandom_range(0, 1) == 1);
      if (dir == 0) aw_ready = rdy; else ar_ready = rdy;
      t_ahs = cyc;
      @(posedge clk);
      if (rdy) begin
        break;
      end
      @(negedge clk);
    end
    @(negedge clk);
    if (dir == 0) begin aw_valid = 0; aw_ready = 0; aw_addr = $urandom(); end
    else          begin ar_valid = 0; ar_ready = 0; ar_addr = $urandom(); end
    repeat ($urandom_range(0, 2)) @(negedge clk);
    t_dv = -1;
    beats = 0;
    while (beats <= len) begin
      bit v, rdy;
      v = ($urandom_range(0, 3) != 0);
      rdy = ($urandom_range(0, 2) != 0);
      if (dir == 0) begin w_valid = v; w_ready = rdy; w_last = v && beats == len; end
      else          begin r_valid = v; r_ready = rdy; r_last = v && beats == len; end
      if (v && t_dv < 0) t_dv = cyc;
      t_last = cyc;
      @(posedge clk);
      if (v && rdy) beats++;
      @(negedge clk);
      // keep VALID until its handshake
      while (v && !rdy) begin
        rdy = ($urandom_range(0, 2) != 0);
        if (dir == 0) w_ready = rdy; else r_ready = rdy;
        t_last = cyc;
        @(posedge clk);
        if (rdy) beats++;
        @(negedge clk);
      end
    end
    if (dir == 0) begin w_valid = 0; w_ready = 0; w_last = 0; end
    else          begin r_valid = 0; r_ready = 0; r_last = 0; end
    if (counting && bank < NPC) begin
      exp_cnt[dir][bank][0] += 1;
      exp_cnt[dir][bank][1] += (len + 1) << size;
      exp_cnt[dir][bank][2] += len + 1;
      exp_cnt[dir][bank][3] += t_last - t_ahs + 1;
      exp_cnt[dir][bank][4] += (dir == 0) ? (t_last - t_dv + 1) : (t_last - t_av + 1);
    end
  endtask

  task automatic traffic(input int n);
    fork
      for (int i = 0; i < n; i++) transaction(0);
      for (int i = 0; i < n; i++) transaction(1);
    join
    repeat (2) @(negedge clk);
  endtask

  initial begin
    foreach (exp_cnt[d, b, k]) exp_cnt[d][b][k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!enable, "disabled after reset");
    traffic(5);
    compare("before enable");
    cfg_write(2'b01);
    counting = 1;
    check(enable, "enabled");
    traffic(60);
    compare("enabled");
    cfg_write(2'b11);
    foreach (exp_cnt[d, b, k]) exp_cnt[d][b][k] = 0;
    compare("after clear");
    cfg_write(2'b00);
    counting = 0;
    traffic(10);
    compare("disabled");
    cfg_write(2'b01);
    counting = 1;
    traffic(40);
    compare("enabled again");
    for (int b = 0; b < NPC; b++)
      check(exp_cnt[0][b][0] > 0 && exp_cnt[1][b][0] > 0, $sformatf("bank %0d saw traffic", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
