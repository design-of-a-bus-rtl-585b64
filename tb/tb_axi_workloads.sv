// tb_axi_workloads: runs the system's named test scenarios through master 0 of
// the full-size system:
//   test case 1  - a burst written and read back at the same address;
//   test case 2  - a write at one address and a read at a different one, which
//                  must return what was stored there before;
//   sequences    - single write, write followed by read, multiple writes,
//                  single read, multiple reads;
//   monitor case - an 8-beat write of 4-byte beats and a 7-beat read of 16-byte
//                  beats at 0x0A7E0FA5 (slave 0): the read is wider than the
//                  32-bit bus and is answered SLVERR, and the first counter bank
//                  must show one transfer, 32 and 112 bytes, 8 and 7 beats.
// Read data are checked against a byte model of the slaves.
module tb_axi_workloads;
  import axi_pkg::*;
  localparam int NM = 2, NS = 3, MEM = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NM-1:0] wcmd_valid = '0, wcmd_ready, wd_valid = '0, wd_ready, b_done;
  logic [NM-1:0] rcmd_valid = '0, rcmd_ready, rd_valid, rd_ready = '0;
  ax_t wcmd [NM];
  ax_t rcmd [NM];
  logic [DATA_W-1:0] wd_data [NM];
  logic [STRB_W-1:0] wd_strb [NM];
  resp_e b_resp [NM];
  logic [ID_W-1:0] b_id [NM];
  r_t rd [NM];
  logic mon_cfg_we = 0;
  logic [1:0] mon_cfg_wdata = '0;
  logic mon_enable;
  perf_cnt_t mon_wr_pc [NS];
  perf_cnt_t mon_rd_pc [NS];
  logic [NM-1:0] wr_grant, rd_grant;
  int checks = 0, failures = 0;
  logic [7:0] model [NS][MEM];

  always #5 clk = ~clk;

  axi_soc_top dut (.aclk(clk), .aresetn(rst_n), .*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // INCR write of len+1 beats of 2**size bytes starting at addr
  task automatic write(input logic [31:0] addr, input int len, input int size, input resp_e exp);
    int slv, a;
    slv = int'(addr[31:28]);
    @(negedge clk);
    wcmd[0] = '0; wcmd[0].addr = addr; wcmd[0].len = 4'(len); wcmd[0].size = 3'(size);
    wcmd[0].burst = BURST_INCR; wcmd[0].id = 4'd3;
    wcmd_valid[0] = 1;
    do @(posedge clk); while (!wcmd_ready[0]);
    @(negedge clk);
    wcmd_valid[0] = 0;
    for (int i = 0; i <= len; i++) begin
      a = (i == 0) ? int'(addr[27:0]) : (int'(addr[27:0]) / (1 << size) + i) * (1 << size);
      wd_valid[0] = 1; wd_data[0] = $urandom(); wd_strb[0] = '1;
      do @(posedge clk); while (!wd_ready[0]);
      if (exp == RESP_OKAY)
        for (int k = 0; k < 4; k++) model[slv][((a & ~3) + k) % MEM] = wd_data[0][8*k +: 8];
      @(negedge clk);
      wd_valid[0] = 0;
    end
    while (!b_done[0]) @(negedge clk);
    check(b_resp[0] == exp, $sformatf("write %h BRESP %0d", addr, b_resp[0]));
  endtask

  task automatic read(input logic [31:0] addr, input int len, input int size, input resp_e exp);
    int slv, a, n;
    logic [31:0] e;
    slv = int'(addr[31:28]);
    @(negedge clk);
    rcmd[0] = '0; rcmd[0].addr = addr; rcmd[0].len = 4'(len); rcmd[0].size = 3'(size);
    rcmd[0].burst = BURST_INCR; rcmd[0].id = 4'd5;
    rcmd_valid[0] = 1;
    do @(posedge clk); while (!rcmd_ready[0]);
    @(negedge clk);
    rcmd_valid[0] = 0;
    rd_ready[0] = 1;
    n = 0;
    while (n <= len) begin
      @(posedge clk);
      if (rd_valid[0]) begin
        a = (n == 0) ? int'(addr[27:0]) : (int'(addr[27:0]) / (1 << size) + n) * (1 << size);
        for (int k = 0; k < 4; k++) e[8*k +: 8] = model[slv][((a & ~3) + k) % MEM];
        if (exp != RESP_OKAY) e = '0;
        check(rd[0].data == e && rd[0].resp == exp && rd[0].last == (n == len),
              $sformatf("read %h beat %0d: %h expected %h", addr, n, rd[0].data, e));
        n++;
      end
    end
    @(negedge clk);
    rd_ready[0] = 0;
  endtask

  task automatic clear_monitor();
    @(negedge clk);
    mon_cfg_we = 1; mon_cfg_wdata = 2'b11;
    @(negedge clk);
    mon_cfg_we = 0;
    @(negedge clk);
  endtask

  initial begin
    wcmd[0] = '0; wcmd[1] = '0; rcmd[0] = '0; rcmd[1] = '0;
    wd_data[0] = '0; wd_data[1] = '0; wd_strb[0] = '0; wd_strb[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill all slaves so every byte of the model is known
    for (int s = 0; s < NS; s++)
      for (int h = 0; h < 2; h++) write({4'(s), 28'(h * 64)}, 15, 2, RESP_OKAY);
    // test case 1: same location
    write(32'h0000_0010, 3, 2, RESP_OKAY);
    read (32'h0000_0010, 3, 2, RESP_OKAY);
    // test case 2: different locations
    write(32'h1000_0020, 3, 2, RESP_OKAY);
    read (32'h2000_0040, 3, 2, RESP_OKAY);
    // sequences
    write(32'h0000_0044, 0, 2, RESP_OKAY);                       // single write
    write(32'h1000_0008, 1, 2, RESP_OKAY);                       // write followed by read
    read (32'h1000_0008, 1, 2, RESP_OKAY);
    for (int i = 0; i < 4; i++) write(32'h2000_0000 + 16 * i, 3, 2, RESP_OKAY);  // multiple writes
    read (32'h2000_0010, 0, 2, RESP_OKAY);                       // single read
    for (int i = 0; i < 4; i++) read(32'h2000_0000 + 16 * i, 3, 2, RESP_OKAY);   // multiple reads
    // monitor scenario of the waveforms
    clear_monitor();
    write(32'h0A7E_0FA5, 7, 2, RESP_OKAY);
    read (32'h0A7E_0FA5, 6, 4, RESP_SLVERR);
    repeat (2) @(negedge clk);
    check(mon_wr_pc[0].xfer_cnt == 1 && mon_wr_pc[0].size_cnt == 32 && mon_wr_pc[0].valid_cnt == 8,
          $sformatf("write bank 0: %0d %0d %0d", mon_wr_pc[0].xfer_cnt, mon_wr_pc[0].size_cnt, mon_wr_pc[0].valid_cnt));
    check(mon_rd_pc[0].xfer_cnt == 1 && mon_rd_pc[0].size_cnt == 112 && mon_rd_pc[0].valid_cnt == 7,
          $sformatf("read bank 0: %0d %0d %0d", mon_rd_pc[0].xfer_cnt, mon_rd_pc[0].size_cnt, mon_rd_pc[0].valid_cnt));
    check(mon_wr_pc[1].xfer_cnt == 0 && mon_rd_pc[2].xfer_cnt == 0, "other banks untouched");
    $display("monitor: write latency %0d busy %0d, read latency %0d busy %0d cycles",
             mon_wr_pc[0].lat_cnt, mon_wr_pc[0].busy_cnt, mon_rd_pc[0].lat_cnt, mon_rd_pc[0].busy_cnt);
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
