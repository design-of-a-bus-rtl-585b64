// tb_axi_slave_ctrl: the testbench drives the shared-bus side of the slave
// controller; three axi_slave memories sit behind it. Writes and reads to all
// three regions and to unmapped addresses check that each channel reaches only
// the decoded slave (VALIDs one-hot to the right slave), that data written
// through one slave reads back from it and not from the others, that unmapped
// addresses get DECERR (with ARLEN+1 read beats), and that wr_done and rd_done
// pulse once per transaction.
module tb_axi_slave_ctrl;
  import axi_pkg::*;
  localparam int S = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [REGION_W-1:0] aw_idx, ar_idx;
  logic aw_hit, ar_hit, wr_done, rd_done;
  logic bus_aw_valid = 0, bus_aw_ready, bus_w_valid = 0, bus_w_ready, bus_b_valid, bus_b_ready = 0;
  logic bus_ar_valid = 0, bus_ar_ready, bus_r_valid, bus_r_ready = 0;
  ax_t bus_aw = '0, bus_ar = '0;
  w_t  bus_w = '0;
  b_t  bus_b;
  r_t  bus_r;
  logic [S-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic [S-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t s_aw, s_ar;
  w_t  s_w;
  b_t  s_b [S];
  r_t  s_r [S];
  int  checks = 0, failures = 0, wdone_cnt = 0, rdone_cnt = 0, decerr_cnt = 0;

  always #5 clk = ~clk;

  // decoders as in the interconnect
  assign aw_idx = bus_aw.addr[31:28];
  assign aw_hit = bus_aw.addr[31:28] < S;
  assign ar_idx = bus_ar.addr[31:28];
  assign ar_hit = bus_ar.addr[31:28] < S;

  axi_slave_ctrl #(.S(S)) dut (.*);

  for (genvar s = 0; s < S; s++) begin : g_s
    axi_slave u_mem (.aclk(clk), .aresetn(rst_n),
      .aw_valid(s_aw_valid[s]), .aw_ready(s_aw_ready[s]), .aw(s_aw),
      .w_valid(s_w_valid[s]), .w_ready(s_w_ready[s]), .w(s_w),
      .b_valid(s_b_valid[s]), .b_ready(s_b_ready[s]), .b(s_b[s]),
      .ar_valid(s_ar_valid[s]), .ar_ready(s_ar_ready[s]), .ar(s_ar),
      .r_valid(s_r_valid[s]), .r_ready(s_r_ready[s]), .r(s_r[s]));
  end

  always @(posedge clk) begin
    if (wr_done) wdone_cnt++;
    if (rd_done) rdone_cnt++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit only(logic [S-1:0] v, int idx);
    return (idx < S) ? ((v & ~(S'(1) << idx)) == '0) : (v == '0);
  endfunction

  task automatic write(input logic [31:0] addr, input int len, input logic [31:0] seed,
                       input resp_e exp_resp);
    int slv, w0;
    slv = int'(addr[31:28]);
    w0 = wdone_cnt;
    @(negedge clk);
    bus_aw_valid = 1; bus_aw = '0; bus_aw.id = 4'(seed); bus_aw.addr = addr;
    bus_aw.len = 4'(len); bus_aw.size = 3'd2; bus_aw.burst = BURST_INCR;
    #1 check(only(s_aw_valid, slv) && (slv >= S || s_aw_valid[slv]), "AWVALID to decoded slave only");
    do @(posedge clk); while (!bus_aw_ready);
    @(negedge clk);
    bus_aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      bus_w_valid = 1; bus_w.id = 4'(seed); bus_w.data = seed + i; bus_w.strb = '1;
      bus_w.last = (i == len);
      #1 check(only(s_w_valid, slv), "WVALID to decoded slave only");
      do @(posedge clk); while (!bus_w_ready);
      @(negedge clk);
    end
    bus_w_valid = 0; bus_w = '0;
    bus_b_ready = 1;
    do @(posedge clk); while (!bus_b_valid);
    check(bus_b.resp == exp_resp && bus_b.id == 4'(seed), $sformatf("BRESP %0d", bus_b.resp));
    if (exp_resp == RESP_DECERR) decerr_cnt++;
    @(negedge clk);
    bus_b_ready = 0;
    check(wdone_cnt == w0 + 1, "wr_done once");
  endtask

  task automatic read(input logic [31:0] addr, input int len, input logic [31:0] seed,
                      input bit expect_data, input resp_e exp_resp);
    int slv, n, r0;
    slv = int'(addr[31:28]);
    r0 = rdone_cnt;
    @(negedge clk);
    bus_ar_valid = 1; bus_ar = '0; bus_ar.id = 4'(seed); bus_ar.addr = addr;
    bus_ar.len = 4'(len); bus_ar.size = 3'd2; bus_ar.burst = BURST_INCR;
    #1 check(only(s_ar_valid, slv), "ARVALID to decoded slave only");
    do @(posedge clk); while (!bus_ar_ready);
    @(negedge clk);
    bus_ar_valid = 0;
    bus_r_ready = 1;
    n = 0;
    while (n <= len) begin
      @(posedge clk);
      if (bus_r_valid) begin
        check(bus_r.resp == exp_resp && bus_r.id == 4'(seed), "RRESP/RID");
        check(bus_r.last == (n == len), "RLAST");
        if (exp_resp == RESP_DECERR) check(bus_r.data == '0, "DECERR data is zero");
        else if (expect_data) check(bus_r.data == seed + n, $sformatf("RDATA %h expected %h", bus_r.data, seed + n));
        else check(bus_r.data != seed + n, "data not visible through another slave");
        n++;
      end
    end
    if (exp_resp == RESP_DECERR) decerr_cnt++;
    @(negedge clk);
    bus_r_ready = 0;
    check(rdone_cnt == r0 + 1, "rd_done once");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill all three slaves with distinct data at offset 0x20
    write(32'h0000_0020, 3, 32'hA000_0000, RESP_OKAY);
    write(32'h1000_0020, 3, 32'hB000_0000, RESP_OKAY);
    write(32'h2000_0020, 3, 32'hC000_0000, RESP_OKAY);
    read (32'h0000_0020, 3, 32'hA000_0000, 1, RESP_OKAY);
    read (32'h1000_0020, 3, 32'hB000_0000, 1, RESP_OKAY);
    read (32'h2000_0020, 3, 32'hC000_0000, 1, RESP_OKAY);
    read (32'h1000_0020, 3, 32'hA000_0000, 0, RESP_OKAY);
    // unmapped regions
    write(32'h3000_0000, 2, 32'h1, RESP_DECERR);
    read (32'h5000_0000, 5, 32'h0, 1, RESP_DECERR);
    for (int t = 0; t < 40; t++) begin
      logic [31:0] a, sd;
      int len;
      a = {4'($urandom_range(0, 2)), 28'h0} | 32'($urandom_range(0, 15) * 4);
      sd = $urandom();
      len = $urandom_range(0, 15 - int'(a[5:2]));
      write(a, len, sd, RESP_OKAY);
      read(a, len, sd, 1, RESP_OKAY);
    end
    check(decerr_cnt == 2, "both DECERR transactions seen");
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
