// tb_axi_interconnect: two testbench-driven AXI masters and three axi_slave
// memories around the interconnect. Each master writes bursts into its own part
// of every slave and reads them back, both masters running at once, so that
// the write and read arbiters see contention and one master's write overlaps
// the other's read. Read data, BRESP/RRESP (DECERR for unmapped addresses) and
// IDs are checked; the testbench counts contended arbitrations (a master requesting while the other holds the group), cycles with a
// write and a read by different masters in flight together, and DECERRs, and
// fails if any of them never happened. It also checks that the shared bus
// carries only the granted master.
module tb_axi_interconnect;
  import axi_pkg::*;
  localparam int N = 2, S = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic aw_v [N], w_v [N], b_r [N], ar_v [N], r_r [N];
  logic [N-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic [N-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t m_aw [N];
  ax_t m_ar [N];
  w_t  m_w [N];
  b_t  m_b;
  r_t  m_r;
  logic [S-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic [S-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t s_aw, s_ar;
  w_t  s_w;
  b_t  s_b [S];
  r_t  s_r [S];
  logic mon_aw_valid, mon_aw_ready, mon_w_valid, mon_w_ready, mon_b_valid, mon_b_ready;
  logic mon_ar_valid, mon_ar_ready, mon_r_valid, mon_r_ready;
  ax_t mon_aw, mon_ar;
  w_t  mon_w;
  b_t  mon_b;
  r_t  mon_r;
  logic [N-1:0] wr_grant, rd_grant;
  int checks = 0, failures = 0;
  int contended_w = 0, contended_r = 0, overlap = 0, decerr = 0;
  bit w_busy [N], r_busy [N];

  always #5 clk = ~clk;

  for (genvar m = 0; m < N; m++) begin : g_pack
    assign m_aw_valid[m] = aw_v[m];
    assign m_w_valid[m]  = w_v[m];
    assign m_b_ready[m]  = b_r[m];
    assign m_ar_valid[m] = ar_v[m];
    assign m_r_ready[m]  = r_r[m];
  end

  axi_interconnect #(.N(N), .S(S)) dut (.clk, .rst_n, .*);

  for (genvar s = 0; s < S; s++) begin : g_s
    axi_slave u_mem (.aclk(clk), .aresetn(rst_n),
      .aw_valid(s_aw_valid[s]), .aw_ready(s_aw_ready[s]), .aw(s_aw),
      .w_valid(s_w_valid[s]), .w_ready(s_w_ready[s]), .w(s_w),
      .b_valid(s_b_valid[s]), .b_ready(s_b_ready[s]), .b(s_b[s]),
      .ar_valid(s_ar_valid[s]), .ar_ready(s_ar_ready[s]), .ar(s_ar),
      .r_valid(s_r_valid[s]), .r_ready(s_r_ready[s]), .r(s_r[s]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters and bus checks
  always @(posedge clk) if (rst_n) begin
    // a master requests while the group is held by the other one
    if (wr_grant != '0 && (m_aw_valid & ~wr_grant) != '0) contended_w++;
    if (rd_grant != '0 && (m_ar_valid & ~rd_grant) != '0) contended_r++;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        if (a != b && w_busy[a] && r_busy[b] && wr_grant[a] && rd_grant[b]) overlap++;
    for (int m = 0; m < N; m++)
      if (wr_grant[m] && mon_aw_valid) check(mon_aw == m_aw[m], "bus AW is the granted master's");
  end

  task automatic m_write(input int m, input logic [31:0] addr, input int len,
                         input logic [31:0] seed, input resp_e exp);
    w_busy[m] = 1;
    @(negedge clk);
    aw_v[m] = 1; m_aw[m] = '0; m_aw[m].id = 4'(m * 4 + len % 4); m_aw[m].addr = addr;
    m_aw[m].len = 4'(len); m_aw[m].size = 3'd2; m_aw[m].burst = BURST_INCR;
    do @(posedge clk); while (!m_aw_ready[m]);
    @(negedge clk);
    aw_v[m] = 0;
    for (int i = 0; i <= len; i++) begin
      repeat ($urandom_range(0, 1)) @(negedge clk);
      w_v[m] = 1; m_w[m].id = m_aw[m].id; m_w[m].data = seed + i; m_w[m].strb = '1;
      m_w[m].last = (i == len);
      do @(posedge clk); while (!m_w_ready[m]);
      @(negedge clk);
      w_v[m] = 0;
    end
    b_r[m] = 1;
    do @(posedge clk); while (!m_b_valid[m]);
    check(m_b.resp == exp && m_b.id == m_aw[m].id, $sformatf("master %0d BRESP %0d", m, m_b.resp));
    if (m_b.resp == RESP_DECERR) decerr++;
    @(negedge clk);
    b_r[m] = 0;
    w_busy[m] = 0;
  endtask

  task automatic m_read(input int m, input logic [31:0] addr, input int len,
                        input logic [31:0] seed, input resp_e exp);
    int n;
    r_busy[m] = 1;
    @(negedge clk);
    ar_v[m] = 1; m_ar[m] = '0; m_ar[m].id = 4'(m * 4 + 1); m_ar[m].addr = addr;
    m_ar[m].len = 4'(len); m_ar[m].size = 3'd2; m_ar[m].burst = BURST_INCR;
    do @(posedge clk); while (!m_ar_ready[m]);
    @(negedge clk);
    ar_v[m] = 0;
    n = 0;
    while (n <= len) begin
      r_r[m] = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (m_r_valid[m] && r_r[m]) begin
        check(m_r.resp == exp && m_r.id == m_ar[m].id, "RRESP/RID");
        check(m_r.last == (n == len), "RLAST");
        if (exp == RESP_OKAY)
          check(m_r.data == seed + n, $sformatf("master %0d read %h expected %h", m, m_r.data, seed + n));
        n++;
      end
      @(negedge clk);
    end
    r_r[m] = 0;
    if (exp == RESP_DECERR) decerr++;
    r_busy[m] = 0;
  endtask

  task automatic master_proc(input int m);
    for (int t = 0; t < 40; t++) begin
      logic [31:0] a, sd;
      int len;
      a = {4'($urandom_range(0, 2)), 28'h0} | 32'(m * 64 + $urandom_range(0, 7) * 4);
      len = $urandom_range(0, 7);
      sd = $urandom();
      m_write(m, a, len, sd, RESP_OKAY);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      m_read(m, a, len, sd, RESP_OKAY);
      if (t % 10 == 5) begin
        m_write(m, 32'h4000_0000, 1, 0, RESP_DECERR);
        m_read(m, 32'h7000_0000, 2, 0, RESP_DECERR);
      end
    end
  endtask

  initial begin
    for (int m = 0; m < N; m++) begin
      aw_v[m] = 0; w_v[m] = 0; b_r[m] = 0; ar_v[m] = 0; r_r[m] = 0;
      m_aw[m] = '0; m_ar[m] = '0; m_w[m] = '0; w_busy[m] = 0; r_busy[m] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      master_proc(0);
      master_proc(1);
    join
    $display("contended write=%0d read=%0d overlap cycles=%0d decerr=%0d",
             contended_w, contended_r, overlap, decerr);
    check(contended_w > 0, "write arbiter contention happened");
    check(contended_r > 0, "read arbiter contention happened");
    check(overlap > 0, "write and read by different masters overlapped");
    check(decerr == 16, "DECERR responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
