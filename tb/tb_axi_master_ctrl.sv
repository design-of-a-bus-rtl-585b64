// tb_axi_master_ctrl: applies random grants and random master and bus signals
// to a three-master controller and checks every output against the expected
// multiplexing: the granted master's AW/W/BREADY and AR/RREADY on the bus, bus
// READY and VALID returned only to the granted master, all low without a grant.
module tb_axi_master_ctrl;
  import axi_pkg::*;
  localparam int N = 3;

  logic clk = 1'b0;
  logic wr_granted, rd_granted;
  logic [1:0] wr_idx, rd_idx;
  logic [N-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic [N-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t m_aw [N];
  ax_t m_ar [N];
  w_t  m_w [N];
  b_t  m_b, bus_b;
  r_t  m_r, bus_r;
  logic bus_aw_valid, bus_aw_ready, bus_w_valid, bus_w_ready, bus_b_valid, bus_b_ready;
  logic bus_ar_valid, bus_ar_ready, bus_r_valid, bus_r_ready;
  ax_t bus_aw, bus_ar;
  w_t  bus_w;
  int  checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_master_ctrl #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (iteration at %0t)", what, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr_granted = $urandom_range(0, 3) != 0;
      rd_granted = $urandom_range(0, 3) != 0;
      wr_idx = 2'($urandom_range(0, N - 1));
      rd_idx = 2'($urandom_range(0, N - 1));
      m_aw_valid = N'($urandom()); m_w_valid = N'($urandom()); m_b_ready = N'($urandom());
      m_ar_valid = N'($urandom()); m_r_ready = N'($urandom());
      for (int m = 0; m < N; m++) begin
        m_aw[m] = ax_t'({$urandom(), $urandom()});
        m_ar[m] = ax_t'({$urandom(), $urandom()});
        m_w[m]  = w_t'({$urandom(), $urandom()});
      end
      bus_aw_ready = 1'($urandom()); bus_w_ready = 1'($urandom()); bus_b_valid = 1'($urandom());
      bus_ar_ready = 1'($urandom()); bus_r_valid = 1'($urandom());
      bus_b = b_t'($urandom()); bus_r = r_t'({$urandom(), $urandom()});
      #1;
      check(bus_aw_valid == (wr_granted && m_aw_valid[wr_idx]), "bus AWVALID");
      check(bus_w_valid == (wr_granted && m_w_valid[wr_idx]), "bus WVALID");
      check(bus_b_ready == (wr_granted && m_b_ready[wr_idx]), "bus BREADY");
      check(bus_ar_valid == (rd_granted && m_ar_valid[rd_idx]), "bus ARVALID");
      check(bus_r_ready == (rd_granted && m_r_ready[rd_idx]), "bus RREADY");
      if (wr_granted) check(bus_aw == m_aw[wr_idx] && bus_w == m_w[wr_idx], "bus AW/W payload");
      if (rd_granted) check(bus_ar == m_ar[rd_idx], "bus AR payload");
      check(m_b == bus_b && m_r == bus_r, "B/R payload to masters");
      for (int m = 0; m < N; m++) begin
        bit wg, rg;
        wg = wr_granted && (int'(wr_idx) == m);
        rg = rd_granted && (int'(rd_idx) == m);
        check(m_aw_ready[m] == (wg && bus_aw_ready), $sformatf("AWREADY to master %0d", m));
        check(m_w_ready[m] == (wg && bus_w_ready), $sformatf("WREADY to master %0d", m));
        check(m_b_valid[m] == (wg && bus_b_valid), $sformatf("BVALID to master %0d", m));
        check(m_ar_ready[m] == (rg && bus_ar_ready), $sformatf("ARREADY to master %0d", m));
        check(m_r_valid[m] == (rg && bus_r_valid), $sformatf("RVALID to master %0d", m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
