// tb_axi_soc_top: end-to-end test of the whole system at its default size (two
// masters, three 128-byte slaves, three counter banks per direction).
//
// Each master owns half of every slave (bytes 0..63 or 64..127) and runs random
// write and read bursts there through its user ports, both masters at once:
// FIXED, INCR and WRAP bursts, byte to word sizes, unaligned starts, random
// strobes and read stalls, plus writes and reads to an unmapped region (DECERR)
// and with an over-wide beat size (SLVERR). A byte model of every slave
// predicts each read beat. The bus monitor is enabled, cleared after the
// memories are filled, disabled for a while and enabled again; its transfer
// count, size and valid count in every bank must equal the totals of the
// transactions the testbench issued while counting was on, and its busy and
// latency counts must be at least the valid count. Every mechanism (arbiter
// contention on both groups, a write overlapping another master's read, each
// burst type, narrow beats, DECERR, SLVERR, read stalls, counter clear and
// disable) is counted and must have happened.
module tb_axi_soc_top;
  import axi_pkg::*;
  localparam int NM = 2, NS = 3, MEM = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wc_v [NM], wd_v [NM], rc_v [NM], rd_r [NM];
  logic [NM-1:0] wcmd_valid, wcmd_ready, wd_valid, wd_ready, b_done;
  logic [NM-1:0] rcmd_valid, rcmd_ready, rd_valid, rd_ready;
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
  bit counting = 0;
  longint e_xfer [2][NS], e_size [2][NS], e_beat [2][NS];
  // mechanism counters
  int n_cont_w = 0, n_cont_r = 0, n_overlap = 0, n_fixed = 0, n_incr = 0, n_wrap = 0;
  int n_narrow = 0, n_decerr = 0, n_slverr = 0, n_stall = 0, n_clear = 0, n_disabled = 0;

  always #5 clk = ~clk;   // 100 MHz

  for (genvar m = 0; m < NM; m++) begin : g_pack
    assign wcmd_valid[m] = wc_v[m];
    assign wd_valid[m]   = wd_v[m];
    assign rcmd_valid[m] = rc_v[m];
    assign rd_ready[m]   = rd_r[m];
  end

  axi_soc_top dut (.aclk(clk), .aresetn(rst_n), .*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if ((dut.m_aw_valid & ~wr_grant) != '0 && wr_grant != '0) n_cont_w++;
    if ((dut.m_ar_valid & ~rd_grant) != '0 && rd_grant != '0) n_cont_r++;
    if (dut.mon_w_valid && dut.mon_r_valid && wr_grant != rd_grant) n_overlap++;
    for (int m = 0; m < NM; m++) if (rd_valid[m] && !rd_ready[m]) n_stall++;
  end

  function automatic int beat_addr(int start, int i, int len, int size, burst_e bt);
    int nb, total, lower;
    nb = 1 << size;
    case (bt)
      BURST_FIXED: return start;
      BURST_WRAP: begin
        total = nb * (len + 1);
        lower = (start / total) * total;
        return lower + ((start - lower) + i * nb) % total;
      end
      default: return (i == 0) ? start : (start / nb) * nb + i * nb;
    endcase
  endfunction

  // byte lanes a beat at address a of 2**size bytes may use
  function automatic logic [3:0] lanes(int a, int size);
    logic [3:0] l;
    int lo, hi;
    lo = a % 4;
    hi = ((a / (1 << size)) * (1 << size) + (1 << size) - 1) % 4;
    if (size >= 2) hi = 3;
    for (int k = 0; k < 4; k++) l[k] = (k >= lo) && (k <= hi);
    return l;
  endfunction

  task automatic account(input int dir, input int slv, input int len, input int size);
    if (counting && slv < NS) begin
      e_xfer[dir][slv] += 1;
      e_size[dir][slv] += (len + 1) << size;
      e_beat[dir][slv] += len + 1;
    end
  endtask

  task automatic do_write(input int m, input int slv, input int off, input int len,
                          input int size, input burst_e bt, input bit full_strb);
    ax_t c;
    resp_e exp;
    int id;
    id = $urandom_range(0, 15);
    c = '0; c.id = 4'(id); c.addr = {4'(slv), 28'(off)}; c.len = 4'(len);
    c.size = 3'(size); c.burst = bt;
    exp = (slv >= NS) ? RESP_DECERR : (size > 2) ? RESP_SLVERR : RESP_OKAY;
    @(negedge clk);
    wc_v[m] = 1; wcmd[m] = c;
    do @(posedge clk); while (!wcmd_ready[m]);
    @(negedge clk);
    wc_v[m] = 0;
    for (int i = 0; i <= len; i++) begin
      int a;
      a = beat_addr(off, i, len, size, bt);
      wd_v[m] = 1;
      wd_data[m] = $urandom();
      wd_strb[m] = full_strb ? lanes(a, size) : (lanes(a, size) & 4'($urandom()));
      do @(posedge clk); while (!wd_ready[m]);
      if (exp == RESP_OKAY)
        for (int k = 0; k < 4; k++)
          if (wd_strb[m][k]) model[slv][((a & ~3) + k) % MEM] = wd_data[m][8*k +: 8];
      @(negedge clk);
      wd_v[m] = 0;
    end
    while (!b_done[m]) @(negedge clk);
    check(b_resp[m] == exp && b_id[m] == 4'(id), $sformatf("master %0d BRESP %0d expected %0d", m, b_resp[m], exp));
    if (exp == RESP_DECERR) n_decerr++;
    if (exp == RESP_SLVERR) n_slverr++;
    if (size < 2) n_narrow++;
    if (bt == BURST_FIXED) n_fixed++;
    if (bt == BURST_INCR) n_incr++;
    if (bt == BURST_WRAP) n_wrap++;
    if (!counting && mon_enable == 0) n_disabled++;
    account(0, slv, len, size);
  endtask

  task automatic do_read(input int m, input int slv, input int off, input int len,
                         input int size, input burst_e bt);
    ax_t c;
    resp_e exp;
    int n, id;
    id = $urandom_range(0, 15);
    c = '0; c.id = 4'(id); c.addr = {4'(slv), 28'(off)}; c.len = 4'(len);
    c.size = 3'(size); c.burst = bt;
    exp = (slv >= NS) ? RESP_DECERR : (size > 2) ? RESP_SLVERR : RESP_OKAY;
    @(negedge clk);
    rc_v[m] = 1; rcmd[m] = c;
    do @(posedge clk); while (!rcmd_ready[m]);
    @(negedge clk);
    rc_v[m] = 0;
    n = 0;
    while (n <= len) begin
      rd_r[m] = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rd_valid[m] && rd_r[m]) begin
        int a;
        logic [31:0] e;
        a = beat_addr(off, n, len, size, bt);
        for (int k = 0; k < 4; k++) e[8*k +: 8] = model[slv % NS][((a & ~3) + k) % MEM];
        if (exp != RESP_OKAY) e = '0;
        check(rd[m].data == e, $sformatf("master %0d slave %0d addr %0d beat %0d: %h expected %h",
                                         m, slv, a, n, rd[m].data, e));
        check(rd[m].resp == exp && rd[m].id == 4'(id) && rd[m].last == (n == len),
              "RRESP/RID/RLAST");
        n++;
      end
      @(negedge clk);
    end
    rd_r[m] = 0;
    account(1, slv, len, size);
  endtask

  task automatic random_op(input int m);
    int slv, size, len, off, sel, nbytes;
    burst_e bt;
    slv  = $urandom_range(0, NS - 1);
    size = $urandom_range(0, 2);
    sel  = $urandom_range(0, 19);
    if (sel < 6) begin
      bt = BURST_WRAP;
      len = (1 << $urandom_range(1, 3)) - 1;
      while (((len + 1) << size) > 64) len = (len + 1) / 2 - 1;
      if (len < 1) len = 1;
      off = m * 64 + ($urandom_range(0, 63) & ~((1 << size) - 1));
    end else if (sel < 9) begin
      bt = BURST_FIXED;
      len = $urandom_range(0, 7);
      off = m * 64 + $urandom_range(0, 63);
    end else begin
      bt = BURST_INCR;
      len = $urandom_range(0, 15);
      nbytes = (len + 1) << size;
      while (nbytes > 64) begin len = len / 2; nbytes = (len + 1) << size; end
      off = m * 64 + $urandom_range(0, 64 - nbytes);
    end
    if (sel == 19) slv = 5 + m;                         // unmapped: DECERR
    if (sel == 18) begin size = 3; bt = BURST_INCR; len = 1; off = m * 64; end  // SLVERR
    if ($urandom_range(0, 1)) do_write(m, slv, off, len, size, bt, 0);
    else do_read(m, slv, off, len, size, bt);
  endtask

  task automatic fill(input int m);
    for (int s = 0; s < NS; s++) begin
      do_write(m, s, m * 64, 15, 2, BURST_INCR, 1);
      do_read(m, s, m * 64, 15, 2, BURST_INCR);
    end
  endtask

  task automatic cfg(input logic [1:0] d);
    @(negedge clk);
    mon_cfg_we = 1; mon_cfg_wdata = d;
    @(negedge clk);
    mon_cfg_we = 0;
    @(negedge clk);
  endtask

  task automatic phase(input int n);
    fork
      for (int i = 0; i < n; i++) random_op(0);
      for (int i = 0; i < n; i++) random_op(1);
    join
    repeat (3) @(negedge clk);
  endtask

  task automatic compare_monitor(input string when);
    for (int s = 0; s < NS; s++) begin
      check(mon_wr_pc[s].xfer_cnt == 32'(e_xfer[0][s]) && mon_wr_pc[s].size_cnt == 32'(e_size[0][s]) &&
            mon_wr_pc[s].valid_cnt == 32'(e_beat[0][s]),
            $sformatf("%s write bank %0d: %0d %0d %0d expected %0d %0d %0d", when, s,
                      mon_wr_pc[s].xfer_cnt, mon_wr_pc[s].size_cnt, mon_wr_pc[s].valid_cnt,
                      e_xfer[0][s], e_size[0][s], e_beat[0][s]));
      check(mon_rd_pc[s].xfer_cnt == 32'(e_xfer[1][s]) && mon_rd_pc[s].size_cnt == 32'(e_size[1][s]) &&
            mon_rd_pc[s].valid_cnt == 32'(e_beat[1][s]),
            $sformatf("%s read bank %0d: %0d %0d %0d expected %0d %0d %0d", when, s,
                      mon_rd_pc[s].xfer_cnt, mon_rd_pc[s].size_cnt, mon_rd_pc[s].valid_cnt,
                      e_xfer[1][s], e_size[1][s], e_beat[1][s]));
      check(mon_wr_pc[s].busy_cnt >= mon_wr_pc[s].valid_cnt &&
            mon_wr_pc[s].lat_cnt >= mon_wr_pc[s].valid_cnt &&
            mon_rd_pc[s].busy_cnt >= mon_rd_pc[s].valid_cnt &&
            mon_rd_pc[s].lat_cnt >= mon_rd_pc[s].valid_cnt, $sformatf("%s busy/latency bounds bank %0d", when, s));
    end
  endtask

  task automatic zero_expect();
    for (int d = 0; d < 2; d++)
      for (int s = 0; s < NS; s++) begin
        e_xfer[d][s] = 0; e_size[d][s] = 0; e_beat[d][s] = 0;
      end
  endtask

  initial begin
    for (int m = 0; m < NM; m++) begin
      wc_v[m] = 0; wd_v[m] = 0; rc_v[m] = 0; rd_r[m] = 0;
      wcmd[m] = '0; rcmd[m] = '0; wd_data[m] = '0; wd_strb[m] = '0;
    end
    zero_expect();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cfg(2'b01);
    counting = 1;
    check(mon_enable, "monitor enabled");
    fork
      fill(0);
      fill(1);
    join
    compare_monitor("after fill");
    cfg(2'b11);
    n_clear++;
    zero_expect();
    compare_monitor("after clear");
    phase(60);
    compare_monitor("phase 1");
    cfg(2'b00);
    counting = 0;
    phase(10);
    compare_monitor("while disabled");
    cfg(2'b01);
    counting = 1;
    phase(60);
    compare_monitor("phase 2");
    $display("contention w=%0d r=%0d overlap=%0d fixed=%0d incr=%0d wrap=%0d narrow=%0d",
             n_cont_w, n_cont_r, n_overlap, n_fixed, n_incr, n_wrap, n_narrow);
    $display("decerr=%0d slverr=%0d read stalls=%0d clears=%0d writes while disabled=%0d",
             n_decerr, n_slverr, n_stall, n_clear, n_disabled);
    check(n_cont_w > 0, "write arbiter contention");
    check(n_cont_r > 0, "read arbiter contention");
    check(n_overlap > 0, "write overlapping another master's read");
    check(n_fixed > 0 && n_incr > 0 && n_wrap > 0, "all burst types");
    check(n_narrow > 0, "narrow transfers");
    check(n_decerr > 0, "DECERR");
    check(n_slverr > 0, "SLVERR");
    check(n_stall > 0, "read stalls");
    check(n_clear > 0 && n_disabled > 0, "counter clear and disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
