// tb_axi_master: the testbench plays the user of the master and an AXI slave
// with random READY and VALID stalls. Write and read transactions run at the
// same time. It checks that AW and AR carry the command unchanged and rise the
// cycle after the command is taken, that the W beats carry the user's data in
// order with WID = AWID and WLAST on beat AWLEN+1 only, that no W beat comes
// before the address handshake, that the B response is reported once, and that
// every R beat reaches the user in order with RREADY following rd_ready.
module tb_axi_master;
  import axi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wcmd_valid = 0, wcmd_ready, wd_valid = 0, wd_ready, b_done;
  ax_t  wcmd = '0, rcmd = '0;
  logic [DATA_W-1:0] wd_data = '0;
  logic [STRB_W-1:0] wd_strb = '0;
  resp_e b_resp;
  logic [ID_W-1:0] b_id;
  logic rcmd_valid = 0, rcmd_ready, rd_valid, rd_ready = 0;
  r_t   rd;
  logic aw_valid, aw_ready = 0, w_valid, w_ready = 0, b_valid = 0, b_ready;
  logic ar_valid, ar_ready = 0, r_valid = 0, r_ready;
  ax_t  aw, ar;
  w_t   w;
  b_t   b = '0;
  r_t   r = '0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_master dut (.aclk(clk), .aresetn(rst_n), .wcmd_valid, .wcmd_ready, .wcmd,
    .wd_valid, .wd_ready, .wd_data, .wd_strb, .b_done, .b_resp, .b_id,
    .rcmd_valid, .rcmd_ready, .rcmd, .rd_valid, .rd_ready, .rd,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] wbeats [16];
  logic [3:0]  wstrbs [16];
  logic [31:0] rbeats [16];

  // ---------- write side ----------
  task automatic user_write(input ax_t c);
    @(negedge clk);
    wcmd = c; wcmd_valid = 1;
    do @(posedge clk); while (!wcmd_ready);
    @(negedge clk);
    wcmd_valid = 0;
    check(aw_valid && aw == c, "AWVALID with the command one cycle after it is taken");
    for (int i = 0; i <= int'(c.len); i++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      wd_valid = 1; wd_data = wbeats[i]; wd_strb = wstrbs[i];
      do @(posedge clk); while (!wd_ready);
      @(negedge clk);
      wd_valid = 0;
    end
  endtask

  task automatic slave_write(input ax_t c, input resp_e resp);
    int n;
    // address
    forever begin
      @(negedge clk);
      check(!w_valid, "no W before the address handshake");
      aw_ready = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (aw_valid && aw_ready) break;
    end
    check(aw == c, "AW payload at handshake");
    @(negedge clk);
    aw_ready = 0;
    // data
    n = 0;
    while (n <= int'(c.len)) begin
      w_ready = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (w_valid && w_ready) begin
        check(w.data == wbeats[n] && w.strb == wstrbs[n], $sformatf("W beat %0d data", n));
        check(w.id == c.id, "WID equals AWID");
        check(w.last == (n == int'(c.len)), $sformatf("WLAST on beat %0d of %0d", n, c.len));
        n++;
      end
      @(negedge clk);
    end
    w_ready = 0;
    // response
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check(b_ready, "BREADY high while waiting for the response");
    b_valid = 1; b.id = c.id; b.resp = resp;
    @(posedge clk);
    @(negedge clk);
    b_valid = 0;
    check(b_done && b_resp == resp && b_id == c.id, "b_done reports the response");
    @(negedge clk);
    check(!b_done, "b_done lasts one cycle");
  endtask

  // ---------- read side ----------
  task automatic user_read(input ax_t c);
    int n;
    @(negedge clk);
    rcmd = c; rcmd_valid = 1;
    do @(posedge clk); while (!rcmd_ready);
    @(negedge clk);
    rcmd_valid = 0;
    check(ar_valid && ar == c, "ARVALID with the command one cycle after it is taken");
    n = 0;
    while (n <= int'(c.len)) begin
      rd_ready = ($urandom_range(0, 2) != 0);
      #1;
      check(r_ready == (rd_ready && !ar_valid), "RREADY follows rd_ready after the address");
      @(posedge clk);
      if (rd_valid && rd_ready) begin
        check(rd.data == rbeats[n] && rd.id == c.id, $sformatf("R beat %0d to user", n));
        check(rd.last == (n == int'(c.len)), "RLAST to user");
        n++;
      end
      @(negedge clk);
    end
    rd_ready = 0;
  endtask

  task automatic slave_read(input ax_t c);
    int n;
    forever begin
      @(negedge clk);
      ar_ready = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (ar_valid && ar_ready) break;
    end
    check(ar == c, "AR payload at handshake");
    @(negedge clk);
    ar_ready = 0;
    n = 0;
    while (n <= int'(c.len)) begin
      repeat ($urandom_range(0, 1)) @(negedge clk);
      r_valid = 1; r.id = c.id; r.data = rbeats[n]; r.resp = RESP_OKAY;
      r.last = (n == int'(c.len));
      do @(posedge clk); while (!r_ready);
      n++;
      @(negedge clk);
      r_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!aw_valid && !w_valid && !ar_valid && aw == '0 && w == '0 && ar == '0,
          "AXI outputs zero in reset");
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      ax_t wc, rc;
      resp_e rs;
      wc = '0; rc = '0;
      wc.id = ID_W'($urandom()); wc.addr = $urandom(); wc.len = LEN_W'($urandom());
      wc.size = 3'd2; wc.burst = burst_e'($urandom_range(0, 2));
      wc.cache = 4'($urandom()); wc.prot = 3'($urandom()); wc.lock = 2'($urandom());
      rc.id = ID_W'($urandom()); rc.addr = $urandom(); rc.len = LEN_W'($urandom());
      rc.size = 3'($urandom_range(0, 2)); rc.burst = BURST_INCR;
      rs = resp_e'($urandom_range(0, 3));
      for (int i = 0; i < 16; i++) begin
        wbeats[i] = $urandom(); wstrbs[i] = 4'($urandom()); rbeats[i] = $urandom();
      end
      fork
        user_write(wc);
        slave_write(wc, rs);
        user_read(rc);
        slave_read(rc);
      join
    end
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
