// tb_axi_slave: drives the AXI slave's five channels directly. It fills the
// 128-byte memory, then runs random FIXED, INCR and WRAP bursts with random
// sizes, strobes and VALID/READY stalls. A byte-array model in the testbench,
// with its own burst address arithmetic, predicts every read beat; BID/RID,
// BRESP/RRESP and RLAST are checked, and an over-wide beat size must give SLVERR
// without changing the memory.
module tb_axi_slave;
  import axi_pkg::*;

  localparam int MEM = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic aw_valid = 0, aw_ready, w_valid = 0, w_ready, b_valid, b_ready = 0;
  logic ar_valid = 0, ar_ready, r_valid, r_ready = 0;
  ax_t  aw = '0, ar = '0;
  w_t   w = '0;
  b_t   b;
  r_t   r;
  int   checks = 0, failures = 0;
  int   n_fixed = 0, n_incr = 0, n_wrap = 0, n_err = 0;
  logic [7:0] model [MEM];

  always #5 clk = ~clk;

  axi_slave #(.MEM_BYTES(MEM)) dut (.aclk(clk), .aresetn(rst_n), .aw_valid, .aw_ready, .aw,
    .w_valid, .w_ready, .w, .b_valid, .b_ready, .b, .ar_valid, .ar_ready, .ar,
    .r_valid, .r_ready, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // address of beat i, computed from the burst rules
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

  task automatic do_write(input int id, input int addr, input int len, input int size,
                          input burst_e bt, input bit rand_strb);
    bit err;
    err = (size > 2);
    @(negedge clk);
    aw_valid = 1;
    aw = '0; aw.id = ID_W'(id); aw.addr = addr; aw.len = LEN_W'(len);
    aw.size = SIZE_W'(size); aw.burst = bt;
    do @(posedge clk); while (!aw_ready);
    @(negedge clk);
    aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      int a;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      w_valid = 1;
      w.id = ID_W'(id);
      w.data = $urandom();
      w.strb = rand_strb ? STRB_W'($urandom()) : '1;
      w.last = (i == len);
      do @(posedge clk); while (!w_ready);
      a = beat_addr(addr, i, len, size, bt);
      if (!err)
        for (int k = 0; k < 4; k++)
          if (w.strb[k]) model[((a & ~3) + k) % MEM] = w.data[8*k +: 8];
      @(negedge clk);
      w_valid = 0;
      w.last = 0;
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
    b_ready = 1;
    do @(posedge clk); while (!b_valid);
    check(b.id == ID_W'(id), $sformatf("BID %0d expected %0d", b.id, id));
    check(b.resp == (err ? RESP_SLVERR : RESP_OKAY), $sformatf("BRESP %0d", b.resp));
    @(negedge clk);
    b_ready = 0;
    check(!b_valid && b == '0, "B returns to zero after BREADY");
  endtask

  task automatic do_read(input int id, input int addr, input int len, input int size,
                         input burst_e bt);
    bit err;
    err = (size > 2);
    @(negedge clk);
    ar_valid = 1;
    ar = '0; ar.id = ID_W'(id); ar.addr = addr; ar.len = LEN_W'(len);
    ar.size = SIZE_W'(size); ar.burst = bt;
    do @(posedge clk); while (!ar_ready);
    @(negedge clk);
    ar_valid = 0;
    for (int i = 0; i <= len; i++) begin
      int a;
      logic [31:0] exp;
      r_ready = ($urandom_range(0, 2) != 0);
      while (!(r_valid && r_ready)) begin
        @(negedge clk);
        r_ready = ($urandom_range(0, 2) != 0);
      end
      a = beat_addr(addr, i, len, size, bt);
      for (int k = 0; k < 4; k++) exp[8*k +: 8] = model[((a & ~3) + k) % MEM];
      if (err) exp = '0;
      check(r.data == exp, $sformatf("RDATA beat %0d addr %0d: %h expected %h", i, a, r.data, exp));
      check(r.id == ID_W'(id), "RID");
      check(r.last == (i == len), $sformatf("RLAST beat %0d of %0d", i, len));
      check(r.resp == (err ? RESP_SLVERR : RESP_OKAY), "RRESP");
      @(posedge clk);
      @(negedge clk);
      r_ready = 0;
    end
    check(!r_valid, "RVALID drops after last beat");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!b_valid && !r_valid && b == '0, "outputs zero in reset");
    rst_n = 1'b1;
    // fill the memory: two 16-beat INCR bursts of words
    do_write(1, 0, 15, 2, BURST_INCR, 0);
    do_write(2, 64, 15, 2, BURST_INCR, 0);
    do_read(3, 0, 15, 2, BURST_INCR);
    do_read(4, 64, 15, 2, BURST_INCR);
    for (int t = 0; t < 150; t++) begin
      int len, size, addr, sel, id;
      burst_e bt;
      sel  = $urandom_range(0, 9);
      id   = $urandom_range(0, 15);
      size = $urandom_range(0, 2);
      if (sel < 3) begin
        bt = BURST_WRAP;
        len = (1 << $urandom_range(1, 3)) - 1;
        n_wrap++;
      end else if (sel < 5) begin
        bt = BURST_FIXED; len = $urandom_range(0, 7); n_fixed++;
      end else if (sel < 9) begin
        bt = BURST_INCR; len = $urandom_range(0, 15); n_incr++;
      end else begin
        bt = BURST_INCR; len = $urandom_range(0, 3); size = 3; n_err++;
      end
      addr = $urandom_range(0, 127);
      if (bt == BURST_WRAP || size == 3) addr = addr & ~((1 << size) - 1);
      // keep INCR bursts inside the memory
      if (bt == BURST_INCR && size < 3) addr = addr % (MEM - ((len + 1) << size) + 1);
      addr = addr + 32'h1000_0000 * $urandom_range(0, 2);
      if ($urandom_range(0, 1)) do_write(id, addr, len, size, bt, 1);
      else do_read(id, addr, len, size, bt);
    end
    $display("bursts: fixed=%0d incr=%0d wrap=%0d slverr=%0d", n_fixed, n_incr, n_wrap, n_err);
    check(n_fixed > 0 && n_incr > 0 && n_wrap > 0 && n_err > 0, "every burst kind ran");
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
