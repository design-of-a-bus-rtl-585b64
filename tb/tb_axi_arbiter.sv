// tb_axi_arbiter: random requests against a three-master arbiter. A reference
// model in the testbench predicts the registered round-robin grant, its hold
// until `done` and its release; grant, index and `granted` are compared every
// cycle. It also counts that contention (several requests while free) happened.
module tb_axi_arbiter;
  localparam int N = 3;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req = '0;
  logic         done = 1'b0;
  logic [N-1:0] grant;
  logic [1:0]   grant_idx;
  logic         granted;
  int           checks = 0, failures = 0, contended = 0, grants_seen = 0;

  // reference model
  bit           m_granted;
  int           m_idx, m_last;

  always #5 clk = ~clk;

  axi_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .done, .grant, .grant_idx, .granted);

  initial begin
    m_granted = 0; m_idx = 0; m_last = N - 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      req  = N'($urandom_range(0, (1 << N) - 1));
      done = m_granted && ($urandom_range(0, 3) == 0);
      if (!m_granted && $countones(req) > 1) contended++;
      @(posedge clk);
      // model update
      if (m_granted) begin
        if (done) m_granted = 0;
      end else if (req != 0) begin
        for (int k = 1; k <= N; k++) begin
          int c;
          c = (m_last + k) % N;
          if (req[c]) begin
            m_idx = c;
            break;
          end
        end
        m_last = m_idx;
        m_granted = 1;
        grants_seen++;
      end
      #1;
      checks++;
      if (granted != m_granted || (m_granted && (int'(grant_idx) != m_idx ||
          grant != N'(1 << m_idx))) || (!m_granted && grant != '0)) begin
        failures++;
        $display("FAIL cycle %0d: granted=%0b idx=%0d grant=%b expected %0b %0d", i,
                 granted, grant_idx, grant, m_granted, m_idx);
      end
    end
    checks++;
    if (contended == 0 || grants_seen < 10) begin
      failures++;
      $display("FAIL contention=%0d grants=%0d", contended, grants_seen);
    end
    $display("contended arbitrations=%0d grants=%0d", contended, grants_seen);
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
