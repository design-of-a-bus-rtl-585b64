// tb_axi_addr_decoder: checks the slave index and hit flag for fixed and random
// addresses against the address map (bits [31:28] = slave, slaves 0..2 exist).
module tb_axi_addr_decoder;
  import axi_pkg::*;

  logic              clk = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic [REGION_W-1:0] idx;
  logic              hit;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_addr_decoder #(.NUM_SLAVES(3)) dut (.addr, .idx, .hit);

  task automatic expect_map(input logic [31:0] a, input int exp_idx, input bit exp_hit);
    addr = a;
    #1;
    checks++;
    if (int'(idx) != exp_idx || hit != exp_hit) begin
      failures++;
      $display("FAIL addr=%h idx=%0d hit=%0b expected %0d %0b", a, idx, hit, exp_idx, exp_hit);
    end
  endtask

  initial begin
    expect_map(32'h0A7E_0FA5, 0, 1'b1);
    expect_map(32'h0000_0000, 0, 1'b1);
    expect_map(32'h1000_0010, 1, 1'b1);
    expect_map(32'h2FFF_FFFF, 2, 1'b1);
    expect_map(32'h3000_0000, 3, 1'b0);
    expect_map(32'hF000_0004, 15, 1'b0);
    for (int i = 0; i < 200; i++) begin
      logic [31:0] a;
      a = $urandom();
      expect_map(a, int'(a / 32'h1000_0000), (a < 32'h3000_0000));
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
