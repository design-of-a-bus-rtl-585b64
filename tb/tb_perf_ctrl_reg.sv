// tb_perf_ctrl_reg: checks that writes set and clear the enable bit and that a
// write with bit 1 set gives exactly one clear pulse on the next cycle.
module tb_perf_ctrl_reg;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cfg_we = 1'b0;
  logic [1:0] cfg_wdata = '0;
  logic       enable, clear;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  perf_ctrl_reg dut (.clk, .rst_n, .cfg_we, .cfg_wdata, .enable, .clear);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (enable=%0b clear=%0b) at %0t", what, enable, clear, $time);
    end
  endtask

  task automatic write(input logic [1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0; cfg_wdata = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(enable == 1'b0 && clear == 1'b0, "reset values");
    rst_n = 1'b1;
    @(negedge clk);
    check(enable == 1'b0 && clear == 1'b0, "idle after reset");
    write(2'b01);
    check(enable == 1'b1, "enable set");
    check(clear == 1'b0, "no clear on plain enable");
    repeat (3) @(negedge clk);
    check(enable == 1'b1, "enable holds");
    write(2'b11);
    check(enable == 1'b1 && clear == 1'b1, "clear pulse with enable kept");
    @(negedge clk);
    check(clear == 1'b0, "clear lasts one cycle");
    write(2'b10);
    check(enable == 1'b0 && clear == 1'b1, "clear with disable");
    @(negedge clk);
    check(clear == 1'b0 && enable == 1'b0, "disabled after pulse");
    write(2'b00);
    check(enable == 1'b0 && clear == 1'b0, "disable write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
