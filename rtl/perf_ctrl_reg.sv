// perf_ctrl_reg: control register of the bus monitor.
//
// A write (cfg_we) stores bit 0 of cfg_wdata as the monitor enable, which stays
// until the next write; bit 1 of the same write requests a counter reset, given
// to the counter banks as a one-cycle `clear` pulse on the following cycle.
// After reset the monitor is disabled.
// The document names the register and its Enable and Reset outputs; the bit
// layout and write port are this design's choices.
module perf_ctrl_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic [1:0] cfg_wdata,
  output logic       enable,
  output logic       clear
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0;
      clear  <= 1'b0;
    end else begin
      clear <= cfg_we && cfg_wdata[1];
      if (cfg_we) enable <= cfg_wdata[0];
    end
  end

endmodule
