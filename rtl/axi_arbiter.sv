// axi_arbiter: grants one group of channels (the write group AW/W/B or the read
// group AR/R) to one master at a time.
//
// req[i] is master i's request (its AWVALID or ARVALID). When no master holds
// the group, the arbiter picks the first requesting master after the one granted
// last (round robin) and registers the grant, so grant appears the cycle after
// req. The grant is held until `done` pulses (the group's transaction has
// finished: the write response or the last read beat was accepted); the group
// is free again the cycle after `done`. Outputs: a one-hot grant, its index and
// `granted`. The document gives two arbiters, one per group, each granting a
// single master at a time; the round-robin order and the hold-until-done rule
// are this design's choices.
module axi_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 done,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 granted
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last_idx;   // master granted most recently
  logic [IW-1:0] pick;
  logic          any_req;

  // Round robin: search starting after last_idx.
  always_comb begin
    pick    = '0;
    any_req = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last_idx) + k) % N;
      if (!any_req && req[c]) begin
        any_req = 1'b1;
        pick    = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      granted   <= 1'b0;
      grant_idx <= '0;
      last_idx  <= IW'(N - 1);
    end else if (granted) begin
      if (done) granted <= 1'b0;
    end else if (any_req) begin
      granted   <= 1'b1;
      grant_idx <= pick;
      last_idx  <= pick;
    end
  end

  always_comb begin
    grant = '0;
    if (granted) grant[grant_idx] = 1'b1;
  end

  a_onehot: assert property (@(posedge clk) $onehot0(grant));

endmodule
