// axi_master: AXI master with independent write and read engines.
//
// Write engine (AW, W and B channels): a command accepted on the wcmd port is
// placed on AW with AWVALID high; the address and control signals are held
// unchanged until AWREADY. Then WLEN+1 write beats are taken from the wd stream
// and driven on W with WID equal to AWID; each beat is held until WREADY and
// WLAST marks the last one. After the last beat BREADY is raised until the
// slave's response arrives, which is reported on b_done/b_resp/b_id for one
// cycle. Read engine (AR and R channels): a command accepted on rcmd is placed
// on AR and held until ARREADY; read beats are passed to the rd stream, with
// RREADY following rd_ready, until RLAST.
//
// While ARESETn is low every AXI output is zero. Address, data and response
// phases run one after the other on the write side, as the document's channel
// state diagrams describe; the write and read engines run in parallel. The
// user-side command and data ports are this design's own.
module axi_master
  import axi_pkg::*;
(
  input  logic              aclk,
  input  logic              aresetn,
  // write command and data from the user
  input  logic              wcmd_valid,
  output logic              wcmd_ready,
  input  ax_t               wcmd,
  input  logic              wd_valid,
  output logic              wd_ready,
  input  logic [DATA_W-1:0] wd_data,
  input  logic [STRB_W-1:0] wd_strb,
  output logic              b_done,
  output resp_e             b_resp,
  output logic [ID_W-1:0]   b_id,
  // read command and data to the user
  input  logic              rcmd_valid,
  output logic              rcmd_ready,
  input  ax_t               rcmd,
  output logic              rd_valid,
  input  logic              rd_ready,
  output r_t                rd,
  // AXI
  output logic              aw_valid,
  input  logic              aw_ready,
  output ax_t               aw,
  output logic              w_valid,
  input  logic              w_ready,
  output w_t                w,
  input  logic              b_valid,
  output logic              b_ready,
  input  b_t                b,
  output logic              ar_valid,
  input  logic              ar_ready,
  output ax_t               ar,
  input  logic              r_valid,
  output logic              r_ready,
  input  r_t                r
);

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;

  wstate_e          wstate;
  rstate_e          rstate;
  logic [LEN_W:0]   beats_sent;  // write beats loaded onto W so far

  logic aw_hs, w_hs, b_hs, ar_hs, r_hs;
  logic w_slot_free, w_more;

  assign aw_hs = aw_valid && aw_ready;
  assign w_hs  = w_valid && w_ready;
  assign b_hs  = b_valid && b_ready;
  assign ar_hs = ar_valid && ar_ready;
  assign r_hs  = r_valid && r_ready;

  assign wcmd_ready  = (wstate == W_IDLE);
  assign rcmd_ready  = (rstate == R_IDLE);

  // A new beat may be loaded when the W register is empty or being emptied.
  assign w_slot_free = !w_valid || w_ready;
  assign w_more      = (beats_sent <= {1'b0, aw.len});
  assign wd_ready    = (wstate == W_DATA) && w_slot_free && w_more;

  assign b_ready  = (wstate == W_RESP);
  assign r_ready  = (rstate == R_DATA) && rd_ready;
  assign rd_valid = (rstate == R_DATA) && r_valid;
  assign rd       = r;

  // ---------------- write engine: AW, W, B ----------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wstate     <= W_IDLE;
      aw_valid   <= 1'b0;
      aw         <= '0;
      w_valid    <= 1'b0;
      w          <= '0;
      beats_sent <= '0;
      b_done     <= 1'b0;
      b_resp     <= RESP_OKAY;
      b_id       <= '0;
    end else begin
      b_done <= 1'b0;
      unique case (wstate)
        W_IDLE: if (wcmd_valid) begin
          aw         <= wcmd;
          aw_valid   <= 1'b1;
          beats_sent <= '0;
          wstate     <= W_ADDR;
        end
        W_ADDR: if (aw_hs) begin
          aw_valid <= 1'b0;
          wstate   <= W_DATA;
        end
        W_DATA: begin
          if (wd_valid && wd_ready) begin
            w_valid    <= 1'b1;
            w.id       <= aw.id;
            w.data     <= wd_data;
            w.strb     <= wd_strb;
            w.last     <= (beats_sent == {1'b0, aw.len});
            beats_sent <= beats_sent + 1'b1;
          end else if (w_hs) begin
            w_valid <= 1'b0;
          end
          if (w_hs && w.last) begin
            w_valid <= 1'b0;
            w       <= '0;
            wstate  <= W_RESP;
          end
        end
        W_RESP: if (b_hs) begin
          b_done <= 1'b1;
          b_resp <= b.resp;
          b_id   <= b.id;
          wstate <= W_IDLE;
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- read engine: AR, R ----------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      rstate   <= R_IDLE;
      ar_valid <= 1'b0;
      ar       <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (rcmd_valid) begin
          ar       <= rcmd;
          ar_valid <= 1'b1;
          rstate   <= R_ADDR;
        end
        R_ADDR: if (ar_hs) begin
          ar_valid <= 1'b0;
          rstate   <= R_DATA;
        end
        R_DATA: if (r_hs && r.last) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // Protocol rules: a raised VALID stays high, with stable payload, until READY.
  property p_hold(logic v, logic rdy, logic [63:0] pl);
    @(posedge aclk) disable iff (!aresetn) v && !rdy |=> v && $stable(pl);
  endproperty
  a_aw_hold: assert property (p_hold(aw_valid, aw_ready, 64'(aw)));
  a_ar_hold: assert property (p_hold(ar_valid, ar_ready, 64'(ar)));
  a_w_hold:  assert property (p_hold(w_valid, w_ready, 64'(w)));

endmodule
