// pr_stall: stalls the colour pipeline around a partial reconfiguration of
// the 3D/4D region, so that no pixel is lost or corrupted while the region is
// rewritten.
//
// States:
//   IDLE      normal operation
//   DRAIN     entered on pr_start. New pixels are already diverted, and the
//             pipeline keeps running until the stages ahead of the region
//             (pre_busy low) and the region itself (prr_empty) are empty.
//             The ICAP is not written yet.
//   RECONFIG  pipeline frozen (stall), ICAP writes allowed (icap_en), until
//             the siphon has passed on every PR word and the ICI is idle.
//   SETTLE    SETTLE_CYCLES cycles with the pipeline frozen and prm_clear
//             high, which empties the newly loaded phase's pipeline
//             registers before pixels flow again.
// busy is high in every state but IDLE. Stalling is what the published architecture calls
// for; the drain step, the settle step and its length are this design's own
// choices.
module pr_stall #(
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pr_start,
  input  logic pre_busy,
  input  logic prr_empty,
  input  logic siphoning,
  input  logic ici_idle,
  output logic busy,
  output logic stall,
  output logic icap_en,
  output logic prm_clear
);

  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_RECONFIG, S_SETTLE} state_e;
  state_e state;
  logic [$clog2(SETTLE_CYCLES + 1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE:     if (pr_start) state <= S_DRAIN;
        S_DRAIN:    if (!pre_busy && prr_empty) state <= S_RECONFIG;
        S_RECONFIG: if (!siphoning && ici_idle) begin
                      state <= S_SETTLE;
                      cnt   <= '0;
                    end
        S_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == SETTLE_CYCLES - 1) state <= S_IDLE;
        end
        default:    state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign stall     = (state == S_RECONFIG) || (state == S_SETTLE);
  assign icap_en   = (state == S_RECONFIG);
  assign prm_clear = (state == S_SETTLE);

endmodule
