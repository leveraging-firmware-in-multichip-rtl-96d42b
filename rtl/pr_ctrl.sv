// pr_ctrl: the partial-reconfiguration (PR) control register and the siphon
// that diverts PR data off the pixel interface.
//
// The engine's existing interfaces carry the PR data: firmware writes the
// PR control register through the register interface, then sends the
// partial bitstream as ordinary pixel words. While this block is siphoning,
// pixel words go to the internal configuration interface (ICI) instead of
// the colour pipeline. The register field and the word-count way of ending
// the siphon are this design's own choice: REG_PR_CTRL[23:0] is the bitstream
// length in 32-bit words; a write with a non-zero length starts PR, and the
// next that many pixel words are PR data. A write of PR_CTRL takes effect
// from the next packet, so a pixel word in the same packet is still image
// data.
//
// Flow control of the engine input (one csc_in_t per accepted cycle):
//   siphoning   in_ready follows the ICI (or is high for a packet with no
//               pixel word)
//   otherwise   in_ready is low while the stall logic reports PR busy, so
//               nothing reaches the pipeline or the CLUT until the newly
//               loaded phase is running
// pr_start pulses on the accepted PR_CTRL write. Register writes are passed
// on (reg_*_o) in the cycle they are accepted, pixel words for the pipeline
// on pix_*_o.
module pr_ctrl
  import csc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // engine input
  input  csc_in_t           in,
  input  logic              in_valid,
  output logic              in_ready,
  // from the stall logic: PR in progress
  input  logic              pr_busy,
  // register writes for the rest of the engine
  output logic              reg_we_o,
  output logic [REG_AW-1:0] reg_addr_o,
  output logic [REG_DW-1:0] reg_wdata_o,
  // pixel words for the colour pipeline
  output logic              pix_valid_o,
  output logic [PIX_W-1:0]  pix_data_o,
  // PR words for the ICI
  output logic              ici_valid,
  output logic [31:0]       ici_data,
  input  logic              ici_ready,
  // status
  output logic              pr_start,
  output logic              siphoning,
  output logic [PR_LEN_W-1:0] words_left
);

  logic accept;

  assign siphoning = (words_left != '0);
  assign in_ready  = siphoning ? (!in.pix_valid || ici_ready) : !pr_busy;
  assign accept    = in_valid && in_ready;

  assign reg_we_o    = accept && in.reg_we;
  assign reg_addr_o  = in.reg_addr;
  assign reg_wdata_o = in.reg_wdata;

  assign pix_valid_o = accept && in.pix_valid && !siphoning;
  assign pix_data_o  = in.pix_data;

  assign ici_valid = in_valid && in.pix_valid && siphoning;
  assign ici_data  = in.pix_data;

  assign pr_start = accept && !siphoning && in.reg_we && in.reg_addr == REG_PR_CTRL &&
                    in.reg_wdata[PR_LEN_W-1:0] != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words_left <= '0;
    end else if (pr_start) begin
      words_left <= in.reg_wdata[PR_LEN_W-1:0];
    end else if (ici_valid && ici_ready) begin
      words_left <= words_left - PR_LEN_W'(1);
    end
  end

  // PR data is only siphoned while a count is pending.
  assert property (@(posedge clk) disable iff (!rst_n) ici_valid |-> siphoning);

endmodule
