// csc_pr_top: a colour space conversion (CSC) engine whose two largest,
// mutually exclusive phases, 3D and 4D interpolation, share one partially
// reconfigurable region of the FPGA, and which receives the partial
// bitstreams over its existing pixel interface.
//
// The point of the design is that nothing outside the FPGA changes. The
// controlling processor uses the register interface to write a PR control
// register, then sends the partial bitstream as ordinary pixel words. Inside,
//   csc_depacketizer  rebuilds engine input cycles from the 32-bit link
//   pr_ctrl           PR control register; siphons PR words off the pixel
//                     interface and gates the engine input
//   ici               writes PR words into the ICAP a byte per clock
//   pr_stall          drains, freezes and restarts the pipeline around PR
//   csc_control       loads CLUT entries sent through the register interface
//   csc_prr           the region holding the 3D or the 4D phase
//
// Parts this RTL does not contain have their signals brought out:
//   pre_*   the pipeline phases ahead of the region. pre_in_* carries the
//           pixel words towards them; pre_out_* returns their result to the
//           region; pre_busy is high while they hold a pixel.
//   post_*  the phases after the region; post_in_* is the region's output.
//   icap_*  the FPGA's internal configuration access port. prm_sel tells
//           which phase the configuration memory currently holds.
// All logic runs on clk with the active-low asynchronous reset rst_n; link
// and engine input are valid/ready streams. The region passes one pixel per
// clock with a three-clock latency; the ICAP takes one byte per clock.
module csc_pr_top
  import csc_pkg::*;
#(
  parameter int unsigned GRID3         = 17,  // nodes per axis, 3D CLUT
  parameter int unsigned GRID4         = 9,   // nodes per axis, 4D CLUT
  parameter int unsigned SETTLE_CYCLES = 4    // clear cycles after reconfiguration
) (
  input  logic             clk,
  input  logic             rst_n,
  // 32-bit link from the controlling board
  input  logic [31:0]      link_data,
  input  logic             link_valid,
  output logic             link_ready,
  output logic             link_sync_err,
  // phases ahead of the region
  output logic             pre_in_valid,
  output logic [PIX_W-1:0] pre_in_data,
  input  logic             pre_out_valid,
  input  logic [PIX_W-1:0] pre_out_data,
  input  logic             pre_busy,
  // phases after the region
  output logic             post_in_valid,
  output logic [PIX_W-1:0] post_in_data,
  // ICAP
  output logic             icap_ce_n,
  output logic             icap_write_n,
  output logic [7:0]       icap_i,
  input  logic             icap_busy,
  input  logic             prm_sel,
  // status
  output logic             pr_busy
);

  csc_in_t           eng_in;
  logic              eng_valid, eng_ready;
  logic              reg_we;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wdata;
  logic              ici_valid, ici_ready, ici_idle;
  logic [31:0]       ici_data;
  logic              pr_start, siphoning;
  logic              stall, icap_en, prm_clear, prr_empty;
  clut_wr_t          clut_wr;
  prm_e              prm;

  assign prm = prm_e'(prm_sel);

  csc_depacketizer u_depack (
    .clk, .rst_n,
    .link_data, .link_valid, .link_ready,
    .out      (eng_in),
    .out_valid(eng_valid),
    .out_ready(eng_ready),
    .sync_err (link_sync_err)
  );

  pr_ctrl u_pr_ctrl (
    .clk, .rst_n,
    .in         (eng_in),
    .in_valid   (eng_valid),
    .in_ready   (eng_ready),
    .pr_busy,
    .reg_we_o   (reg_we),
    .reg_addr_o (reg_addr),
    .reg_wdata_o(reg_wdata),
    .pix_valid_o(pre_in_valid),
    .pix_data_o (pre_in_data),
    .ici_valid, .ici_data, .ici_ready,
    .pr_start, .siphoning,
    .words_left ()
  );

  ici u_ici (
    .clk, .rst_n,
    .en      (icap_en),
    .in_valid(ici_valid),
    .in_data (ici_data),
    .in_ready(ici_ready),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy,
    .idle    (ici_idle)
  );

  pr_stall #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_stall (
    .clk, .rst_n,
    .pr_start, .pre_busy, .prr_empty, .siphoning,
    .ici_idle,
    .busy     (pr_busy),
    .stall, .icap_en, .prm_clear
  );

  csc_control #(.GRID3(GRID3), .GRID4(GRID4)) u_control (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata,
    .prm_sel(prm),
    .clut_wr
  );

  csc_prr #(.GRID3(GRID3), .GRID4(GRID4)) u_prr (
    .clk, .rst_n,
    .prm_sel  (prm),
    .en       (!stall),
    .clear    (prm_clear),
    .clut_wr,
    .in_valid (pre_out_valid),
    .in_pix   (pre_out_data),
    .out_valid(post_in_valid),
    .out_pix  (post_in_data),
    .empty    (prr_empty)
  );

endmodule
