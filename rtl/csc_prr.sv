// csc_prr: the partially reconfigurable region (PRR) of the CSC engine. On
// the FPGA it holds either the 3D phase (three input channels) or the 4D
// phase (four input channels), never both: the two are never needed at the
// same time, so the region is rewritten through the ICAP whenever the
// conversion type changes.
//
// Written as ordinary RTL, the region contains both phases side by side and
// prm_sel, the state of the configuration memory, decides which one is
// present: only that phase receives pixels and CLUT writes, and only its
// outputs are seen. Building the design for the FPGA means keeping one of
// the two instances per partial bitstream; the static logic around the
// region does not change.
//
// Interface and timing are those of clut_interp: three pipeline stages that
// advance together while en is high, clear to empty them, one CLUT entry per
// cycle on clut_wr. empty covers both phases.
module csc_prr
  import csc_pkg::*;
#(
  parameter int unsigned GRID3 = 17,  // nodes per axis of the 3D CLUT
  parameter int unsigned GRID4 = 9    // nodes per axis of the 4D CLUT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  prm_e             prm_sel,
  input  logic             en,
  input  logic             clear,
  input  clut_wr_t         clut_wr,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic             empty
);

  clut_wr_t         wr3, wr4;
  logic             v3, v4, e3, e4;
  logic [PIX_W-1:0] p3, p4;

  always_comb begin
    wr3 = clut_wr;
    wr4 = clut_wr;
    wr3.we = clut_wr.we && prm_sel == PRM_3D;
    wr4.we = clut_wr.we && prm_sel == PRM_4D;
  end

  clut_interp #(.DIMS(3), .GRID(GRID3)) u_phase3d (
    .clk, .rst_n, .en, .clear,
    .clut_wr  (wr3),
    .in_valid (in_valid && prm_sel == PRM_3D),
    .in_pix,
    .out_valid(v3),
    .out_pix  (p3),
    .empty    (e3)
  );

  clut_interp #(.DIMS(4), .GRID(GRID4)) u_phase4d (
    .clk, .rst_n, .en, .clear,
    .clut_wr  (wr4),
    .in_valid (in_valid && prm_sel == PRM_4D),
    .in_pix,
    .out_valid(v4),
    .out_pix  (p4),
    .empty    (e4)
  );

  assign out_valid = (prm_sel == PRM_4D) ? v4 : v3;
  assign out_pix   = (prm_sel == PRM_4D) ? p4 : p3;
  assign empty     = e3 && e4;

endmodule
