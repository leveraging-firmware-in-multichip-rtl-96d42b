// csc_control: register-interface side of the CSC engine that loads the CLUT
// of whichever interpolation phase the reconfigurable region holds.
//
// CLUT values reach the engine through the register interface, one entry
// per register write. Writing REG_CLUT_ADDR sets the node coordinates of the
// next entry (5 bits per axis: [4:0] axis 0, [9:5] axis 1, [14:10] axis 2,
// [19:15] axis 3). Each write to REG_CLUT_DATA stores its 32-bit value
// (four 8-bit output channels) at the current node and steps to the next
// node, axis 0 fastest, wrapping each axis at the grid size of the phase that
// is loaded (GRID3 nodes per axis over three axes for the 3D phase, GRID4
// over four for the 4D phase). A full table therefore takes one address
// write plus one data write per node. The register numbers, the coordinate
// packing and the auto-increment are this design's own choices.
//
// Interface: reg_we/reg_addr/reg_wdata are register writes already accepted
// by the engine (one per cycle at most); writes to other addresses are
// ignored. clut_wr is registered: the entry reaches the phase one cycle after
// the data write. prm_sel tells which phase the region holds.
module csc_control
  import csc_pkg::*;
#(
  parameter int unsigned GRID3 = 17,  // nodes per axis of the 3D CLUT
  parameter int unsigned GRID4 = 9    // nodes per axis of the 4D CLUT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [REG_DW-1:0] reg_wdata,
  input  prm_e              prm_sel,
  output clut_wr_t          clut_wr
);

  logic [MAX_DIM-1:0][COORD_W-1:0] coord;
  logic [MAX_DIM-1:0][COORD_W-1:0] coord_next;

  // Next node in raster order for the loaded phase.
  always_comb begin
    int unsigned dims, grid;
    logic carry;
    dims  = (prm_sel == PRM_4D) ? 4 : 3;
    grid  = (prm_sel == PRM_4D) ? GRID4 : GRID3;
    carry = 1'b1;
    coord_next = coord;
    for (int d = 0; d < MAX_DIM; d++) begin
      if (d < int'(dims) && carry) begin
        if (int'(coord[d]) >= int'(grid) - 1) begin
          coord_next[d] = '0;
        end else begin
          coord_next[d] = coord[d] + COORD_W'(1);
          carry = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coord   <= '0;
      clut_wr <= '0;
    end else begin
      clut_wr.we <= 1'b0;
      if (reg_we && reg_addr == REG_CLUT_ADDR) begin
        for (int d = 0; d < MAX_DIM; d++)
          coord[d] <= reg_wdata[d*COORD_W +: COORD_W];
      end else if (reg_we && reg_addr == REG_CLUT_DATA) begin
        clut_wr.we    <= 1'b1;
        clut_wr.coord <= coord;
        clut_wr.data  <= reg_wdata;
        coord         <= coord_next;
      end
    end
  end

endmodule
