// csc_pkg: types and constants shared by the partially reconfigurable
// colour space conversion (CSC) engine.
//
// One "CSC cycle" of engine inputs is a register-interface write and a
// pixel-interface word, carried together in csc_in_t. Pixels are 32-bit
// words of four 8-bit channels; channel 0 sits in bits [7:0]. The 3D phase
// reads channels 0..2, the 4D phase all four. CLUT entries hold four 8-bit
// output channels in the same layout.
//
// The register map, the packet header tag and the encoding of the PR module
// number are this design's own choices; the engine only has to offer a CLUT
// load path through the register interface and a PR control register.
package csc_pkg;

  localparam int unsigned PIX_W   = 32;  // pixel interface width
  localparam int unsigned CH_W    = 8;   // bits per colour channel
  localparam int unsigned N_CH    = 4;   // channels in a pixel word / CLUT entry
  localparam int unsigned REG_AW  = 8;   // register address width
  localparam int unsigned REG_DW  = 32;  // register data width
  localparam int unsigned COORD_W = 5;   // CLUT node coordinate per axis (grids up to 32 nodes)
  localparam int unsigned MAX_DIM = 4;   // axes of the largest CLUT

  // Register map of the register interface.
  localparam logic [REG_AW-1:0] REG_CLUT_ADDR = 8'h00;  // node coordinates of next CLUT write
  localparam logic [REG_AW-1:0] REG_CLUT_DATA = 8'h01;  // CLUT entry, coordinates auto-increment
  localparam logic [REG_AW-1:0] REG_PR_CTRL   = 8'h10;  // PR control: [23:0] PR word count

  localparam int unsigned PR_LEN_W = 24;  // PR bitstream length field, in 32-bit words

  // Header tag in bits [31:24] of the first word of every CSC packet.
  localparam logic [7:0] PKT_TAG = 8'hC5;
  localparam int unsigned PKT_WORDS = 3;  // header, register data, pixel data

  // Which partial reconfiguration module (PRM) the PRR holds.
  typedef enum logic {PRM_3D = 1'b0, PRM_4D = 1'b1} prm_e;

  // One CSC cycle of engine inputs.
  typedef struct packed {
    logic              reg_we;
    logic [REG_AW-1:0] reg_addr;
    logic [REG_DW-1:0] reg_wdata;
    logic              pix_valid;
    logic [PIX_W-1:0]  pix_data;
  } csc_in_t;

  // CLUT write port driven by the control block into the PRR.
  typedef struct packed {
    logic                             we;
    logic [MAX_DIM-1:0][COORD_W-1:0]  coord;  // coord[0] is the fastest axis
    logic [PIX_W-1:0]                 data;
  } clut_wr_t;

endpackage
