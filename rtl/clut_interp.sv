// clut_interp: one interpolation phase of the CSC engine, a colour look-up
// table (CLUT) sampled on a regular grid plus multilinear interpolation
// between the grid nodes. With DIMS=3 it is the 3D phase (three input
// channels), with DIMS=4 the 4D phase (four input channels). Both phases
// have three pipeline stages and an SRAM CLUT, as in the engine this design
// follows; the grid size, the kind of interpolation and the memory banking
// are this design's own choices.
//
// How it works. Each input channel (8 bits) splits into a cell index (upper
// IB bits) and a fraction (lower FB bits); GRID = 2**IB + 1 nodes per axis,
// so node 2**IB stands for full scale. All 2**DIMS corners of a cell are read
// in one cycle by storing the CLUT in 2**DIMS banks: node n goes to the bank
// numbered by the parities of its coordinates, at address sum((n[d]>>1) *
// HALF**d). The corners of any cell have distinct parity patterns, so each
// bank supplies exactly one of them. Every output channel is then
//   out = round( sum_c corner_c * prod_d w_d(c) / 2**(DIMS*FB) ),
//   w_d = f_d for the upper corner on axis d, 2**FB - f_d for the lower,
// computed exactly and rounded half up once.
//
// Pipeline (all stages advance together when en is high, hold when low):
//   stage 1  register cell index, fraction and valid
//   stage 2  synchronous read of all banks
//   stage 3  weighted sum, registered output
// out_valid is the stage-3 valid qualified by en, so a result held during a
// stall is reported once, on the cycle it leaves the pipeline. Latency is
// three enabled cycles, throughput one pixel per enabled cycle.
//
// CLUT writes (clut_wr, one entry per cycle) are taken regardless of en.
// Coordinates at or above GRID, or on axes above DIMS, are ignored. clear
// empties the pipeline (used after the phase has been reconfigured).
module clut_interp
  import csc_pkg::*;
#(
  parameter int unsigned DIMS = 3,   // input channels: 3 (3D phase) or 4 (4D phase)
  parameter int unsigned GRID = 17   // nodes per axis, 2**k + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clear,
  input  clut_wr_t         clut_wr,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic             empty
);

  localparam int unsigned IB    = $clog2(GRID - 1);   // cell index bits per axis
  localparam int unsigned FB    = CH_W - IB;          // fraction bits per axis
  localparam int unsigned HALF  = (GRID + 1) / 2;     // bank address range per axis
  localparam int unsigned NB    = 1 << DIMS;          // banks = corners per cell
  localparam int unsigned SUM_W = CH_W + DIMS * FB + 1;

  function automatic int unsigned ipow(int unsigned b, int unsigned e);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

  localparam int unsigned DEPTH = ipow(HALF, DIMS);
  localparam int unsigned AW    = $clog2(DEPTH);

  initial begin
    assert (GRID == (1 << IB) + 1) else $fatal(1, "GRID must be 2**k + 1");
    assert (DIMS >= 1 && DIMS <= MAX_DIM) else $fatal(1, "DIMS out of range");
  end

  // ---------------- stage 1: split channels ----------------
  logic                       s1_valid;
  logic [DIMS-1:0][IB-1:0]    s1_idx;
  logic [DIMS-1:0][FB-1:0]    s1_frac;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      s1_frac  <= '0;
    end else if (clear) begin
      s1_valid <= 1'b0;
    end else if (en) begin
      s1_valid <= in_valid;
      for (int d = 0; d < DIMS; d++) begin
        s1_idx[d]  <= in_pix[d*CH_W + FB +: IB];
        s1_frac[d] <= in_pix[d*CH_W +: FB];
      end
    end
  end

  // Read address of each bank for the cell held in stage 1.
  logic [NB-1:0][AW-1:0] rd_addr;
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      int unsigned a;
      a = 0;
      for (int d = 0; d < DIMS; d++) begin
        int unsigned half_idx;
        half_idx = (int'(s1_idx[d]) >> 1) + ((s1_idx[d][0] && !b[d]) ? 1 : 0);
        a = a + half_idx * ipow(HALF, d);
      end
      rd_addr[b] = AW'(a);
    end
  end

  // Write bank and address of the CLUT node being loaded.
  logic [DIMS-1:0] wr_bank;
  logic [AW-1:0]   wr_addr;
  logic            wr_ok;
  always_comb begin
    int unsigned a;
    a     = 0;
    wr_ok = clut_wr.we;
    for (int d = 0; d < DIMS; d++) begin
      wr_bank[d] = clut_wr.coord[d][0];
      a = a + (int'(clut_wr.coord[d]) >> 1) * ipow(HALF, d);
      if (int'(clut_wr.coord[d]) >= GRID) wr_ok = 1'b0;
    end
    for (int d = DIMS; d < MAX_DIM; d++)
      if (clut_wr.coord[d] != '0) wr_ok = 1'b0;
    wr_addr = AW'(a);
  end

  // ---------------- stage 2: bank reads ----------------
  logic [NB-1:0][PIX_W-1:0] rd_data;
  logic                     s2_valid;
  logic [DIMS-1:0][FB-1:0]  s2_frac;
  logic [DIMS-1:0]          s2_par;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [PIX_W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_ok && wr_bank == DIMS'(b)) mem[wr_addr] <= clut_wr.data;
      if (en) rd_data[b] <= mem[rd_addr[b]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_frac  <= '0;
      s2_par   <= '0;
    end else if (clear) begin
      s2_valid <= 1'b0;
    end else if (en) begin
      s2_valid <= s1_valid;
      s2_frac  <= s1_frac;
      for (int d = 0; d < DIMS; d++) s2_par[d] <= s1_idx[d][0];
    end
  end

  // ---------------- stage 3: weighted sum ----------------
  logic [PIX_W-1:0] interp;
  always_comb begin
    for (int ch = 0; ch < N_CH; ch++) begin
      logic [SUM_W-1:0] acc;
      acc = '0;
      for (int c = 0; c < NB; c++) begin
        logic [SUM_W-1:0] w;
        logic [DIMS-1:0]  bank;
        w    = SUM_W'(1);
        bank = DIMS'(c) ^ s2_par;
        for (int d = 0; d < DIMS; d++)
          w = w * (c[d] ? SUM_W'(s2_frac[d]) : SUM_W'((1 << FB) - int'(s2_frac[d])));
        acc = acc + w * SUM_W'(rd_data[bank][ch*CH_W +: CH_W]);
      end
      acc = acc + (SUM_W'(1) << (DIMS * FB - 1));
      interp[ch*CH_W +: CH_W] = CH_W'(acc >> (DIMS * FB));
    end
  end

  logic s3_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0;
      out_pix  <= '0;
    end else if (clear) begin
      s3_valid <= 1'b0;
    end else if (en) begin
      s3_valid <= s2_valid;
      out_pix  <= interp;
    end
  end

  assign out_valid = s3_valid & en;
  assign empty     = ~(s1_valid | s2_valid | s3_valid);

endmodule
