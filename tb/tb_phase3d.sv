// tb_phase3d: self-checking testbench of the 3D interpolation phase
// (clut_interp with DIMS=3, GRID=17, its defaults).
//
// It fills every CLUT node with a random entry, kept in a flat array indexed
// by node number, then streams random pixels while randomly stalling the
// pipeline (en low). Each expected output is worked out from the flat array
// by visiting the cell's corners and weighting them by products of the
// channel fractions; this never touches the banked layout of the block. It
// also checks the three-cycle latency in a stall-free run and the empty flag.
`timescale 1ns/1ps
module tb_phase3d;
  import csc_pkg::*;

  localparam int unsigned DIMS = 3;
  localparam int unsigned GRID = 17;
  localparam int unsigned IB   = 4;
  localparam int unsigned FB   = CH_W - IB;
  localparam int unsigned NODES = GRID * GRID * GRID;
  localparam int unsigned NPIX  = 3000;

  logic clk = 0;
  logic rst_n = 0;
  logic en, clear;
  clut_wr_t clut_wr;
  logic in_valid;
  logic [PIX_W-1:0] in_pix;
  logic out_valid;
  logic [PIX_W-1:0] out_pix;
  logic empty;

  int checks = 0, failures = 0;

  clut_interp dut (.*);

  always #5 clk = ~clk;

  logic [PIX_W-1:0] lut [NODES];
  logic [PIX_W-1:0] expq[$];
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [PIX_W-1:0] ref_out(logic [PIX_W-1:0] p);
    logic [PIX_W-1:0] r;
    for (int ch = 0; ch < N_CH; ch++) begin
      longint sum = 0;
      for (int c = 0; c < (1 << DIMS); c++) begin
        longint w = 1;
        int node = 0, stride = 1;
        for (int d = 0; d < DIMS; d++) begin
          int v = p[d*8 +: 8];
          int idx = v >> FB;
          int f = v % (1 << FB);
          int n = idx + ((c >> d) & 1);
          w = w * (((c >> d) & 1) ? f : ((1 << FB) - f));
          node += n * stride;
          stride *= GRID;
        end
        sum += w * lut[node][ch*8 +: 8];
      end
      r[ch*8 +: 8] = 8'((sum + (64'd1 << (DIMS*FB - 1))) / (64'd1 << (DIMS*FB)));
    end
    return r;
  endfunction

  // compare every result leaving the pipeline
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output %h", out_pix);
      end else begin
        logic [PIX_W-1:0] e;
        e = expq.pop_front();
        if (e !== out_pix) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", out_pix, e);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input logic [PIX_W-1:0] p, input logic stall_ok);
    in_valid = 1'b1;
    in_pix   = p;
    en       = stall_ok ? ($urandom_range(0, 3) != 0) : 1'b1;
    expq.push_back(ref_out(p));
    @(posedge clk);
    while (!en) begin
      #1;
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk);
    end
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    en = 1'b1; clear = 1'b0; clut_wr = '0; in_valid = 1'b0; in_pix = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // empty after reset
    checks++; if (!empty) begin failures++; $display("not empty after reset"); end
    // load the CLUT, one node per cycle, coordinate 0 fastest
    for (int n = 0; n < NODES; n++) begin
      lut[n] = $urandom;
      clut_wr.we = 1'b1;
      clut_wr.coord = '0;
      clut_wr.coord[0] = COORD_W'(n % GRID);
      clut_wr.coord[1] = COORD_W'((n / GRID) % GRID);
      clut_wr.coord[2] = COORD_W'(n / (GRID*GRID));
      clut_wr.data = lut[n];
      @(posedge clk); #1;
    end
    clut_wr = '0;
    // corner pixels: exact node values
    push(32'h00000000, 0);
    push(32'h00FFFFFF, 0);
    push(32'h00102030, 0);
    // latency: one pixel in a stall-free pipeline appears after 3 cycles
    repeat (4) @(posedge clk);
    #1;
    begin
      int unsigned t0;
      t0 = cyc;
      in_valid = 1'b1; in_pix = $urandom; expq.push_back(ref_out(in_pix));
      @(posedge clk); #1 in_valid = 1'b0;
      checks++; if (empty) begin failures++; $display("empty while busy"); end
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (cyc - t0 != 3) begin failures++; $display("latency %0d, expected 3", cyc - t0); end
    end
    // random pixels with random stalls
    for (int i = 0; i < NPIX; i++) begin
      push($urandom, 1);
      if ($urandom_range(0, 4) == 0) begin en = 1'b1; @(posedge clk); #1; end
    end
    en = 1'b1;
    repeat (6) @(posedge clk);
    #1;
    checks++; if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    checks++; if (!empty) begin failures++; $display("not empty at end"); end
    // clear empties a busy pipeline without producing its results
    in_valid = 1'b1; in_pix = $urandom;
    @(posedge clk); #1 in_valid = 1'b0; clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    checks++; if (!empty) begin failures++; $display("clear did not empty"); end
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
