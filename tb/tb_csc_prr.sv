// tb_csc_prr: self-checking testbench of the reconfigurable region.
//
// With prm_sel naming the 3D phase it loads a random 3D CLUT and checks a
// stream of random pixels against the reference interpolation (three
// channels, 17-node grid). It then switches prm_sel to the 4D phase, clears
// the pipeline, loads a random 4D CLUT and checks four-channel pixels on the
// 9-node grid, with random pipeline freezes (en low) throughout. Last it
// switches back, reloads a different 3D CLUT and checks again.
`timescale 1ns/1ps
module tb_csc_prr;
  import csc_pkg::*;
  import csc_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  prm_e prm_sel;
  logic en, clear, in_valid, out_valid, empty;
  clut_wr_t clut_wr;
  logic [PIX_W-1:0] in_pix, out_pix;
  int checks = 0, failures = 0;
  logic [31:0] lut3[], lut4[];
  logic [31:0] expq[$];
  int n_out = 0;

  csc_prr dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] e;
      n_out++;
      checks++;
      e = (expq.size() != 0) ? expq.pop_front() : 32'hxxxxxxxx;
      if (e !== out_pix) begin
        failures++;
        if (failures < 10) $display("output %0d: got %h expected %h", n_out, out_pix, e);
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

  task automatic load(input int dims, input int grid, ref logic [31:0] lut[]);
    int n;
    n = 1;
    for (int d = 0; d < dims; d++) n *= grid;
    lut = new[n];
    for (int k = 0; k < n; k++) begin
      int r;
      r = k;
      lut[k] = $urandom;
      #1 clut_wr = '0; clut_wr.we = 1'b1; clut_wr.data = lut[k];
      for (int d = 0; d < dims; d++) begin
        clut_wr.coord[d] = COORD_W'(r % grid);
        r /= grid;
      end
      @(posedge clk);
    end
    #1 clut_wr = '0;
  endtask

  task automatic pixels(input int dims, input int grid, ref logic [31:0] lut[], input int n);
    for (int k = 0; k < n; k++) begin
      #1 in_valid = 1'b1; in_pix = $urandom;
      en = ($urandom_range(0, 4) != 0);
      expq.push_back(ref_interp(dims, grid, lut, in_pix));
      @(posedge clk);
      while (!en) begin #1 en = ($urandom_range(0, 1) != 0); @(posedge clk); end
      #1 in_valid = 1'b0;
    end
    #1 en = 1'b1;
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    checks++; if (!empty) begin failures++; $display("not empty"); end
  endtask

  initial begin
    prm_sel = PRM_3D; en = 1; clear = 0; in_valid = 0; in_pix = '0; clut_wr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    load(3, 17, lut3);
    pixels(3, 17, lut3, 2000);
    #1 prm_sel = PRM_4D; clear = 1;
    @(posedge clk);
    #1 clear = 0;
    load(4, 9, lut4);
    pixels(4, 9, lut4, 2000);
    #1 prm_sel = PRM_3D;
    load(3, 17, lut3);
    pixels(3, 17, lut3, 1000);
    checks++; if (n_out != 5000) begin failures++; $display("%0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
