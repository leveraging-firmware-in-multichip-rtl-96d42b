// tb_csc_page: throughput run of the reconfigurable region at the image
// sizes of the evaluation, one pixel offered on every clock.
//
// With the 3D phase loaded (random 17-node CLUT) it converts a 160 x 120
// image and checks every pixel against the reference interpolation, then a
// full letter page at 600 dpi (5,100 x 6,600 = 33.66 M pixels), of which
// every 251st pixel is checked against the reference and every pixel is
// counted. For both it checks the cycle count: N pixels leave the region in
// N consecutive clocks, the first three clocks after the first one enters
// (19,200 clocks for the image and 33.66 M, 0.67 s at 50 MHz, for the page).
`timescale 1ns/1ps
module tb_csc_page;
  import csc_pkg::*;
  import csc_tb_pkg::*;
  localparam int IMG  = 160 * 120;
  localparam int PAGE = 5100 * 6600;
  localparam int STEP = 251;

  logic clk = 0, rst_n = 0;
  prm_e prm_sel;
  logic en, clear, in_valid, out_valid, empty;
  clut_wr_t clut_wr;
  logic [PIX_W-1:0] in_pix, out_pix;
  int checks = 0, failures = 0;
  logic [31:0] lut[];

  csc_prr dut (.*);
  always #5 clk = ~clk;

  // pixel source: a 32-bit xorshift sequence, reproducible on both sides
  function automatic logic [31:0] next(input logic [31:0] s);
    s ^= s << 13; s ^= s >> 17; s ^= s << 5;
    return s;
  endfunction

  longint cyc = 0, n_in = 0, n_out = 0, first_in = -1, first_out = -1, last_out = -1;
  longint limit = 0, checked = 0;
  logic [31:0] exp_seed;
  logic [31:0] expq[$];
  bit full_check = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      if (full_check || (n_out % STEP) == 0) begin
        logic [31:0] e;
        e = ref_interp(3, 17, lut, exp_seed);
        checks++;
        checked++;
        if (e !== out_pix) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %h expected %h", n_out, out_pix, e);
        end
      end
      exp_seed = next(exp_seed);
      n_out++;
    end
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n, input bit full);
    logic [31:0] s;
    s = 32'h1234_5678;
    exp_seed = s;
    full_check = full;
    n_out = 0; first_out = -1;
    @(posedge clk);
    #1 in_valid = 1'b1; in_pix = s;
    first_in = cyc;
    for (longint k = 0; k < n; k++) begin
      @(posedge clk);
      s = next(s);
      #1 in_pix = s;
      if (k == n - 1) in_valid = 1'b0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != n) begin failures++; $display("%0d of %0d pixels out", n_out, n); end
    checks++;
    if (first_out - first_in != 3 || last_out - first_out != n - 1) begin
      failures++;
      $display("timing: first out after %0d clocks, %0d pixels over %0d clocks", first_out - first_in, n, last_out - first_out + 1);
    end
    $display("%0d pixels in %0d clocks, %0d checked", n, last_out - first_out + 1, checked);
  endtask

  initial begin
    prm_sel = PRM_3D; en = 1; clear = 0; in_valid = 0; in_pix = '0; clut_wr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    lut = new[17 * 17 * 17];
    for (int k = 0; k < 17 * 17 * 17; k++) begin
      lut[k] = $urandom;
      #1 clut_wr = '0; clut_wr.we = 1'b1; clut_wr.data = lut[k];
      clut_wr.coord[0] = COORD_W'(k % 17);
      clut_wr.coord[1] = COORD_W'((k / 17) % 17);
      clut_wr.coord[2] = COORD_W'(k / 289);
      @(posedge clk);
    end
    #1 clut_wr = '0;
    run(IMG, 1);
    run(PAGE, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
