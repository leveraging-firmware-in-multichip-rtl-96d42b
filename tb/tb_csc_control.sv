// tb_csc_control: self-checking testbench of the CLUT loader.
//
// For the 3D phase and then the 4D phase it sets a start node through
// REG_CLUT_ADDR and streams REG_CLUT_DATA writes (with idle cycles and writes
// to unrelated registers mixed in), and checks that each write produces one
// CLUT write, one clock later, at the node a raster walk over the phase's
// grid predicts (axis 0 fastest, GRID3 = 17 nodes over three axes or
// GRID4 = 9 nodes over four).
`timescale 1ns/1ps
module tb_csc_control;
  import csc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_we;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wdata;
  prm_e prm_sel;
  clut_wr_t clut_wr;
  int checks = 0, failures = 0;
  clut_wr_t expq[$];
  int n_wr = 0;

  csc_control dut (.*);
  always #5 clk = ~clk;

  // every write must be due and one clock after its register write
  logic pend = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (clut_wr.we !== pend) begin failures++; $display("write strobe %b, expected %b", clut_wr.we, pend); end
      if (clut_wr.we) begin
        clut_wr_t e;
        n_wr++;
        e = expq.pop_front();
        checks++;
        if (e.coord !== clut_wr.coord || e.data !== clut_wr.data) begin
          failures++;
          if (failures < 10) $display("write %0d: got %h/%h expected %h/%h", n_wr, clut_wr.coord, clut_wr.data, e.coord, e.data);
        end
      end
      pend <= reg_we && reg_addr == REG_CLUT_DATA;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    #1 reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(posedge clk);
    #1 reg_we = 1'b0;
  endtask

  task automatic load(input prm_e m, input int n, input int start[4]);
    int dims, grid;
    int c[4];
    clut_wr_t e;
    dims = (m == PRM_4D) ? 4 : 3;
    grid = (m == PRM_4D) ? 9 : 17;
    prm_sel = m;
    c = start;
    wr(REG_CLUT_ADDR, {12'd0, 5'(c[3]), 5'(c[2]), 5'(c[1]), 5'(c[0])});
    for (int k = 0; k < n; k++) begin
      e = '0;
      for (int d = 0; d < 4; d++) e.coord[d] = COORD_W'(c[d]);
      e.data = $urandom;
      e.we = 1'b1;
      expq.push_back(e);
      wr(REG_CLUT_DATA, e.data);
      if ($urandom_range(0, 7) == 0) @(posedge clk);
      if ($urandom_range(0, 7) == 0) wr(8'h55, $urandom);
      // next node
      for (int d = 0; d < dims; d++) begin
        if (c[d] == grid - 1) c[d] = 0;
        else begin c[d]++; break; end
      end
    end
  endtask

  initial begin
    int s[4];
    reg_we = 1'b0; reg_addr = '0; reg_wdata = '0; prm_sel = PRM_3D;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    s = '{0, 0, 0, 0};
    load(PRM_3D, 17*17*17 + 5, s);
    s = '{5, 16, 3, 0};
    load(PRM_3D, 100, s);
    s = '{0, 0, 0, 0};
    load(PRM_4D, 9*9*9*9 + 5, s);
    s = '{7, 8, 8, 8};
    load(PRM_4D, 50, s);
    repeat (3) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d writes missing", expq.size()); end
    checks++; if (n_wr != 4913 + 5 + 100 + 6561 + 5 + 50) begin failures++; $display("writes %0d", n_wr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
