// tb_csc_pr_run: end-to-end test of the engine, instantiated by
// tb_csc_pr_top (short run) and tb_csc_pr_full (sizes of the evaluation).
//
// The testbench plays the controlling processor. It builds a frame of
// 32-bit link words, exactly as the firmware would, and streams it in:
//   1. load a 3D CLUT (one REG_CLUT_ADDR write, then one REG_CLUT_DATA write
//      per node) and convert NPIX three-channel pixels;
//   2. reconfigure the region with the 4D phase: a PR_CTRL write, then a
//      PR_WORDS-word partial bitstream as ordinary pixel words;
//   3. load a 4D CLUT and convert NPIX four-channel pixels;
//   4. reconfigure back to the 3D phase, load a new 3D CLUT and convert
//      NPIX pixels.
// The pixel packets run straight into each PR request, so the pipeline
// still holds pixels when reconfiguration starts. A stray untagged word is
// slipped in once. The phases ahead of the region are modelled as a
// two-clock delay, the ICAP by icap_model, which switches prm_sel at the end
// of each bitstream.
//
// Checked: every converted pixel against the reference interpolation of the
// CLUT then loaded, in order and none missing; the bytes and checksum the
// ICAP received; that the region ends up holding each requested phase; and
// the reconfiguration rate: while the ICAP is enabled it takes one byte on
// every clock it is not busy. Each mechanism (drain with pixels in flight,
// pipeline freeze, ICAP busy, link back-pressure, sync error, phase switch,
// CLUT write, pipeline clear, siphoned word) is counted and must occur.
`timescale 1ns/1ps
module tb_csc_pr_run #(
  parameter int NPIX     = 300,      // pixels per image
  parameter int PR_WORDS = 64,       // words per partial bitstream
  parameter int WATCHDOG = 400000    // clocks
);
  import csc_pkg::*;
  import csc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] link_data;
  logic link_valid, link_ready, link_sync_err;
  logic pre_in_valid, pre_out_valid, pre_busy, post_in_valid;
  logic [PIX_W-1:0] pre_in_data, pre_out_data, post_in_data;
  logic icap_ce_n, icap_write_n, icap_busy, prm_sel, pr_busy;
  logic [7:0] icap_i;

  csc_pr_top dut (.*);

  icap_model #(.BUSY_ONE_IN(8), .INIT_PRM(1'b0)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i),
    .busy(icap_busy), .prm_sel
  );

  always #5 clk = ~clk;

  // phases ahead of the region: a two-clock delay
  logic [1:0] pv;
  logic [1:0][PIX_W-1:0] pd;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin pv <= '0; pd <= '0; end
    else begin
      pv <= {pv[0], pre_in_valid};
      pd <= {pd[0], pre_in_data};
    end
  end
  assign pre_out_valid = pv[1];
  assign pre_out_data  = pd[1];
  assign pre_busy      = |pv;

  int checks = 0, failures = 0;

  // ---------------- frame building ----------------
  typedef struct { logic [31:0] w; bit gaps; } lw_t;
  lw_t frame[$];
  logic [31:0] expq[$];
  int unsigned exp_sum = 0;
  longint unsigned exp_bytes = 0;
  logic [31:0] lut[];

  function automatic void packet(input bit we, input logic [7:0] a, input logic [31:0] d,
                                 input bit pv_, input logic [31:0] p, input bit gaps);
    frame.push_back('{ {PKT_TAG, 7'd0, pv_, 7'd0, we, a}, gaps });
    frame.push_back('{ d, gaps });
    frame.push_back('{ p, gaps });
  endfunction

  function automatic void load_clut(input int dims, input int grid);
    int n;
    n = 1;
    for (int d = 0; d < dims; d++) n *= grid;
    lut = new[n];
    packet(1, REG_CLUT_ADDR, 0, 0, 0, 1);
    for (int k = 0; k < n; k++) begin
      lut[k] = $urandom;
      packet(1, REG_CLUT_DATA, lut[k], 0, 0, 1);
    end
  endfunction

  function automatic void image(input int dims, input int grid);
    for (int k = 0; k < NPIX; k++) begin
      logic [31:0] p;
      p = $urandom;
      expq.push_back(ref_interp(dims, grid, lut, p));
      packet(0, 0, 0, 1, p, 1);
    end
  endfunction

  function automatic void reconfigure(input bit id);
    logic [31:0] w;
    packet(1, REG_PR_CTRL, PR_WORDS, 0, 0, 0);
    for (int k = 0; k < PR_WORDS; k++) begin
      if (k == 0) w = 32'hAA995566;
      else if (k == 1) w = {31'd0, id};
      else if (k == PR_WORDS - 1) w = 32'h0000000D;
      else w = $urandom | 32'h01000000;
      for (int b = 3; b >= 0; b--) exp_sum = exp_sum * 31 + w[8*b +: 8];
      exp_bytes += 4;
      packet(0, 0, 0, 1, w, 0);
    end
  endfunction

  // ---------------- link driver ----------------
  bit frame_done = 0;
  initial begin
    link_valid = 0; link_data = '0;
    wait (rst_n);
    while (frame.size() != 0) begin
      lw_t x;
      x = frame.pop_front();
      while (x.gaps && $urandom_range(0, 7) == 0) @(posedge clk);
      #1 link_valid = 1; link_data = x.w;
      @(posedge clk);
      while (!link_ready) @(posedge clk);
      #1 link_valid = 0;
    end
    frame_done = 1;
  end

  // ---------------- monitors ----------------
  int n_out = 0, n_drain = 0, n_freeze = 0, n_bp = 0, n_sync = 0, n_switch = 0;
  int n_clut = 0, n_clear = 0, n_siph = 0, n_starve = 0;
  longint n_icap_en = 0, n_icap_wr = 0, n_icap_busy = 0;
  logic prm_q = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (post_in_valid) begin
        logic [31:0] e;
        n_out++;
        checks++;
        e = (expq.size() != 0) ? expq.pop_front() : 32'hxxxxxxxx;
        if (e !== post_in_data) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %h expected %h", n_out, post_in_data, e);
        end
      end
      if (pr_busy && !dut.stall && !(dut.prr_empty && !pre_busy)) n_drain++;
      if (dut.stall) n_freeze++;
      if (!icap_ce_n && !(dut.prr_empty && !pre_busy)) begin
        failures++;
        if (failures < 10) $display("ICAP written while pixels are in the pipeline");
      end
      if (link_valid && !link_ready) n_bp++;
      if (link_sync_err) n_sync++;
      if (prm_sel != prm_q) n_switch++;
      prm_q <= prm_sel;
      if (dut.clut_wr.we) n_clut++;
      if (dut.prm_clear) n_clear++;
      if (dut.ici_valid && dut.ici_ready) n_siph++;
      if (dut.icap_en) begin
        n_icap_en++;
        if (!icap_ce_n && !icap_busy) n_icap_wr++;
        else if (!icap_ce_n && icap_busy) n_icap_busy++;
        else n_starve++;
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n <= 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the frame
    load_clut(3, 17);
    image(3, 17);
    frame.push_back('{32'h0000_0000, 1});   // stray word
    reconfigure(1'b1);
    load_clut(4, 9);
    image(4, 9);
    reconfigure(1'b0);
    load_clut(3, 17);
    image(3, 17);
    $display("frame: %0d link words", frame.size());
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (frame_done);
    repeat (20) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d pixels missing", expq.size()); end
    checks++; if (n_out != 3 * NPIX) begin failures++; $display("%0d pixels out", n_out); end
    checks++; if (u_icap.bytes != exp_bytes) begin failures++; $display("ICAP bytes %0d, expected %0d", u_icap.bytes, exp_bytes); end
    checks++; if (u_icap.sum != exp_sum) begin failures++; $display("ICAP checksum mismatch"); end
    checks++; if (u_icap.loads != 2 || prm_sel != 1'b0) begin failures++; $display("region loads %0d", u_icap.loads); end
    checks++; if (pr_busy) begin failures++; $display("PR still busy"); end
    // reconfiguration rate: one byte per non-busy clock while enabled,
    // apart from the very first byte of each bitstream
    checks++;
    if (n_starve > 4) begin failures++; $display("ICAP starved on %0d clocks", n_starve); end
    need(n_drain, "drain with pixels in flight");
    need(n_freeze, "pipeline freeze");
    need(n_icap_busy, "ICAP busy");
    need(n_bp, "link back-pressure");
    need(n_sync, "sync error");
    need(n_switch == 2 ? 1 : 0, "two phase switches");
    need(n_clut, "CLUT write");
    need(n_clear, "pipeline clear");
    need(n_siph == 2 * PR_WORDS ? 1 : 0, "all PR words siphoned");
    $display("pixels %0d, ICAP bytes %0d in %0d enabled clocks (%0d busy, %0d starved), drain %0d, freeze %0d, back-pressure %0d",
             n_out, n_icap_wr, n_icap_en, n_icap_busy, n_starve, n_drain, n_freeze, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
