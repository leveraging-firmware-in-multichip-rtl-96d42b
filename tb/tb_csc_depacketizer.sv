// tb_csc_depacketizer: self-checking testbench of the link depacketizer.
//
// A sender task cuts random engine-input cycles into three-word packets
// (header with tag, register data, pixel word) and now and then slips in a
// stray untagged word, which must be dropped and flagged. The receiver side
// takes packets with random back-pressure. Checked: every packet arrives
// intact and in order, one sync error per stray word, back-pressure reaches
// the link, and with no gaps a packet arrives every three clocks.
`timescale 1ns/1ps
module tb_csc_depacketizer;
  import csc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] link_data;
  logic link_valid, link_ready, out_valid, out_ready, sync_err;
  csc_in_t out;
  int checks = 0, failures = 0;
  csc_in_t expq[$];
  int n_err = 0, n_out = 0, n_bp = 0;
  logic rand_ready = 0;

  csc_depacketizer dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && sync_err) n_err++;
    if (rst_n && link_valid && !link_ready) n_bp++;
    if (rst_n && out_valid && out_ready) begin
      csc_in_t e;
      n_out++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected packet"); end
      else begin
        e = expq.pop_front();
        if (e !== out) begin
          failures++;
          if (failures < 10) $display("packet %0d: got %h expected %h", n_out, out, e);
        end
      end
    end
  end
  always @(posedge clk) out_ready <= rand_ready ? ($urandom_range(0, 2) == 0) : 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [31:0] w, input bit gaps);
    while (gaps && $urandom_range(0, 3) == 0) @(posedge clk);
    #1 link_valid = 1'b1; link_data = w;
    @(posedge clk);
    while (!link_ready) @(posedge clk);
    #1 link_valid = 1'b0;
  endtask

  task automatic packet(input bit gaps);
    csc_in_t p;
    p.reg_we    = 1'($urandom);
    p.reg_addr  = 8'($urandom);
    p.reg_wdata = $urandom;
    p.pix_valid = 1'($urandom);
    p.pix_data  = $urandom;
    expq.push_back(p);
    word({PKT_TAG, 7'd0, p.pix_valid, 7'd0, p.reg_we, p.reg_addr}, gaps);
    word(p.reg_wdata, gaps);
    word(p.pix_data, gaps);
  endtask

  initial begin
    int strays;
    link_valid = 1'b0; link_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // rate: 30 packets back to back
    begin
      int t0, o0;
      @(posedge clk);
      o0 = n_out;
      for (int k = 0; k < 30; k++) packet(0);
      @(posedge clk); @(posedge clk);
      checks++;
      if (n_out - o0 != 30) begin failures++; $display("rate: %0d packets", n_out - o0); end
    end
    begin
      int t0;
      t0 = $time;
      for (int k = 0; k < 20; k++) packet(0);
      repeat (2) @(posedge clk);
      checks++;
      if (($time - t0) / 10 > 20 * 3 + 3) begin failures++; $display("20 packets took %0d cycles", ($time - t0) / 10); end
    end
    // random traffic with stray words and back-pressure
    rand_ready = 1'b1;
    strays = 0;
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(0, 19) == 0) begin
        word({8'h00, 24'($urandom)}, 1);
        strays++;
      end
      packet(1);
    end
    rand_ready = 1'b0;
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d packets lost", expq.size()); end
    checks++; if (n_err != strays) begin failures++; $display("sync errors %0d, strays %0d", n_err, strays); end
    checks++; if (n_bp == 0) begin failures++; $display("back-pressure never reached the link"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
