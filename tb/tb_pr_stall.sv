// tb_pr_stall: self-checking testbench of the pipeline stall logic.
//
// Each round starts a reconfiguration and keeps the drain condition
// (stages ahead busy, region not empty) and the end-of-reconfiguration
// condition (siphon still running, ICI not idle) false for random numbers of
// clocks. It checks, clock by clock: nothing is frozen and the ICAP is
// disabled while draining; the pipeline is frozen and the ICAP enabled from
// the clock after the drain completes until the clock after the last PR
// byte; then exactly SETTLE_CYCLES = 4 clocks of clear; then idle again.
`timescale 1ns/1ps
module tb_pr_stall;
  logic clk = 0, rst_n = 0;
  logic pr_start, pre_busy, prr_empty, siphoning, ici_idle;
  logic busy, stall, icap_en, prm_clear;
  int checks = 0, failures = 0;

  pr_stall dut (.*);
  always #5 clk = ~clk;

  task automatic expect_out(input logic b, s, e, c, input string what);
    checks++;
    if ({busy, stall, icap_en, prm_clear} !== {b, s, e, c}) begin
      failures++;
      if (failures < 10)
        $display("%s: busy/stall/icap_en/clear = %b%b%b%b, expected %b%b%b%b",
                 what, busy, stall, icap_en, prm_clear, b, s, e, c);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pr_start = 0; pre_busy = 0; prr_empty = 1; siphoning = 0; ici_idle = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 300; r++) begin
      int dpre, dprr, dsiph, dici;
      dpre  = $urandom_range(0, 5);
      dprr  = $urandom_range(0, 5);
      dsiph = $urandom_range(1, 20);
      dici  = dsiph + $urandom_range(0, 4);
      // idle
      repeat ($urandom_range(0, 3)) begin
        #1 expect_out(0, 0, 0, 0, "idle");
        @(posedge clk);
      end
      #1 pr_start = 1; siphoning = 1;
      pre_busy = (dpre > 0); prr_empty = (dprr == 0);
      expect_out(0, 0, 0, 0, "idle at start");
      @(posedge clk);
      #1 pr_start = 0;
      // drain
      for (int t = 1; t <= (dpre > dprr ? dpre : dprr); t++) begin
        pre_busy = (t < dpre); prr_empty = (t >= dprr);
        expect_out(1, 0, 0, 0, "drain");
        @(posedge clk); #1;
      end
      pre_busy = 0; prr_empty = 1;
      if (dpre == 0 && dprr == 0) begin
        expect_out(1, 0, 0, 0, "drain");
        @(posedge clk); #1;
      end
      // reconfigure
      for (int t = 0; t < dici; t++) begin
        siphoning = (t < dsiph); ici_idle = 0;
        expect_out(1, 1, 1, 0, "reconfig");
        @(posedge clk); #1;
      end
      siphoning = 0; ici_idle = 1;
      expect_out(1, 1, 1, 0, "reconfig end");
      @(posedge clk); #1;
      // settle
      for (int t = 0; t < 4; t++) begin
        expect_out(1, 1, 0, 1, "settle");
        @(posedge clk); #1;
      end
      expect_out(0, 0, 0, 0, "back to idle");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
