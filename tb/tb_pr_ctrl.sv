// tb_pr_ctrl: self-checking testbench of the PR control register and
// pixel-interface siphon.
//
// Random engine-input cycles (register writes, pixel words, both or
// neither) are offered, and now and then a PR_CTRL write with a random
// length. A reference counter in the testbench decides where each accepted
// cycle must go: while it runs, pixel words must reach the ICI and not the
// pipeline; otherwise they must reach the pipeline. The ICI side accepts at
// random, and the testbench plays the stall logic, holding pr_busy high from
// pr_start until some clocks after the last PR word. Checked: routing,
// register pass-through, one pr_start per PR write, the word count, and that
// nothing is accepted while PR is busy outside the siphon.
`timescale 1ns/1ps
module tb_pr_ctrl;
  import csc_pkg::*;
  logic clk = 0, rst_n = 0;
  csc_in_t in;
  logic in_valid, in_ready, pr_busy;
  logic reg_we_o, pix_valid_o, ici_valid, ici_ready, pr_start, siphoning;
  logic [REG_AW-1:0] reg_addr_o;
  logic [REG_DW-1:0] reg_wdata_o;
  logic [PIX_W-1:0] pix_data_o;
  logic [31:0] ici_data;
  logic [PR_LEN_W-1:0] words_left;
  int checks = 0, failures = 0;
  int m_left = 0;          // reference count of PR words still due
  int n_pr = 0, n_start = 0, n_siphoned = 0, n_pix = 0, n_blocked = 0;
  int busy_hold = 0;

  pr_ctrl dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) ici_ready <= ($urandom_range(0, 2) != 0);

  // reference routing of each accepted cycle
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if ((words_left != 0) !== siphoning || int'(words_left) != m_left) begin
        failures++; $display("words_left %0d, expected %0d", words_left, m_left);
      end
      if (in_valid && !siphoning && pr_busy) begin
        n_blocked++;
        checks++;
        if (in_ready) begin failures++; $display("accepted while PR busy"); end
      end
      if (in_valid && in_ready) begin
        checks++;
        if (reg_we_o !== in.reg_we || (in.reg_we && (reg_addr_o !== in.reg_addr || reg_wdata_o !== in.reg_wdata))) begin
          failures++; $display("register write not passed on");
        end
        if (in.pix_valid && m_left > 0) begin
          checks++;
          if (!(ici_valid && ici_ready) || pix_valid_o || ici_data !== in.pix_data) begin
            failures++; $display("PR word not siphoned");
          end
          m_left--;
          n_siphoned++;
        end else begin
          checks++;
          if (pix_valid_o !== in.pix_valid || (in.pix_valid && pix_data_o !== in.pix_data) || (ici_valid && ici_ready)) begin
            failures++; $display("pixel word misrouted");
          end
          if (in.pix_valid) n_pix++;
          if (m_left == 0 && in.reg_we && in.reg_addr == REG_PR_CTRL && in.reg_wdata[23:0] != 0) begin
            m_left = int'(in.reg_wdata[23:0]);
            n_pr++;
          end
        end
      end
      if (pr_start) n_start++;
      // stall-logic stand-in
      if (pr_start) pr_busy <= 1'b1;
      else if (pr_busy && !siphoning) begin
        if (busy_hold == 0) busy_hold = $urandom_range(1, 6);
        else if (--busy_hold == 0) pr_busy <= 1'b0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: busy=%b siph=%b left=%0d in_valid=%b in_ready=%b hold=%0d", pr_busy, siphoning, words_left, in_valid, in_ready, busy_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input csc_in_t c);
    #1 in = c; in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    csc_in_t c;
    in = '0; in_valid = 1'b0; pr_busy = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 6000; k++) begin
      c.reg_we    = ($urandom_range(0, 3) == 0);
      c.reg_addr  = 8'($urandom_range(0, 3));
      c.reg_wdata = $urandom;
      c.pix_valid = ($urandom_range(0, 4) != 0);
      c.pix_data  = $urandom;
      if ($urandom_range(0, 99) == 0) begin
        c.reg_we = 1'b1; c.reg_addr = REG_PR_CTRL;
        c.reg_wdata = {8'($urandom), 24'($urandom_range(1, 40))};
      end
      offer(c);
      if ($urandom_range(0, 5) == 0) @(posedge clk);
    end
    // a PR_CTRL write with length 0 starts nothing
    c = '0; c.reg_we = 1'b1; c.reg_addr = REG_PR_CTRL;
    while (siphoning) begin
      csc_in_t w;
      w = '0; w.pix_valid = 1'b1; w.pix_data = $urandom;
      offer(w);
    end
    while (pr_busy) @(posedge clk);
    offer(c);
    @(posedge clk);
    checks++; if (siphoning) begin failures++; $display("zero length started PR"); end
    checks++; if (n_start != n_pr) begin failures++; $display("pr_start %0d times for %0d PR writes", n_start, n_pr); end
    checks++; if (n_pr == 0 || n_siphoned == 0 || n_blocked == 0) begin failures++; $display("PR never exercised"); end
    $display("PR writes %0d, siphoned %0d, pixels %0d, blocked %0d", n_pr, n_siphoned, n_pix, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
