// tb_csc_pr_top: short end-to-end run of the engine (300 pixels per image,
// 64-word partial bitstreams, full-size CLUTs). See tb_csc_pr_run for what
// is driven and checked.
`timescale 1ns/1ps
module tb_csc_pr_top;
  tb_csc_pr_run #(.NPIX(300), .PR_WORDS(64), .WATCHDOG(400000)) run ();
endmodule
