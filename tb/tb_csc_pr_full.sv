// tb_csc_pr_full: end-to-end run at the sizes of the evaluation, with the
// engine at its default parameters: 160 x 120 pixel images (19,200 pixels)
// and two 465 KB partial bitstreams (119,040 words each), with full-size 3D
// and 4D CLUT loads. See tb_csc_pr_run for what is driven and checked.
`timescale 1ns/1ps
module tb_csc_pr_full;
  tb_csc_pr_run #(.NPIX(160 * 120), .PR_WORDS(465 * 1024 / 4), .WATCHDOG(4000000)) run ();
endmodule
