// ici: internal configuration interface. It takes the 32-bit PR words
// siphoned off the pixel interface and writes them, one byte per clock, into
// the FPGA's internal configuration access port (ICAP), an 8-bit port on the
// Virtex-II Pro.
//
// A one-word buffer holds the current word; its bytes go out most
// significant first. A byte is written on a clock edge where icap_ce_n and
// icap_write_n are low and icap_busy is low; while icap_busy is high the same
// byte is held. The next word is accepted in the cycle the last byte is
// written, so a steady source sustains one byte per clock, the rate the
// ICAP allows at its 50 MHz maximum. en (from the stall logic) holds the
// ICAP writes back until the pipeline has drained. idle is high when no word
// is buffered. The byte order, the one-word buffer and the busy handling are
// this design's own choices.
module ici (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  // PR words
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  // ICAP pins
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [7:0]  icap_i,
  input  logic        icap_busy,
  output logic        idle
);

  logic [31:0] word_q;
  logic        full;
  logic [1:0]  bidx;    // byte being written, 0 = most significant
  logic        byte_wr;
  logic        last;

  assign icap_ce_n    = !(full && en);
  assign icap_write_n = !(full && en);
  assign icap_i       = word_q[8*(3 - int'(bidx)) +: 8];
  assign byte_wr      = full && en && !icap_busy;
  assign last         = byte_wr && bidx == 2'd3;
  assign in_ready     = !full || last;
  assign idle         = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      full   <= 1'b0;
      bidx   <= '0;
    end else if (in_valid && in_ready) begin
      word_q <= in_data;
      full   <= 1'b1;
      bidx   <= '0;
    end else if (last) begin
      full   <= 1'b0;
      bidx   <= '0;
    end else if (byte_wr) begin
      bidx   <= bidx + 2'd1;
    end
  end

  // A byte refused by a busy ICAP is presented again unchanged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !icap_ce_n && icap_busy |=> $stable(icap_i));

endmodule
