// csc_depacketizer: turns the 32-bit word stream from the test-rig link into
// one cycle of CSC engine inputs per packet.
//
// The CSC engine has more inputs than the 32-bit link between the boards, so
// the sender cuts each engine cycle into a packet of PKT_WORDS = 3 words:
//   word 0  header: [31:24] PKT_TAG, [16] pix_valid, [8] reg_we, [7:0] reg_addr
//   word 1  register write data
//   word 2  pixel word
// The packet is the same whether the pixel word is image data or
// partial-reconfiguration data. The word layout and the header tag are this
// design's own; the published architecture only says that packets stimulate all engine
// inputs cycle by cycle and are unpacked on the receiving board.
//
// Interface: link_* is a valid/ready word stream (a word moves when both are
// high). out/out_valid/out_ready is a valid/ready stream of csc_in_t; the
// assembled packet is held in an output register until taken. Words 0 and 1
// are always accepted; word 2 waits while a previous packet is still held.
// A header word without the tag is dropped and reported by a one-cycle
// sync_err pulse, so the receiver re-aligns on the next tagged word.
// Throughput: one packet per three link words; latency one cycle after the
// last word.
module csc_depacketizer
  import csc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      link_data,
  input  logic             link_valid,
  output logic             link_ready,
  output csc_in_t          out,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             sync_err
);

  logic [1:0]        cnt;        // word position within the packet
  logic              hdr_pix;    // pix_valid from the header
  logic              hdr_we;     // reg_we from the header
  logic [REG_AW-1:0] hdr_addr;
  logic [REG_DW-1:0] wdata_q;

  logic take;
  assign link_ready = (cnt != 2'd2) || !out_valid || out_ready;
  assign take       = link_valid && link_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= 2'd0;
      hdr_pix   <= 1'b0;
      hdr_we    <= 1'b0;
      hdr_addr  <= '0;
      wdata_q   <= '0;
      out       <= '0;
      out_valid <= 1'b0;
      sync_err  <= 1'b0;
    end else begin
      sync_err <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        unique case (cnt)
          2'd0: begin
            if (link_data[31:24] == PKT_TAG) begin
              hdr_pix  <= link_data[16];
              hdr_we   <= link_data[8];
              hdr_addr <= link_data[7:0];
              cnt      <= 2'd1;
            end else begin
              sync_err <= 1'b1;
            end
          end
          2'd1: begin
            wdata_q <= link_data;
            cnt     <= 2'd2;
          end
          default: begin
            out.reg_we    <= hdr_we;
            out.reg_addr  <= hdr_addr;
            out.reg_wdata <= wdata_q;
            out.pix_valid <= hdr_pix;
            out.pix_data  <= link_data;
            out_valid     <= 1'b1;
            cnt           <= 2'd0;
          end
        endcase
      end
    end
  end

  // A held packet must not change until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out);
  endproperty
  assert property (p_hold);

endmodule
