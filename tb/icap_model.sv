// icap_model: behavioural stand-in for the 8-bit internal configuration
// access port of a Virtex-II Pro FPGA, as far as the testbenches need it.
// Not synthesizable logic.
//
// A byte is taken on a rising clock edge with ce_n and write_n low and busy
// low. busy is raised at random, about one cycle in BUSY_ONE_IN, to exercise
// the writer's hold behaviour. The model counts the bytes and folds them into
// a checksum (sum = sum * 31 + byte). To stand for the region being rewritten
// it understands a toy bitstream: after the sync word 32'hAA995566, the next
// word's bit 0 names the module (0 = 3D phase, 1 = 4D phase); when the end
// word 32'h0000000D arrives, prm_sel switches to that module.
module icap_model #(
  parameter int BUSY_ONE_IN = 8,
  parameter bit INIT_PRM    = 1'b0
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       write_n,
  input  logic [7:0] i,
  output logic       busy,
  output logic       prm_sel
);
  longint unsigned bytes = 0;
  longint unsigned busy_cycles = 0;
  int unsigned     sum = 0;
  int unsigned     loads = 0;
  logic [31:0]     win = '0;
  int              phase = 0;   // 0 hunting sync, 1 expect id, 2 payload
  logic            id = 1'b0;
  int              bpos = 0;    // byte position within the current word

  initial begin
    prm_sel = INIT_PRM;
    busy    = 1'b0;
  end

  always @(posedge clk) begin
    if (!ce_n && !write_n && busy) busy_cycles++;
    if (!ce_n && !write_n && !busy) begin
      bytes++;
      sum = sum * 31 + i;
      win = {win[23:0], i};
      if (phase == 0) begin
        if (win == 32'hAA995566) begin phase = 1; bpos = 0; end
      end else begin
        bpos++;
        if (bpos == 4) begin
          bpos = 0;
          if (phase == 1) begin
            id = win[0];
            phase = 2;
          end else if (win == 32'h0000000D) begin
            prm_sel <= id;
            loads++;
            phase = 0;
          end
        end
      end
    end
    busy <= (BUSY_ONE_IN > 0) && ($urandom_range(0, BUSY_ONE_IN - 1) == 0);
  end
endmodule
