// tb_ici: self-checking testbench of the internal configuration interface.
//
// Phase 1 streams words with the ICAP never busy and the source always
// ready and checks the byte order and the rate of one byte per clock
// (4 bytes per word). Phase 2 streams random words with random source gaps,
// a randomly busy ICAP and the enable toggling, and checks that every byte
// reaches the ICAP once, in order, only while enabled, and that idle
// follows the buffer.
`timescale 1ns/1ps
module tb_ici;
  logic clk = 0, rst_n = 0;
  logic en, in_valid, in_ready, icap_ce_n, icap_write_n, icap_busy, idle;
  logic [31:0] in_data;
  logic [7:0] icap_i;
  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  int unsigned nbytes = 0;
  logic rand_busy = 0;

  ici dut (.*);
  always #5 clk = ~clk;

  // ICAP side: collect bytes, check them, drive busy
  always @(posedge clk) begin
    if (rst_n && !icap_ce_n) begin
      checks++;
      if (!en) begin failures++; $display("ICAP written while disabled"); end
      if (icap_write_n) begin failures++; $display("write_n high with ce_n low"); end
    end
    if (rst_n && !icap_ce_n && !icap_write_n && !icap_busy) begin
      logic [7:0] e;
      nbytes++;
      checks++;
      e = (expq.size() != 0) ? expq.pop_front() : 8'hxx;
      if (e !== icap_i) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h expected %h", nbytes, icap_i, e);
      end
    end
  end
  always @(posedge clk) icap_busy <= rand_busy ? ($urandom_range(0, 3) == 0) : 1'b0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [31:0] w, input bit gaps);
    while (gaps && $urandom_range(0, 2) == 0) @(posedge clk);
    #1;
    in_valid = 1'b1; in_data = w;
    for (int k = 3; k >= 0; k--) expq.push_back(w[8*k +: 8]);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    en = 1'b1; in_valid = 1'b0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (!idle) begin failures++; $display("not idle after reset"); end
    // phase 1: rate
    begin
      int unsigned t0, b0;
      @(posedge clk);
      b0 = nbytes;
      fork
        for (int n = 0; n < 64; n++) send($urandom, 0);
      join
      t0 = nbytes - b0;
      repeat (8) @(posedge clk);
      checks++;
      if (nbytes - b0 != 256) begin failures++; $display("phase 1 bytes %0d", nbytes - b0); end
      // 64 words handed over back to back, 4 cycles each: 63*4 bytes were
      // written while the words were being handed over
      checks++;
      if (t0 < 251 || t0 > 253) begin failures++; $display("rate: %0d bytes while sending 64 words", t0); end
    end
    // phase 2: random
    rand_busy = 1'b1;
    fork
      for (int n = 0; n < 2000; n++) send($urandom, 1);
      for (int n = 0; n < 3000; n++) begin
        @(posedge clk); #1 en = ($urandom_range(0, 5) != 0);
      end
    join
    #1 en = 1'b1;
    repeat (40) @(posedge clk);
    #1;
    checks++; if (expq.size() != 0) begin failures++; $display("%0d bytes not written", expq.size()); end
    checks++; if (!idle) begin failures++; $display("not idle at end"); end
    checks++; if (nbytes != 256 + 8000) begin failures++; $display("byte count %0d", nbytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
