// csc_tb_pkg: reference arithmetic shared by the CSC testbenches.
//
// ref_interp works out the expected output of an interpolation phase
// directly from a flat CLUT image (node number = sum n[d] * grid**d), by
// visiting every corner of the cell and weighting it with the product of
// the per-axis fractions. It shares no code or storage layout with the RTL.
package csc_tb_pkg;

  function automatic logic [31:0] ref_interp(input int dims, input int grid,
                                             const ref logic [31:0] lut[],
                                             input logic [31:0] p);
    logic [31:0] r;
    int ib, fb;
    ib = $clog2(grid - 1);
    fb = 8 - ib;
    for (int ch = 0; ch < 4; ch++) begin
      longint sum = 0;
      for (int c = 0; c < (1 << dims); c++) begin
        longint w = 1;
        int node = 0, stride = 1;
        for (int d = 0; d < dims; d++) begin
          int v, idx, f, up;
          v   = int'(p[d*8 +: 8]);
          idx = v >> fb;
          f   = v % (1 << fb);
          up  = (c >> d) & 1;
          w   = w * longint'((up != 0) ? f : ((1 << fb) - f));
          node += (idx + up) * stride;
          stride *= grid;
        end
        sum += w * longint'(lut[node][ch*8 +: 8]);
      end
      r[ch*8 +: 8] = 8'((sum + (64'd1 << (dims*fb - 1))) >> (dims*fb));
    end
    return r;
  endfunction

endpackage
