// tb_fpc_decompressor: feeds blocks encoded by the reference FPC model to
// fpc_decompressor and checks the line that comes back and when it comes:
// 5 cycles when header and data arrive together, 2 cycles after the data
// when the header came at least 3 cycles earlier, and the later of the two
// in between.
module tb_fpc_decompressor;
  import hc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_ready, hdr_valid = 0, data_valid = 0, out_valid;
  logic [47:0] hdr_pfx = 0;
  logic [511:0] data = 0, out_line;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fpc_decompressor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bits, gap, t0, td, tout, exp_lat;
    line_t blk, l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      l = gen_line(n, n * 3 + 11);
      bits = fpc_encode(l, blk);
      if (bits > 512) l = gen_line(3, n);      // small integers always fit
      bits = fpc_encode(l, blk);
      gap = n % 8;                       // cycles between header and data
      @(negedge clk);
      checks++;
      if (!in_ready) failures++;
      hdr_valid = 1; hdr_pfx = blk[47:0];
      if (gap == 0) begin data_valid = 1; data = blk; end
      t0 = cyc;
      @(negedge clk); hdr_valid = 0; hdr_pfx = '1; data_valid = 0;
      if (gap > 0) begin
        repeat (gap - 1) @(negedge clk);
        data_valid = 1; data = blk;
        @(negedge clk); data_valid = 0; data = '1;
      end
      td = t0 + gap;
      while (!out_valid) @(negedge clk);
      tout = cyc;
      exp_lat = (td + 2 > t0 + 5) ? td + 2 - t0 : 5;
      checks++;
      if (out_line != l || tout - t0 != exp_lat) begin
        failures++;
        if (failures < 5) $display("gap %0d: latency %0d expected %0d, data %0d", gap,
                                   tout - t0, exp_lat, out_line == l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
