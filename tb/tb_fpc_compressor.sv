// tb_fpc_compressor: compares fpc_compressor's block, size and
// compressibility flag with the reference FPC model of tb_ref_pkg for lines
// of several data patterns; checks the 1-cycle latency.
module tb_fpc_compressor;
  import hc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_ok;
  logic [511:0] line = 0, out_data;
  cmeta_t out_meta;
  int checks = 0, failures = 0;

  fpc_compressor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bits, nok = 0;
    line_t blk, l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 440; n++) begin
      l = gen_line(n, 5 * n + 1);
      if (n % 4 == 3)                         // words of every FPC pattern, signed values
        for (int i = 0; i < 16; i++)
          case ((n / 4 + i) % 6)
            0: l[i*32 +: 32] = 32'($urandom_range(0, 255)) - 32'd128;
            1: l[i*32 +: 32] = 32'($urandom_range(0, 65535)) - 32'd32768;
            2: l[i*32 +: 32] = {2{8'($urandom_range(0, 255)) - 8'd128 == 8'h0 ? 16'h0 :
                                 {{8{1'b1}}, 8'($urandom_range(128, 255))}}};
            3: l[i*32 +: 32] = {4{8'($urandom_range(0, 255))}};
            4: l[i*32 +: 32] = 32'($urandom_range(0, 15)) - 32'd8;
            default: l[i*32 +: 32] = {16'($urandom()), 16'h0};
          endcase
      bits = fpc_encode(l, blk);
      @(negedge clk); in_valid = 1; line = l;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || out_ok != (bits <= 512) || out_meta.scheme != SCH_FPC ||
          (bits <= 512 && (int'(out_meta.segs) != (bits + 63) / 64 || out_data != blk))) begin
        failures++;
        if (failures < 5) $display("mismatch kind %0d: bits %0d segs %0d ok %0d", n % 11, bits,
                                   out_meta.segs, out_ok);
      end
      if (bits <= 512) nok++;
    end
    checks++;
    if (nok == 0 || nok == 440) failures++;   // both outcomes must occur
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
