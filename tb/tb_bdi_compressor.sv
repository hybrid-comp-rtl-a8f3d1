// tb_bdi_compressor: drives lines of several data patterns into
// bdi_compressor and compares encoding, size and payload with the reference
// BDI model of tb_ref_pkg; checks the 1-cycle latency.
module tb_bdi_compressor;
  import hc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [511:0] line = 0, out_data;
  cmeta_t out_meta;
  int checks = 0, failures = 0;

  bdi_compressor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int enc, segs;
    line_t pl, l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      l = gen_line(n, n + 1);
      @(negedge clk); in_valid = 1; line = l;
      @(negedge clk); in_valid = 0;
      bdi_best(l, enc, segs, pl);
      checks++;
      if (!out_valid || int'(out_meta.enc) != enc || int'(out_meta.segs) != segs ||
          out_meta.scheme != SCH_BDI || out_data != pl) begin
        failures++;
        if (failures < 5) $display("mismatch kind %0d: enc %0d/%0d segs %0d/%0d", n % 8,
                                   out_meta.enc, enc, out_meta.segs, segs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
