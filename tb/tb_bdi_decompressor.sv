// tb_bdi_decompressor: encodes lines with the reference BDI model, feeds the
// codings to bdi_decompressor and checks that the original line comes back
// exactly one cycle later.
module tb_bdi_decompressor;
  import hc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  bdi_enc_e enc = BDI_RAW;
  logic [511:0] payload = 0, out_line;
  int checks = 0, failures = 0;

  bdi_decompressor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, segs;
    int seen [16];
    line_t pl, l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      l = gen_line(n, 7 * n + 3);
      bdi_best(l, e, segs, pl);
      seen[e]++;
      @(negedge clk); in_valid = 1; enc = bdi_enc_e'(e); payload = pl;
      @(negedge clk); in_valid = 0; payload = '1;
      checks++;
      if (!out_valid || out_line != l) begin
        failures++;
        if (failures < 5) $display("mismatch enc %0d", e);
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    // each encoding must have been exercised
    foreach (seen[i]) if (i <= 7 || i == 15) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("encoding %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
