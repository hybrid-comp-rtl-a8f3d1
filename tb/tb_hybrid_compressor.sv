// tb_hybrid_compressor: checks the criticality rule of hybrid_compressor
// against the reference models: critical lines always in BDI form,
// non-critical lines in FPC form exactly when FPC is strictly smaller.
module tb_hybrid_compressor;
  import hc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, critical = 0, out_valid;
  logic [511:0] line = 0, out_data;
  cmeta_t out_meta;
  int checks = 0, failures = 0;
  int n_fpc = 0, n_crit_bdi = 0;

  hybrid_compressor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int enc, segs, bits, fsegs;
    bit want_fpc;
    line_t pl, blk, l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      l = gen_line(n / 2, n + 9);
      bdi_best(l, enc, segs, pl);
      bits  = fpc_encode(l, blk);
      fsegs = (bits + 63) / 64;
      @(negedge clk); in_valid = 1; line = l; critical = n[0];
      @(negedge clk); in_valid = 0; critical = !critical;
      want_fpc = !n[0] && bits <= 512 && fsegs < segs;
      checks++;
      if (!out_valid ||
          (want_fpc && (out_meta.scheme != SCH_FPC || out_data != blk || int'(out_meta.segs) != fsegs)) ||
          (!want_fpc && (out_meta.scheme != SCH_BDI || out_data != pl || int'(out_meta.segs) != segs))) begin
        failures++;
        if (failures < 5) $display("n %0d crit %0d: scheme %0d want_fpc %0d", n, n[0],
                                   out_meta.scheme, want_fpc);
      end
      if (want_fpc) n_fpc++;
      if (n[0] && bits <= 512 && fsegs < segs) n_crit_bdi++;
    end
    checks += 2;
    if (n_fpc == 0) failures++;
    if (n_crit_bdi == 0) failures++;   // a critical line that FPC would have shrunk more
    $display("fpc chosen %0d, critical kept in BDI %0d", n_fpc, n_crit_bdi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
