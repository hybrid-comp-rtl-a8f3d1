// hybrid_compressor: criticality-aware choice between BDI and FPC.
//
// A line marked critical (local to the requesting core, or predicted to stall
// the ROB) is always stored in BDI form so that reading it costs only the
// 1-cycle BDI decompression. A non-critical line is compressed by both
// schemes and the smaller result is kept (FPC only when it is strictly
// smaller, since BDI is faster to read). This rule is the document's.
//
// Timing: in_valid/line/critical sampled on a clock edge; out_* valid one
// cycle later, from the registered outputs of the two compressors.
module hybrid_compressor
  import hc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 critical,
  input  logic [LINE_BITS-1:0] line,
  output logic                 out_valid,
  output cmeta_t               out_meta,
  output logic [LINE_BITS-1:0] out_data
);
  logic                 bdi_v, fpc_v, fpc_ok, crit_q;
  cmeta_t               bdi_m, fpc_m;
  logic [LINE_BITS-1:0] bdi_d, fpc_d;

  bdi_compressor u_bdi (.clk, .rst_n, .in_valid, .line,
                        .out_valid(bdi_v), .out_meta(bdi_m), .out_data(bdi_d));
  fpc_compressor u_fpc (.clk, .rst_n, .in_valid, .line,
                        .out_valid(fpc_v), .out_ok(fpc_ok), .out_meta(fpc_m), .out_data(fpc_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        crit_q <= 1'b0;
    else if (in_valid) crit_q <= critical;
  end

  logic use_fpc;
  assign use_fpc   = !crit_q && fpc_ok && (fpc_m.segs < bdi_m.segs);
  assign out_valid = bdi_v;
  assign out_meta  = use_fpc ? fpc_m : bdi_m;
  assign out_data  = use_fpc ? fpc_d : bdi_d;
endmodule
