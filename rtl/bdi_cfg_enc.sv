// bdi_cfg_enc: tests whether a 64-byte line can be coded with one BDI
// configuration (K-byte elements, D-byte deltas) and builds that coding.
//
// Each element is coded either against the implicit zero base or against one
// explicit base, the first element that does not fit as a small value from
// zero. A per-element mask bit says which base was used. Payload layout,
// LSB first: base (K bytes), N deltas (D bytes each), N mask bits, where
// N = 64/K. Purely combinational; used by bdi_compressor. The two-base
// (zero plus explicit) form follows the published BDI scheme; the bit layout
// is this design's choice.
module bdi_cfg_enc #(
  parameter int K = 8,
  parameter int D = 1
) (
  input  logic [511:0] line,
  output logic         ok,
  output logic [511:0] payload
);
  localparam int N  = 64 / K;
  localparam int EW = 8 * K;
  localparam int DW = 8 * D;

  function automatic logic fits(input logic [EW-1:0] v);
    return {{(EW-DW){v[DW-1]}}, v[DW-1:0]} == v;
  endfunction

  always_comb begin
    logic [EW-1:0] e, base, diff;
    logic found;
    base    = '0;
    found   = 1'b0;
    for (int i = 0; i < N; i++) begin
      e = line[i*EW +: EW];
      if (!found && !fits(e)) begin
        base  = e;
        found = 1'b1;
      end
    end
    ok      = 1'b1;
    payload = '0;
    payload[0 +: EW] = base;
    for (int i = 0; i < N; i++) begin
      e    = line[i*EW +: EW];
      diff = e - base;
      if (fits(e)) begin
        payload[EW + i*DW +: DW] = e[DW-1:0];
      end else if (fits(diff)) begin
        payload[EW + i*DW +: DW] = diff[DW-1:0];
        payload[EW + N*DW + i]   = 1'b1;
      end else begin
        ok = 1'b0;
      end
    end
  end
endmodule
