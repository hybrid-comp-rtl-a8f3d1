// bdi_cfg_dec: rebuilds a 64-byte line from one BDI base/delta coding
// (K-byte elements, D-byte deltas), the inverse of bdi_cfg_enc. Element i is
// the sign-extended delta, plus the explicit base when its mask bit is set.
// Purely combinational; used by bdi_decompressor.
module bdi_cfg_dec #(
  parameter int K = 8,
  parameter int D = 1
) (
  input  logic [511:0] payload,
  output logic [511:0] line
);
  localparam int N  = 64 / K;
  localparam int EW = 8 * K;
  localparam int DW = 8 * D;

  always_comb begin
    logic [EW-1:0] base, d;
    base = payload[0 +: EW];
    for (int i = 0; i < N; i++) begin
      d = {{(EW-DW){payload[EW + i*DW + DW-1]}}, payload[EW + i*DW +: DW]};
      line[i*EW +: EW] = payload[EW + N*DW + i] ? base + d : d;
    end
  end
endmodule
