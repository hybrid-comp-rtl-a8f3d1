// bdi_decompressor: rebuilds a 64-byte line from its BDI coding.
//
// All six base/delta decoders (bdi_cfg_dec) run in parallel on the payload;
// the encoding field of the metadata selects one of them, or the zero,
// repeated-value or raw cases. Each element needs only one add, which is why
// BDI serves the latency-critical lines.
//
// Timing: in_valid with enc/payload sampled on a clock edge; out_valid and
// out_line one cycle later, one line per cycle: the 1-cycle BDI
// decompression latency the document gives.
module bdi_decompressor
  import hc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  bdi_enc_e             enc,
  input  logic [LINE_BITS-1:0] payload,
  output logic                 out_valid,
  output logic [LINE_BITS-1:0] out_line
);
  logic [511:0] dl [6];

  bdi_cfg_dec #(.K(8), .D(1)) u_b8d1 (.payload, .line(dl[0]));
  bdi_cfg_dec #(.K(4), .D(1)) u_b4d1 (.payload, .line(dl[1]));
  bdi_cfg_dec #(.K(8), .D(2)) u_b8d2 (.payload, .line(dl[2]));
  bdi_cfg_dec #(.K(4), .D(2)) u_b4d2 (.payload, .line(dl[3]));
  bdi_cfg_dec #(.K(2), .D(1)) u_b2d1 (.payload, .line(dl[4]));
  bdi_cfg_dec #(.K(8), .D(4)) u_b8d4 (.payload, .line(dl[5]));

  logic [LINE_BITS-1:0] line_c;

  always_comb begin
    unique case (enc)
      BDI_ZEROS: line_c = '0;
      BDI_REP8:  line_c = {8{payload[63:0]}};
      BDI_B8D1:  line_c = dl[0];
      BDI_B4D1:  line_c = dl[1];
      BDI_B8D2:  line_c = dl[2];
      BDI_B4D2:  line_c = dl[3];
      BDI_B2D1:  line_c = dl[4];
      BDI_B8D4:  line_c = dl[5];
      default:   line_c = payload;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_line  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_line <= line_c;
    end
  end
endmodule
