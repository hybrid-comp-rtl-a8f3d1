// bdi_compressor: Base-Delta-Immediate compression of one 64-byte line.
//
// The fast scheme of the design: used alone for critical lines and as one of
// the two candidates for non-critical lines. Six base/delta configurations
// (8/1, 8/2, 8/4, 4/1, 4/2, 2/1 bytes) are tried in parallel by bdi_cfg_enc,
// together with the all-zero and repeated-8-byte-value cases; the smallest
// valid coding wins, and a line nothing shrinks is kept as BDI_RAW.
// Sizes in 8-byte segments: zeros 1, rep8 1, 8/1 3, 4/1 3, 8/2 4, 4/2 5,
// 2/1 5, 8/4 6, raw 8.
//
// Timing: in_valid/line sampled on a clock edge, out_* valid one cycle later
// (one result per cycle). The document uses BDI by name with its 1-cycle
// decompression; the set of configurations and the payload layout are this
// design's own.
module bdi_compressor
  import hc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LINE_BITS-1:0] line,
  output logic                 out_valid,
  output cmeta_t               out_meta,
  output logic [LINE_BITS-1:0] out_data
);
  logic          ok [6];
  logic [511:0]  pl [6];

  bdi_cfg_enc #(.K(8), .D(1)) u_b8d1 (.line, .ok(ok[0]), .payload(pl[0]));
  bdi_cfg_enc #(.K(4), .D(1)) u_b4d1 (.line, .ok(ok[1]), .payload(pl[1]));
  bdi_cfg_enc #(.K(8), .D(2)) u_b8d2 (.line, .ok(ok[2]), .payload(pl[2]));
  bdi_cfg_enc #(.K(4), .D(2)) u_b4d2 (.line, .ok(ok[3]), .payload(pl[3]));
  bdi_cfg_enc #(.K(2), .D(1)) u_b2d1 (.line, .ok(ok[4]), .payload(pl[4]));
  bdi_cfg_enc #(.K(8), .D(4)) u_b8d4 (.line, .ok(ok[5]), .payload(pl[5]));

  localparam bdi_enc_e       CFG_ENC  [6] = '{BDI_B8D1, BDI_B4D1, BDI_B8D2,
                                              BDI_B4D2, BDI_B2D1, BDI_B8D4};
  localparam logic [3:0]     CFG_SEGS [6] = '{4'd3, 4'd3, 4'd4, 4'd5, 4'd5, 4'd6};

  cmeta_t                 meta_c;
  logic [LINE_BITS-1:0]   data_c;
  logic                   rep8;

  always_comb begin
    rep8 = 1'b1;
    for (int i = 1; i < 8; i++)
      if (line[i*64 +: 64] != line[63:0]) rep8 = 1'b0;

    meta_c.scheme = SCH_BDI;
    meta_c.enc    = BDI_RAW;
    meta_c.segs   = 4'd8;
    data_c        = line;
    if (line == '0) begin
      meta_c.enc  = BDI_ZEROS;
      meta_c.segs = 4'd1;
      data_c      = '0;
    end else if (rep8) begin
      meta_c.enc  = BDI_REP8;
      meta_c.segs = 4'd1;
      data_c      = {448'b0, line[63:0]};
    end else begin
      for (int c = 5; c >= 0; c--) begin   // lowest index = smallest wins
        if (ok[c]) begin
          meta_c.enc  = CFG_ENC[c];
          meta_c.segs = CFG_SEGS[c];
          data_c      = pl[c];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_meta  <= '{scheme: SCH_BDI, enc: BDI_RAW, segs: 4'd8};
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_meta <= meta_c;
        out_data <= data_c;
      end
    end
  end
endmodule
