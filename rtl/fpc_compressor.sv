// fpc_compressor: Frequent Pattern Compression of one 64-byte line.
//
// The strong scheme of the design. Each of the sixteen 32-bit words gets a
// 3-bit prefix naming its pattern (see hc_pkg::fpc_pfx_e) and keeps only the
// data bits that pattern needs: zero word 0, 4-bit sign-extended 4, 8-bit
// sign-extended 8, repeated byte 8, 16-bit sign-extended 16, halfword padded
// with zeros 16, two sign-extended bytes 16, uncompressed 32. The block is
// the 48 prefix bits followed by the data fields in word order, LSB first.
// A block longer than 512 bits is not FPC-compressible (out_ok = 0).
//
// Timing: inputs sampled on a clock edge, out_* valid one cycle later.
// The document uses FPC by name; the pattern table follows the published
// FPC scheme except that every zero word has its own prefix instead of a
// zero-run code, so that each word's data length depends on its prefix alone.
module fpc_compressor
  import hc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LINE_BITS-1:0] line,
  output logic                 out_valid,
  output logic                 out_ok,
  output cmeta_t               out_meta,
  output logic [LINE_BITS-1:0] out_data
);
  localparam int TMP_W = FPC_PFX_BITS + LINE_BITS;   // 560

  function automatic logic sext_fits(input logic [31:0] w, input int b);
    logic [31:0] m;
    m = 32'hFFFF_FFFF << (b - 1);
    return ((w & m) == 32'h0) || ((w & m) == m);
  endfunction

  logic [TMP_W-1:0] tmp;
  logic [9:0]       bits;

  always_comb begin
    logic [2:0]  p;
    logic [31:0] w, f;
    tmp  = '0;
    bits = 10'(FPC_PFX_BITS);
    for (int i = 0; i < WORDS; i++) begin
      w = line[i*32 +: 32];
      if (w == 32'h0) begin
        p = FPC_ZERO; f = '0;
      end else if (sext_fits(w, 4)) begin
        p = FPC_SE4;  f = {28'b0, w[3:0]};
      end else if (sext_fits(w, 8)) begin
        p = FPC_SE8;  f = {24'b0, w[7:0]};
      end else if (w == {4{w[7:0]}}) begin
        p = FPC_REPB; f = {24'b0, w[7:0]};
      end else if (sext_fits(w, 16)) begin
        p = FPC_SE16; f = {16'b0, w[15:0]};
      end else if (w[15:0] == 16'h0) begin
        p = FPC_HPAD; f = {16'b0, w[31:16]};
      end else if (w[31:16] == {{8{w[23]}}, w[23:16]}
                   && w[15:0]  == {{8{w[7]}},  w[7:0]}) begin
        p = FPC_2B;   f = {16'b0, w[23:16], w[7:0]};
      end else begin
        p = FPC_RAW;  f = w;
      end
      tmp[i*3 +: 3]  = p;
      tmp[bits +: 32] = f;
      bits = bits + 10'(fpc_len(p));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ok    <= 1'b0;
      out_meta  <= '{scheme: SCH_FPC, enc: BDI_RAW, segs: 4'd8};
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ok        <= bits <= 10'(LINE_BITS);
        out_meta      <= '{scheme: SCH_FPC, enc: BDI_RAW,
                           segs: SEGCNT_W'((bits + 10'd63) >> 6)};
        out_data      <= tmp[LINE_BITS-1:0];
      end
    end
  end
endmodule
