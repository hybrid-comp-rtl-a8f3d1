// fpc_decompressor: five-stage FPC decompression that can overlap with the
// arrival of a packet.
//
// Stage 1 turns each 3-bit prefix into its data length. Stages 2 and 3
// compute the starting bit of every word: stage 2 forms running sums inside
// groups of four words, stage 3 adds the group bases. Stage 4 cuts each
// word's field out of the block and stage 5 expands it to 32 bits. Stages
// 1-3 need only the prefixes, which travel in a packet's head flit; stages
// 4-5 need the data.
//
// Interface: hdr_valid/hdr_pfx starts a block (only when in_ready);
// data_valid/data delivers the whole compressed block, in the same cycle as
// the header or any later cycle before the result. One block at a time.
// Timing (counting the sampling edge as cycle 1, as for the 1-cycle BDI
// decompressor): header and data together -> result after 5 cycles (the FPC
// latency the document gives). Data arriving 3 or more cycles after the
// header -> result after 2 cycles, the 2-cycle residual latency the document gives for
// decompression overlapped with flit traversal. The split into stages
// follows the document; the group-of-four prefix sum is this design's choice.
module fpc_decompressor
  import hc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    in_ready,
  input  logic                    hdr_valid,
  input  logic [FPC_PFX_BITS-1:0] hdr_pfx,
  input  logic                    data_valid,
  input  logic [LINE_BITS-1:0]    data,
  output logic                    out_valid,
  output logic [LINE_BITS-1:0]    out_line
);
  localparam int TMP_W = FPC_PFX_BITS + LINE_BITS;   // room for a 32-bit read at the end

  logic                    busy;
  logic [FPC_PFX_BITS-1:0] pfx;
  logic                    v1, v2, v4, ordy, pvalid;
  logic [5:0]              len   [WORDS];
  logic [6:0]              loc   [WORDS];   // offset inside group of 4
  logic [7:0]              gsum  [4];       // length of each group
  logic [9:0]              off   [WORDS];
  logic [31:0]             fld   [WORDS];
  logic [LINE_BITS-1:0]    pdata;

  assign in_ready = !busy;

  function automatic logic [31:0] expand(input logic [2:0] p, input logic [31:0] f);
    case (p)
      FPC_ZERO: return 32'h0;
      FPC_SE4:  return {{28{f[3]}}, f[3:0]};
      FPC_SE8:  return {{24{f[7]}}, f[7:0]};
      FPC_SE16: return {{16{f[15]}}, f[15:0]};
      FPC_HPAD: return {f[15:0], 16'h0};
      FPC_2B:   return {{8{f[15]}}, f[15:8], {8{f[7]}}, f[7:0]};
      FPC_REPB: return {4{f[7:0]}};
      default:  return f;
    endcase
  endfunction

  logic [TMP_W-1:0] pwide;
  assign pwide = {{FPC_PFX_BITS{1'b0}}, (data_valid ? data : pdata)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; v1 <= 1'b0; v2 <= 1'b0; v4 <= 1'b0;
      ordy <= 1'b0; pvalid <= 1'b0; out_valid <= 1'b0;
      pfx <= '0; pdata <= '0; out_line <= '0;
      for (int i = 0; i < WORDS; i++) begin
        len[i] <= '0; loc[i] <= '0; off[i] <= '0; fld[i] <= '0;
      end
      for (int g = 0; g < 4; g++) gsum[g] <= '0;
    end else begin
      out_valid <= 1'b0;
      // accept header / data
      if (hdr_valid && !busy) begin
        busy <= 1'b1;
        pfx  <= hdr_pfx;
      end
      if (data_valid && (busy || hdr_valid) && !ordy) begin
        pvalid <= 1'b1;
        pdata  <= data;
      end
      // stage 1: code lengths
      v1 <= hdr_valid && !busy;
      if (hdr_valid && !busy)
        for (int i = 0; i < WORDS; i++) len[i] <= 6'(fpc_len(hdr_pfx[i*3 +: 3]));
      // stage 2: offsets inside groups of four, group lengths
      v2 <= v1;
      if (v1)
        for (int g = 0; g < 4; g++) begin
          logic [7:0] s;
          s = '0;
          for (int j = 0; j < 4; j++) begin
            loc[g*4+j] <= 7'(s);
            s = s + 8'(len[g*4+j]);
          end
          gsum[g] <= s;
        end
      // stage 3: absolute start bit of each word
      if (v2) begin
        logic [9:0] base;
        base = 10'(FPC_PFX_BITS);
        for (int g = 0; g < 4; g++) begin
          for (int j = 0; j < 4; j++) off[g*4+j] <= base + 10'(loc[g*4+j]);
          base = base + 10'(gsum[g]);
        end
        ordy <= 1'b1;
      end
      // stage 4: extract fields (needs offsets and data)
      v4 <= 1'b0;
      if (ordy && (pvalid || data_valid) && !v4) begin
        for (int i = 0; i < WORDS; i++) fld[i] <= pwide[off[i] +: 32];
        v4 <= 1'b1;
        ordy <= 1'b0;
        pvalid <= 1'b0;
      end
      // stage 5: expand
      if (v4) begin
        for (int i = 0; i < WORDS; i++) out_line[i*32 +: 32] <= expand(pfx[i*3 +: 3], fld[i]);
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end
    end
  end
endmodule
