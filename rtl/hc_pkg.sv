// hc_pkg: types and constants shared by the criticality-aware compressed
// last-level cache.
//
// A cache line is 64 bytes (512 bits), seen as sixteen 32-bit words by FPC
// and as 8-, 4- or 2-byte elements by BDI. Compressed lines are stored in
// 8-byte segments, so a line occupies 1..8 segments. The tag array is doubled:
// each physical 64-byte way holds two tag slots that share its eight segments.
// One bit per tag (scheme_e) tells whether the line is BDI- or FPC-encoded;
// a line that neither scheme shrinks is kept as the BDI "raw" encoding.
//
// The line size, the 4x4 mesh, 16 banks and the 4 MB / 8-way L2 follow the
// document's system table. Address width, the flit format, segment size and
// all encodings below are this design's own choices.
package hc_pkg;

  localparam int LINE_BITS  = 512;
  localparam int LINE_BYTES = 64;
  localparam int WORDS      = 16;            // 32-bit words per line (FPC)
  localparam int SEG_BITS   = 64;            // storage segment
  localparam int SEGS       = LINE_BITS / SEG_BITS;   // 8
  localparam int SEGCNT_W   = 4;             // 0..8 segments

  localparam int PADDR_W    = 40;            // physical address bits (assumed)
  localparam int LADDR_W    = PADDR_W - 6;   // line address bits

  localparam int MESH_X     = 4;
  localparam int MESH_Y     = 4;
  localparam int NODES      = MESH_X * MESH_Y;
  localparam int NODE_W     = 4;

  // FPC: 3-bit prefix per 32-bit word, 48 prefix bits at the start of a block
  localparam int FPC_PFX_BITS = 3 * WORDS;

  typedef enum logic {SCH_BDI = 1'b0, SCH_FPC = 1'b1} scheme_e;

  // BDI encodings (base size / delta size)
  typedef enum logic [3:0] {
    BDI_ZEROS = 4'd0,   // all-zero line
    BDI_REP8  = 4'd1,   // one 8-byte value repeated
    BDI_B8D1  = 4'd2,
    BDI_B8D2  = 4'd3,
    BDI_B8D4  = 4'd4,
    BDI_B4D1  = 4'd5,
    BDI_B4D2  = 4'd6,
    BDI_B2D1  = 4'd7,
    BDI_RAW   = 4'd15   // uncompressed
  } bdi_enc_e;

  // FPC word prefixes
  typedef enum logic [2:0] {
    FPC_ZERO  = 3'b000, // zero word, no data bits
    FPC_SE4   = 3'b001, // 4-bit sign-extended
    FPC_SE8   = 3'b010, // 8-bit sign-extended
    FPC_SE16  = 3'b011, // 16-bit sign-extended
    FPC_HPAD  = 3'b100, // upper halfword, lower halfword zero
    FPC_2B    = 3'b101, // two halfwords, each a sign-extended byte
    FPC_REPB  = 3'b110, // one byte repeated four times
    FPC_RAW   = 3'b111  // uncompressed word
  } fpc_pfx_e;

  // Data bits that follow each FPC prefix
  function automatic int unsigned fpc_len(input logic [2:0] p);
    case (p)
      3'b000:  return 0;
      3'b001:  return 4;
      3'b010:  return 8;
      3'b011:  return 16;
      3'b100:  return 16;
      3'b101:  return 16;
      3'b110:  return 8;
      default: return 32;
    endcase
  endfunction

  // Compressed-line descriptor as kept in a tag slot and sent in a header
  typedef struct packed {
    scheme_e              scheme;
    bdi_enc_e             enc;      // meaningful when scheme == SCH_BDI
    logic [SEGCNT_W-1:0]  segs;     // 1..8
  } cmeta_t;

  // ---------------- network ----------------
  localparam int FLIT_DATA_W = 128;
  localparam int FLITS_PER_LINE = LINE_BITS / FLIT_DATA_W;   // 4
  localparam int NUM_VC = 2;   // VC0: requests, VC1: responses

  typedef enum logic [1:0] {
    PKT_RD_REQ = 2'd0,
    PKT_WR_REQ = 2'd1,
    PKT_RD_RSP = 2'd2,
    PKT_WR_ACK = 2'd3
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e              ptype;
    logic [NODE_W-1:0]      src;
    logic [NODE_W-1:0]      dst;
    logic [LADDR_W-1:0]     addr;
    logic                   crit;      // requester's CPT says critical
    logic                   hit;       // read response: L2 hit
    cmeta_t                 meta;
    logic [FPC_PFX_BITS-1:0] pfx;      // FPC prefixes, copied into the head flit
  } pkt_hdr_t;

  typedef struct packed {
    logic                   head;
    logic                   tail;
    logic                   vc;
    logic [NODE_W-1:0]      dst;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  // Bank-side request/response (whole packets)
  typedef struct packed {
    logic                   write;
    logic [NODE_W-1:0]      src;
    logic [LADDR_W-1:0]     addr;
    logic                   crit;
    logic [LINE_BITS-1:0]   wdata;
  } bank_req_t;

  typedef struct packed {
    logic                   write_ack;
    logic [NODE_W-1:0]      dst;
    logic [LADDR_W-1:0]     addr;
    logic                   hit;
    cmeta_t                 meta;
    logic [LINE_BITS-1:0]   cdata;     // compressed payload, LSB first
  } bank_rsp_t;

  function automatic logic [NODE_W-1:0] home_node(input logic [LADDR_W-1:0] a);
    return a[NODE_W-1:0];
  endfunction

endpackage
