// llc_bank: one bank of the shared, physically distributed (S-NUCA) L2,
// storing lines in compressed form.
//
// Organisation: SETS sets of PWAYS physical 64-byte ways. The tag array is
// doubled: every physical way has two tag slots that share its eight 8-byte
// segments. Slot 2w fills segments from the bottom of way w, slot 2w+1 from
// the top, so two lines fit when their sizes add up to at most eight
// segments, and the bank holds at most twice its uncompressed line count.
// Every tag slot keeps the one-bit scheme flag (BDI or FPC) plus the BDI
// encoding and the size in segments.
//
// Criticality: whenever a line is written into the bank it is compressed by
// hybrid_compressor. It counts as critical when the requesting core sits at
// this bank's node (a local block), or, for a write from a core, when that
// core's predictor marked the access critical. A line fetched from memory on
// a miss is first treated as non-critical unless it is local, so a change of
// ROB criticality takes effect at the next write of the line (as the
// document describes).
//
// Operation (one request at a time):
//   read hit  : response with the compressed payload exactly HIT_CYCLES
//               cycles after the request is accepted;
//   read miss : memory read, compression, placement (evicting if needed),
//               response marked hit = 0 with the compressed payload;
//   write     : compression, placement in the hit slot or a new slot,
//               line marked dirty, write acknowledgement.
// A dirty victim is decompressed (bdi_decompressor or fpc_decompressor) and
// written back to memory uncompressed. Placement prefers a free slot whose
// partner leaves room; otherwise a round-robin way pointer picks the victim
// way, whose first slot is evicted, and its partner too if still needed.
// Replacement policy, the segment layout and all handshakes are this
// design's choices; the document gives the doubled tag array, the scheme bit
// and the 10-cycle L2 hit latency.
//
// Interfaces are valid/ready; mem_rsp has no ready (the bank always waits
// for it). ev_* outputs pulse for one cycle per event, for statistics.
module llc_bank
  import hc_pkg::*;
#(
  parameter int               SETS       = 512,
  parameter int               PWAYS      = 8,
  parameter int               HIT_CYCLES = 10,
  parameter logic [NODE_W-1:0] NODE_ID   = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  bank_req_t            req,
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output bank_rsp_t            rsp,
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic                 mem_req_write,
  output logic [LADDR_W-1:0]   mem_req_addr,
  output logic [LINE_BITS-1:0] mem_req_wdata,
  input  logic                 mem_rsp_valid,
  input  logic [LINE_BITS-1:0] mem_rsp_data,
  output logic                 ev_hit,
  output logic                 ev_miss,
  output logic                 ev_evict,
  output logic                 ev_writeback,
  output logic                 ev_store_bdi,
  output logic                 ev_store_fpc,
  output logic                 ev_store_raw
);
  localparam int SET_W  = $clog2(SETS);
  localparam int WAY_W  = $clog2(PWAYS);
  localparam int SLOTS  = 2 * PWAYS;
  localparam int SLOT_W = $clog2(SLOTS);
  localparam int TAG_W  = LADDR_W - NODE_W - SET_W;

  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
    cmeta_t           meta;
  } tag_t;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_HITWAIT, S_MEMRD, S_MEMWAIT, S_COMPW,
    S_PLACE, S_EV_RD, S_EV_DEC, S_EV_WR, S_WRITE, S_RESP
  } state_e;

  // ---------------- storage ----------------
  tag_t                       tag_mem [SETS][SLOTS];   // valid field unused here
  logic [SLOTS-1:0]           vld     [SETS];          // valid bits, reset
  logic [SEGS-1:0][SEG_BITS-1:0] dmem [SETS*PWAYS];

  // ---------------- state ----------------
  state_e                 st;
  bank_req_t              r;
  tag_t                   tags_q [SLOTS];
  logic [7:0]             cnt;
  logic                   hit_q;
  logic [SLOT_W-1:0]      hslot, tslot, eslot;
  logic [1:0]             evict_m;     // bit0: target slot, bit1: partner slot
  logic [WAY_W-1:0]       rr;
  cmeta_t                 nmeta;
  logic [LINE_BITS-1:0]   ndata, line_q, ev_line;
  cmeta_t                 ev_meta;
  logic [TAG_W-1:0]       ev_tag;
  bank_rsp_t              rsp_q;

  logic [SET_W-1:0]       set_i;
  logic [TAG_W-1:0]       tag_i;
  assign set_i = r.addr[NODE_W +: SET_W];
  assign tag_i = r.addr[LADDR_W-1 -: TAG_W];

  // ---------------- compressor / decompressors ----------------
  logic                 comp_in, comp_crit, comp_ov;
  cmeta_t               comp_meta;
  logic [LINE_BITS-1:0] comp_data;
  hybrid_compressor u_comp (.clk, .rst_n, .in_valid(comp_in), .critical(comp_crit),
                            .line(line_q), .out_valid(comp_ov), .out_meta(comp_meta),
                            .out_data(comp_data));

  logic                 dec_go, bdi_ov, fpc_ov, fpc_rdy;
  logic [LINE_BITS-1:0] bdi_ol, fpc_ol;
  bdi_decompressor u_bdi_dec (.clk, .rst_n, .in_valid(dec_go && ev_meta.scheme == SCH_BDI),
                              .enc(ev_meta.enc), .payload(ev_line),
                              .out_valid(bdi_ov), .out_line(bdi_ol));
  fpc_decompressor u_fpc_dec (.clk, .rst_n, .in_ready(fpc_rdy),
                              .hdr_valid(dec_go && ev_meta.scheme == SCH_FPC),
                              .hdr_pfx(ev_line[FPC_PFX_BITS-1:0]),
                              .data_valid(dec_go && ev_meta.scheme == SCH_FPC),
                              .data(ev_line), .out_valid(fpc_ov), .out_line(fpc_ol));

  // ---------------- helpers ----------------
  function automatic logic [LINE_BITS-1:0] seg_mask(input logic [SEGCNT_W-1:0] n);
    logic [LINE_BITS-1:0] m;
    m = '0;
    for (int s = 0; s < SEGS; s++) if (s < int'(n)) m[s*SEG_BITS +: SEG_BITS] = '1;
    return m;
  endfunction

  // payload of a slot read out of its physical way
  function automatic logic [LINE_BITS-1:0] slot_payload(input logic [LINE_BITS-1:0] way,
                                                        input logic odd,
                                                        input logic [SEGCNT_W-1:0] n);
    logic [LINE_BITS-1:0] p;
    p = odd ? way >> ((SEGS - int'(n)) * SEG_BITS) : way;
    return p & seg_mask(n);
  endfunction

  // lookup
  logic                  hit_c;
  logic [SLOT_W-1:0]     hslot_c;
  always_comb begin
    hit_c   = 1'b0;
    hslot_c = '0;
    for (int i = 0; i < SLOTS; i++)
      if (!hit_c && tags_q[i].valid && tags_q[i].tag == tag_i) begin
        hit_c   = 1'b1;
        hslot_c = SLOT_W'(i);
      end
  end

  // placement of a line of nmeta.segs segments
  logic                  free_c;
  logic [SLOT_W-1:0]     fslot_c;
  always_comb begin
    free_c  = 1'b0;
    fslot_c = '0;
    for (int i = 0; i < SLOTS; i++)
      if (!free_c && !tags_q[i].valid &&
          (!tags_q[i ^ 1].valid ||
           5'(tags_q[i ^ 1].meta.segs) + 5'(nmeta.segs) <= 5'(SEGS))) begin
        free_c  = 1'b1;
        fslot_c = SLOT_W'(i);
      end
  end

  logic [SLOT_W-1:0] part_t;
  assign part_t = tslot ^ SLOT_W'(1);
  logic local_req;
  assign local_req = (r.src == NODE_ID);

  // ---------------- FSM ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      r <= '0; cnt <= '0; hit_q <= 1'b0; hslot <= '0; tslot <= '0; eslot <= '0;
      evict_m <= '0; rr <= '0; nmeta <= '0; ndata <= '0; line_q <= '0;
      ev_line <= '0; ev_meta <= '0; ev_tag <= '0; rsp_q <= '0;
      comp_in <= 1'b0; comp_crit <= 1'b0; dec_go <= 1'b0;
      for (int i = 0; i < SLOTS; i++) tags_q[i] <= '0;
      for (int s = 0; s < SETS; s++) vld[s] <= '0;
      ev_hit <= 0; ev_miss <= 0; ev_evict <= 0; ev_writeback <= 0;
      ev_store_bdi <= 0; ev_store_fpc <= 0; ev_store_raw <= 0;
    end else begin
      comp_in <= 1'b0;
      dec_go  <= 1'b0;
      ev_hit <= 0; ev_miss <= 0; ev_evict <= 0; ev_writeback <= 0;
      ev_store_bdi <= 0; ev_store_fpc <= 0; ev_store_raw <= 0;
      cnt <= cnt + 8'd1;
      unique case (st)
        S_IDLE: if (req_valid) begin
          r   <= req;
          cnt <= 8'd1;
          for (int i = 0; i < SLOTS; i++) begin
            tags_q[i]       <= tag_mem[req.addr[NODE_W +: SET_W]][i];
            tags_q[i].valid <= vld[req.addr[NODE_W +: SET_W]][i];
          end
          st  <= S_LOOKUP;
        end
        S_LOOKUP: begin
          hit_q <= hit_c;
          hslot <= hslot_c;
          if (!r.write && hit_c) begin
            ev_hit <= 1'b1;
            rsp_q.write_ack <= 1'b0;
            rsp_q.dst   <= r.src;
            rsp_q.addr  <= r.addr;
            rsp_q.hit   <= 1'b1;
            rsp_q.meta  <= tags_q[hslot_c].meta;
            rsp_q.cdata <= slot_payload(dmem[{set_i, hslot_c[SLOT_W-1:1]}], hslot_c[0],
                                        tags_q[hslot_c].meta.segs);
            st <= S_HITWAIT;
          end else if (!r.write) begin
            ev_miss <= 1'b1;
            st <= S_MEMRD;
          end else begin
            line_q    <= r.wdata;
            comp_in   <= 1'b1;
            comp_crit <= local_req || r.crit;
            st <= S_COMPW;
          end
        end
        S_HITWAIT: if (cnt >= 8'(HIT_CYCLES)) st <= S_RESP;
        S_MEMRD: if (mem_req_ready) st <= S_MEMWAIT;
        S_MEMWAIT: if (mem_rsp_valid) begin
          line_q    <= mem_rsp_data;
          comp_in   <= 1'b1;
          comp_crit <= local_req;
          st <= S_COMPW;
        end
        S_COMPW: if (comp_ov) begin
          nmeta <= comp_meta;
          ndata <= comp_data;
          st    <= S_PLACE;
        end
        S_PLACE: begin
          logic [SLOT_W-1:0] t;
          logic [1:0]        m;
          m = 2'b00;
          if (hit_q) begin
            t = hslot;
          end else if (free_c) begin
            t = fslot_c;
          end else begin
            t = {rr, 1'b0};
            rr <= rr + 1'b1;
            m[0] = 1'b1;
          end
          if (tags_q[t ^ SLOT_W'(1)].valid &&
              5'(tags_q[t ^ SLOT_W'(1)].meta.segs) + 5'(nmeta.segs) > 5'(SEGS))
            m[1] = 1'b1;
          tslot   <= t;
          evict_m <= m;
          st      <= (m != 2'b00) ? S_EV_RD : S_WRITE;
        end
        S_EV_RD: begin
          logic [SLOT_W-1:0] e;
          e = evict_m[0] ? tslot : part_t;
          eslot <= e;
          if (tags_q[e].valid && tags_q[e].dirty) begin
            ev_meta <= tags_q[e].meta;
            ev_tag  <= tags_q[e].tag;
            ev_line <= slot_payload(dmem[{set_i, e[SLOT_W-1:1]}], e[0], tags_q[e].meta.segs);
            dec_go  <= 1'b1;
            st      <= S_EV_DEC;
          end else begin
            ev_evict <= tags_q[e].valid;
            tags_q[e].valid <= 1'b0;
            if (evict_m[0]) evict_m[0] <= 1'b0; else evict_m[1] <= 1'b0;
            st <= (evict_m[0] && evict_m[1]) ? S_EV_RD : S_WRITE;
          end
        end
        S_EV_DEC: if (bdi_ov || fpc_ov) begin
          ev_line <= bdi_ov ? bdi_ol : fpc_ol;
          st      <= S_EV_WR;
        end
        S_EV_WR: if (mem_req_ready) begin
          ev_evict     <= 1'b1;
          ev_writeback <= 1'b1;
          tags_q[eslot].valid <= 1'b0;
          if (evict_m[0]) evict_m[0] <= 1'b0; else evict_m[1] <= 1'b0;
          st <= (evict_m[0] && evict_m[1]) ? S_EV_RD : S_WRITE;
        end
        S_WRITE: begin
          tag_t nt;
          nt.valid = 1'b1;
          nt.dirty = r.write;
          nt.tag   = tag_i;
          nt.meta  = nmeta;
          for (int i = 0; i < SLOTS; i++) vld[set_i][i] <= (i == int'(tslot)) ? 1'b1 : tags_q[i].valid;
          tags_q[tslot]         <= nt;
          if (nmeta.scheme == SCH_FPC)   ev_store_fpc <= 1'b1;
          else if (nmeta.enc == BDI_RAW) ev_store_raw <= 1'b1;
          else                           ev_store_bdi <= 1'b1;
          rsp_q.write_ack <= r.write;
          rsp_q.dst   <= r.src;
          rsp_q.addr  <= r.addr;
          rsp_q.hit   <= hit_q;
          rsp_q.meta  <= nmeta;
          rsp_q.cdata <= r.write ? '0 : ndata;
          st <= S_RESP;
        end
        S_RESP: if (rsp_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // tag and data array writes (segments of the target slot only)
  always_ff @(posedge clk) begin
    if (st == S_WRITE) begin
      tag_mem[set_i][tslot] <= '{valid: 1'b1, dirty: r.write, tag: tag_i, meta: nmeta};
      for (int s = 0; s < SEGS; s++) begin
        if (!tslot[0] && s < int'(nmeta.segs))
          dmem[{set_i, tslot[SLOT_W-1:1]}][s] <= ndata[s*SEG_BITS +: SEG_BITS];
        else if (tslot[0] && s >= SEGS - int'(nmeta.segs))
          dmem[{set_i, tslot[SLOT_W-1:1]}][s] <=
            ndata[(s - (SEGS - int'(nmeta.segs)))*SEG_BITS +: SEG_BITS];
      end
    end
  end

  assign req_ready     = (st == S_IDLE);
  assign rsp_valid     = (st == S_RESP);
  assign rsp           = rsp_q;
  assign mem_req_valid = (st == S_MEMRD) || (st == S_EV_WR);
  assign mem_req_write = (st == S_EV_WR);
  assign mem_req_addr  = (st == S_EV_WR) ? {ev_tag, set_i, NODE_ID} : r.addr;
  assign mem_req_wdata = ev_line;
endmodule
