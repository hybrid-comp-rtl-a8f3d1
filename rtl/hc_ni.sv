// hc_ni: network interface of a tile. It joins the core, the local L2 bank
// and the router's local port, and holds the decompression logic for lines
// arriving at this tile.
//
// Core side: one outstanding request. The request's PC is looked up in the
// criticality predictor and the answer travels with the request. The home
// bank is given by the low line-address bits (static S-NUCA mapping). A
// request for the local bank goes straight to it; any other request becomes
// a packet on VC0: a head flit, plus four data flits for a write.
//
// Bank side: requests from the local core and from the network (VC0
// packets, reassembled) are served alternately. A response for the local
// core is taken whole; one for a remote core becomes a VC1 packet: a head
// flit carrying the header, including the compressed line's metadata and its
// first 48 bits (the FPC prefixes), then ceil(segments/2) data flits with the
// compressed payload. Write acknowledgements are one flit.
//
// Decompression: a read response (local or remote) is decompressed here.
// BDI takes 1 cycle after the whole line is present. For FPC the head flit
// starts stages 1-3 of fpc_decompressor as soon as it arrives and the last
// flit completes stages 4-5, so a remote FPC line costs max(head + 5,
// last flit + 2) cycles; a local FPC line costs the full 5 cycles.
//
// Router side: inj_* feeds the router's local input (credits per VC in
// inj_credit); ej_* is the router's local output, buffered here in one FIFO
// per VC of EJ_DEPTH flits, with credits returned on ej_credit.
// Placing decompression at the receiving tile and starting FPC from the head
// flit follow the document; packet formats, the single outstanding request
// and arbitration are this design's choices.
module hc_ni
  import hc_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID  = '0,
  parameter int                EJ_DEPTH = 4,   // ejection FIFO per VC
  parameter int                INJ_CREDITS = 4, // router local input FIFO per VC
  parameter int                PC_W     = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // core
  input  logic                     core_req_valid,
  output logic                     core_req_ready,
  input  logic                     core_req_write,
  input  logic [LADDR_W-1:0]       core_req_addr,
  input  logic [LINE_BITS-1:0]     core_req_wdata,
  input  logic [PC_W-1:0]          core_req_pc,
  output logic                     core_rsp_valid,
  output logic                     core_rsp_write_ack,
  output logic                     core_rsp_hit,
  output logic [LADDR_W-1:0]       core_rsp_addr,
  output logic [LINE_BITS-1:0]     core_rsp_data,
  // criticality predictor lookup
  output logic [PC_W-1:0]          cpt_pc,
  input  logic                     cpt_critical,
  // local bank
  output logic                     bank_req_valid,
  input  logic                     bank_req_ready,
  output bank_req_t                bank_req,
  input  logic                     bank_rsp_valid,
  output logic                     bank_rsp_ready,
  input  bank_rsp_t                bank_rsp,
  // router local port
  output flit_t                    inj_flit,
  output logic                     inj_valid,
  input  logic [NUM_VC-1:0]        inj_credit,
  input  flit_t                    ej_flit,
  input  logic                     ej_valid,
  output logic [NUM_VC-1:0]        ej_credit,
  // statistics
  output logic                     ev_local,
  output logic                     ev_remote,
  output logic                     ev_fpc_overlap
);
  localparam int HDR_W   = $bits(pkt_hdr_t);
  localparam int PTR_W   = $clog2(EJ_DEPTH);
  localparam int CNT_W   = $clog2((EJ_DEPTH > INJ_CREDITS ? EJ_DEPTH : INJ_CREDITS) + 1);

  // =============== core request ===============
  logic       take_local;    // bank response for the local core this cycle
  logic       outstanding;
  logic       lreq_v;        // request for the local bank waiting
  bank_req_t  lreq;
  logic       qtx_v;         // request packet being sent
  pkt_hdr_t   qtx_hdr;
  logic [LINE_BITS-1:0] qtx_data;
  logic [2:0] qtx_i;         // flit index
  logic       qtx_go;        // flit of qtx sent this cycle

  logic [NODE_W-1:0] home;
  assign home           = home_node(core_req_addr);
  assign cpt_pc         = core_req_pc;
  assign core_req_ready = !outstanding;

  // =============== ejection FIFOs ===============
  flit_t            ejq  [NUM_VC][EJ_DEPTH];
  logic [PTR_W-1:0] ejr  [NUM_VC];
  logic [PTR_W-1:0] ejw  [NUM_VC];
  logic [CNT_W-1:0] ejc  [NUM_VC];
  logic             ejpop [NUM_VC];
  flit_t            ejh  [NUM_VC];
  always_comb for (int v = 0; v < NUM_VC; v++) ejh[v] = ejq[v][ejr[v]];

  // =============== network request reassembly (VC0) ===============
  logic       rreq_v;        // complete remote request waiting for the bank
  bank_req_t  rreq;
  logic [2:0] rcnt;
  pkt_hdr_t   ejh0_hdr;
  assign ejh0_hdr = pkt_hdr_t'(ejh[0].data[HDR_W-1:0]);
  assign ejpop[0] = (ejc[0] != '0) && !rreq_v;

  // =============== bank arbitration ===============
  logic last_remote;
  logic pick_remote;
  assign pick_remote    = rreq_v && (!lreq_v || !last_remote);
  assign bank_req_valid = lreq_v || rreq_v;
  assign bank_req       = pick_remote ? rreq : lreq;

  // =============== bank response transmit (VC1) ===============
  logic       ptx_v;
  pkt_hdr_t   ptx_hdr;
  logic [LINE_BITS-1:0] ptx_data;
  logic [2:0] ptx_i, ptx_n;  // flit index, number of data flits
  logic       ptx_go;
  logic       rsp_local;
  assign rsp_local      = bank_rsp.dst == NODE_ID;
  assign bank_rsp_ready = rsp_local || !ptx_v;

  // =============== injection credits and mux ===============
  logic [CNT_W-1:0] icred [NUM_VC];
  always_comb begin
    ptx_go   = ptx_v && icred[1] != '0;
    qtx_go   = qtx_v && icred[0] != '0 && !ptx_go;
    inj_valid = ptx_go || qtx_go;
    inj_flit  = '0;
    if (ptx_go) begin
      inj_flit.vc   = 1'b1;
      inj_flit.dst  = ptx_hdr.dst;
      inj_flit.head = (ptx_i == 3'd0);
      inj_flit.tail = (ptx_i == ptx_n);
      inj_flit.data = (ptx_i == 3'd0) ? FLIT_DATA_W'(ptx_hdr)
                                      : ptx_data[(int'(ptx_i) - 1)*FLIT_DATA_W +: FLIT_DATA_W];
    end else if (qtx_go) begin
      inj_flit.vc   = 1'b0;
      inj_flit.dst  = qtx_hdr.dst;
      inj_flit.head = (qtx_i == 3'd0);
      inj_flit.tail = (qtx_hdr.ptype == PKT_RD_REQ) || (qtx_i == 3'(FLITS_PER_LINE));
      inj_flit.data = (qtx_i == 3'd0) ? FLIT_DATA_W'(qtx_hdr)
                                      : qtx_data[(int'(qtx_i) - 1)*FLIT_DATA_W +: FLIT_DATA_W];
    end
  end

  // =============== response receive and decompression ===============
  pkt_hdr_t   rx_hdr;
  logic [LINE_BITS-1:0] rx_buf;
  logic [2:0] rx_i;
  pkt_hdr_t   ejh1_hdr;
  assign ejh1_hdr = pkt_hdr_t'(ejh[1].data[HDR_W-1:0]);
  assign ejpop[1] = (ejc[1] != '0) && !take_local;

  // decompressor inputs (combinational from the local response or ej FIFO)
  logic                 bdi_go, fh_go, fd_go;
  bdi_enc_e             bdi_enc;
  logic [LINE_BITS-1:0] dec_data;
  logic [FPC_PFX_BITS-1:0] fh_pfx;
  logic                 bdi_ov, fpc_ov, fpc_rdy;
  logic [LINE_BITS-1:0] bdi_ol, fpc_ol;
  logic                 d_hit, d_wack_now;
  logic [LADDR_W-1:0]   d_addr;
  logic [LINE_BITS-1:0] rx_full;

  assign take_local = bank_rsp_valid && rsp_local;

  always_comb begin
    bdi_go = 1'b0; fh_go = 1'b0; fd_go = 1'b0; d_wack_now = 1'b0;
    bdi_enc = BDI_RAW; dec_data = '0; fh_pfx = '0;
    rx_full = rx_buf;
    if (ejpop[1] && !ejh[1].head)
      rx_full[(int'(rx_i) - 1)*FLIT_DATA_W +: FLIT_DATA_W] = ejh[1].data;
    if (take_local) begin
      if (bank_rsp.write_ack) d_wack_now = 1'b1;
      else if (bank_rsp.meta.scheme == SCH_FPC) begin
        fh_go = 1'b1; fd_go = 1'b1; fh_pfx = bank_rsp.cdata[FPC_PFX_BITS-1:0];
        dec_data = bank_rsp.cdata;
      end else begin
        bdi_go = 1'b1; bdi_enc = bank_rsp.meta.enc; dec_data = bank_rsp.cdata;
      end
    end else if (ejpop[1]) begin
      if (ejh[1].head) begin
        if (ejh1_hdr.ptype == PKT_WR_ACK) d_wack_now = 1'b1;
        else if (ejh1_hdr.meta.scheme == SCH_FPC) begin
          fh_go  = 1'b1;
          fh_pfx = ejh1_hdr.pfx;
        end
      end else if (ejh[1].tail) begin
        dec_data = rx_full;
        if (rx_hdr.meta.scheme == SCH_FPC) fd_go = 1'b1;
        else begin
          bdi_go = 1'b1; bdi_enc = rx_hdr.meta.enc;
        end
      end
    end
  end

  bdi_decompressor u_bdi (.clk, .rst_n, .in_valid(bdi_go), .enc(bdi_enc), .payload(dec_data),
                          .out_valid(bdi_ov), .out_line(bdi_ol));
  fpc_decompressor u_fpc (.clk, .rst_n, .in_ready(fpc_rdy), .hdr_valid(fh_go), .hdr_pfx(fh_pfx),
                          .data_valid(fd_go), .data(dec_data), .out_valid(fpc_ov),
                          .out_line(fpc_ol));

  // =============== sequential ===============
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding <= 1'b0; lreq_v <= 1'b0; lreq <= '0;
      qtx_v <= 1'b0; qtx_hdr <= '0; qtx_data <= '0; qtx_i <= '0;
      rreq_v <= 1'b0; rreq <= '0; rcnt <= '0;
      last_remote <= 1'b0;
      ptx_v <= 1'b0; ptx_hdr <= '0; ptx_data <= '0; ptx_i <= '0; ptx_n <= '0;
      rx_hdr <= '0; rx_buf <= '0; rx_i <= '0;
      d_hit <= 1'b0; d_addr <= '0;
      core_rsp_valid <= 1'b0; core_rsp_write_ack <= 1'b0; core_rsp_hit <= 1'b0;
      core_rsp_addr <= '0; core_rsp_data <= '0;
      ev_local <= 1'b0; ev_remote <= 1'b0; ev_fpc_overlap <= 1'b0;
      ej_credit <= '0;
      for (int v = 0; v < NUM_VC; v++) begin
        ejr[v] <= '0; ejw[v] <= '0; ejc[v] <= '0; icred[v] <= CNT_W'(INJ_CREDITS);
      end
    end else begin
      ev_local <= 1'b0; ev_remote <= 1'b0; ev_fpc_overlap <= 1'b0;
      core_rsp_valid <= 1'b0;
      ej_credit <= '0;

      // ---- core request accept ----
      if (core_req_valid && !outstanding) begin
        outstanding <= 1'b1;
        if (home == NODE_ID) begin
          ev_local    <= 1'b1;
          lreq_v      <= 1'b1;
          lreq.write  <= core_req_write;
          lreq.src    <= NODE_ID;
          lreq.addr   <= core_req_addr;
          lreq.crit   <= cpt_critical;
          lreq.wdata  <= core_req_wdata;
        end else begin
          ev_remote     <= 1'b1;
          qtx_v         <= 1'b1;
          qtx_i         <= '0;
          qtx_hdr       <= '0;
          qtx_hdr.ptype <= core_req_write ? PKT_WR_REQ : PKT_RD_REQ;
          qtx_hdr.src   <= NODE_ID;
          qtx_hdr.dst   <= home;
          qtx_hdr.addr  <= core_req_addr;
          qtx_hdr.crit  <= cpt_critical;
          qtx_data      <= core_req_wdata;
        end
      end
      if (qtx_go) begin
        qtx_i <= qtx_i + 3'd1;
        if (inj_flit.tail) qtx_v <= 1'b0;
      end

      // ---- ejection FIFOs ----
      for (int v = 0; v < NUM_VC; v++) begin
        logic push;
        push = ej_valid && ej_flit.vc == 1'(v);
        if (push) begin
          ejq[v][ejw[v]] <= ej_flit;
          ejw[v] <= PTR_W'((int'(ejw[v]) + 1) % EJ_DEPTH);
        end
        if (ejpop[v]) begin
          ejr[v] <= PTR_W'((int'(ejr[v]) + 1) % EJ_DEPTH);
          ej_credit[v] <= 1'b1;
        end
        ejc[v] <= ejc[v] + CNT_W'(push) - CNT_W'(ejpop[v]);
      end

      // ---- VC0: reassemble requests for this bank ----
      if (ejpop[0]) begin
        if (ejh[0].head) begin
          rreq.write <= (ejh0_hdr.ptype == PKT_WR_REQ);
          rreq.src   <= ejh0_hdr.src;
          rreq.addr  <= ejh0_hdr.addr;
          rreq.crit  <= ejh0_hdr.crit;
          rcnt       <= 3'd0;
          if (ejh[0].tail) rreq_v <= 1'b1;
        end else begin
          rreq.wdata[int'(rcnt)*FLIT_DATA_W +: FLIT_DATA_W] <= ejh[0].data;
          rcnt <= rcnt + 3'd1;
          if (ejh[0].tail) rreq_v <= 1'b1;
        end
      end

      // ---- bank request handshake ----
      if (bank_req_valid && bank_req_ready) begin
        last_remote <= pick_remote;
        if (pick_remote) rreq_v <= 1'b0; else lreq_v <= 1'b0;
      end

      // ---- bank response to a remote core ----
      if (bank_rsp_valid && !rsp_local && !ptx_v) begin
        ptx_v         <= 1'b1;
        ptx_i         <= '0;
        ptx_hdr       <= '0;
        ptx_hdr.ptype <= bank_rsp.write_ack ? PKT_WR_ACK : PKT_RD_RSP;
        ptx_hdr.src   <= NODE_ID;
        ptx_hdr.dst   <= bank_rsp.dst;
        ptx_hdr.addr  <= bank_rsp.addr;
        ptx_hdr.hit   <= bank_rsp.hit;
        ptx_hdr.meta  <= bank_rsp.meta;
        ptx_hdr.pfx   <= bank_rsp.cdata[FPC_PFX_BITS-1:0];
        ptx_data      <= bank_rsp.cdata;
        ptx_n         <= bank_rsp.write_ack ? 3'd0 : 3'((int'(bank_rsp.meta.segs) + 1) / 2);
      end
      if (ptx_go) begin
        ptx_i <= ptx_i + 3'd1;
        if (inj_flit.tail) ptx_v <= 1'b0;
      end

      // ---- injection credits ----
      for (int v = 0; v < NUM_VC; v++)
        icred[v] <= icred[v] - CNT_W'(inj_valid && inj_flit.vc == 1'(v)) + CNT_W'(inj_credit[v]);

      // ---- VC1: responses for the local core ----
      if (ejpop[1]) begin
        if (ejh[1].head) begin
          rx_hdr <= ejh1_hdr;
          rx_i   <= 3'd1;
          rx_buf <= '0;
          if (ejh1_hdr.meta.scheme == SCH_FPC && !ejh[1].tail) ev_fpc_overlap <= 1'b1;
        end else begin
          rx_buf <= rx_full;
          rx_i   <= rx_i + 3'd1;
        end
      end
      // response bookkeeping
      if (take_local) begin
        d_hit  <= bank_rsp.hit;
        d_addr <= bank_rsp.addr;
      end else if (ejpop[1] && ejh[1].head) begin
        d_hit  <= ejh1_hdr.hit;
        d_addr <= ejh1_hdr.addr;
      end
      if (d_wack_now) begin
        core_rsp_valid     <= 1'b1;
        core_rsp_write_ack <= 1'b1;
        core_rsp_hit       <= take_local ? bank_rsp.hit : ejh1_hdr.hit;
        core_rsp_addr      <= take_local ? bank_rsp.addr : ejh1_hdr.addr;
        outstanding        <= 1'b0;
      end
      if (bdi_ov || fpc_ov) begin
        core_rsp_valid     <= 1'b1;
        core_rsp_write_ack <= 1'b0;
        core_rsp_hit       <= d_hit;
        core_rsp_addr      <= d_addr;
        core_rsp_data      <= bdi_ov ? bdi_ol : fpc_ol;
        outstanding        <= 1'b0;
      end
    end
  end

  // One response at a time: the FPC decompressor is free when a line starts.
  a_fpc_free: assert property (@(posedge clk) disable iff (!rst_n) fh_go |-> fpc_rdy)
    else $error("ni %0d: FPC decompressor busy", NODE_ID);
endmodule
