// mesh_router: five-port wormhole router of the 4x4 mesh that connects the
// tiles (ports N, E, S, W and the local network interface).
//
// Per input port and virtual channel a flit FIFO (the "VC identifier" of the
// router picture: an arriving flit is written into the FIFO of the VC named
// in the flit). The routing unit computes an XY (dimension-order) route for
// each head flit. VC allocation keeps the message class: a packet on VC v
// leaves on VC v of its output port, which it owns from head to tail flit
// (wormhole). The switch allocator is separable: each input picks one ready
// VC round-robin, then each output grants one input round-robin. Granted
// flits cross the crossbar into the output register.
//
// Flow control is credit based: cred[o][v] counts free FIFO places at the
// downstream router (BUF_DEPTH at reset); credit_out pulses one cycle after
// a flit leaves an input FIFO.
// Timing: a flit presented on in_valid is written into its FIFO on the next
// edge and can leave through the output register on the edge after that: 2
// cycles per hop, the per-hop latency the document gives. The router parts
// and XY routing are the document's; FIFO depth, VC count (one request and
// one response class), the allocators and the credit scheme are this
// design's choices. Node id = y*4 + x, x grows to the East, y to the South.
module mesh_router
  import hc_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int BUF_DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  flit_t [4:0]                in_flit,
  input  logic  [4:0]                in_valid,
  output logic  [4:0][NUM_VC-1:0]    credit_out,   // to upstream, per input
  output flit_t [4:0]                out_flit,
  output logic  [4:0]                out_valid,
  input  logic  [4:0][NUM_VC-1:0]    credit_in     // from downstream, per output
);
  localparam int P_N = 0, P_E = 1, P_S = 2, P_W = 3, P_L = 4;
  localparam int PTR_W = $clog2(BUF_DEPTH);
  localparam int CNT_W = $clog2(BUF_DEPTH + 1);

  // ---------------- input FIFOs ----------------
  flit_t              fifo  [5][NUM_VC][BUF_DEPTH];
  logic [PTR_W-1:0]   rdp   [5][NUM_VC];
  logic [PTR_W-1:0]   wrp   [5][NUM_VC];
  logic [CNT_W-1:0]   cnt   [5][NUM_VC];
  logic [2:0]         route [5][NUM_VC];   // output of the packet in progress
  logic               owned [5][NUM_VC];   // output VC owned by a packet
  logic [2:0]         owner [5][NUM_VC];   // which input owns it
  logic [CNT_W-1:0]   cred  [5][NUM_VC];
  logic               irr   [5];           // per-input VC round robin
  logic [2:0]         orr   [5];           // per-output input round robin

  function automatic logic [2:0] xy_route(input logic [NODE_W-1:0] dst);
    int dx, dy;
    dx = int'(dst[1:0]);
    dy = int'(dst[3:2]);
    if (dx > X) return 3'(P_E);
    if (dx < X) return 3'(P_W);
    if (dy > Y) return 3'(P_S);
    if (dy < Y) return 3'(P_N);
    return 3'(P_L);
  endfunction

  // ---------------- switch allocation ----------------
  flit_t       hd   [5][NUM_VC];
  logic        rdy  [5][NUM_VC];    // VC can send this cycle
  logic [2:0]  want [5][NUM_VC];
  logic        ireq [5];            // input has picked a VC
  logic        ivc  [5];
  logic [2:0]  iout [5];
  logic        gnt  [5];            // input granted
  logic [2:0]  osel [5];            // output -> granted input
  logic        ovld [5];

  always_comb begin
    for (int p = 0; p < 5; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        hd[p][v]   = fifo[p][v][rdp[p][v]];
        want[p][v] = hd[p][v].head ? xy_route(hd[p][v].dst) : route[p][v];
        rdy[p][v]  = (cnt[p][v] != '0) && (cred[want[p][v]][v] != '0) &&
                     (hd[p][v].head ? !owned[want[p][v]][v]
                                    : (owned[want[p][v]][v] && owner[want[p][v]][v] == 3'(p)));
      end
      // pick a VC (two VCs: rotate priority)
      ireq[p] = 1'b0;
      ivc[p]  = 1'b0;
      for (int k = 0; k < NUM_VC; k++) begin
        logic v;
        v = 1'(k) ^ irr[p];
        if (!ireq[p] && rdy[p][v]) begin
          ireq[p] = 1'b1;
          ivc[p]  = v;
        end
      end
      iout[p] = want[p][ivc[p]];
    end
    // output arbitration
    for (int o = 0; o < 5; o++) begin
      ovld[o] = 1'b0;
      osel[o] = '0;
      for (int k = 0; k < 5; k++) begin
        int p;
        p = (int'(orr[o]) + k) % 5;
        if (!ovld[o] && ireq[p] && iout[p] == 3'(o)) begin
          ovld[o] = 1'b1;
          osel[o] = 3'(p);
        end
      end
    end
    for (int p = 0; p < 5; p++) gnt[p] = ireq[p] && ovld[iout[p]] && osel[iout[p]] == 3'(p);
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 5; p++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          rdp[p][v] <= '0; wrp[p][v] <= '0; cnt[p][v] <= '0; route[p][v] <= '0;
          owned[p][v] <= 1'b0; owner[p][v] <= '0; cred[p][v] <= CNT_W'(BUF_DEPTH);
        end
        irr[p] <= 1'b0; orr[p] <= '0;
      end
      out_valid  <= '0;
      out_flit   <= '0;
      credit_out <= '0;
    end else begin
      credit_out <= '0;
      out_valid  <= '0;
      for (int p = 0; p < 5; p++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          logic push, pop;
          push = in_valid[p] && in_flit[p].vc == 1'(v);
          pop  = gnt[p] && ivc[p] == 1'(v);
          if (push) begin
            fifo[p][v][wrp[p][v]] <= in_flit[p];
            wrp[p][v] <= PTR_W'((int'(wrp[p][v]) + 1) % BUF_DEPTH);
          end
          if (pop) begin
            rdp[p][v] <= PTR_W'((int'(rdp[p][v]) + 1) % BUF_DEPTH);
            credit_out[p][v] <= 1'b1;
            if (hd[p][v].head) route[p][v] <= want[p][v];
          end
          cnt[p][v] <= cnt[p][v] + CNT_W'(push) - CNT_W'(pop);
        end
        if (gnt[p]) irr[p] <= ~ivc[p];
      end
      for (int o = 0; o < 5; o++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          logic sent;
          sent = ovld[o] && ivc[osel[o]] == 1'(v);
          cred[o][v] <= cred[o][v] - CNT_W'(sent) + CNT_W'(credit_in[o][v]);
          if (sent) begin
            if (hd[osel[o]][v].head && !hd[osel[o]][v].tail) begin
              owned[o][v] <= 1'b1;
              owner[o][v] <= osel[o];
            end else if (hd[osel[o]][v].tail) begin
              owned[o][v] <= 1'b0;
            end
          end
        end
        if (ovld[o]) begin
          out_valid[o] <= 1'b1;
          out_flit[o]  <= hd[osel[o]][ivc[osel[o]]];
          orr[o]       <= 3'((int'(osel[o]) + 1) % 5);
        end
      end
    end
  end

  // A flit is only ever written into a FIFO that has a free place.
  for (genvar p = 0; p < 5; p++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_valid[p] && cnt[p][in_flit[p].vc] == CNT_W'(BUF_DEPTH)))
      else $error("router (%0d,%0d): input %0d overflow", X, Y, p);
  end
endmodule
