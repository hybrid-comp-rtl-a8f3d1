// hybrid_comp_top: the criticality-aware compressed last-level cache of a
// 16-core chip: a 4x4 mesh of tiles (hc_tile), each with a router, a
// network interface with the decompression logic, a 256 KB compressed L2
// bank (4 MB in all, 8-way, 64-byte lines) and a criticality predictor.
//
// Lines are interleaved over the banks by the low four line-address bits.
// A line is stored BDI-compressed when it is critical (the requesting core
// is local to its bank, or the core's predictor flags the load) and as the
// smaller of BDI and FPC otherwise; the tag array is doubled so a bank holds
// up to twice its uncompressed capacity.
//
// Ports are per node, indexed by node id = y*4 + x: the core's L2 request
// and response channel and its ROB commit events, and the bank's memory
// channel. Mesh links between neighbouring tiles are internal; links at the
// edge of the mesh are tied off. ev[n] carries each tile's event pulses (see
// hc_tile).
module hybrid_comp_top
  import hc_pkg::*;
#(
  parameter int SETS       = 512,   // per bank: 512 sets * 8 ways * 64 B = 256 KB
  parameter int PWAYS      = 8,
  parameter int HIT_CYCLES = 10,
  parameter int BUF_DEPTH  = 4,
  parameter int PC_W       = 32,
  parameter int CPT_ENTRIES   = 64,
  parameter int CPT_THRESHOLD = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NODES-1:0]                     core_req_valid,
  output logic [NODES-1:0]                     core_req_ready,
  input  logic [NODES-1:0]                     core_req_write,
  input  logic [NODES-1:0][LADDR_W-1:0]        core_req_addr,
  input  logic [NODES-1:0][LINE_BITS-1:0]      core_req_wdata,
  input  logic [NODES-1:0][PC_W-1:0]           core_req_pc,
  output logic [NODES-1:0]                     core_rsp_valid,
  output logic [NODES-1:0]                     core_rsp_write_ack,
  output logic [NODES-1:0]                     core_rsp_hit,
  output logic [NODES-1:0][LADDR_W-1:0]        core_rsp_addr,
  output logic [NODES-1:0][LINE_BITS-1:0]      core_rsp_data,
  input  logic [NODES-1:0]                     commit_valid,
  input  logic [NODES-1:0]                     commit_is_load,
  input  logic [NODES-1:0][PC_W-1:0]           commit_pc,
  input  logic [NODES-1:0]                     commit_rob_stall,
  output logic [NODES-1:0]                     mem_req_valid,
  input  logic [NODES-1:0]                     mem_req_ready,
  output logic [NODES-1:0]                     mem_req_write,
  output logic [NODES-1:0][LADDR_W-1:0]        mem_req_addr,
  output logic [NODES-1:0][LINE_BITS-1:0]      mem_req_wdata,
  input  logic [NODES-1:0]                     mem_rsp_valid,
  input  logic [NODES-1:0][LINE_BITS-1:0]      mem_rsp_data,
  output logic [NODES-1:0][9:0]                ev
);
  localparam int P_N = 0, P_E = 1, P_S = 2, P_W = 3;

  flit_t [NODES-1:0][3:0]              lo_flit, li_flit;
  logic  [NODES-1:0][3:0]              lo_valid, li_valid;
  logic  [NODES-1:0][3:0][NUM_VC-1:0]  li_credit, lo_credit;

  // link from node (x,y) port d to its neighbour's opposite port
  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;
      for (genvar d = 0; d < 4; d++) begin : g_d
        localparam int NX  = (d == P_E) ? x + 1 : (d == P_W) ? x - 1 : x;
        localparam int NY  = (d == P_S) ? y + 1 : (d == P_N) ? y - 1 : y;
        localparam int OPP = (d + 2) % 4;
        if (NX >= 0 && NX < MESH_X && NY >= 0 && NY < MESH_Y) begin : g_link
          localparam int M = NY * MESH_X + NX;
          assign li_flit[N][d]   = lo_flit[M][OPP];
          assign li_valid[N][d]  = lo_valid[M][OPP];
          assign lo_credit[N][d] = li_credit[M][OPP];
        end else begin : g_edge
          assign li_flit[N][d]   = '0;
          assign li_valid[N][d]  = 1'b0;
          assign lo_credit[N][d] = '0;
        end
      end

      hc_tile #(.X(x), .Y(y), .SETS(SETS), .PWAYS(PWAYS), .HIT_CYCLES(HIT_CYCLES),
                .BUF_DEPTH(BUF_DEPTH), .PC_W(PC_W), .CPT_ENTRIES(CPT_ENTRIES),
                .CPT_THRESHOLD(CPT_THRESHOLD)) u_tile (
        .clk, .rst_n,
        .core_req_valid(core_req_valid[N]), .core_req_ready(core_req_ready[N]),
        .core_req_write(core_req_write[N]), .core_req_addr(core_req_addr[N]),
        .core_req_wdata(core_req_wdata[N]), .core_req_pc(core_req_pc[N]),
        .core_rsp_valid(core_rsp_valid[N]), .core_rsp_write_ack(core_rsp_write_ack[N]),
        .core_rsp_hit(core_rsp_hit[N]), .core_rsp_addr(core_rsp_addr[N]),
        .core_rsp_data(core_rsp_data[N]),
        .commit_valid(commit_valid[N]), .commit_is_load(commit_is_load[N]),
        .commit_pc(commit_pc[N]), .commit_rob_stall(commit_rob_stall[N]),
        .mem_req_valid(mem_req_valid[N]), .mem_req_ready(mem_req_ready[N]),
        .mem_req_write(mem_req_write[N]), .mem_req_addr(mem_req_addr[N]),
        .mem_req_wdata(mem_req_wdata[N]), .mem_rsp_valid(mem_rsp_valid[N]),
        .mem_rsp_data(mem_rsp_data[N]),
        .link_in_flit(li_flit[N]), .link_in_valid(li_valid[N]), .link_in_credit(li_credit[N]),
        .link_out_flit(lo_flit[N]), .link_out_valid(lo_valid[N]), .link_out_credit(lo_credit[N]),
        .ev(ev[N]));
    end
  end
endmodule
