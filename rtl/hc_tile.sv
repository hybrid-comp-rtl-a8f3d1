// hc_tile: one tile of the mesh, as in the tiled-CMP picture of the design:
// a router, the network interface, one compressed L2 bank and the core's
// criticality predictor table. The core itself and its L1 caches are not
// part of this RTL: the core's L2 requests, its responses and its ROB commit
// events are ports. The bank's memory port is also brought out.
//
// Router ports 0..3 (N, E, S, W) are the mesh links; port 4 is wired to the
// network interface. Timing is that of the parts: 10-cycle bank hit
// (HIT_CYCLES), 2 cycles per router hop, 1-cycle BDI and 5-cycle FPC
// decompression (2 cycles after the last flit when overlapped).
module hc_tile
  import hc_pkg::*;
#(
  parameter int X          = 0,
  parameter int Y          = 0,
  parameter int SETS       = 512,
  parameter int PWAYS      = 8,
  parameter int HIT_CYCLES = 10,
  parameter int BUF_DEPTH  = 4,
  parameter int PC_W       = 32,
  parameter int CPT_ENTRIES   = 64,
  parameter int CPT_THRESHOLD = 4
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
  input  logic                     commit_valid,
  input  logic                     commit_is_load,
  input  logic [PC_W-1:0]          commit_pc,
  input  logic                     commit_rob_stall,
  // memory
  output logic                     mem_req_valid,
  input  logic                     mem_req_ready,
  output logic                     mem_req_write,
  output logic [LADDR_W-1:0]       mem_req_addr,
  output logic [LINE_BITS-1:0]     mem_req_wdata,
  input  logic                     mem_rsp_valid,
  input  logic [LINE_BITS-1:0]     mem_rsp_data,
  // mesh links, index 0..3 = N, E, S, W
  input  flit_t [3:0]              link_in_flit,
  input  logic  [3:0]              link_in_valid,
  output logic  [3:0][NUM_VC-1:0]  link_in_credit,
  output flit_t [3:0]              link_out_flit,
  output logic  [3:0]              link_out_valid,
  input  logic  [3:0][NUM_VC-1:0]  link_out_credit,
  // statistics: hit, miss, evict, writeback, store_bdi, store_fpc,
  // store_raw, local, remote, fpc_overlap
  output logic  [9:0]              ev
);
  localparam logic [NODE_W-1:0] NODE_ID = NODE_W'(Y * MESH_X + X);

  flit_t [4:0]             r_in_flit, r_out_flit;
  logic  [4:0]             r_in_valid, r_out_valid;
  logic  [4:0][NUM_VC-1:0] r_credit_out, r_credit_in;

  flit_t             inj_flit, ej_flit;
  logic              inj_valid, ej_valid;
  logic [NUM_VC-1:0] inj_credit, ej_credit;

  always_comb begin
    r_in_flit[3:0]   = link_in_flit;
    r_in_valid[3:0]  = link_in_valid;
    r_credit_in[3:0] = link_out_credit;
    r_in_flit[4]     = inj_flit;
    r_in_valid[4]    = inj_valid;
    r_credit_in[4]   = ej_credit;
  end
  assign link_in_credit = r_credit_out[3:0];
  assign link_out_flit  = r_out_flit[3:0];
  assign link_out_valid = r_out_valid[3:0];
  assign inj_credit     = r_credit_out[4];
  assign ej_flit        = r_out_flit[4];
  assign ej_valid       = r_out_valid[4];

  mesh_router #(.X(X), .Y(Y), .BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk, .rst_n,
    .in_flit(r_in_flit), .in_valid(r_in_valid), .credit_out(r_credit_out),
    .out_flit(r_out_flit), .out_valid(r_out_valid), .credit_in(r_credit_in));

  logic [PC_W-1:0] cpt_pc;
  logic            cpt_critical;
  cpt #(.ENTRIES(CPT_ENTRIES), .PC_W(PC_W), .THRESHOLD(CPT_THRESHOLD)) u_cpt (
    .clk, .rst_n, .commit_valid, .commit_is_load, .commit_pc, .commit_rob_stall,
    .lookup_pc(cpt_pc), .lookup_critical(cpt_critical));

  logic      bank_req_valid, bank_req_ready, bank_rsp_valid, bank_rsp_ready;
  bank_req_t bank_req;
  bank_rsp_t bank_rsp;

  hc_ni #(.NODE_ID(NODE_ID), .EJ_DEPTH(BUF_DEPTH), .INJ_CREDITS(BUF_DEPTH), .PC_W(PC_W)) u_ni (
    .clk, .rst_n,
    .core_req_valid, .core_req_ready, .core_req_write, .core_req_addr, .core_req_wdata,
    .core_req_pc, .core_rsp_valid, .core_rsp_write_ack, .core_rsp_hit, .core_rsp_addr,
    .core_rsp_data, .cpt_pc, .cpt_critical,
    .bank_req_valid, .bank_req_ready, .bank_req, .bank_rsp_valid, .bank_rsp_ready, .bank_rsp,
    .inj_flit, .inj_valid, .inj_credit, .ej_flit, .ej_valid, .ej_credit,
    .ev_local(ev[7]), .ev_remote(ev[8]), .ev_fpc_overlap(ev[9]));

  llc_bank #(.SETS(SETS), .PWAYS(PWAYS), .HIT_CYCLES(HIT_CYCLES), .NODE_ID(NODE_ID)) u_bank (
    .clk, .rst_n,
    .req_valid(bank_req_valid), .req_ready(bank_req_ready), .req(bank_req),
    .rsp_valid(bank_rsp_valid), .rsp_ready(bank_rsp_ready), .rsp(bank_rsp),
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .ev_hit(ev[0]), .ev_miss(ev[1]), .ev_evict(ev[2]), .ev_writeback(ev[3]),
    .ev_store_bdi(ev[4]), .ev_store_fpc(ev[5]), .ev_store_raw(ev[6]));
endmodule
