// tb_hybrid_comp_top: end-to-end test of the whole 16-tile compressed L2 at
// its full size (4 MB, 512 sets per bank, 8 physical ways, doubled tags).
//
// A behavioural DRAM answers each bank's memory port after MEM_LAT cycles;
// its initial content is generated per line address with several data
// patterns. The test keeps a shadow copy of every line and checks each read
// response against it. Phases:
//   1. reads and writes from single cores: local and remote blocks, lines
//      that FPC or BDI compress best, BDI-only and incompressible lines;
//   2. criticality: ROB-stalling commits make a PC critical, after which a
//      non-local write with that PC is stored in BDI form, not FPC;
//   3. one set of one bank is overfilled with dirty lines to force evictions
//      and write-backs, then all are read back;
//   4. all 16 cores issue random traffic at once through the mesh.
// Each mechanism (local/remote access, hit, miss, eviction, write-back, BDI,
// FPC and raw storage, FPC decompression overlapped with flit arrival,
// critical line kept in BDI form) is counted; one that never happens counts
// as a failure. The latency of a local BDI read hit is also checked.
module tb_hybrid_comp_top;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int MEM_LAT = 30;
  localparam int PC_W    = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [NODES-1:0]                core_req_valid = '0, core_req_ready, core_req_write = '0;
  logic [NODES-1:0][LADDR_W-1:0]   core_req_addr = '0;
  logic [NODES-1:0][LINE_BITS-1:0] core_req_wdata = '0;
  logic [NODES-1:0][PC_W-1:0]      core_req_pc = '0;
  logic [NODES-1:0]                core_rsp_valid, core_rsp_write_ack, core_rsp_hit;
  logic [NODES-1:0][LADDR_W-1:0]   core_rsp_addr;
  logic [NODES-1:0][LINE_BITS-1:0] core_rsp_data;
  logic [NODES-1:0]                commit_valid = '0, commit_is_load = '0, commit_rob_stall = '0;
  logic [NODES-1:0][PC_W-1:0]      commit_pc = '0;
  logic [NODES-1:0]                mem_req_valid, mem_req_ready, mem_req_write;
  logic [NODES-1:0][LADDR_W-1:0]   mem_req_addr;
  logic [NODES-1:0][LINE_BITS-1:0] mem_req_wdata, mem_rsp_data;
  logic [NODES-1:0]                mem_rsp_valid;
  logic [NODES-1:0][9:0]           ev;

  hybrid_comp_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural DRAM ----------------
  line_t dram [logic [LADDR_W-1:0]];
  function automatic line_t dram_init(logic [LADDR_W-1:0] a);
    return gen_line(int'(a[7:4]) % 12, int'(a[31:0]) + 1);
  endfunction

  int                 busy_until [NODES];
  logic [NODES-1:0]   pend = '0;
  logic [LADDR_W-1:0] pa [NODES];
  assign mem_req_ready = ~pend;
  always @(posedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      mem_rsp_valid[n] <= 1'b0;
      if (mem_req_valid[n] && !pend[n]) begin
        if (mem_req_write[n]) dram[mem_req_addr[n]] = mem_req_wdata[n];
        else begin
          pend[n] <= 1'b1; pa[n] <= mem_req_addr[n]; busy_until[n] <= cyc + MEM_LAT;
        end
      end
      if (pend[n] && cyc >= busy_until[n]) begin
        pend[n] <= 1'b0;
        mem_rsp_valid[n] <= 1'b1;
        mem_rsp_data[n]  <= dram.exists(pa[n]) ? dram[pa[n]] : dram_init(pa[n]);
      end
    end
  end

  // ---------------- shadow and statistics ----------------
  line_t shadow [logic [LADDR_W-1:0]];
  function automatic line_t expect_line(logic [LADDR_W-1:0] a);
    return shadow.exists(a) ? shadow[a] : dram_init(a);
  endfunction

  int evcnt [10];
  always @(posedge clk) for (int n = 0; n < NODES; n++) for (int e = 0; e < 10; e++) if (ev[n][e]) evcnt[e]++;

  // one core operation; returns latency in cycles
  task automatic op(int node, bit wr, logic [LADDR_W-1:0] a, line_t d, logic [PC_W-1:0] pc,
                    output int lat, output bit hit);
    int t0;
    @(negedge clk);
    while (!core_req_ready[node]) @(negedge clk);
    core_req_valid[node] = 1; core_req_write[node] = wr; core_req_addr[node] = a;
    core_req_wdata[node] = d; core_req_pc[node] = pc;
    t0 = cyc;
    @(negedge clk);
    core_req_valid[node] = 0;
    while (!core_rsp_valid[node]) @(negedge clk);
    lat = cyc - t0;
    hit = core_rsp_hit[node];
    checks++;
    if (core_rsp_addr[node] != a || core_rsp_write_ack[node] != wr) begin
      failures++;
      $display("node %0d: wrong response for %h", node, a);
    end
    if (wr) shadow[a] = d;
    else begin
      checks++;
      if (core_rsp_data[node] != expect_line(a)) begin
        failures++;
        $display("node %0d: data mismatch at %h (cycle %0d)", node, a, cyc);
      end
    end
  endtask

  function automatic logic [LADDR_W-1:0] mk_addr(int bank, int set, int tag);
    return {LADDR_W'(tag) << 13} | (LADDR_W'(set) << 4) | LADDR_W'(bank);
  endfunction

  int n_crit_bdi = 0, lat_local = -1, ndone = 0;

  initial begin
    int lat;
    bit hit;
    int f0, f1;
    logic [LADDR_W-1:0] a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- phase 1: single-core accesses ----
    for (int k = 0; k < 12; k++) begin
      a = mk_addr(5, 10 + k, 3);                 // home bank 5
      op(5, 0, a, '0, 0, lat, hit);               // local miss
      op(5, 0, a, '0, 0, lat, hit);               // local hit
      checks++;
      if (!hit) failures++;
      op(0, 0, a, '0, 0, lat, hit);               // remote (3 hops) hit
      op(15, 1, a, gen_line(k, 99 + k), 0, lat, hit);   // remote write
      op(10, 0, a, '0, 0, lat, hit);              // remote read of written line
      op(5, 0, a, '0, 0, lat, hit);
    end
    // local BDI read hit latency: zero line stored locally
    a = mk_addr(6, 40, 1);
    op(6, 1, a, '0, 0, lat, hit);
    op(6, 0, a, '0, 0, lat, hit);
    lat_local = lat;
    checks++;
    if (lat != HIT_EXPECT) begin
      failures++;
      $display("local BDI hit latency %0d, expected %0d", lat, HIT_EXPECT);
    end

    // ---- phase 2: criticality predictor ----
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      commit_valid[2] = 1; commit_is_load[2] = 1; commit_pc[2] = 32'h0000_4A00; commit_rob_stall[2] = 1;
    end
    @(negedge clk); commit_valid[2] = 0;
    f0 = evcnt[5];
    op(2, 1, mk_addr(9, 50, 7), gen_line(6, 5), 32'h0000_4A00, lat, hit);  // critical: BDI
    f1 = evcnt[5];
    checks++;
    if (f1 != f0) begin failures++; $display("critical line stored as FPC"); end
    else n_crit_bdi++;
    op(2, 1, mk_addr(9, 51, 7), gen_line(6, 5), 32'h0000_7700, lat, hit);  // not critical: FPC
    checks++;
    if (evcnt[5] == f1) begin failures++; $display("non-critical FPC line not stored as FPC"); end
    op(2, 0, mk_addr(9, 50, 7), '0, 0, lat, hit);
    op(2, 0, mk_addr(9, 51, 7), '0, 0, lat, hit);

    // ---- phase 3: overfill one set with dirty lines ----
    for (int t = 0; t < 40; t++)
      op(t % 16, 1, mk_addr(12, 77, 100 + t), gen_line(t, 500 + t), 0, lat, hit);
    for (int t = 0; t < 40; t++)
      op((t * 7) % 16, 0, mk_addr(12, 77, 100 + t), '0, 0, lat, hit);

    // ---- phase 4: all cores at once ----
    for (int n = 0; n < NODES; n++) begin
      fork
        automatic int nn = n;
        begin
          int l2; bit h2;
          for (int i = 0; i < 25; i++) begin
            logic [LADDR_W-1:0] aa;
            aa = mk_addr($urandom_range(0, 15), 200 + nn, $urandom_range(0, 3));
            op(nn, $urandom_range(0, 2) == 0, aa, gen_line($urandom_range(0, 11), nn * 1000 + i),
               0, l2, h2);
          end
          ndone++;
        end
      join_none
    end
    while (ndone < NODES) @(negedge clk);

    // ---- mechanism coverage ----
    begin
      string names [10] = '{"hit", "miss", "evict", "writeback", "store_bdi", "store_fpc",
                            "store_raw", "local", "remote", "fpc_overlap"};
      for (int e = 0; e < 10; e++) begin
        $display("%-12s %0d", names[e], evcnt[e]);
        checks++;
        if (evcnt[e] == 0) begin failures++; $display("mechanism %s never happened", names[e]); end
      end
      $display("critical_bdi %0d  local BDI hit latency %0d", n_crit_bdi, lat_local);
      checks++;
      if (n_crit_bdi == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request accepted (1) -> NI hands it to the bank (1) -> 10-cycle bank
  // hit -> 1-cycle BDI decompression -> response register (1)
  localparam int HIT_EXPECT = 14;
endmodule
