// tb_llc_bank: a small llc_bank (4 sets, 2 physical ways = 4 tag slots per
// set) under random reads and writes from local and remote requesters to 40
// lines, so that lines of all sizes share ways and are evicted often.
// A behavioural memory serves misses and takes write-backs. Each read
// response must carry the reference BDI/FPC coding of the expected line in
// the form the criticality rule selects: BDI for a local requester or a
// critical write, the smaller of BDI and FPC otherwise. Hits must respond
// exactly HIT_CYCLES after the request is accepted.
module tb_llc_bank;
  import hc_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [NODE_W-1:0] ME = 4'd3;
  localparam int HIT = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic req_valid = 0, req_ready, rsp_valid, rsp_ready = 1;
  bank_req_t req = '0;
  bank_rsp_t rsp;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid = 0;
  logic [LADDR_W-1:0] mem_req_addr;
  logic [LINE_BITS-1:0] mem_req_wdata, mem_rsp_data = '0;
  logic ev_hit, ev_miss, ev_evict, ev_writeback, ev_store_bdi, ev_store_fpc, ev_store_raw;

  llc_bank #(.SETS(4), .PWAYS(2), .HIT_CYCLES(HIT), .NODE_ID(ME)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  line_t mem [logic [LADDR_W-1:0]];
  line_t shadow [logic [LADDR_W-1:0]];
  function automatic line_t mem_rd(logic [LADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : gen_line(int'(a[9:6]), int'(a) + 3);
  endfunction
  assign mem_req_ready = 1'b1;
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (mem_req_valid && mem_req_write) begin
      mem[mem_req_addr] = mem_req_wdata;
      checks++;
      if (!shadow.exists(mem_req_addr) || shadow[mem_req_addr] != mem_req_wdata) begin
        failures++;
        if (failures < 8) $display("write-back of %h: wrong data (cycle %0d) meta %p slot %0d", mem_req_addr, cyc, dut.ev_meta, dut.eslot);
      end
    end
    else if (mem_req_valid) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_data  <= mem_rd(mem_req_addr);
    end
  end

  // own random source (gen_line reseeds the simulator's generator)
  logic [31:0] rs = 32'h1234_5678;
  function automatic int rnd(int lo, int hi);
    rs = rs ^ (rs << 13); rs = rs ^ (rs >> 17); rs = rs ^ (rs << 5);
    return lo + int'(rs % 32'(hi - lo + 1));
  endfunction

  bit    scrit  [logic [LADDR_W-1:0]];   // criticality of the stored form
  int nwb = 0, nfpc = 0, nhit = 0, nrd = 0;
  always @(posedge clk) begin
    if (ev_writeback) nwb++;
    if (ev_store_fpc) nfpc++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic [LADDR_W-1:0] a;
      bit wr, cr, c, want_fpc;
      logic [NODE_W-1:0] src;
      line_t l, exp_l, pl, blk;
      int t0, enc, segs, bits;
      a   = (LADDR_W'(rnd(0, 9)) << 6) | (LADDR_W'(rnd(0, 3)) << 4) | ME;
      wr  = (rnd(0, 2) == 0);
      src = (rnd(0, 3) == 0) ? ME : NODE_W'(rnd(4, 15));
      cr  = rnd(0, 1);
      l   = gen_line(rnd(0, 11), n + 77);
      @(negedge clk);
      req_valid = 1; req.write = wr; req.src = src; req.addr = a; req.crit = cr; req.wdata = l;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      t0 = cyc + 1;   // cyc has not yet counted the accepting edge
      @(negedge clk); req_valid = 0;
      while (!rsp_valid) @(negedge clk);
      checks++;
      if (rsp.addr != a || rsp.dst != src || rsp.write_ack != wr) failures++;
      if (wr) begin
        shadow[a] = l;
        scrit[a]  = (src == ME) || cr;
      end else begin
        nrd++;
        exp_l = shadow.exists(a) ? shadow[a] : mem_rd(a);
        if (!rsp.hit) scrit[a] = (src == ME);
        else begin
          nhit++;
          checks++;
          if (cyc - t0 != HIT) begin
            failures++;
            $display("hit latency %0d", cyc - t0);
          end
        end
        c = scrit.exists(a) ? scrit[a] : 1'b0;
        bdi_best(exp_l, enc, segs, pl);
        bits = fpc_encode(exp_l, blk);
        want_fpc = !c && bits <= 512 && (bits + 63) / 64 < segs;
        checks++;
        if (want_fpc ? (rsp.meta.scheme != SCH_FPC || rsp.cdata != blk)
                     : (rsp.meta.scheme != SCH_BDI || int'(rsp.meta.enc) != enc || rsp.cdata != pl)) begin
          failures++;
          if (failures < 5) begin
            line_t p2; int e2, s2;
            bdi_best(gen_line(int'(a[9:6]), int'(a) + 3), e2, s2, p2);
            $display("read %h: wrong coding (scheme %0d enc %0d/%0d, want_fpc %0d, hit %0d, in shadow %0d, mem %0d, matches init %0d)",
                     a, rsp.meta.scheme, rsp.meta.enc, enc, want_fpc, rsp.hit, shadow.exists(a), mem.exists(a), p2 == rsp.cdata);
          end
        end
      end
    end
    checks += 3;
    if (nwb == 0)  failures++;
    if (nfpc == 0) failures++;
    if (nhit == 0) failures++;
    $display("reads %0d hits %0d writebacks %0d fpc stores %0d", nrd, nhit, nwb, nfpc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
