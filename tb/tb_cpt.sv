// tb_cpt: random load commits (some stalling the ROB) for a small set of
// PCs, some of which collide in the table; compares the critical answer of
// cpt with a reference model of the table after every commit.
module tb_cpt;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic commit_valid = 0, commit_is_load = 0, commit_rob_stall = 0, lookup_critical;
  logic [31:0] commit_pc = 0, lookup_pc = 0;
  int checks = 0, failures = 0;

  cpt #(.ENTRIES(16), .THRESHOLD(3)) dut (.*);

  // reference: per index, the PC held and its counts
  logic [31:0] r_pc  [16];
  bit          r_v   [16];
  int          r_blk [16];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pcs [6];
    int n_crit = 0;
    pcs = '{32'h400, 32'h404, 32'h1000, 32'h440, 32'h2004, 32'h800};  // 0x400/0x440/0x800 share index 0
    foreach (r_v[i]) r_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int k, ix;
      logic [31:0] pc;
      bit ld, st;
      k  = (n < 1000) ? $urandom_range(0, 2) : $urandom_range(0, 5);
      pc = pcs[k];
      ld = ($urandom_range(0, 9) != 0);
      st = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      commit_valid = 1; commit_is_load = ld; commit_pc = pc; commit_rob_stall = st;
      ix = int'(pc[5:2]);
      if (ld) begin
        if (r_v[ix] && r_pc[ix] == pc) begin
          if (st && r_blk[ix] < 255) r_blk[ix]++;
        end else begin
          r_v[ix] = 1; r_pc[ix] = pc; r_blk[ix] = st;
        end
      end
      @(negedge clk);
      commit_valid = 0;
      for (int j = 0; j < 6; j++) begin
        bit exp;
        int jx;
        lookup_pc = pcs[j];
        jx = int'(pcs[j][5:2]);
        #1;
        exp = r_v[jx] && r_pc[jx] == pcs[j] && r_blk[jx] >= 3;
        checks++;
        if (lookup_critical != exp) failures++;
        if (exp) n_crit++;
      end
    end
    checks++;
    if (n_crit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
