// cpt: criticality predictor table for loads.
//
// Each entry holds a PC tag, numLoadCount and robBlockCount. On every load
// committed from the head of the ROB the entry for its PC is updated:
// numLoadCount is incremented, and robBlockCount too when that load had
// stalled the ROB. A PC that misses replaces the entry at its index, starting
// from counts of zero plus this commit. A lookup by PC answers "critical"
// when the PC hits and robBlockCount >= THRESHOLD. Counters saturate.
//
// The fields, the update rule and the threshold test follow the document.
// The organisation (direct-mapped, ENTRIES entries, PC bits [2+:IDX] as
// index), counter width and THRESHOLD value are this design's choices.
// Timing: update written on the clock edge; lookup is combinational.
module cpt #(
  parameter int ENTRIES   = 64,
  parameter int PC_W      = 32,
  parameter int CNT_W     = 8,
  parameter int THRESHOLD = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // commit port (head of ROB)
  input  logic            commit_valid,
  input  logic            commit_is_load,
  input  logic [PC_W-1:0] commit_pc,
  input  logic            commit_rob_stall,
  // lookup port
  input  logic [PC_W-1:0] lookup_pc,
  output logic            lookup_critical
);
  localparam int IDX_W = $clog2(ENTRIES);
  localparam int TAG_W = PC_W - 2 - IDX_W;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [CNT_W-1:0] num_load;
    logic [CNT_W-1:0] rob_block;
  } cpt_entry_t;

  cpt_entry_t tbl [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(input logic [PC_W-1:0] pc);
    return pc[2 +: IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [PC_W-1:0] pc);
    return pc[PC_W-1 -: TAG_W];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (commit_valid && commit_is_load) begin
      cpt_entry_t e;
      e = tbl[idx_of(commit_pc)];
      if (e.valid && e.tag == tag_of(commit_pc)) begin
        if (e.num_load != '1) e.num_load = e.num_load + 1'b1;
        if (commit_rob_stall && e.rob_block != '1) e.rob_block = e.rob_block + 1'b1;
      end else begin
        e.valid     = 1'b1;
        e.tag       = tag_of(commit_pc);
        e.num_load  = CNT_W'(1);
        e.rob_block = CNT_W'(commit_rob_stall);
      end
      tbl[idx_of(commit_pc)] <= e;
    end
  end

  cpt_entry_t le;
  assign le = tbl[idx_of(lookup_pc)];
  assign lookup_critical = le.valid && le.tag == tag_of(lookup_pc)
                           && le.rob_block >= CNT_W'(THRESHOLD);
endmodule
