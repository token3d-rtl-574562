// ptht: Power Token History Table of one core.
//
// The table holds, for every static instruction (indexed by its PC), the
// number of power tokens its last dynamic execution cost.  At fetch the core
// looks up the instructions it fetches, so their summed cost is an estimate
// of the power the core spends this cycle without performance counters.  At
// commit an instruction's cost is recomputed as its base tokens (the
// structure accesses known a priori) plus the number of cycles it spent in the
// instruction window, and written back.
//
// Organisation (from the power-token scheme): 8K entries, direct mapped on the
// PC, no tag.  Own choices: the index is PC[2 +: log2(ENTRIES)] (fixed 4-byte
// instructions), one read port per fetch slot and one write port per commit
// slot, entries never written return DEFAULT_TOKENS (a valid bit per entry,
// cleared at reset), window residency is measured with a free-running cycle
// stamp that the core attaches to an instruction at dispatch
// (`now_stamp`), and the cost saturates at 2^TOKEN_W-1.
//
// Timing: fetch lookups are registered; fetch_tokens/fetch_tok_valid appear
// one cycle after fetch_valid/fetch_pc.  A read and a commit write to the same
// entry in one cycle return the old value.  Of several commit writes to the same
// entry in one cycle the highest slot (youngest instruction) wins.
module ptht
  import token3d_pkg::*;
#(
  parameter int unsigned ENTRIES        = PTHT_ENTRIES_DEF,
  parameter int unsigned FETCH_W        = FETCH_W_DEF,
  parameter int unsigned COMMIT_W       = COMMIT_W_DEF,
  parameter int unsigned DEFAULT_TOKENS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch-side lookups
  input  logic [FETCH_W-1:0]  fetch_valid,
  input  pc_t                 fetch_pc       [FETCH_W],
  output logic [FETCH_W-1:0]  fetch_tok_valid,
  output token_t              fetch_tokens   [FETCH_W],
  // commit-side updates
  input  commit_t             commit         [COMMIT_W],
  // free-running cycle stamp for dispatch
  output stamp_t              now_stamp
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  token_t              cost  [ENTRIES];
  logic [ENTRIES-1:0]  valid;
  stamp_t              cycle_q;

  assign now_stamp = cycle_q;

  function automatic logic [IDX_W-1:0] idx_of(input pc_t pc);
    return pc[2 +: IDX_W];
  endfunction

  // Cost of a committing instruction: base + residency, saturated
  function automatic token_t commit_cost(input commit_t c, input stamp_t now);
    stamp_t              resid;
    logic [STAMP_W:0]    sum;
    resid = now - c.dispatch_stamp;
    sum   = {1'b0, resid} + {{(STAMP_W+1-TOKEN_W){1'b0}}, c.base_tokens};
    if (sum > (STAMP_W+1)'((1 << TOKEN_W) - 1)) return '1;
    return sum[TOKEN_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cycle_q <= '0;
    else        cycle_q <= cycle_q + 1'b1;
  end

  // fetch lookups (registered read)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_tok_valid <= '0;
      for (int f = 0; f < FETCH_W; f++) fetch_tokens[f] <= '0;
    end else begin
      fetch_tok_valid <= fetch_valid;
      for (int f = 0; f < FETCH_W; f++) begin
        if (!fetch_valid[f])
          fetch_tokens[f] <= '0;
        else if (valid[idx_of(fetch_pc[f])])
          fetch_tokens[f] <= cost[idx_of(fetch_pc[f])];
        else
          fetch_tokens[f] <= token_t'(DEFAULT_TOKENS);
      end
    end
  end

  // commit updates: cost array (no reset, like an SRAM) and valid bits
  always_ff @(posedge clk) begin
    for (int c = 0; c < COMMIT_W; c++)
      if (commit[c].valid)
        cost[idx_of(commit[c].pc)] <= commit_cost(commit[c], cycle_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else
      for (int c = 0; c < COMMIT_W; c++)
        if (commit[c].valid) valid[idx_of(commit[c].pc)] <= 1'b1;
  end

endmodule
