// token3d_cmp: power-control fabric of a 3D die-stacked chip multiprocessor
// (NCORES cores on NLAYERS layers; 16 cores on 4 layers by default).
//
// Per core:
//   ptht              - power cost of fetched instructions, learnt at commit
//   core_power_meter  - cycle power estimate (+ leakage), spare tokens or
//                       over-budget, throttle request against budget + grant
//   iw_layer_gate     - instruction window sized by whole layers (vertical core)
//   alu_crit_steer    - critical instructions to fast upper-layer ALUs,
//                       others to slow low-power lower-layer ALUs
// Shared:
//   leakage_token_unit - leakage tokens from temperature, every 10K cycles
//   token3d_bucketizer - temperature buckets, every 100K cycles
//   token3d_balancer   - pools spare tokens and hands them to over-budget
//                        cores, cooler buckets getting larger shares
//
// The power loop per cycle t: the PTHT returns the cost of the instructions
// fetched at t-1; the meter registers their sum plus leakage as the power of
// cycle t and reports spare tokens / over-budget; the balancer's grants appear
// at t+1 and raise that core's budget, against which the meter then decides
// whether to throttle.  The processor cores themselves, their caches and
// network, the temperature sensors and the policies that choose the window
// size and the criticality of instructions are outside this block: their
// signals are ports.  All ports are plain arrays indexed by core.
module token3d_cmp
  import token3d_pkg::*;
#(
  parameter int unsigned NCORES      = NCORES_DEF,
  parameter int unsigned NLAYERS     = NLAYERS_DEF,
  parameter int unsigned FETCH_W     = FETCH_W_DEF,
  parameter int unsigned COMMIT_W    = COMMIT_W_DEF,
  parameter int unsigned PTHT_ENTRIES = PTHT_ENTRIES_DEF,
  parameter int unsigned LEAK_WINDOW = LEAK_WINDOW_DEF,
  parameter int unsigned BUCKET_EPOCH = BUCKET_EPOCH_DEF,
  parameter int unsigned IW_ENTRIES  = 128,
  parameter int unsigned ISSUE_W     = 4,
  parameter int unsigned N_FAST_ALU  = 3,
  parameter int unsigned N_SLOW_ALU  = 3,
  localparam int unsigned BW  = (NLAYERS > 1) ? $clog2(NLAYERS) : 1,
  localparam int unsigned PW  = POW_W + $clog2(NCORES),
  localparam int unsigned LW  = $clog2(NLAYERS + 1),
  localparam int unsigned UW  = $clog2((N_FAST_ALU > N_SLOW_ALU ? N_FAST_ALU : N_SLOW_ALU) + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // budget and technology
  input  pow_t                  core_budget,            // local budget per core per cycle
  input  pow_t                  leak_base,              // leakage at base temperature
  // core front end / back end
  input  logic [FETCH_W-1:0]    fetch_valid   [NCORES],
  input  pc_t                   fetch_pc      [NCORES][FETCH_W],
  input  commit_t               commit        [NCORES][COMMIT_W],
  output stamp_t                now_stamp     [NCORES],
  // thermal sensors
  input  temp_t                 temp          [NCORES],
  // power control results
  output pow_t                  power         [NCORES],
  output pow_t                  spare         [NCORES],
  output logic                  over          [NCORES],
  output logic                  throttle      [NCORES],
  output pow_t                  excess        [NCORES],
  output pow_t                  grant         [NCORES],
  output pow_t                  leak_tokens   [NCORES],
  output logic [BW-1:0]         bucket        [NCORES],
  output logic [PW-1:0]         pool,
  output logic [PW-1:0]         granted,
  output logic                  balance_active,
  output logic                  bucket_epoch,
  output logic                  leak_refresh,
  // instruction window layers (vertical core)
  input  logic [LW-1:0]         iw_req_layers [NCORES],
  input  logic [IW_ENTRIES-1:0] iw_entry_busy [NCORES],
  output logic [IW_ENTRIES-1:0] iw_alloc_mask [NCORES],
  output logic [NLAYERS-1:0]    iw_layer_power[NCORES],
  output logic [NLAYERS-1:0]    iw_layer_drain[NCORES],
  output logic [LW-1:0]         iw_active     [NCORES],
  // ALU steering (vertical core)
  input  logic [ISSUE_W-1:0]    alu_req_valid [NCORES],
  input  logic [ISSUE_W-1:0]    alu_req_crit  [NCORES],
  input  logic [N_FAST_ALU-1:0] alu_fast_free [NCORES],
  input  logic [N_SLOW_ALU-1:0] alu_slow_free [NCORES],
  output logic [ISSUE_W-1:0]    alu_gnt_valid [NCORES],
  output logic [ISSUE_W-1:0]    alu_gnt_fast  [NCORES],
  output logic [UW-1:0]         alu_gnt_unit  [NCORES][ISSUE_W],
  output logic [1:0]            alu_gnt_lat   [NCORES][ISSUE_W],
  output logic [N_FAST_ALU-1:0] alu_fast_used [NCORES],
  output logic [N_SLOW_ALU-1:0] alu_slow_used [NCORES]
);

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic [FETCH_W-1:0] tok_valid;
    token_t             tokens [FETCH_W];

    ptht #(
      .ENTRIES (PTHT_ENTRIES),
      .FETCH_W (FETCH_W),
      .COMMIT_W(COMMIT_W)
    ) u_ptht (
      .clk, .rst_n,
      .fetch_valid    (fetch_valid[c]),
      .fetch_pc       (fetch_pc[c]),
      .fetch_tok_valid(tok_valid),
      .fetch_tokens   (tokens),
      .commit         (commit[c]),
      .now_stamp      (now_stamp[c])
    );

    core_power_meter #(.FETCH_W(FETCH_W)) u_meter (
      .clk, .rst_n,
      .tok_valid  (tok_valid),
      .tokens     (tokens),
      .leak_tokens(leak_tokens[c]),
      .budget     (core_budget),
      .grant      (grant[c]),
      .power      (power[c]),
      .spare      (spare[c]),
      .over       (over[c]),
      .throttle   (throttle[c]),
      .excess     (excess[c])
    );

    iw_layer_gate #(.ENTRIES(IW_ENTRIES), .LAYERS(NLAYERS)) u_iw (
      .clk, .rst_n,
      .req_layers    (iw_req_layers[c]),
      .entry_busy    (iw_entry_busy[c]),
      .alloc_mask    (iw_alloc_mask[c]),
      .layer_power   (iw_layer_power[c]),
      .layer_draining(iw_layer_drain[c]),
      .active_layers (iw_active[c])
    );

    alu_crit_steer #(
      .ISSUE_W(ISSUE_W), .N_FAST(N_FAST_ALU), .N_SLOW(N_SLOW_ALU)
    ) u_alu (
      .req_valid(alu_req_valid[c]),
      .req_crit (alu_req_crit[c]),
      .fast_free(alu_fast_free[c]),
      .slow_free(alu_slow_free[c]),
      .gnt_valid(alu_gnt_valid[c]),
      .gnt_fast (alu_gnt_fast[c]),
      .gnt_unit (alu_gnt_unit[c]),
      .gnt_lat  (alu_gnt_lat[c]),
      .fast_used(alu_fast_used[c]),
      .slow_used(alu_slow_used[c])
    );
  end

  leakage_token_unit #(.NCORES(NCORES), .WINDOW(LEAK_WINDOW)) u_leak (
    .clk, .rst_n,
    .leak_base   (leak_base),
    .temp        (temp),
    .leak_tokens (leak_tokens),
    .refresh_done(leak_refresh)
  );

  token3d_bucketizer #(
    .NCORES(NCORES), .NBUCKETS(NLAYERS), .EPOCH(BUCKET_EPOCH)
  ) u_bucket (
    .clk, .rst_n,
    .temp  (temp),
    .bucket(bucket),
    .epoch (bucket_epoch)
  );

  token3d_balancer #(.NCORES(NCORES), .NBUCKETS(NLAYERS)) u_bal (
    .clk, .rst_n,
    .spare  (spare),
    .over   (over),
    .bucket (bucket),
    .grant  (grant),
    .pool   (pool),
    .granted(granted),
    .active (balance_active)
  );

endmodule
