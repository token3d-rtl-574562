// token3d_balancer: the central power-token load-balancer with the Token3D
// distribution policy.
//
// Every cycle each core either reports spare tokens (it is under its local
// budget) or is over budget (it reports none).  Tokens are only a currency:
// what moves is the number of spare tokens.  The balancer pools the spare
// tokens and shares them among the over-budget cores, favouring cool cores:
//
//   * Only buckets holding an over-budget core are active.  Let H be the
//     hottest active bucket (buckets numbered 0 = coolest .. NBUCKETS-1).
//   * One round walks the levels k = H, H-1, .., 0; at level k every
//     over-budget core in a bucket <= k receives one token.  A core in bucket
//     b therefore gets H-b+1 tokens per round: x1 in the hottest active
//     bucket, up to xNBUCKETS in the coolest.
//   * Rounds repeat while tokens are left.
//
// This is computed in closed form in one cycle instead of token by token:
// with weights w_i = H-b_i+1 and R = sum of w_i, every core first gets
// floor(pool/R)*w_i (complete rounds); the remainder is walked level by level
// from H downwards while a whole level can be paid; the tokens left at the
// first level that cannot be paid completely go one each to that level's
// eligible cores in order of (bucket, core index), coolest first.  The
// result is identical to handing out the tokens one at a time in that order.
// With no over-budget core the pool is discarded (spare power of one cycle is
// not banked).
//
// Follows the Token3D description for the bucket multipliers and repeated
// rounds.  Own choices: how a last, incomplete level is split (coolest
// bucket, then lowest core index, first), single-cycle operation, and the
// registered output: grants computed from cycle t's reports appear at t+1.
module token3d_balancer
  import token3d_pkg::*;
#(
  parameter int unsigned NCORES   = NCORES_DEF,
  parameter int unsigned NBUCKETS = NLAYERS_DEF,
  localparam int unsigned BW      = (NBUCKETS > 1) ? $clog2(NBUCKETS) : 1,
  localparam int unsigned PW      = POW_W + $clog2(NCORES)   // pool width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pow_t          spare  [NCORES],
  input  logic          over   [NCORES],
  input  logic [BW-1:0] bucket [NCORES],
  output pow_t          grant  [NCORES],
  output logic [PW-1:0] pool,        // tokens pooled in the last cycle
  output logic [PW-1:0] granted,     // tokens handed out in the last cycle
  output logic          active       // some core was over budget
);

  localparam int unsigned RW = $clog2(NCORES * NBUCKETS + 1);

  logic [PW-1:0] pool_d, full_d, rem_d, cum_d, left_d, granted_d;
  logic [RW-1:0] rsum_d;
  logic [BW-1:0] hot_d, lo_d, part_lvl_d, from_d;
  logic [RW-1:0] rank_d;
  logic          any_over_d, any_served_d, part_d;
  logic [RW-1:0] w_d     [NCORES];
  logic [RW-1:0] cnt_lvl [NBUCKETS];
  logic [PW-1:0] g_d     [NCORES];

  always_comb begin
    // pool and hottest active bucket
    pool_d     = '0;
    any_over_d = 1'b0;
    hot_d      = '0;
    for (int i = 0; i < NCORES; i++) begin
      if (over[i]) begin
        any_over_d = 1'b1;
        if (bucket[i] > hot_d) hot_d = bucket[i];
      end else begin
        pool_d = pool_d + PW'(spare[i]);
      end
    end

    // per-core round weights
    rsum_d = '0;
    for (int i = 0; i < NCORES; i++) begin
      w_d[i] = over[i] ? RW'(hot_d - bucket[i]) + RW'(1) : '0;
      rsum_d = rsum_d + w_d[i];
    end

    // complete rounds
    if (rsum_d != '0) begin
      full_d = pool_d / PW'(rsum_d);
      rem_d  = pool_d - full_d * PW'(rsum_d);
    end else begin
      full_d = '0;
      rem_d  = '0;
    end

    // cost of each level
    for (int k = 0; k < NBUCKETS; k++) begin
      cnt_lvl[k] = '0;
      for (int i = 0; i < NCORES; i++)
        if (over[i] && bucket[i] <= BW'(k)) cnt_lvl[k] = cnt_lvl[k] + 1'b1;
    end

    // walk the remainder from the hottest active level down
    cum_d        = '0;
    any_served_d = 1'b0;
    lo_d         = hot_d;
    part_d       = 1'b0;
    part_lvl_d   = '0;
    for (int k = NBUCKETS - 1; k >= 0; k--) begin
      if (any_over_d && BW'(k) <= hot_d && !part_d) begin
        if (cum_d + PW'(cnt_lvl[k]) <= rem_d) begin
          cum_d        = cum_d + PW'(cnt_lvl[k]);
          any_served_d = 1'b1;
          lo_d         = BW'(k);
        end else begin
          part_d     = 1'b1;
          part_lvl_d = BW'(k);
        end
      end
    end
    left_d = rem_d - cum_d;

    // per-core grants
    granted_d = '0;
    for (int i = 0; i < NCORES; i++) begin
      g_d[i] = '0;
      from_d = '0;
      rank_d = '0;
      if (over[i]) begin
        g_d[i] = full_d * PW'(w_d[i]);
        // complete remainder levels lo_d..hot_d reached by this core
        if (any_served_d) begin
          from_d = (bucket[i] > lo_d) ? bucket[i] : lo_d;
          g_d[i] = g_d[i] + PW'(hot_d - from_d) + PW'(1);
        end
        // incomplete level: coolest bucket, then lowest index, first
        if (part_d && bucket[i] <= part_lvl_d) begin
          for (int j = 0; j < NCORES; j++)
            if (over[j] && bucket[j] <= part_lvl_d &&
                (bucket[j] < bucket[i] || (bucket[j] == bucket[i] && j < i)))
              rank_d = rank_d + 1'b1;
          if (PW'(rank_d) < left_d) g_d[i] = g_d[i] + PW'(1);
        end
      end
      granted_d = granted_d + g_d[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCORES; i++) grant[i] <= '0;
      pool    <= '0;
      granted <= '0;
      active  <= 1'b0;
    end else begin
      for (int i = 0; i < NCORES; i++)
        grant[i] <= (g_d[i] > PW'({POW_W{1'b1}})) ? '1 : g_d[i][POW_W-1:0];
      pool    <= pool_d;
      granted <= granted_d;
      active  <= any_over_d;
    end
  end

endmodule
