// token3d_harness: stand-in cores, thermal stand-in and checkers around one
// token3d_cmp instance of a given size (cores, layers, epoch lengths).  It is
// the same end-to-end environment as tb_token3d_cmp, generalised to any
// layer count: buckets, window layers (IW_ENTRIES/NLAYERS entries each) and
// the temperature pattern follow NLAYERS.  It raises `done` when its run is
// over and reports its own check and failure counts and how many of the
// tracked mechanisms never occurred.

module token3d_harness #(
  parameter int unsigned N      = 16,
  parameter int unsigned NL     = 4,
  parameter int unsigned EPOCH  = 100_000,
  parameter int unsigned WIN    = 10_000,
  parameter int unsigned CYCLES = 2 * EPOCH + EPOCH / 5
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   uncovered,
  output logic done
);
  import token3d_pkg::*;

  localparam int unsigned FW = FETCH_W_DEF, CW = COMMIT_W_DEF;
  localparam int unsigned IWE = 128, IW = 4, NF = 3, NS = 3;
  localparam int unsigned BW = (NL > 1) ? $clog2(NL) : 1;
  localparam int unsigned LW = $clog2(NL + 1);
  localparam int unsigned EPL = IWE / NL;
  localparam int unsigned PW = POW_W + $clog2(N);
  localparam int DEF_TOK = 8;
  localparam int LOOP = 64;

  logic rst_n = 0;
  pow_t          core_budget, leak_base;
  logic [FW-1:0] fetch_valid [N];
  pc_t           fetch_pc    [N][FW];
  commit_t       commit      [N][CW];
  stamp_t        now_stamp   [N];
  temp_t         temp        [N];
  pow_t          power [N], spare [N], excess [N], grant [N], leak_tokens [N];
  logic          over [N], throttle [N];
  logic [BW-1:0] bucket [N];
  logic [PW-1:0] pool, granted;
  logic          balance_active, bucket_epoch, leak_refresh;
  logic [LW-1:0] iw_req_layers [N];
  logic [IWE-1:0] iw_entry_busy [N], iw_alloc_mask [N];
  logic [NL-1:0] iw_layer_power [N], iw_layer_drain [N];
  logic [LW-1:0] iw_active [N];
  logic [IW-1:0] alu_req_valid [N], alu_req_crit [N], alu_gnt_valid [N], alu_gnt_fast [N];
  logic [NF-1:0] alu_fast_free [N], alu_fast_used [N];
  logic [NS-1:0] alu_slow_free [N], alu_slow_used [N];
  logic [1:0]    alu_gnt_unit [N][IW], alu_gnt_lat [N][IW];

  token3d_cmp #(
    .NCORES(N), .NLAYERS(NL), .LEAK_WINDOW(WIN), .BUCKET_EPOCH(EPOCH)
  ) dut (.*);

  initial begin checks = 0; failures = 0; uncovered = 0; done = 0; end
  // mechanism counters
  int n_over = 0, n_spare = 0, n_grant = 0, n_throttle = 0, n_rescued = 0, n_learnt = 0;
  int n_epoch = 0, n_bucket_change = 0, n_multi_bucket = 0, n_refresh = 0, n_pool_split = 0;
  int n_iw_drain = 0, n_iw_off = 0, n_iw_grow = 0, n_iw_full = 0, n_alu_fb = 0, n_alu_stall = 0;


  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t %s", $time, msg);
  endtask

  // stand-in core state
  typedef struct { int pc_idx; int base; int fcyc; int ccyc; int entry; } inflight_t;
  inflight_t q [N][$];
  int  table_m [N][int];        // PTHT model: index -> tokens
  int  pcpos [N];
  int  exp_next [N], pipe_a [N];
  logic prev_over [N];
  logic [BW-1:0] prev_bucket [N];
  int  prev_spare [N];
  int  cyc = 0;
  logic [BW-1:0] bucket_seen [N];

  function automatic pc_t pc_of(int c, int k);
    return pc_t'(32'h0010_0000 * (c + 1) + 4 * k);
  endfunction
  function automatic int base_of(int k);  return 2 + (k * 7) % 13; endfunction
  function automatic int lat_of(int k);   return 3 + (k * 5) % 30 + ((k % 16 == 0) ? 300 : 0); endfunction

  // fetch intensity per core and phase: 0..4 instructions per cycle
  function automatic int width_of(int c, int n);
    int ph = (n / (EPOCH * 3 / 10)) % 3;
    if ((c + ph) % 3 == 0) return 1;
    if ((c + ph) % 3 == 1) return 2;
    return 4;
  endfunction

  // thermal stand-in: bottom layer hottest, reversed after the first epoch
  task automatic set_temps(bit reversed);
    for (int c = 0; c < N; c++) begin
      int layer = c / (N / NL);
      int hot = reversed ? layer : (NL - 1 - layer);
      temp[c] = temp_t'((70 * 16) + hot * (240 / NL) + (c % 4) * 9);
    end
  endtask

  function automatic int bucket_model(int c);
    int tmin = int'(temp[0]), b = 0;
    for (int j = 1; j < N; j++) if (int'(temp[j]) < tmin) tmin = int'(temp[j]);
    for (int k = 1; k < NL; k++) if (20 * (int'(temp[c]) - tmin) >= k * tmin) b = k;
    return b;
  endfunction

  function automatic int leak_model(int c);
    real f = $exp(0.025 * real'(int'(temp[c] >> TEMP_FRAC) - 60));
    if (f > 65535.0 / 4096.0) f = 65535.0 / 4096.0;
    return int'(real'(leak_base) * f);
  endfunction

  initial begin
    bit check_buckets = 0;
    core_budget = pow_t'(60);
    leak_base   = pow_t'(6);
    set_temps(0);
    for (int c = 0; c < N; c++) begin
      fetch_valid[c] = '0;
      for (int f = 0; f < FW; f++) fetch_pc[c][f] = '0;
      for (int k = 0; k < CW; k++) commit[c][k] = '0;
      iw_req_layers[c] = LW'(NL); iw_entry_busy[c] = '0;
      alu_req_valid[c] = '0; alu_req_crit[c] = '0; alu_fast_free[c] = '0; alu_slow_free[c] = '0;
      pcpos[c] = 0; exp_next[c] = 0; pipe_a[c] = 0; prev_over[c] = 0; prev_bucket[c] = 0; prev_spare[c] = 0;
      bucket_seen[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);

      // ---------------- checks on what the last edge produced ----------------
      if (check_buckets) begin
        automatic bit [NL-1:0] used = 0;
        n_epoch++;
        for (int c = 0; c < N; c++) begin
          checks++;
          if (int'(bucket[c]) != bucket_model(c)) fail($sformatf("bucket core %0d", c));
          if (n_epoch > 1 && bucket[c] != bucket_seen[c]) n_bucket_change++;
          bucket_seen[c] = bucket[c];
          used[bucket[c]] = 1;
        end
        if ($countones(used) >= ((NL > 2) ? 3 : NL)) n_multi_bucket++;
        check_buckets = 0;
      end
      if (bucket_epoch) check_buckets = 1;

      if (leak_refresh) begin
        n_refresh++;
        for (int c = 0; c < N; c++) begin
          automatic int d = int'(leak_tokens[c]) - leak_model(c);
          checks++;
          if (d > 1 || d < -1) fail($sformatf("leak core %0d %0d/%0d", c, leak_tokens[c], leak_model(c)));
        end
      end

      // balancer: result of the previous cycle's reports
      if (cyc > 0) begin
        automatic int p = 0, g = 0; automatic bit any = 0;
        for (int c = 0; c < N; c++) begin
          if (prev_over[c]) any = 1; else p += prev_spare[c];
          g += int'(grant[c]);
          checks++;
          if (!prev_over[c] && grant[c] != 0) fail($sformatf("grant to under-budget core %0d", c));
        end
        checks++;
        if (int'(pool) != p || int'(granted) != (any ? p : 0) || g != int'(granted))
          fail($sformatf("conservation pool %0d/%0d granted %0d sum %0d", pool, p, granted, g));
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (prev_over[i] && prev_over[j] && prev_bucket[i] < prev_bucket[j]) begin
              checks++;
              if (grant[i] < grant[j]) fail($sformatf("Token3D order %0d<%0d", i, j));
              if (p > 0) n_pool_split++;
            end
        for (int c = 0; c < N; c++) if (prev_over[c] && grant[c] != 0) n_grant++;
      end

      for (int c = 0; c < N; c++) begin
        // power estimate
        checks++;
        if (int'(power[c]) != exp_next[c]) fail($sformatf("power core %0d %0d/%0d", c, power[c], exp_next[c]));
        checks++;
        if (throttle[c] != (int'(power[c]) > int'(core_budget) + int'(grant[c])))
          fail($sformatf("throttle core %0d", c));
        if (over[c]) n_over++;
        if (spare[c] != 0) n_spare++;
        if (throttle[c]) n_throttle++;
        if (over[c] && !throttle[c]) n_rescued++;
        checks++;
        if (now_stamp[c] != stamp_t'(cyc + 1)) fail("stamp");
        // no instruction in an unpowered window layer
        for (int l = 0; l < NL; l++) begin
          checks++;
          if (!iw_layer_power[c][l] && iw_entry_busy[c][l*EPL +: EPL] != 0) fail("busy entry in off layer");
          if (iw_layer_drain[c][l]) n_iw_drain++;
        end
        // ALU grants only to free units
        checks++;
        if ((alu_fast_used[c] & ~alu_fast_free[c]) != 0 || (alu_slow_used[c] & ~alu_slow_free[c]) != 0)
          fail("ALU grant to busy unit");
        for (int s = 0; s < IW; s++) if (alu_req_valid[c][s]) begin
          if (!alu_gnt_valid[c][s]) n_alu_stall++;
          else if (alu_gnt_fast[c][s] != alu_req_crit[c][s]) n_alu_fb++;
        end
      end

      // ---------------- stand-in cores drive the next cycle ----------------
      if (cyc == EPOCH + EPOCH / 2) set_temps(1);

      for (int c = 0; c < N; c++) begin
        logic [IWE-1:0] freem;
        automatic int w = 0, nc = 0;
        exp_next[c] = pipe_a[c] + int'(leak_tokens[c]);
        prev_over[c] = over[c]; prev_bucket[c] = bucket[c]; prev_spare[c] = int'(spare[c]);

        // fetch (looked up before this cycle's commits land)
        fetch_valid[c] = '0;
        pipe_a[c] = 0;
        w = throttle[c] ? 0 : $urandom_range(0, (width_of(c, cyc) * 2 > FW) ? FW : width_of(c, cyc) * 2);
        for (int f = 0; f < FW; f++) begin
          fetch_pc[c][f] = '0;
          freem = iw_alloc_mask[c] & ~iw_entry_busy[c];
          if (f < w) begin
            if (freem == 0) n_iw_full++;
            else begin
              inflight_t it;
              automatic int e = $clog2(freem & (~freem + 1'b1));
              automatic int idx = int'(pc_of(c, pcpos[c])) >> 2 & 13'h1fff;
              fetch_valid[c][f] = 1'b1;
              fetch_pc[c][f] = pc_of(c, pcpos[c]);
              pipe_a[c] += table_m[c].exists(idx) ? table_m[c][idx] : DEF_TOK;
              if (table_m[c].exists(idx) && table_m[c][idx] != DEF_TOK) n_learnt++;
              it.pc_idx = pcpos[c]; it.base = base_of(pcpos[c]); it.fcyc = cyc;
              it.ccyc = cyc + lat_of(pcpos[c]); it.entry = e;
              q[c].push_back(it);
              iw_entry_busy[c][e] = 1'b1;
              pcpos[c] = (pcpos[c] + 1) % LOOP;
            end
          end
        end

        // in-order commit, up to CW per cycle
        for (int k = 0; k < CW; k++) commit[c][k] = '0;
        while (nc < CW && q[c].size() > 0 && q[c][0].ccyc <= cyc && q[c][0].fcyc < cyc) begin
          automatic inflight_t it = q[c].pop_front();
          automatic int idx = int'(pc_of(c, it.pc_idx)) >> 2 & 13'h1fff;
          automatic int cost = it.base + (cyc - it.fcyc);
          commit[c][nc].valid = 1'b1;
          commit[c][nc].pc = pc_of(c, it.pc_idx);
          commit[c][nc].base_tokens = token_t'(it.base);
          commit[c][nc].dispatch_stamp = stamp_t'(it.fcyc + 1);
          table_m[c][idx] = cost > 1023 ? 1023 : cost;
          iw_entry_busy[c][it.entry] = 1'b0;
          nc++;
        end

        // window-size policy stand-in
        if (cyc % (EPOCH * 7 / 100) == (EPOCH * 7 / 100) - 1) begin
          automatic logic [LW-1:0] r = LW'($urandom_range(1, NL));
          if (r > iw_req_layers[c]) n_iw_grow++;
          iw_req_layers[c] = r;
        end
        for (int l = 0; l < NL; l++) if (!iw_layer_power[c][l]) n_iw_off++;

        // criticality stand-in
        alu_req_valid[c] = 4'($urandom()); alu_req_crit[c] = 4'($urandom());
        alu_fast_free[c] = 3'($urandom()); alu_slow_free[c] = 3'($urandom());
      end
    end

    // every mechanism must have happened
    begin
      int cov [string];
      cov["over_budget"] = n_over; cov["spare_tokens"] = n_spare; cov["grants_to_over"] = n_grant;
      cov["throttle"] = n_throttle; cov["grant_avoids_throttle"] = n_rescued; cov["ptht_learnt"] = n_learnt;
      cov["bucket_epochs"] = n_epoch; cov["bucket_change"] = n_bucket_change; cov["three_buckets"] = n_multi_bucket;
      cov["leak_refresh"] = n_refresh; cov["token3d_split"] = n_pool_split; cov["iw_drain"] = n_iw_drain;
      cov["iw_off"] = n_iw_off; cov["iw_grow"] = n_iw_grow; cov["iw_full"] = n_iw_full;
      cov["alu_fallback"] = n_alu_fb; cov["alu_stall"] = n_alu_stall;
      foreach (cov[k]) begin
        $display("N=%0d NL=%0d coverage %-22s %0d", N, NL, k, cov[k]);
        checks++;
        if (cov[k] == 0) begin uncovered++; fail($sformatf("N=%0d NL=%0d: mechanism never happened: %s", N, NL, k)); end
      end
    end
    done = 1;
  end
endmodule
