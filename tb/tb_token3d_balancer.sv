// tb_token3d_balancer: self-checking test of the Token3D load-balancer.
//
// A reference model hands the pooled spare tokens out one at a time: rounds
// of levels H..0, at level k one token to every over-budget core in a bucket
// <= k, coolest bucket and lowest core first, until the pool is empty.  The
// balancer's one-cycle closed-form result must match it exactly, one cycle
// after the reports.  Directed cases reproduce the three-bucket example
// (x3/x2/x1 shares, repeated rounds, a partial round), then random cases.
module tb_token3d_balancer;
  import token3d_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned NB = 4;
  localparam int unsigned BW = 2;
  localparam int unsigned PW = POW_W + $clog2(N);

  logic clk = 0, rst_n = 0;
  pow_t          spare  [N];
  logic          over   [N];
  logic [BW-1:0] bucket [N];
  pow_t          grant  [N];
  logic [PW-1:0] pool, granted;
  logic          active;

  int checks = 0, failures = 0;
  int exp_g [N];

  token3d_balancer #(.NCORES(N), .NBUCKETS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(output int total);
    int p, h;
    bit any;
    p = 0; h = 0; any = 0;
    for (int i = 0; i < N; i++) begin
      exp_g[i] = 0;
      if (over[i]) begin any = 1; if (int'(bucket[i]) > h) h = int'(bucket[i]); end
      else p += int'(spare[i]);
    end
    total = p;
    if (!any) return;
    while (p > 0)
      for (int k = h; k >= 0; k--)
        for (int b = 0; b <= k; b++)
          for (int i = 0; i < N; i++)
            if (over[i] && int'(bucket[i]) == b && p > 0) begin
              exp_g[i]++; p--;
            end
  endtask

  task automatic check_case(string tag);
    int total, sum;
    model(total);
    @(posedge clk); #1;
    sum = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(grant[i]) != exp_g[i]) begin
        failures++;
        $display("FAIL %s core %0d grant %0d expected %0d", tag, i, grant[i], exp_g[i]);
      end
      sum += exp_g[i];
    end
    checks++;
    if (int'(pool) != total || int'(granted) != sum) begin
      failures++;
      $display("FAIL %s pool %0d/%0d granted %0d/%0d", tag, pool, total, granted, sum);
    end
  endtask

  task automatic clear();
    for (int i = 0; i < N; i++) begin spare[i] = '0; over[i] = 0; bucket[i] = '0; end
  endtask

  initial begin
    clear();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // three active buckets, one over-budget core each: x3 / x2 / x1
    clear();
    over[1] = 1; bucket[1] = 0;
    over[2] = 1; bucket[2] = 1;
    over[3] = 1; bucket[3] = 2;
    spare[8] = 6;
    check_case("example-6");
    checks++; if (grant[1] != 3 || grant[2] != 2 || grant[3] != 1) failures++;
    @(negedge clk); spare[8] = 12;             // two complete rounds
    check_case("example-12");
    checks++; if (grant[1] != 6 || grant[2] != 4 || grant[3] != 2) failures++;
    @(negedge clk); spare[8] = 7;              // one round + one token
    check_case("example-7");
    checks++; if (grant[1] != 4 || grant[2] != 2 || grant[3] != 1) failures++;
    @(negedge clk); spare[8] = 8; spare[9] = 2; // 10 = round + level H + 1
    check_case("example-10");
    checks++; if (grant[1] != 5 || grant[2] != 3 || grant[3] != 2) failures++;

    // nobody over: nothing granted
    @(negedge clk); clear(); spare[0] = 50;
    check_case("none-over");
    checks++; if (active != 0) failures++;

    // everybody over: nothing to give
    @(negedge clk); clear();
    for (int i = 0; i < N; i++) begin over[i] = 1; bucket[i] = BW'(i % NB); end
    check_case("all-over");
    checks++; if (active != 1) failures++;

    // random
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        over[i]   = ($urandom_range(0, 99) < 40);
        bucket[i] = BW'($urandom_range(0, NB - 1));
        spare[i]  = over[i] ? '0 : pow_t'($urandom_range(0, (t % 3 == 0) ? 400 : 20));
      end
      check_case("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
