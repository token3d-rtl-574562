// tb_core_power_meter: self-checking test of the per-core power meter.
//
// Random fetch-token groups, leakage, budgets and grants.  The model sums the
// valid tokens and the leakage (saturating) and expects that sum on `power`
// one cycle later; spare/over/throttle/excess are then checked against the
// budget and grant present in that cycle.  Directed cases hit exactly-at-budget,
// a grant that lifts an over-budget core out of throttling, and saturation.
module tb_core_power_meter;
  import token3d_pkg::*;

  localparam int unsigned FW = 4;
  localparam int MAXP = (1 << POW_W) - 1;

  logic clk = 0, rst_n = 0;
  logic [FW-1:0] tok_valid;
  token_t        tokens [FW];
  pow_t          leak_tokens, budget, grant;
  pow_t          power, spare, excess;
  logic          over, throttle;

  int checks = 0, failures = 0;
  int n_over = 0, n_thr = 0, n_rescued = 0;

  core_power_meter dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(int b, int g);
    int sum, eb;
    sum = int'(leak_tokens);
    for (int f = 0; f < FW; f++) if (tok_valid[f]) sum += int'(tokens[f]);
    if (sum > MAXP) sum = MAXP;
    @(posedge clk); #1;
    budget = pow_t'(b); grant = pow_t'(g);
    #1;
    eb = b + g; if (eb > MAXP) eb = MAXP;
    checks++;
    if (int'(power) != sum ||
        over != (sum > b) ||
        int'(spare) != ((sum < b) ? b - sum : 0) ||
        throttle != (sum > eb) ||
        int'(excess) != ((sum > eb) ? sum - eb : 0)) begin
      failures++;
      $display("FAIL power %0d/%0d budget %0d grant %0d over %0d thr %0d spare %0d excess %0d",
               power, sum, b, g, over, throttle, spare, excess);
    end
    if (over) n_over++;
    if (throttle) n_thr++;
    if (over && !throttle) n_rescued++;
    @(negedge clk);
  endtask

  task automatic drive(int l, int t0, int t1, int t2, int t3, logic [FW-1:0] v);
    leak_tokens = pow_t'(l);
    tokens[0] = token_t'(t0); tokens[1] = token_t'(t1);
    tokens[2] = token_t'(t2); tokens[3] = token_t'(t3);
    tok_valid = v;
  endtask

  initial begin
    drive(0, 0, 0, 0, 0, '0); budget = '0; grant = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    drive(10, 20, 30, 40, 50, 4'b1111); cycle(150, 0);   // exactly at budget
    checks++; if (over || spare != 0) failures++;
    drive(10, 20, 30, 40, 50, 4'b0101); cycle(150, 0);   // 10+20+40 = 70
    checks++; if (spare != 80) failures++;
    drive(10, 100, 30, 40, 50, 4'b1111); cycle(200, 40); // 230 > 200, < 240
    checks++; if (!over || throttle) failures++;
    drive(10, 100, 30, 40, 50, 4'b1111); cycle(200, 10); // 230 > 210
    checks++; if (!throttle || excess != 20) failures++;
    drive(MAXP, 1023, 1023, 1023, 1023, 4'b1111); cycle(MAXP, MAXP); // saturation
    checks++; if (power != pow_t'(MAXP) || throttle) failures++;

    for (int t = 0; t < 20000; t++) begin
      drive($urandom_range(0, 60), $urandom_range(0, 1023), $urandom_range(0, 200),
            $urandom_range(0, 200), $urandom_range(0, 200), 4'($urandom_range(0, 15)));
      cycle($urandom_range(0, 500), ($urandom_range(0, 1) != 0) ? $urandom_range(0, 300) : 0);
    end

    checks++;
    if (n_over == 0 || n_thr == 0 || n_rescued == 0) begin
      failures++; $display("FAIL coverage over=%0d throttle=%0d rescued=%0d", n_over, n_thr, n_rescued);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
