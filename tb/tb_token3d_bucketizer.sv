// tb_token3d_bucketizer: self-checking test of the Token3D bucket assignment.
//
// Checks the worked example (coolest core 70 C: buckets end at 73.5, 77 and
// 80.5 C), that buckets are refreshed exactly every EPOCH cycles and hold in
// between, and random temperature sets against a model that places core i in
// the largest k < NBUCKETS with T_i >= T_min * (1 + k/20).  EPOCH is reduced
// to keep the run short; the rate check uses the reduced value.
module tb_token3d_bucketizer;
  import token3d_pkg::*;

  localparam int unsigned N = 16, NB = 4, EPOCH = 64;

  logic clk = 0, rst_n = 0;
  temp_t       temp   [N];
  logic [1:0]  bucket [N];
  logic        epoch;

  int checks = 0, failures = 0;
  int last_epoch = -1, cyc = 0;

  token3d_bucketizer #(.NCORES(N), .NBUCKETS(NB), .EPOCH(EPOCH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (EPOCH * 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // period of the refresh pulse
  always @(posedge clk) if (rst_n && epoch) begin
    if (last_epoch >= 0) begin
      checks++;
      if (cyc - last_epoch != EPOCH) begin
        failures++; $display("FAIL epoch period %0d", cyc - last_epoch);
      end
    end
    last_epoch = cyc;
  end

  function automatic int model_bucket(int i);
    int tmin = int'(temp[0]), b = 0;
    for (int j = 1; j < N; j++) if (int'(temp[j]) < tmin) tmin = int'(temp[j]);
    for (int k = 1; k < NB; k++)
      if (20 * (int'(temp[i]) - tmin) >= k * tmin) b = k;
    return b;
  endfunction

  task automatic wait_epoch();
    @(posedge clk iff epoch);
    @(negedge clk);
  endtask

  task automatic check_all(string tag);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(bucket[i]) != model_bucket(i)) begin
        failures++;
        $display("FAIL %s core %0d T=%0d bucket %0d expected %0d", tag, i, temp[i], bucket[i], model_bucket(i));
      end
    end
  endtask

  initial begin
    int hold [N];
    for (int i = 0; i < N; i++) temp[i] = temp_t'(70 * 16);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // worked example (Q8.4 degrees)
    temp[0] = temp_t'(70 * 16);   // coolest
    temp[1] = temp_t'(73 * 16);   // 73.0 -> bucket 0
    temp[2] = temp_t'(1176);      // 73.5 -> bucket 1 (boundary goes up)
    temp[3] = temp_t'(76 * 16);   // bucket 1
    temp[4] = temp_t'(78 * 16);   // bucket 2
    temp[5] = temp_t'(1288);      // 80.5 -> bucket 3
    temp[6] = temp_t'(95 * 16);   // bucket 3
    for (int i = 7; i < N; i++) temp[i] = temp_t'(71 * 16);
    wait_epoch();
    check_all("example");
    checks++;
    if (bucket[1] != 0 || bucket[2] != 1 || bucket[3] != 1 || bucket[4] != 2 ||
        bucket[5] != 3 || bucket[6] != 3) begin
      failures++; $display("FAIL example buckets");
    end

    // buckets hold between refreshes
    for (int i = 0; i < N; i++) hold[i] = int'(bucket[i]);
    repeat (EPOCH / 4) @(negedge clk);
    for (int i = 0; i < N; i++) temp[i] = temp_t'(60 * 16 + i * 40);
    repeat (EPOCH / 4) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++; if (int'(bucket[i]) != hold[i]) failures++;
    end
    wait_epoch();
    check_all("after-change");

    // random sets
    for (int t = 0; t < 200; t++) begin
      int base = $urandom_range(30 * 16, 110 * 16);
      for (int i = 0; i < N; i++) temp[i] = temp_t'(base + $urandom_range(0, base / 4));
      wait_epoch();
      check_all("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
