// tb_leakage_token_unit: self-checking test of the leakage-token refresh.
//
// The window is shortened to 300 cycles.  The test checks that a refresh ends
// exactly NCORES cycles after each window boundary and one window apart, that
// values hold between refreshes, and that every core's leakage equals
// round(L_base * exp(0.025 * (T - 60))) computed with $exp (within one token,
// the table being quantised; the factor saturates just under 16).  Covers
// temperatures below, at and above the base temperature.
module tb_leakage_token_unit;
  import token3d_pkg::*;

  localparam int unsigned N = 16, WIN = 300;
  localparam real BETA = 0.025;
  localparam int  TB_BASE = 60;

  logic clk = 0, rst_n = 0;
  pow_t  leak_base;
  temp_t temp [N];
  pow_t  leak_tokens [N];
  logic  refresh_done;

  int checks = 0, failures = 0, cyc = 0, last_done = -1, n_done = 0;

  leakage_token_unit #(.NCORES(N), .WINDOW(WIN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (WIN * 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && refresh_done) begin
    n_done++;
    if (last_done >= 0) begin
      checks++;
      if (cyc - last_done != WIN) begin failures++; $display("FAIL refresh period %0d", cyc - last_done); end
    end else begin
      checks++;   // first refresh: reset releases at cycle 3, window ends at once
      if (cyc != 3 + N) begin failures++; $display("FAIL first refresh at %0d", cyc); end
    end
    last_done = cyc;
  end

  function automatic int model(int i);
    real f = $exp(BETA * real'(int'(temp[i] >> TEMP_FRAC) - TB_BASE));
    if (f > 65535.0 / 4096.0) f = 65535.0 / 4096.0;
    return int'(real'(leak_base) * f);   // int'() rounds to nearest
  endfunction

  task automatic check_all(string tag);
    for (int i = 0; i < N; i++) begin
      int e = model(i), d;
      d = int'(leak_tokens[i]) - e;
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        $display("FAIL %s core %0d T=%0d leak %0d expected %0d", tag, i, temp[i] >> 4, leak_tokens[i], e);
      end
    end
  endtask

  initial begin
    int snap [N];
    leak_base = pow_t'(100);
    for (int i = 0; i < N; i++) temp[i] = temp_t'((40 + i * 5) * 16);
    @(posedge clk); @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk iff refresh_done); @(negedge clk);
    check_all("first");
    checks++; if (leak_tokens[4] != 100) failures++;   // 60 C: base leakage

    // hold between refreshes
    for (int i = 0; i < N; i++) snap[i] = int'(leak_tokens[i]);
    for (int i = 0; i < N; i++) temp[i] = temp_t'((120 + i) * 16 + 7);
    repeat (WIN / 2) @(negedge clk);
    for (int i = 0; i < N; i++) begin checks++; if (int'(leak_tokens[i]) != snap[i]) failures++; end
    @(posedge clk iff refresh_done); @(negedge clk);
    check_all("hot");

    for (int t = 0; t < 40; t++) begin
      leak_base = pow_t'($urandom_range(0, 400));
      for (int i = 0; i < N; i++) temp[i] = temp_t'($urandom_range(0, 4095));
      @(posedge clk iff refresh_done); @(negedge clk);
      check_all("random");
    end

    checks++; if (n_done < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
