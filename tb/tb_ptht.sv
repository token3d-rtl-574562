// tb_ptht: self-checking test of the Power Token History Table.
//
// A reference model (an associative array keyed by table index) predicts
// every lookup: DEFAULT_TOKENS for entries never written, otherwise base
// tokens + window residency (commit cycle - dispatch stamp) of the last
// commit, saturated at 2^TOKEN_W-1.  Lookups are checked one cycle after the
// fetch (the table's read latency).  Directed cases cover the default value,
// residency counting, saturation, PC aliasing, same-entry commits in one cycle
// (youngest wins) and read-during-write (old value); then random traffic.
module tb_ptht;
  import token3d_pkg::*;

  localparam int unsigned ENTRIES = 8192;
  localparam int unsigned FW = 4, CW = 4;
  localparam int unsigned DEF = 8;

  logic clk = 0, rst_n = 0;
  logic [FW-1:0] fetch_valid;
  pc_t           fetch_pc [FW];
  logic [FW-1:0] fetch_tok_valid;
  token_t        fetch_tokens [FW];
  commit_t       commit [CW];
  stamp_t        now_stamp;

  int checks = 0, failures = 0;
  int model [int];
  int cyc = 0;
  int exp_tok [FW];
  bit exp_v [FW];

  ptht dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(pc_t pc);
    return int'(pc[2 +: 13]);
  endfunction

  function automatic int lookup(pc_t pc);
    return model.exists(idx(pc)) ? model[idx(pc)] : DEF;
  endfunction

  task automatic idle();
    fetch_valid = '0;
    for (int f = 0; f < FW; f++) fetch_pc[f] = '0;
    for (int c = 0; c < CW; c++) commit[c] = '0;
  endtask

  // one cycle: apply fetch/commit at negedge, check lookups at the next negedge
  task automatic step();
    int now;
    checks++;
    if (int'(now_stamp) != (cyc & 16'hffff)) begin
      failures++; $display("FAIL stamp %0d expected %0d", now_stamp, cyc);
    end
    now = cyc;
    for (int f = 0; f < FW; f++) begin
      exp_v[f]   = fetch_valid[f];
      exp_tok[f] = fetch_valid[f] ? lookup(fetch_pc[f]) : 0;
    end
    for (int c = 0; c < CW; c++)
      if (commit[c].valid) begin
        int r = (now - int'(commit[c].dispatch_stamp)) & 16'hffff;
        int v = int'(commit[c].base_tokens) + r;
        model[idx(commit[c].pc)] = (v > 1023) ? 1023 : v;
      end
    @(negedge clk);
    for (int f = 0; f < FW; f++) begin
      checks++;
      if (fetch_tok_valid[f] != exp_v[f] || int'(fetch_tokens[f]) != exp_tok[f]) begin
        failures++;
        $display("FAIL cyc %0d slot %0d tokens %0d/%0d", cyc, f, fetch_tokens[f], exp_tok[f]);
      end
    end
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    idle();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    // never-written entry returns the default cost
    fetch_valid = 4'b0001; fetch_pc[0] = 32'h1000;
    step();
    checks++; if (fetch_tokens[0] != token_t'(DEF)) failures++;

    // commit: base 5, 20 cycles in the window -> 25 tokens
    idle();
    commit[0] = '{valid: 1, pc: 32'h1000, base_tokens: 5, dispatch_stamp: stamp_t'(now_stamp - 20)};
    step();
    idle(); fetch_valid = 4'b0010; fetch_pc[1] = 32'h1000;
    step();
    checks++; if (fetch_tokens[1] != 25) begin failures++; $display("FAIL residency"); end

    // saturation
    idle();
    commit[2] = '{valid: 1, pc: 32'h2000, base_tokens: 1000, dispatch_stamp: stamp_t'(now_stamp - 300)};
    step();
    idle(); fetch_valid = 4'b0100; fetch_pc[2] = 32'h2000;
    step();
    checks++; if (fetch_tokens[2] != 1023) begin failures++; $display("FAIL saturation"); end

    // aliasing: PC + 32 KiB hits the same entry
    idle(); fetch_valid = 4'b1000; fetch_pc[3] = 32'h1000 + 32'h8000;
    step();
    checks++; if (fetch_tokens[3] != 25) begin failures++; $display("FAIL alias"); end

    // two commits to one entry in one cycle: slot 3 (youngest) wins,
    // and a lookup of the entry in that cycle returns the old cost
    idle();
    commit[1] = '{valid: 1, pc: 32'h3000, base_tokens: 7, dispatch_stamp: now_stamp};
    commit[3] = '{valid: 1, pc: 32'h3000, base_tokens: 9, dispatch_stamp: now_stamp};
    fetch_valid = 4'b0001; fetch_pc[0] = 32'h3000;
    step();
    checks++; if (fetch_tokens[0] != token_t'(DEF)) begin failures++; $display("FAIL rdw"); end
    idle(); fetch_valid = 4'b0001; fetch_pc[0] = 32'h3000;
    step();
    checks++; if (fetch_tokens[0] != 9) begin failures++; $display("FAIL order"); end

    // random traffic over a small PC footprint
    for (int t = 0; t < 20000; t++) begin
      idle();
      for (int f = 0; f < FW; f++) begin
        fetch_valid[f] = $urandom_range(0, 3) != 0;
        fetch_pc[f]    = pc_t'($urandom_range(0, 255) << 2);
      end
      for (int c = 0; c < CW; c++)
        if ($urandom_range(0, 2) == 0) begin
          commit[c].valid          = 1'b1;
          commit[c].pc             = pc_t'($urandom_range(0, 255) << 2);
          commit[c].base_tokens    = token_t'($urandom_range(0, 40));
          commit[c].dispatch_stamp = stamp_t'(now_stamp - stamp_t'($urandom_range(0, 400)));
        end
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
