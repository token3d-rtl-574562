// tb_alu_crit_steer: self-checking test of criticality-based ALU selection.
//
// The model scans issue slots oldest first; a critical instruction takes the
// lowest free fast unit, else (fallback) the lowest free slow unit, and the
// reverse for a non-critical one.  Outputs are checked for random requests
// and free masks, plus directed cases: all critical with three fast units
// (the fourth falls back to a slow unit), and no free unit at all.
module tb_alu_crit_steer;
  localparam int unsigned IW = 4, NF = 3, NS = 3;

  logic [IW-1:0] req_valid, req_crit;
  logic [NF-1:0] fast_free;
  logic [NS-1:0] slow_free;
  logic [IW-1:0] gnt_valid, gnt_fast;
  logic [1:0]    gnt_unit [IW];
  logic [1:0]    gnt_lat  [IW];
  logic [NF-1:0] fast_used;
  logic [NS-1:0] slow_used;

  int checks = 0, failures = 0, n_fb = 0, n_stall = 0;
  logic clk = 0;

  alu_crit_steer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int first(logic [2:0] m);
    for (int u = 0; u < 3; u++) if (m[u]) return u;
    return -1;
  endfunction

  task automatic check();
    logic [2:0] f = fast_free, s = slow_free, fu = 0, su = 0;
    #1;
    for (int i = 0; i < IW; i++) begin
      bit v = 0, isf = 0; int u = 0, lat = 0;
      if (req_valid[i]) begin
        int a = req_crit[i] ? first(f) : first(s);
        if (a >= 0) begin v = 1; isf = req_crit[i]; u = a; end
        else begin
          a = req_crit[i] ? first(s) : first(f);
          if (a >= 0) begin v = 1; isf = !req_crit[i]; u = a; n_fb++; end
          else n_stall++;
        end
        if (v) begin
          if (isf) begin f[u] = 0; fu[u] = 1; lat = 1; end
          else     begin s[u] = 0; su[u] = 1; lat = 2; end
        end
      end
      checks++;
      if (gnt_valid[i] != v || (v && (gnt_fast[i] != isf || int'(gnt_unit[i]) != u || int'(gnt_lat[i]) != lat))) begin
        failures++;
        $display("FAIL slot %0d v=%0d/%0d fast=%0d/%0d unit=%0d/%0d", i, gnt_valid[i], v, gnt_fast[i], isf, gnt_unit[i], u);
      end
    end
    checks++;
    if (fast_used != fu || slow_used != su) begin failures++; $display("FAIL used masks"); end
  endtask

  initial begin
    req_valid = 4'b1111; req_crit = 4'b1111; fast_free = 3'b111; slow_free = 3'b111;
    check();
    checks++; if (gnt_fast != 4'b0111 || gnt_lat[3] != 2) failures++;
    fast_free = 0; slow_free = 0;
    check();
    checks++; if (gnt_valid != 0) failures++;
    req_crit = 4'b0000; fast_free = 3'b010; slow_free = 3'b101;
    check();
    checks++; if (gnt_valid != 4'b0111 || gnt_fast != 4'b0100 || gnt_unit[1] != 2) failures++;
    for (int t = 0; t < 10000; t++) begin
      req_valid = 4'($urandom()); req_crit = 4'($urandom());
      fast_free = 3'($urandom()); slow_free = 3'($urandom());
      check();
    end
    checks++; if (n_fb == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
