// tb_iw_layer_gate: self-checking test of layer-granular window resizing.
//
// A reference model keeps each layer's state (on / draining / off) and is
// stepped with the same requests and occupancy.  Directed steps: shrink
// from 4 to 2 layers with entries still in layer 0 (it drains, layer 1 goes
// straight off), drain completes, regrow to 4, request 0 (one layer kept).
// Then random requests and occupancy.  Every cycle alloc_mask, layer_power,
// layer_draining and active_layers are compared with the model.
module tb_iw_layer_gate;
  localparam int unsigned E = 128, L = 4, EPL = 32;

  logic clk = 0, rst_n = 0;
  logic [2:0]   req_layers;
  logic [E-1:0] entry_busy;
  logic [E-1:0] alloc_mask;
  logic [L-1:0] layer_power, layer_draining;
  logic [2:0]   active_layers;

  int checks = 0, failures = 0;
  int st [L];     // 0 off, 1 on, 2 draining
  int n_drain = 0, n_off = 0, n_grow = 0;

  iw_layer_gate dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    int r = int'(req_layers);
    if (r == 0) r = 1;
    if (r > L) r = L;
    for (int l = 0; l < L; l++) begin
      bit want  = l >= L - r;
      bit empty = entry_busy[l*EPL +: EPL] == 0;
      case (st[l])
        1: if (!want) st[l] = empty ? 0 : 2;
        2: if (want) st[l] = 1; else if (empty) st[l] = 0;
        default: if (want) begin st[l] = 1; n_grow++; end
      endcase
      if (st[l] == 2) n_drain++;
    end
    @(posedge clk); #1;
    begin
      int act = 0;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (alloc_mask[l*EPL +: EPL] != {EPL{st[l] == 1}} || layer_power[l] != (st[l] != 0) ||
            layer_draining[l] != (st[l] == 2)) begin
          failures++; $display("FAIL layer %0d state %0d", l, st[l]);
        end
        if (st[l] == 1) act++;
        if (st[l] == 0) n_off++;
      end
      checks++;
      if (int'(active_layers) != act) begin failures++; $display("FAIL active %0d/%0d", active_layers, act); end
    end
    @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < L; l++) st[l] = 1;
    req_layers = 3'd4; entry_busy = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (alloc_mask != '1 || active_layers != 4) failures++;

    entry_busy[3] = 1'b1;                 // layer 0 still holds an instruction
    req_layers = 3'd2; step();
    checks++; if (layer_draining != 4'b0001 || layer_power != 4'b1101) failures++;
    step();
    entry_busy = '0; step();              // drained -> off
    checks++; if (layer_power != 4'b1100 || alloc_mask != {64'hffff_ffff_ffff_ffff, 64'h0}) failures++;
    req_layers = 3'd4; step();            // regrow
    checks++; if (layer_power != 4'b1111 || active_layers != 4) failures++;
    req_layers = 3'd0; step();            // never below one layer
    checks++; if (layer_power != 4'b1000 || active_layers != 1) failures++;

    for (int t = 0; t < 5000; t++) begin
      if ($urandom_range(0, 7) == 0) req_layers = 3'($urandom_range(0, 5));
      for (int w = 0; w < 4; w++) entry_busy[w*32 +: 32] = $urandom_range(0, 3) == 0 ? $urandom() : 32'h0;
      step();
    end
    checks++;
    if (n_drain == 0 || n_off == 0 || n_grow == 0) begin failures++; $display("FAIL coverage"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
