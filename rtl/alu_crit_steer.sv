// alu_crit_steer: criticality-based ALU selection for a vertically stacked core.
//
// Half of the integer ALUs are fast, power-hungry units on the upper layers
// (next to the heatsink); the other half are low-power units on the lower
// layers that use 25 % of the power but are 25 % slower.  A criticality
// predictor in the core marks each issuing instruction critical or not.  This
// block assigns the instructions issued in a cycle to free ALUs:
//   * critical instructions go to a free fast ALU,
//   * non-critical instructions go to a free slow ALU,
//   * if the preferred group has no free unit the other group is used
//     (when ALLOW_FALLBACK), otherwise the instruction is not granted and must
//     retry next cycle.
// Slots are served in order 0..ISSUE_W-1 (oldest first); within a group the
// lowest-numbered free unit is taken.  The grant carries the result latency
// of the chosen unit so the scheduler can time the wake-up of dependants.
//
// From the document: the fast/slow split (half and half of the 6 integer ALUs
// of the core), the placement and the 25 % power / 25 % speed ratio.  Own
// choices: the fallback rule, the slot order, and the latencies (1 cycle for a
// fast ALU; a slow ALU's 1.25 cycles rounded up to 2).  Purely combinational.
module alu_crit_steer #(
  parameter int unsigned ISSUE_W        = 4,
  parameter int unsigned N_FAST         = 3,
  parameter int unsigned N_SLOW         = 3,
  parameter int unsigned FAST_LAT       = 1,
  parameter int unsigned SLOW_LAT       = 2,
  parameter bit          ALLOW_FALLBACK = 1'b1,
  localparam int unsigned UW = $clog2((N_FAST > N_SLOW ? N_FAST : N_SLOW) + 1)
) (
  input  logic [ISSUE_W-1:0] req_valid,
  input  logic [ISSUE_W-1:0] req_crit,
  input  logic [N_FAST-1:0]  fast_free,
  input  logic [N_SLOW-1:0]  slow_free,
  output logic [ISSUE_W-1:0] gnt_valid,
  output logic [ISSUE_W-1:0] gnt_fast,    // 1: fast (upper-layer) ALU
  output logic [UW-1:0]      gnt_unit [ISSUE_W],
  output logic [1:0]         gnt_lat  [ISSUE_W],
  output logic [N_FAST-1:0]  fast_used,
  output logic [N_SLOW-1:0]  slow_used
);

  logic [N_FAST-1:0] ff;
  logic [N_SLOW-1:0] sf;
  logic              found;

  always_comb begin
    ff        = fast_free;
    sf        = slow_free;
    fast_used = '0;
    slow_used = '0;
    for (int s = 0; s < ISSUE_W; s++) begin
      gnt_valid[s] = 1'b0;
      gnt_fast[s]  = 1'b0;
      gnt_unit[s]  = '0;
      gnt_lat[s]   = '0;
      found        = 1'b0;
      if (req_valid[s]) begin
        // preferred group
        if (req_crit[s]) begin
          for (int u = 0; u < N_FAST; u++)
            if (!found && ff[u]) begin
              found = 1'b1; ff[u] = 1'b0; fast_used[u] = 1'b1;
              gnt_fast[s] = 1'b1; gnt_unit[s] = UW'(u);
            end
        end else begin
          for (int u = 0; u < N_SLOW; u++)
            if (!found && sf[u]) begin
              found = 1'b1; sf[u] = 1'b0; slow_used[u] = 1'b1;
              gnt_fast[s] = 1'b0; gnt_unit[s] = UW'(u);
            end
        end
        // other group
        if (ALLOW_FALLBACK && !found) begin
          if (req_crit[s]) begin
            for (int u = 0; u < N_SLOW; u++)
              if (!found && sf[u]) begin
                found = 1'b1; sf[u] = 1'b0; slow_used[u] = 1'b1;
                gnt_fast[s] = 1'b0; gnt_unit[s] = UW'(u);
              end
          end else begin
            for (int u = 0; u < N_FAST; u++)
              if (!found && ff[u]) begin
                found = 1'b1; ff[u] = 1'b0; fast_used[u] = 1'b1;
                gnt_fast[s] = 1'b1; gnt_unit[s] = UW'(u);
              end
          end
        end
        gnt_valid[s] = found;
        if (found) gnt_lat[s] = gnt_fast[s] ? 2'(FAST_LAT) : 2'(SLOW_LAT);
      end
    end
  end

endmodule
