// core_power_meter: per-core power accounting and the core side of power
// token balancing.
//
// Each cycle the core's power is estimated as the sum of the PTHT costs of
// the instructions fetched (as returned by the table) plus the core's current
// leakage tokens.  The estimate is compared with the core's local budget:
//   * under budget  -> the difference is reported to the load-balancer as
//                      spare tokens (`spare`), `over` is low;
//   * over budget   -> `over` is high, no spare tokens are given.
// The tokens the balancer grants back (`grant`) raise the local budget for the
// cycle they arrive in.  If the estimate still exceeds budget + grant, the
// core is asked to cut power (`throttle`) and told by how much (`excess`), so
// that the core's power-reduction mechanism can pick a technique by distance
// to the budget.
//
// Follows the power-token / PTB description: fetch-time accumulation of PTHT
// costs, leakage translated to tokens, spare tokens sent from cores under the
// budget, over-budget cores being those that send none.  Own choices: the
// estimate is registered (`power` is the previous cycle's sum), power and
// budget use POW_W-bit saturating arithmetic, and a core exactly at its
// budget is neither over nor has spare tokens.
module core_power_meter
  import token3d_pkg::*;
#(
  parameter int unsigned FETCH_W = FETCH_W_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [FETCH_W-1:0]  tok_valid,
  input  token_t              tokens [FETCH_W],
  input  pow_t                leak_tokens,   // leakage tokens per cycle
  input  pow_t                budget,        // local per-core budget per cycle
  input  pow_t                grant,         // tokens granted by the balancer
  output pow_t                power,         // estimated tokens this cycle
  output pow_t                spare,
  output logic                over,
  output logic                throttle,
  output pow_t                excess
);

  pow_t sum_d;
  pow_t eff_budget;

  always_comb begin
    sum_d = leak_tokens;
    for (int f = 0; f < FETCH_W; f++)
      if (tok_valid[f]) sum_d = sat_add_pow(sum_d, pow_t'(tokens[f]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) power <= '0;
    else        power <= sum_d;
  end

  assign eff_budget = sat_add_pow(budget, grant);
  assign over       = power > budget;
  assign spare      = (power < budget) ? budget - power : '0;
  assign throttle   = power > eff_budget;
  assign excess     = throttle ? power - eff_budget : '0;

endmodule
