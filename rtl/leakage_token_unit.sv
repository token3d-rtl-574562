// leakage_token_unit: temperature-dependent leakage, expressed in power tokens.
//
// Leakage grows exponentially with temperature, and more leakage heats the
// chip further, so the token budget must see leakage that follows the current
// temperature.  Once per window of WINDOW cycles (10K) every core's leakage
// is recomputed as
//     L_new = L_base * exp(LEAK_BETA * (T_current - T_BASE))
// and kept, in tokens per cycle, until the next window.
//
// Implementation: exp() is read from a 256-entry table indexed by the integer
// part of the core temperature (1 C steps); the table is computed at
// elaboration from LEAK_BETA and T_BASE, in unsigned Q4.12 (saturating at
// just under 16).  One multiplier is shared: after a window ends the cores
// are updated one per cycle, core 0 first, so the whole CMP is refreshed
// NCORES cycles after the window boundary.  The first refresh starts in the
// first cycle after reset; until a core has been refreshed its leakage reads
// as zero.  `leak_base` is the per-core leakage at T_BASE (the same for all
// cores of the homogeneous CMP) in tokens per cycle.
//
// The formula and the 10K-cycle window follow the document.  LEAK_BETA and
// T_BASE are technology values it takes from its thermal and power models
// without giving them; the defaults here are assumptions, as are the table
// resolution and the rounding (to nearest).
module leakage_token_unit
  import token3d_pkg::*;
#(
  parameter int unsigned NCORES    = NCORES_DEF,
  parameter int unsigned WINDOW    = LEAK_WINDOW_DEF,
  parameter real         LEAK_BETA = 0.025,   // 1/C
  parameter int          T_BASE    = 60       // C
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pow_t   leak_base,
  input  temp_t  temp        [NCORES],
  output pow_t   leak_tokens [NCORES],
  output logic   refresh_done            // pulses when the last core was updated
);

  localparam int unsigned FRAC   = 12;
  localparam int unsigned F_W    = 16;
  localparam int unsigned CNT_W  = $clog2(WINDOW);
  localparam int unsigned IDX_W  = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam int unsigned TI_W   = TEMP_W - TEMP_FRAC;   // integer degrees

  // exp(LEAK_BETA*(t-T_BASE)) in Q4.12, by range reduction and a Taylor series
  function automatic logic [F_W-1:0] exp_q(input int t);
    real x, term, sum, scaled;
    x    = LEAK_BETA * real'(t - T_BASE) / 64.0;
    sum  = 1.0;
    term = 1.0;
    for (int n = 1; n < 12; n++) begin
      term = term * x / real'(n);
      sum  = sum + term;
    end
    for (int s = 0; s < 6; s++) sum = sum * sum;   // (e^(x/64))^64
    scaled = sum * real'(1 << FRAC) + 0.5;
    if (scaled >= real'((1 << F_W) - 1)) return '1;
    return F_W'(longint'(scaled));
  endfunction

  logic [F_W-1:0] exp_lut [1 << TI_W];
  for (genvar t = 0; t < (1 << TI_W); t++) begin : g_lut
    localparam logic [F_W-1:0] F = exp_q(t);
    assign exp_lut[t] = F;
  end

  logic [CNT_W-1:0] cnt_q;
  logic             busy_q;
  logic [IDX_W-1:0] idx_q;
  logic [F_W-1:0]   factor;
  logic [POW_W+F_W-1:0] prod;
  logic [POW_W+F_W-FRAC:0] rounded;
  pow_t             new_leak;
  logic             win_end;

  assign win_end  = (cnt_q == CNT_W'(WINDOW - 1));
  assign factor   = exp_lut[temp[idx_q][TEMP_W-1:TEMP_FRAC]];
  assign prod     = (POW_W+F_W)'(leak_base) * (POW_W+F_W)'(factor);
  assign rounded  = (POW_W+F_W-FRAC+1)'((prod + (POW_W+F_W)'(1 << (FRAC-1))) >> FRAC);
  assign new_leak = (rounded > (POW_W+F_W-FRAC+1)'({POW_W{1'b1}})) ? '1 : rounded[POW_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q        <= CNT_W'(WINDOW - 1);
      busy_q       <= 1'b0;
      idx_q        <= '0;
      refresh_done <= 1'b0;
      for (int i = 0; i < NCORES; i++) leak_tokens[i] <= '0;
    end else begin
      cnt_q        <= win_end ? '0 : cnt_q + 1'b1;
      refresh_done <= 1'b0;
      if (busy_q) begin
        leak_tokens[idx_q] <= new_leak;
        if (idx_q == IDX_W'(NCORES - 1)) begin
          busy_q       <= 1'b0;
          refresh_done <= 1'b1;
        end
        idx_q <= idx_q + 1'b1;
      end
      if (win_end) begin
        busy_q <= 1'b1;
        idx_q  <= '0;
      end
    end
  end

endmodule
