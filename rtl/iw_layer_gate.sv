// iw_layer_gate: layer-granular resizing of the instruction window (IW) of a
// vertically stacked core.
//
// In the vertical core every structure is split across the layers, so the
// 128-entry IW holds 32 entries per layer on 4 layers, and the window can only
// be shrunk or grown a whole layer (32 entries) at a time.  A resizing policy
// (memory-level-parallelism based, outside this block) requests how many
// layers should be in use; this block turns the request into allocation and
// power-gating controls:
//   * a layer that is wanted is ON: its entries may be allocated, it is powered;
//   * a layer no longer wanted stops taking new instructions (DRAIN) and stays
//     powered until all its entries have left the window;
//   * a drained layer is OFF (not powered).  A wanted layer turns ON again at
//     once, whether it was draining or off.
// Layers are given up from layer 0 (bottom, farthest from the heatsink)
// upwards; the top layer is the last to go.  A request of 0 is treated as 1
// and one larger than LAYERS as LAYERS: the window never loses all entries.
//
// From the document: 128 entries, 4 layers of 32, disabling by whole layers.
// Own choices: the order in which layers are given up, draining before power
// off, and the registered state (a new request takes effect on
// `alloc_mask`/`layer_power` one cycle later).
module iw_layer_gate #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LAYERS  = 4,
  localparam int unsigned EPL    = ENTRIES / LAYERS,       // entries per layer
  localparam int unsigned LW     = $clog2(LAYERS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LW-1:0]      req_layers,     // requested number of layers
  input  logic [ENTRIES-1:0] entry_busy,     // entry holds an instruction
  output logic [ENTRIES-1:0] alloc_mask,     // entries open for allocation
  output logic [LAYERS-1:0]  layer_power,    // layer powered
  output logic [LAYERS-1:0]  layer_draining,
  output logic [LW-1:0]      active_layers   // layers open for allocation
);

  typedef enum logic [1:0] {L_OFF, L_ON, L_DRAIN} lstate_e;

  lstate_e          st_q [LAYERS];
  logic [LW-1:0]    req_c;
  logic [LAYERS-1:0] want, empty;

  always_comb begin
    if (req_layers == '0)                req_c = LW'(1);
    else if (req_layers > LW'(LAYERS))   req_c = LW'(LAYERS);
    else                                 req_c = req_layers;
    for (int l = 0; l < LAYERS; l++) begin
      want[l]  = (l >= int'(LAYERS) - int'(req_c));
      empty[l] = (entry_busy[l*EPL +: EPL] == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LAYERS; l++) st_q[l] <= L_ON;
    end else begin
      for (int l = 0; l < LAYERS; l++) begin
        unique case (st_q[l])
          L_ON:    if (!want[l]) st_q[l] <= empty[l] ? L_OFF : L_DRAIN;
          L_DRAIN: if (want[l]) st_q[l] <= L_ON;
                   else if (empty[l]) st_q[l] <= L_OFF;
          L_OFF:   if (want[l]) st_q[l] <= L_ON;
          default: st_q[l] <= L_ON;
        endcase
      end
    end
  end

  always_comb begin
    active_layers = '0;
    for (int l = 0; l < LAYERS; l++) begin
      alloc_mask[l*EPL +: EPL] = {EPL{st_q[l] == L_ON}};
      layer_power[l]           = (st_q[l] != L_OFF);
      layer_draining[l]        = (st_q[l] == L_DRAIN);
      if (st_q[l] == L_ON) active_layers = active_layers + 1'b1;
    end
  end

endmodule
