// token3d_bucketizer: Token3D temperature buckets.
//
// Token3D ranks cores by temperature so that cooler cores (usually near the
// heatsink or the chip edges) receive more of the spare power.  There are as
// many buckets as layers.  The coolest core defines bucket 0 (the paper's
// bucket "one"); a core whose temperature lies k steps of STEP_PCT percent
// (of the coolest core's temperature) above the coolest one goes to bucket k,
// and every core beyond the last step goes to the hottest bucket NBUCKETS-1.
// Example with 4 buckets: coolest 70 C -> buckets 70..73.5, 73.5..77,
// 77..80.5 and above 80.5 C.  Classification does not need cycle-level speed:
// it is repeated every EPOCH cycles (100K).
//
// Implementation: core i is in bucket
//     b_i = #{ k in 1..NBUCKETS-1 : 100*(T_i - T_min) >= k*STEP_PCT*T_min }
// which needs no divider.  A core lying exactly on a boundary goes to the
// hotter bucket (own choice).  Temperatures are read as given on `temp`; the
// averaging of sensor readings is left to the thermal sensing side.  The first
// classification happens in the first cycle after reset, then every EPOCH
// cycles; `bucket` holds its value in between and `epoch` pulses for the
// cycle in which new buckets are registered (visible the next cycle).
module token3d_bucketizer
  import token3d_pkg::*;
#(
  parameter int unsigned NCORES   = NCORES_DEF,
  parameter int unsigned NBUCKETS = NLAYERS_DEF,
  parameter int unsigned EPOCH    = BUCKET_EPOCH_DEF,
  parameter int unsigned STEP_PCT = BUCKET_STEP_PCT_DEF,
  localparam int unsigned BW      = (NBUCKETS > 1) ? $clog2(NBUCKETS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  temp_t         temp   [NCORES],
  output logic [BW-1:0] bucket [NCORES],
  output logic          epoch
);

  localparam int unsigned CNT_W  = $clog2(EPOCH);
  localparam int unsigned PROD_W = TEMP_W + 8 + $clog2(NBUCKETS) + 1;

  logic [CNT_W-1:0] cnt_q;
  temp_t            tmin;
  logic [BW-1:0]    bucket_d [NCORES];

  always_comb begin
    tmin = temp[0];
    for (int i = 1; i < NCORES; i++)
      if (temp[i] < tmin) tmin = temp[i];
  end

  always_comb begin
    for (int i = 0; i < NCORES; i++) begin
      logic [PROD_W-1:0] lhs;
      lhs = PROD_W'(temp[i] - tmin) * PROD_W'(100);
      bucket_d[i] = '0;
      for (int k = 1; k < NBUCKETS; k++)
        if (lhs >= PROD_W'(k * STEP_PCT) * PROD_W'(tmin))
          bucket_d[i] = BW'(k);
    end
  end

  assign epoch = (cnt_q == CNT_W'(EPOCH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= CNT_W'(EPOCH - 1);
      for (int i = 0; i < NCORES; i++) bucket[i] <= '0;
    end else begin
      cnt_q <= epoch ? '0 : cnt_q + 1'b1;
      if (epoch)
        for (int i = 0; i < NCORES; i++) bucket[i] <= bucket_d[i];
    end
  end

endmodule
