// yolo_accel_top: deeply pipelined CNN layer accelerator for Tiny-YOLOv2.
//
// The host describes one layer (cfg) and pulses `start`. The data mover then
// walks the layer and issues one read beat per clock to global memory: a
// VEC-lane feature word and, for convolutions, a weight word holding NUM_CU
// weight vectors. The read data returns MEM_LAT clocks later and meets the
// beat's tag, delayed here by the same amount. Convolution beats go to the
// convolution kernel (NUM_CU compute units, one output channel each); pooling
// beats go to the max-pool unit. The result writer turns finished values into
// lane-masked global-memory writes. `done` pulses once the last result of
// the layer has been written; `busy` is high from start until then.
//
// Memory ports: reads are fixed-latency (data valid MEM_LAT clocks after
// *_re), writes are fire-and-forget with per-lane enables. Word layouts are
// described in cnn_pkg. A layer of B beats takes B + MEM_LAT + 5 clocks from
// start to done. The data mover / convolution kernel split, the compute
// units, the 8-lane vectors and the use of shared global memory follow the
// original OpenCL accelerator; the fixed-point format, the memory layout, the max-pool datapath
// and all timing are this design's choices.
module yolo_accel_top
  import cnn_pkg::layer_cfg_t, cnn_pkg::beat_tag_t, cnn_pkg::layer_mode_e,
         cnn_pkg::MODE_CONV, cnn_pkg::MODE_POOL, cnn_pkg::ADDR_W;
#(
  parameter int unsigned NUM_CU  = cnn_pkg::NUM_CU,
  parameter int unsigned VEC     = cnn_pkg::VEC,
  parameter int unsigned DATA_W  = cnn_pkg::DATA_W,
  parameter int unsigned FRAC    = cnn_pkg::FRAC,
  parameter int unsigned MEM_LAT = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host control
  input  logic                         start,
  input  layer_cfg_t                   cfg,
  output logic                         busy,
  output logic                         done,
  // global memory: feature reads
  output logic                         feat_re,
  output logic [ADDR_W-1:0]            feat_addr,
  input  logic [VEC*DATA_W-1:0]        feat_rdata,
  // global memory: weight reads
  output logic                         w_re,
  output logic [ADDR_W-1:0]            w_addr,
  input  logic [NUM_CU*VEC*DATA_W-1:0] w_rdata,
  // global memory: result writes
  output logic                         wr_en,
  output logic [ADDR_W-1:0]            wr_addr,
  output logic [VEC*DATA_W-1:0]        wr_data,
  output logic [VEC-1:0]               wr_lane_en
);
  localparam int unsigned DRAIN = MEM_LAT + 4;  // tag delay + kernel + writer

  initial assert (MEM_LAT >= 1) else $error("MEM_LAT must be at least 1");

  // Layer settings the datapath needs after start.
  logic relu_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                relu_q <= 1'b0;
    else if (start && !busy)   relu_q <= cfg.relu_en;
  end

  // ---------------- data mover ----------------
  logic        mv_busy, mv_done, beat_valid;
  layer_mode_e beat_mode;
  beat_tag_t   beat_tag;

  data_mover #(.NUM_CU(NUM_CU), .VEC(VEC)) u_mover (
    .clk, .rst_n,
    .start     (start && !busy),
    .cfg,
    .busy      (mv_busy),
    .done      (mv_done),
    .beat_valid,
    .beat_mode,
    .beat_tag,
    .feat_re,
    .feat_addr,
    .w_re,
    .w_addr
  );

  // ---------------- align tags with read data ----------------
  logic        dv_q   [MEM_LAT];
  layer_mode_e dmode_q[MEM_LAT];
  beat_tag_t   dtag_q [MEM_LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MEM_LAT; i++) begin
        dv_q[i] <= 1'b0; dmode_q[i] <= MODE_CONV; dtag_q[i] <= '0;
      end
    end else begin
      dv_q[0] <= beat_valid; dmode_q[0] <= beat_mode; dtag_q[0] <= beat_tag;
      for (int i = 1; i < MEM_LAT; i++) begin
        dv_q[i] <= dv_q[i-1]; dmode_q[i] <= dmode_q[i-1]; dtag_q[i] <= dtag_q[i-1];
      end
    end
  end

  logic      d_valid;
  beat_tag_t d_tag;
  assign d_valid = dv_q[MEM_LAT-1];
  assign d_tag   = dtag_q[MEM_LAT-1];

  logic signed [DATA_W-1:0] feat_v [VEC];
  logic signed [DATA_W-1:0] wgt_v  [NUM_CU][VEC];
  always_comb begin
    for (int i = 0; i < VEC; i++) feat_v[i] = feat_rdata[i*DATA_W +: DATA_W];
    for (int c = 0; c < NUM_CU; c++)
      for (int i = 0; i < VEC; i++) wgt_v[c][i] = w_rdata[(c*VEC + i)*DATA_W +: DATA_W];
  end

  // ---------------- convolution kernel ----------------
  logic                     cv_valid;
  beat_tag_t                cv_tag;
  logic signed [DATA_W-1:0] cv_data [NUM_CU];

  conv_kernel #(.NUM_CU(NUM_CU), .VEC(VEC), .DATA_W(DATA_W), .FRAC(FRAC)) u_conv (
    .clk, .rst_n,
    .relu_en  (relu_q),
    .in_valid (d_valid && dmode_q[MEM_LAT-1] == MODE_CONV),
    .in_tag   (d_tag),
    .feat     (feat_v),
    .wgt      (wgt_v),
    .out_valid(cv_valid),
    .out_tag  (cv_tag),
    .out_data (cv_data)
  );

  // ---------------- max-pool unit ----------------
  logic                     pl_valid;
  beat_tag_t                pl_tag;
  logic signed [DATA_W-1:0] pl_data [VEC];

  maxpool_unit #(.VEC(VEC), .DATA_W(DATA_W)) u_pool (
    .clk, .rst_n,
    .in_valid (d_valid && dmode_q[MEM_LAT-1] == MODE_POOL),
    .in_tag   (d_tag),
    .feat     (feat_v),
    .out_valid(pl_valid),
    .out_tag  (pl_tag),
    .out_data (pl_data)
  );

  // ---------------- result writer ----------------
  result_writer #(.NUM_CU(NUM_CU), .VEC(VEC), .DATA_W(DATA_W)) u_writer (
    .clk, .rst_n,
    .conv_valid(cv_valid),
    .conv_tag  (cv_tag),
    .conv_data (cv_data),
    .pool_valid(pl_valid),
    .pool_tag  (pl_tag),
    .pool_data (pl_data),
    .wr_en,
    .wr_addr,
    .wr_data,
    .wr_lane_en
  );

  // ---------------- completion ----------------
  logic                         draining;
  logic [$clog2(DRAIN+1)-1:0]   drain_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining  <= 1'b0;
      drain_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mv_done) begin
        draining  <= 1'b1;
        drain_cnt <= '0;
      end else if (draining) begin
        if (drain_cnt == $bits(drain_cnt)'(DRAIN - 1)) begin
          draining <= 1'b0;
          done     <= 1'b1;
        end else begin
          drain_cnt <= drain_cnt + 1;
        end
      end
    end
  end

  assign busy = mv_busy || draining;

endmodule
