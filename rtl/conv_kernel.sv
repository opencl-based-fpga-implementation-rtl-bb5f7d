// conv_kernel: the convolution kernel, NUM_CU compute units working side by side.
//
// Every beat broadcasts one VEC-wide feature vector to all compute units; each
// unit takes its own VEC weights from the NUM_CU*VEC-wide weight word, so the
// kernel produces NUM_CU output channels of the same pixel at once. A beat
// flagged `bias` does no arithmetic: it loads the per-unit bias registers from
// lane 0 of each unit's weight vector, and those biases are used for every
// pixel until the next bias beat. A `pad` beat (a tap outside the map) feeds
// zeros instead of the feature vector.
//
// The beat tag (output address and lane) is delayed alongside the compute
// units, so out_valid, out_data and out_tag leave together, LAT = 3 clocks
// after the last beat of a pixel. One beat per clock, no back-pressure.
// NUM_CU and VEC follow the 4-CU, 8-lane configuration; how the units share
// data is this design's choice.
module conv_kernel
  import cnn_pkg::beat_tag_t, cnn_pkg::ADDR_W;
#(
  parameter int unsigned NUM_CU = cnn_pkg::NUM_CU,
  parameter int unsigned VEC    = cnn_pkg::VEC,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W,
  parameter int unsigned FRAC   = cnn_pkg::FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     relu_en,
  input  logic                     in_valid,
  input  beat_tag_t                in_tag,
  input  logic signed [DATA_W-1:0] feat [VEC],
  input  logic signed [DATA_W-1:0] wgt  [NUM_CU][VEC],
  output logic                     out_valid,
  output beat_tag_t                out_tag,
  output logic signed [DATA_W-1:0] out_data [NUM_CU]
);
  localparam int unsigned LAT = 3;

  logic signed [DATA_W-1:0] bias_q [NUM_CU];
  logic signed [DATA_W-1:0] feat_m [VEC];
  logic                     mac_valid;
  logic [NUM_CU-1:0]        cu_valid;

  assign mac_valid = in_valid && !in_tag.bias;

  always_comb begin
    for (int i = 0; i < VEC; i++) feat_m[i] = in_tag.pad ? '0 : feat[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CU; c++) bias_q[c] <= '0;
    end else if (in_valid && in_tag.bias) begin
      for (int c = 0; c < NUM_CU; c++) bias_q[c] <= wgt[c][0];
    end
  end

  for (genvar c = 0; c < NUM_CU; c++) begin : g_cu
    conv_cu #(.VEC(VEC), .DATA_W(DATA_W), .FRAC(FRAC)) u_cu (
      .clk, .rst_n,
      .in_valid (mac_valid),
      .in_first (in_tag.first),
      .in_last  (in_tag.last),
      .feat     (feat_m),
      .wgt      (wgt[c]),
      .bias     (bias_q[c]),
      .relu_en,
      .out_valid(cu_valid[c]),
      .out_data (out_data[c])
    );
  end

  // Tag delay line, matched to the compute-unit latency.
  beat_tag_t tag_d [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) tag_d[i] <= '0;
    end else begin
      tag_d[0] <= in_tag;
      for (int i = 1; i < LAT; i++) tag_d[i] <= tag_d[i-1];
    end
  end

  assign out_valid = cu_valid[0];
  assign out_tag   = tag_d[LAT-1];

  // All units see the same control, so they finish together.
  always_comb assert (!rst_n || cu_valid == '0 || cu_valid == '1);

endmodule
