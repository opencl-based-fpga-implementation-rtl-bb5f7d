// conv_cu: one compute unit of the convolution kernel.
//
// Each valid beat brings VEC features and the VEC matching weights of this
// unit's output channel. The unit multiplies them lane by lane (stage 1), sums
// the products in an adder tree (stage 2) and adds the sum to its accumulator
// (stage 3). A beat flagged `first` restarts the accumulator; on a beat
// flagged `last` the finished sum, plus the bias, goes through the leaky ReLU
// (when relu_en is set), is shifted back to the DATA_W fixed-point format and
// saturated, and appears on out_data with out_valid for one clock. bias and
// relu_en are sampled with every beat and travel down the pipeline with it;
// the values given with the last beat of a sum are the ones applied.
//
// Timing: a beat accepted at clock edge n gives out_valid at edge n+3. One beat
// per clock, no stalls. Fixed-point format, accumulator width and the leaky
// slope (LEAKY_NUM/2**LEAKY_SH) are choices of this design; the compute unit
// and its VEC-wide vector come from the 4-CU, 8-lane configuration.
module conv_cu #(
  parameter int unsigned VEC       = cnn_pkg::VEC,
  parameter int unsigned DATA_W    = cnn_pkg::DATA_W,
  parameter int unsigned FRAC      = cnn_pkg::FRAC,
  parameter int unsigned ACC_W     = cnn_pkg::ACC_W,
  parameter int unsigned LEAKY_NUM = cnn_pkg::LEAKY_NUM,
  parameter int unsigned LEAKY_SH  = cnn_pkg::LEAKY_SH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic signed [DATA_W-1:0] feat [VEC],
  input  logic signed [DATA_W-1:0] wgt  [VEC],
  input  logic signed [DATA_W-1:0] bias,
  input  logic                     relu_en,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned EXT_W  = ACC_W + 8;

  // Stage 1: lane products.
  logic signed [PROD_W-1:0] prod_q [VEC];
  logic                     v1, first1, last1, relu1;
  logic signed [DATA_W-1:0] bias1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; relu1 <= 1'b0; bias1 <= '0;
      for (int i = 0; i < VEC; i++) prod_q[i] <= '0;
    end else begin
      v1     <= in_valid;
      first1 <= in_first;
      last1  <= in_last;
      relu1  <= relu_en;
      bias1  <= bias;
      for (int i = 0; i < VEC; i++) prod_q[i] <= PROD_W'(feat[i]) * PROD_W'(wgt[i]);
    end
  end

  // Stage 2: adder tree over the lanes.
  logic signed [ACC_W-1:0] tree_sum;
  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < VEC; i++) tree_sum = tree_sum + ACC_W'(prod_q[i]);
  end

  logic signed [ACC_W-1:0] sum_q;
  logic                    v2, first2, last2, relu2;
  logic signed [DATA_W-1:0] bias2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0; sum_q <= '0; relu2 <= 1'b0; bias2 <= '0;
    end else begin
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      relu2  <= relu1;
      bias2  <= bias1;
      sum_q  <= tree_sum;
    end
  end

  // Stage 3: accumulate, and on the last beat add bias, activate and saturate.
  logic signed [ACC_W-1:0]  acc_q, acc_next;
  logic signed [EXT_W-1:0]  biased, activated, shifted;
  logic signed [DATA_W-1:0] result;

  localparam logic signed [EXT_W-1:0] MAX_V = EXT_W'((2 ** (DATA_W - 1)) - 1);
  localparam logic signed [EXT_W-1:0] MIN_V = -EXT_W'(2 ** (DATA_W - 1));

  always_comb begin
    acc_next = first2 ? sum_q : acc_q + sum_q;
    biased   = EXT_W'(acc_next) + (EXT_W'(bias2) <<< FRAC);
    if (relu2 && biased < 0)
      activated = (biased * $signed(EXT_W'(LEAKY_NUM))) >>> LEAKY_SH;
    else
      activated = biased;
    shifted = activated >>> FRAC;
    if (shifted > MAX_V)      result = MAX_V[DATA_W-1:0];
    else if (shifted < MIN_V) result = MIN_V[DATA_W-1:0];
    else                      result = shifted[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v2 && last2;
      if (v2) begin
        acc_q <= acc_next;
        if (last2) out_data <= result;
      end
    end
  end

endmodule
