// maxpool_unit: lane-wise maximum over the beats of one pooling window.
//
// Beats arrive as VEC-wide feature vectors, one per clock; `first` marks the
// first vector of a window and `last` the final one. The unit keeps a running
// lane-wise maximum and, on the last beat, presents the window's maximum with
// out_valid for one clock, one clock later, together with that beat's tag.
// A 2x2 window is four beats; which input pixels form a window (and the edge
// handling of stride-1 pooling) is decided by the data mover. Signed
// comparison of DATA_W fixed-point values is this design's choice.
module maxpool_unit
  import cnn_pkg::beat_tag_t, cnn_pkg::ADDR_W;
#(
  parameter int unsigned VEC    = cnn_pkg::VEC,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  beat_tag_t                in_tag,
  input  logic signed [DATA_W-1:0] feat [VEC],
  output logic                     out_valid,
  output beat_tag_t                out_tag,
  output logic signed [DATA_W-1:0] out_data [VEC]
);
  logic signed [DATA_W-1:0] max_q [VEC];
  logic signed [DATA_W-1:0] max_n [VEC];

  always_comb begin
    for (int i = 0; i < VEC; i++)
      max_n[i] = (in_tag.first || feat[i] > max_q[i]) ? feat[i] : max_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int i = 0; i < VEC; i++) begin
        max_q[i]    <= '0;
        out_data[i] <= '0;
      end
    end else begin
      out_valid <= in_valid && in_tag.last;
      if (in_valid) begin
        max_q <= max_n;
        if (in_tag.last) begin
          out_data <= max_n;
          out_tag  <= in_tag;
        end
      end
    end
  end

endmodule
