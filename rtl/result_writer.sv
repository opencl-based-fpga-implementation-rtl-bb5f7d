// result_writer: turns finished results into global-memory writes.
//
// In convolution mode the NUM_CU results of one pixel are placed in lanes
// lane .. lane+NUM_CU-1 of a VEC-lane word. A write at lane 0 enables every
// lane and clears the lanes above the results; a write at a higher lane
// enables only its own lanes. Because output groups are produced in
// ascending order, consecutive groups fill one feature-map word between them
// and channels beyond the layer's last output group read as zero in the next
// layer. In pooling mode a whole VEC-lane vector is written with every lane
// enabled. The write is registered: a result presented at edge n is on the
// write port (wr_en high for one clock) after edge n. Convolution results take
// priority if both arrive in the same clock, which the controller never lets
// happen. Lane-enable writes are this design's way of storing NUM_CU < VEC
// channels per pixel.
module result_writer
  import cnn_pkg::beat_tag_t, cnn_pkg::ADDR_W;
#(
  parameter int unsigned NUM_CU = cnn_pkg::NUM_CU,
  parameter int unsigned VEC    = cnn_pkg::VEC,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     conv_valid,
  input  beat_tag_t                conv_tag,
  input  logic signed [DATA_W-1:0] conv_data [NUM_CU],
  input  logic                     pool_valid,
  input  beat_tag_t                pool_tag,
  input  logic signed [DATA_W-1:0] pool_data [VEC],
  output logic                     wr_en,
  output logic [ADDR_W-1:0]        wr_addr,
  output logic [VEC*DATA_W-1:0]    wr_data,
  output logic [VEC-1:0]           wr_lane_en
);
  initial assert (VEC % NUM_CU == 0) else $error("VEC must be a multiple of NUM_CU");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      wr_lane_en <= '0;
    end else begin
      wr_en <= conv_valid || pool_valid;
      if (conv_valid) begin
        wr_addr    <= conv_tag.out_addr;
        wr_data    <= '0;
        wr_lane_en <= (conv_tag.lane == '0) ? '1 : '0;
        for (int c = 0; c < NUM_CU; c++) begin
          wr_data[(int'(conv_tag.lane) + c)*DATA_W +: DATA_W] <= conv_data[c];
          wr_lane_en[int'(conv_tag.lane) + c]                 <= 1'b1;
        end
      end else if (pool_valid) begin
        wr_addr    <= pool_tag.out_addr;
        wr_lane_en <= '1;
        for (int i = 0; i < VEC; i++) wr_data[i*DATA_W +: DATA_W] <= pool_data[i];
      end
    end
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(conv_valid && pool_valid))
    else $error("conv and pool results collide");

endmodule
