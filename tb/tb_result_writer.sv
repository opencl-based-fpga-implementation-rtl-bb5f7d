// tb_result_writer: self-checking test of the result writer.
// Presents convolution results at every lane offset and pooled vectors, in
// random order with idle clocks, and checks the write address, the data in
// the enabled lanes, the lane-enable mask and the one-clock delay.
module tb_result_writer;
  import cnn_pkg::beat_tag_t;
  localparam int NCU = 4;
  localparam int VEC = 8;
  localparam int DW  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic conv_valid, pool_valid, wr_en;
  beat_tag_t conv_tag, pool_tag;
  logic signed [DW-1:0] conv_data [NCU], pool_data [VEC];
  logic [31:0] wr_addr;
  logic [VEC*DW-1:0] wr_data;
  logic [VEC-1:0] wr_lane_en;

  result_writer dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { int addr; logic [VEC*DW-1:0] data; logic [VEC-1:0] en; longint cyc; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && wr_en) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected write"); end
      else begin
        e = q.pop_front();
        if (wr_addr != 32'(e.addr) || wr_lane_en != e.en || cycle != e.cyc) begin
          failures++; $display("write addr %0d en %b exp %0d %b", wr_addr, wr_lane_en, e.addr, e.en);
        end
        for (int i = 0; i < VEC; i++)
          if (e.en[i] && wr_data[i*DW +: DW] != e.data[i*DW +: DW]) begin
            failures++; $display("lane %0d data mismatch", i);
          end
      end
    end
  end

  initial begin
    conv_valid = 0; pool_valid = 0; conv_tag = '0; pool_tag = '0;
    foreach (conv_data[i]) conv_data[i] = 0;
    foreach (pool_data[i]) pool_data[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      exp_t e;
      @(negedge clk);
      conv_valid = 0; pool_valid = 0;
      e.data = '0; e.en = '0; e.addr = $urandom_range(0, 100000); e.cyc = cycle + 1;
      case ($urandom_range(0, 2))
        0: ;
        1: begin
          int lane;
          lane = NCU * $urandom_range(0, VEC / NCU - 1);
          conv_valid = 1; conv_tag = '0; conv_tag.out_addr = 32'(e.addr); conv_tag.lane = 3'(lane);
          for (int c = 0; c < NCU; c++) begin
            conv_data[c] = DW'($urandom);
            e.data[(lane + c)*DW +: DW] = conv_data[c];
            e.en[lane + c] = 1'b1;
          end
          if (lane == 0) e.en = '1;  // lane-0 writes clear the rest of the word
          q.push_back(e);
        end
        default: begin
          pool_valid = 1; pool_tag = '0; pool_tag.out_addr = 32'(e.addr);
          for (int i = 0; i < VEC; i++) begin
            pool_data[i] = DW'($urandom);
            e.data[i*DW +: DW] = pool_data[i];
          end
          e.en = '1;
          q.push_back(e);
        end
      endcase
    end
    @(negedge clk); conv_valid = 0; pool_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d writes missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
