// tb_maxpool_unit: self-checking test of the lane-wise max-pool unit.
// Sends windows of 4 beats (and a few of 1..6 beats) of random signed
// vectors, with idle clocks between some beats, and checks each window's
// lane-wise maximum, its tag and that it appears one clock after the last beat.
module tb_maxpool_unit;
  import cnn_pkg::beat_tag_t;
  localparam int VEC = 8;
  localparam int DW  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  beat_tag_t in_tag, out_tag;
  logic signed [DW-1:0] feat [VEC], out_data [VEC];

  maxpool_unit dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { int v[VEC]; longint cyc; int addr; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (cycle != e.cyc || out_tag.out_addr != 32'(e.addr)) begin
          failures++; $display("timing/tag mismatch at %0d", cycle);
        end
        for (int i = 0; i < VEC; i++) if (out_data[i] !== DW'(e.v[i])) begin
          failures++; $display("lane %0d got %0d exp %0d", i, out_data[i], e.v[i]);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_tag = '0;
    foreach (feat[i]) feat[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      int n; exp_t e;
      n = (w % 10 == 9) ? $urandom_range(1, 6) : 4;
      foreach (e.v[i]) e.v[i] = -40000;
      for (int k = 0; k < n; k++) begin
        if ($urandom_range(0, 7) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_tag = '0;
        in_tag.first = (k == 0); in_tag.last = (k == n - 1); in_tag.out_addr = 32'(w);
        for (int i = 0; i < VEC; i++) begin
          int v;
          v = $signed($urandom_range(0, 65535)) - 32768;
          feat[i] = DW'(v);
          if (v > e.v[i]) e.v[i] = v;
        end
      end
      e.cyc = cycle + 1; e.addr = w;
      q.push_back(e);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d windows missing", q.size()); end
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
