// tb_conv_kernel: self-checking test of the NUM_CU-unit convolution kernel.
// Runs several output groups, each a bias beat followed back-to-back by
// pixels of random length with random pad beats, and checks every unit's
// result, the tag that comes out with it and the 3-clock latency. The bias
// beat of a new group follows the last beat of the previous group directly,
// so a bias change while results are in flight is exercised.
module tb_conv_kernel;
  import cnn_pkg::beat_tag_t;
  import cnn_ref_pkg::*;
  localparam int NCU = 4;
  localparam int VEC = 8;
  localparam int DW  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic relu_en, in_valid, out_valid;
  beat_tag_t in_tag, out_tag;
  logic signed [DW-1:0] feat [VEC], wgt [NCU][VEC], out_data [NCU];

  conv_kernel dut (.*);

  int checks = 0, failures = 0, n_pad = 0, n_groups = 0;
  longint cycle = 0;
  typedef struct { int v[NCU]; longint cyc; int addr; } exp_t;
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
          failures++; $display("timing/tag: cycle %0d exp %0d addr %0d exp %0d", cycle, e.cyc, out_tag.out_addr, e.addr);
        end
        for (int c = 0; c < NCU; c++) if (out_data[c] !== DW'(e.v[c])) begin
          failures++; $display("cu %0d got %0d exp %0d", c, out_data[c], e.v[c]);
        end
      end
    end
  end

  int bias_now [NCU];

  initial begin
    in_valid = 0; in_tag = '0; relu_en = 1;
    foreach (feat[i]) feat[i] = 0;
    foreach (wgt[c, i]) wgt[c][i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 6; g++) begin
      @(negedge clk);
      in_valid = 1; in_tag = '0; in_tag.bias = 1;
      for (int c = 0; c < NCU; c++) begin
        bias_now[c] = rnd_val();
        for (int i = 0; i < VEC; i++) wgt[c][i] = (i == 0) ? DW'(bias_now[c]) : DW'($urandom);
      end
      foreach (feat[i]) feat[i] = DW'($urandom);
      n_groups++;
      for (int px = 0; px < 20; px++) begin
        int n; longint acc [NCU]; exp_t e;
        n = $urandom_range(1, 5);
        foreach (acc[c]) acc[c] = 0;
        for (int k = 0; k < n; k++) begin
          bit pad;
          @(negedge clk);
          pad = ($urandom_range(0, 3) == 0);
          in_valid = 1; in_tag = '0;
          in_tag.pad = pad; in_tag.first = (k == 0); in_tag.last = (k == n - 1);
          in_tag.out_addr = 32'(g * 100 + px);
          if (pad) n_pad++;
          for (int i = 0; i < VEC; i++) begin
            int f;
            f = rnd_val(); feat[i] = DW'(f);
            for (int c = 0; c < NCU; c++) begin
              int w;
              w = rnd_val(); wgt[c][i] = DW'(w);
              if (!pad) acc[c] += longint'(f) * longint'(w);
            end
          end
        end
        for (int c = 0; c < NCU; c++) e.v[c] = finish_value(acc[c], bias_now[c], 1'b1);
        e.cyc = cycle + 3; e.addr = g * 100 + px;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_pad == 0 || n_groups < 2) begin
      failures++; $display("left=%0d pads=%0d groups=%0d", q.size(), n_pad, n_groups);
    end
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
