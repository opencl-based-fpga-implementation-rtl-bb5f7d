// tb_conv_cu: self-checking test of one compute unit.
// Streams back-to-back dot products of random length (1..6 beats) with
// random features, weights, bias and ReLU setting, and checks each result
// against an integer reference and its arrival exactly 3 clocks after the
// last beat. Large values are mixed in to reach the saturation limits.
module tb_conv_cu;
  import cnn_ref_pkg::*;
  localparam int VEC = 8;
  localparam int DW  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, relu_en, out_valid;
  logic signed [DW-1:0] feat [VEC], wgt [VEC], bias, out_data;

  conv_cu dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  int exp_val[$];
  longint exp_cyc[$];
  int n_sat = 0, n_neg_relu = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int ev; longint ec;
        ev = exp_val.pop_front(); ec = exp_cyc.pop_front();
        if (out_data !== DW'(ev) || cycle != ec) begin
          failures++;
          $display("mismatch: got %0d at %0d, expected %0d at %0d", out_data, cycle, ev, ec);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; relu_en = 0; bias = 0;
    foreach (feat[i]) begin feat[i] = 0; wgt[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int px = 0; px < 400; px++) begin
      int n; longint acc; int b; bit r;
      n = $urandom_range(1, 6);
      b = rnd_val();
      r = $urandom_range(0, 1);
      acc = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = (k == 0); in_last = (k == n - 1);
        bias = DW'(b); relu_en = r;
        for (int i = 0; i < VEC; i++) begin
          int f, w;
          f = rnd_val(); w = rnd_val();
          feat[i] = DW'(f); wgt[i] = DW'(w);
          acc += longint'(f) * longint'(w);
        end
        if (k == n - 1) begin
          int ev;
          ev = finish_value(acc, b, r);
          if (ev == 32767 || ev == -32768) n_sat++;
          if (r && ev < 0) n_neg_relu++;
          exp_val.push_back(ev);
          exp_cyc.push_back(cycle + 3);
        end
        // occasional idle clock inside the stream
        if ($urandom_range(0, 9) == 0) begin
          @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    if (exp_val.size() != 0) begin failures++; $display("%0d results missing", exp_val.size()); end
    checks++;
    if (n_sat == 0 || n_neg_relu == 0) begin
      failures++; $display("coverage: saturations=%0d leaky=%0d", n_sat, n_neg_relu);
    end
    $display("saturated=%0d leaky-negative=%0d", n_sat, n_neg_relu);
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
