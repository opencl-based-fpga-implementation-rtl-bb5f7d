// tb_tiny_yolo_net: the complete Tiny-YOLOv2 layer sequence on the
// accelerator at its default configuration, with the real channel counts
// (3-16-32-64-128-256-512-1024-1024-125) and the input reduced from 416x416
// to 64x64 so that the run stays short:
//   6 x (conv 3x3 + leaky, max-pool 2x2), the last pool with stride 1,
//   conv 3x3 512->1024, conv 3x3 1024->1024, conv 1x1 1024->125 linear.
// Every layer reads the previous layer's output from global memory. The
// testbench computes each layer with integer loops and compares the whole
// output map; weights are scaled with the fan-in so values stay in range. It
// checks each layer's time (beats + 7 clocks from driving start to seeing
// done) and prints the total number of beats.
module tb_tiny_yolo_net;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int NCU = 4;
  localparam int VEC = 8;
  localparam int DW  = 16;
  localparam int FWORDS = 16400;
  localparam int WWORDS = 500000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, feat_re, w_re, wr_en;
  layer_cfg_t cfg;
  logic [31:0] feat_addr, w_addr, wr_addr;
  logic [VEC*DW-1:0] feat_rdata, wr_data;
  logic [NCU*VEC*DW-1:0] w_rdata;
  logic [VEC-1:0] wr_lane_en;

  yolo_accel_top dut (.*);

  // Global memory model: one-clock reads, lane-masked writes.
  logic [VEC*DW-1:0]     fmem [FWORDS];
  logic [NCU*VEC*DW-1:0] wmem [WWORDS];
  always @(posedge clk) begin
    if (feat_re) feat_rdata <= fmem[feat_addr];
    if (w_re)    w_rdata    <= wmem[w_addr];
    if (wr_en)
      for (int i = 0; i < VEC; i++) if (wr_lane_en[i]) fmem[wr_addr][i*DW +: DW] <= wr_data[i*DW +: DW];
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_pad = 0, n_bias = 0, n_lane_off = 0, n_leaky = 0, n_clamp = 0, n_switch = 0;
  bit last_mode_valid = 0;
  layer_mode_e last_mode;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dut.beat_valid && dut.beat_tag.pad && dut.beat_mode == MODE_CONV) n_pad++;
      if (dut.beat_valid && dut.beat_tag.bias) n_bias++;
      if (wr_en && wr_lane_en != '1 && wr_lane_en[0] == 1'b0) n_lane_off++;
    end
  end

  // Reference feature maps, channels padded to a multiple of VEC.
  int ref_in[], ref_out[];

  function automatic int fidx(int y, int x, int ch, int w, int cp);
    return (y * w + x) * cp + ch;
  endfunction

  task load_map(int base, int h, int w, int cp);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int g = 0; g < cp / VEC; g++)
          for (int i = 0; i < VEC; i++)
            fmem[base + (y * w + x) * (cp / VEC) + g][i*DW +: DW] = DW'(ref_in[fidx(y, x, g*VEC + i, w, cp)]);
  endtask

  task compare_map(int base, int h, int w, int cp, string name);
    int bad;
    bad = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int ch = 0; ch < cp; ch++) begin
          logic signed [DW-1:0] got;
          got = fmem[base + (y * w + x) * (cp / VEC) + ch / VEC][(ch % VEC)*DW +: DW];
          checks++;
          if (got !== DW'(ref_out[fidx(y, x, ch, w, cp)])) begin
            bad++; failures++;
            if (bad < 5) $display("%s (%0d,%0d,%0d): got %0d exp %0d", name, y, x, ch, got, ref_out[fidx(y, x, ch, w, cp)]);
          end
        end
  endtask

  // Convolution layer: random weights written to memory, reference computed.
  task conv_ref(int h, int w, int c_in, int og, int k, bit relu, int wbase);
    int cg, cp_in, oc, cp_out, pad, r;
    int wt[];
    int bs[];
    cg = (c_in + VEC - 1) / VEC; cp_in = cg * VEC;
    oc = og * NCU; cp_out = ((oc + VEC - 1) / VEC) * VEC;
    pad = (k - 1) / 2;
    // weight range about 1.5/sqrt(fan-in) in Q8.8
    r = 2;
    while ((r * r) * (k * k * c_in) < 384 * 384) r++;
    wt = new[oc * k * k * cp_in];
    bs = new[oc];
    foreach (wt[i]) wt[i] = 0;
    for (int o = 0; o < oc; o++) begin
      bs[o] = $signed($urandom_range(0, 255)) - 128;
      for (int t = 0; t < k * k; t++)
        for (int ch = 0; ch < c_in; ch++) wt[(o * k * k + t) * cp_in + ch] = $signed($urandom_range(0, 2 * r)) - r;
    end
    for (int g = 0; g < og; g++) begin
      int blk;
      blk = wbase + g * (1 + k * k * cg);
      wmem[blk] = '0;
      for (int c = 0; c < NCU; c++) wmem[blk][(c*VEC)*DW +: DW] = DW'(bs[g*NCU + c]);
      for (int t = 0; t < k * k; t++)
        for (int gg = 0; gg < cg; gg++)
          for (int c = 0; c < NCU; c++)
            for (int i = 0; i < VEC; i++)
              wmem[blk + 1 + t * cg + gg][(c*VEC + i)*DW +: DW] = DW'(wt[((g*NCU + c) * k * k + t) * cp_in + gg*VEC + i]);
    end
    ref_out = new[h * w * cp_out];
    foreach (ref_out[i]) ref_out[i] = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int o = 0; o < oc; o++) begin
          longint acc;
          acc = 0;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++) begin
              int iy, ix;
              iy = y + ky - pad; ix = x + kx - pad;
              if (iy >= 0 && ix >= 0 && iy < h && ix < w)
                for (int ch = 0; ch < cp_in; ch++)
                  acc += longint'(ref_in[fidx(iy, ix, ch, w, cp_in)]) * longint'(wt[(o * k * k + ky * k + kx) * cp_in + ch]);
            end
          ref_out[fidx(y, x, o, w, cp_out)] = finish_value(acc, bs[o], relu);
          if (relu && ref_out[fidx(y, x, o, w, cp_out)] < 0) n_leaky++;
        end
  endtask

  task pool_ref(int h, int w, int cp, int s);
    int oh, ow;
    oh = (s == 2) ? h / 2 : h; ow = (s == 2) ? w / 2 : w;
    ref_out = new[oh * ow * cp];
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int ch = 0; ch < cp; ch++) begin
          int m;
          m = -100000;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++) begin
              int iy, ix;
              iy = y * s + dy; ix = x * s + dx;
              if (iy < h && ix < w) begin
                if (ref_in[fidx(iy, ix, ch, w, cp)] > m) m = ref_in[fidx(iy, ix, ch, w, cp)];
              end else if (ch == 0) n_clamp++;
            end
          ref_out[fidx(y, x, ch, ow, cp)] = m;
        end
  endtask

  task run(layer_cfg_t c, longint beats);
    longint t0;
    if (last_mode_valid && last_mode != c.mode) n_switch++;
    last_mode_valid = 1; last_mode = c.mode;
    @(negedge clk); cfg = c; start = 1;
    t0 = cycle;
    @(negedge clk); start = 0; cfg = '0;
    wait (done);
    checks++;
    if (cycle - t0 != beats + 7) begin
      failures++; $display("layer took %0d clocks, expected %0d", cycle - t0, beats + 7);
    end
    @(negedge clk);
  endtask

  longint total_beats = 0;

  task layer_conv(int h, int c_in, int c_out, int k, bit relu, int in_b, int out_b, int wbase, output int wnext);
    layer_cfg_t c;
    int cg, og;
    cg = (c_in + VEC - 1) / VEC; og = (c_out + NCU - 1) / NCU;
    ref_in = ref_out;
    conv_ref(h, h, c_in, og, k, relu, wbase);
    c = '0; c.mode = MODE_CONV; c.in_base = 32'(in_b); c.w_base = 32'(wbase); c.out_base = 32'(out_b);
    c.height = 16'(h); c.width = 16'(h); c.cg = 16'(cg); c.og = 16'(og); c.ksize = 2'(k); c.relu_en = relu;
    run(c, longint'(og) * (1 + longint'(h) * h * k * k * cg));
    total_beats += longint'(og) * (1 + longint'(h) * h * k * k * cg);
    compare_map(out_b, h, h, ((og * NCU + VEC - 1) / VEC) * VEC, $sformatf("conv %0dx%0dx%0d->%0d", h, h, c_in, c_out));
    wnext = wbase + og * (1 + k * k * cg);
  endtask

  task layer_pool(int h, int ch, int s, int in_b, int out_b);
    layer_cfg_t c;
    int cg, oh;
    cg = (ch + VEC - 1) / VEC; oh = (s == 2) ? h / 2 : h;
    ref_in = ref_out;
    pool_ref(h, h, cg * VEC, s);
    c = '0; c.mode = MODE_POOL; c.in_base = 32'(in_b); c.out_base = 32'(out_b);
    c.height = 16'(h); c.width = 16'(h); c.cg = 16'(cg); c.pool_stride = 2'(s);
    run(c, longint'(oh) * oh * cg * 4);
    total_beats += longint'(oh) * oh * cg * 4;
    compare_map(out_b, oh, oh, cg * VEC, $sformatf("pool %0dx%0dx%0d s%0d", h, h, ch, s));
  endtask

  initial begin
    int ba, bb, wb, h;
    int chans [7];
    chans = '{3, 16, 32, 64, 128, 256, 512};
    start = 0; cfg = '0;
    foreach (fmem[i]) fmem[i] = '0;
    foreach (wmem[i]) wmem[i] = '0;
    ba = 0; bb = 8200; wb = 0; h = 64;
    repeat (3) @(negedge clk);
    rst_n = 1;

    ref_in = new[h * h * 8];
    foreach (ref_in[i]) ref_in[i] = (i % 8 < 3) ? $signed($urandom_range(0, 511)) - 256 : 0;
    load_map(ba, h, h, 8);
    ref_out = ref_in;
    for (int l = 0; l < 6; l++) begin
      layer_conv(h, chans[l], chans[l+1], 3, 1'b1, ba, bb, wb, wb);
      layer_pool(h, chans[l+1], (l == 5) ? 1 : 2, bb, ba);
      if (l != 5) h = h / 2;
    end
    layer_conv(h, 512, 1024, 3, 1'b1, ba, bb, wb, wb);
    layer_conv(h, 1024, 1024, 3, 1'b1, bb, ba, wb, wb);
    layer_conv(h, 1024, 125, 1, 1'b0, ba, bb, wb, wb);

    $display("layers=15 beats=%0d weight_words=%0d", total_beats, wb);
    $display("mechanisms: pad=%0d bias=%0d lane_offset=%0d leaky=%0d clamp=%0d mode_switch=%0d",
             n_pad, n_bias, n_lane_off, n_leaky, n_clamp, n_switch);
    checks++;
    if (n_pad == 0 || n_bias == 0 || n_lane_off == 0 || n_leaky == 0 || n_clamp == 0 || n_switch == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
