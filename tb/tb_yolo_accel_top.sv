// tb_yolo_accel_top: end-to-end test of the accelerator on a small network.
//
// A five-layer network in the style of Tiny-YOLOv2 runs layer after layer on
// the same global memory, each layer reading what the previous one wrote:
//   L1 conv 3x3, 8x8x3 -> 8 channels, leaky   (input channels padded 3 -> 8)
//   L2 max-pool 2x2 stride 2 -> 4x4x8
//   L3 conv 3x3, 4x4x8 -> 12 channels, leaky  (output groups at lanes 0 and 4)
//   L4 max-pool 2x2 stride 1 -> 4x4x12         (edge windows clamp)
//   L5 conv 1x1 -> 8 channels, linear
// The testbench keeps its own copy of every feature map, computes each layer
// with plain integer loops, and compares the whole output region in memory
// after each layer. It also checks the layer time (done is seen beats + 7
// clocks after start is driven: beats + MEM_LAT + 5 after the edge that
// samples start) and
// counts how often each mechanism occurred: padding beats, bias beats, results
// written at a lane offset, negative leaky outputs, clamped pool windows and
// conv/pool mode switches; a mechanism that never occurred is a failure.
module tb_yolo_accel_top;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int NCU = 4;
  localparam int VEC = 8;
  localparam int DW  = 16;
  localparam int FWORDS = 4096;
  localparam int WWORDS = 1024;

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
    int cg, cp_in, oc, cp_out, pad;
    int wt[];
    int bs[];
    cg = (c_in + VEC - 1) / VEC; cp_in = cg * VEC;
    oc = og * NCU; cp_out = ((oc + VEC - 1) / VEC) * VEC;
    pad = (k - 1) / 2;
    wt = new[oc * k * k * cp_in];
    bs = new[oc];
    foreach (wt[i]) wt[i] = 0;
    for (int o = 0; o < oc; o++) begin
      bs[o] = $signed($urandom_range(0, 255)) - 128;
      for (int t = 0; t < k * k; t++)
        for (int ch = 0; ch < c_in; ch++) wt[(o * k * k + t) * cp_in + ch] = $signed($urandom_range(0, 127)) - 64;
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

  initial begin
    layer_cfg_t c;
    int base_a, base_b;
    start = 0; cfg = '0;
    foreach (fmem[i]) fmem[i] = '0;
    foreach (wmem[i]) wmem[i] = '0;
    base_a = 16; base_b = 2048;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // L1: 8x8x3 input
    ref_in = new[8 * 8 * 8];
    foreach (ref_in[i]) ref_in[i] = (i % 8 < 3) ? $signed($urandom_range(0, 511)) - 256 : 0;
    load_map(base_a, 8, 8, 8);
    conv_ref(8, 8, 3, 2, 3, 1'b1, 0);
    c = '0; c.mode = MODE_CONV; c.in_base = 32'(base_a); c.w_base = 0; c.out_base = 32'(base_b);
    c.height = 8; c.width = 8; c.cg = 1; c.og = 2; c.ksize = 3; c.relu_en = 1;
    run(c, 2 * (1 + 64 * 9));
    compare_map(base_b, 8, 8, 8, "L1");

    // L2: pool stride 2
    ref_in = ref_out;
    pool_ref(8, 8, 8, 2);
    c = '0; c.mode = MODE_POOL; c.in_base = 32'(base_b); c.out_base = 32'(base_a);
    c.height = 8; c.width = 8; c.cg = 1; c.pool_stride = 2;
    run(c, 16 * 4);
    compare_map(base_a, 4, 4, 8, "L2");

    // L3: conv 3x3 8 -> 12 channels
    ref_in = ref_out;
    conv_ref(4, 4, 8, 3, 3, 1'b1, 100);
    c = '0; c.mode = MODE_CONV; c.in_base = 32'(base_a); c.w_base = 100; c.out_base = 32'(base_b);
    c.height = 4; c.width = 4; c.cg = 1; c.og = 3; c.ksize = 3; c.relu_en = 1;
    run(c, 3 * (1 + 16 * 9));
    compare_map(base_b, 4, 4, 16, "L3");

    // L4: pool stride 1, two channel groups
    ref_in = ref_out;
    pool_ref(4, 4, 16, 1);
    c = '0; c.mode = MODE_POOL; c.in_base = 32'(base_b); c.out_base = 32'(base_a);
    c.height = 4; c.width = 4; c.cg = 2; c.pool_stride = 1;
    run(c, 16 * 2 * 4);
    compare_map(base_a, 4, 4, 16, "L4");

    // L5: conv 1x1, linear, 16 -> 8 channels
    ref_in = ref_out;
    conv_ref(4, 4, 16, 2, 1, 1'b0, 300);
    c = '0; c.mode = MODE_CONV; c.in_base = 32'(base_a); c.w_base = 300; c.out_base = 32'(base_b);
    c.height = 4; c.width = 4; c.cg = 2; c.og = 2; c.ksize = 1; c.relu_en = 0;
    run(c, 2 * (1 + 16 * 2));
    compare_map(base_b, 4, 4, 8, "L5");

    $display("mechanisms: pad=%0d bias=%0d lane_offset=%0d leaky=%0d clamp=%0d mode_switch=%0d",
             n_pad, n_bias, n_lane_off, n_leaky, n_clamp, n_switch);
    if (n_pad == 0)      begin failures++; $display("no padding beat"); end
    if (n_bias == 0)     begin failures++; $display("no bias beat"); end
    if (n_lane_off == 0) begin failures++; $display("no lane-offset write"); end
    if (n_leaky == 0)    begin failures++; $display("no negative leaky output"); end
    if (n_clamp == 0)    begin failures++; $display("no clamped pool window"); end
    if (n_switch == 0)   begin failures++; $display("no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
