// tb_data_mover: self-checking test of the data mover's beat sequence.
// For several layers (3x3 and 1x1 convolutions, stride-2 and stride-1
// max-pools) a reference loop nest in the testbench lists every beat the
// layer needs: bias beats, feature/weight read addresses, padding, first/last
// flags, output address and lane. Each beat issued is compared in order, the
// mover must issue one beat per clock with no gaps, and `done` must pulse one
// clock after the last beat.
module tb_data_mover;
  import cnn_pkg::*;
  localparam int NCU = 4;
  localparam int VEC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, beat_valid, feat_re, w_re;
  layer_cfg_t cfg;
  layer_mode_e beat_mode;
  beat_tag_t beat_tag;
  logic [31:0] feat_addr, w_addr;

  data_mover dut (.*);

  typedef struct {
    bit mode; bit bias; bit pad; bit first; bit last;
    bit fre; int faddr; bit wre; int waddr; int oaddr; int lane;
  } beat_t;
  beat_t exp_q[$];
  int checks = 0, failures = 0;
  longint cycle = 0, last_beat_cyc = 0;
  int n_pad = 0, n_bias = 0, n_clamp = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && beat_valid) begin
      beat_t e;
      last_beat_cyc <= cycle;
      if (exp_q.size() == 0) begin failures++; $display("extra beat"); end
      else begin
        e = exp_q.pop_front();
        checks++;
        if (beat_mode != layer_mode_e'(e.mode) || beat_tag.bias != e.bias || feat_re != e.fre ||
            w_re != e.wre || (e.wre && w_addr != 32'(e.waddr)) ||
            (!e.bias && (beat_tag.pad != e.pad || beat_tag.first != e.first ||
             beat_tag.last != e.last || (e.fre && feat_addr != 32'(e.faddr)) ||
             beat_tag.out_addr != 32'(e.oaddr) || int'(beat_tag.lane) != e.lane))) begin
          failures++;
          $display("beat mismatch at %0d: bias %0d/%0d fre %0d/%0d fa %0d/%0d wa %0d/%0d oa %0d/%0d lane %0d/%0d f%0d/%0d l%0d/%0d",
                   cycle, beat_tag.bias, e.bias, feat_re, e.fre, feat_addr, e.faddr, w_addr, e.waddr,
                   beat_tag.out_addr, e.oaddr, beat_tag.lane, e.lane, beat_tag.first, e.first,
                   beat_tag.last, e.last);
        end
      end
    end
  end

  task automatic expect_conv(layer_cfg_t c);
    int k, pad, wblk, ocg;
    k = int'(c.ksize); pad = (k - 1) / 2;
    wblk = k * k * int'(c.cg) + 1;
    ocg = (int'(c.og) * NCU + VEC - 1) / VEC;
    for (int og = 0; og < int'(c.og); og++) begin
      beat_t b;
      b = '{default: 0};
      b.bias = 1; b.wre = 1; b.waddr = int'(c.w_base) + og * wblk;
      exp_q.push_back(b); n_bias++;
      for (int oy = 0; oy < int'(c.height); oy++)
        for (int ox = 0; ox < int'(c.width); ox++)
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++)
              for (int g = 0; g < int'(c.cg); g++) begin
                int iy, ix;
                iy = oy + ky - pad; ix = ox + kx - pad;
                b = '{default: 0};
                b.pad = (iy < 0 || ix < 0 || iy >= int'(c.height) || ix >= int'(c.width));
                if (b.pad) n_pad++;
                b.fre = !b.pad;
                b.faddr = int'(c.in_base) + (iy * int'(c.width) + ix) * int'(c.cg) + g;
                b.wre = 1;
                b.waddr = int'(c.w_base) + og * wblk + 1 + (ky * k + kx) * int'(c.cg) + g;
                b.first = (ky == 0 && kx == 0 && g == 0);
                b.last  = (ky == k - 1 && kx == k - 1 && g == int'(c.cg) - 1);
                b.oaddr = int'(c.out_base) + (oy * int'(c.width) + ox) * ocg + (og * NCU) / VEC;
                b.lane  = (og * NCU) % VEC;
                exp_q.push_back(b);
              end
    end
  endtask

  task automatic expect_pool(layer_cfg_t c);
    int s, oh, ow;
    s = int'(c.pool_stride);
    oh = (s == 2) ? int'(c.height) / 2 : int'(c.height);
    ow = (s == 2) ? int'(c.width) / 2 : int'(c.width);
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int g = 0; g < int'(c.cg); g++)
          for (int p = 0; p < 4; p++) begin
            beat_t b; int iy, ix;
            iy = oy * s + p / 2; ix = ox * s + p % 2;
            if (iy > int'(c.height) - 1) begin iy = int'(c.height) - 1; n_clamp++; end
            if (ix > int'(c.width) - 1)  begin ix = int'(c.width) - 1; n_clamp++; end
            b = '{default: 0};
            b.mode = 1; b.fre = 1;
            b.faddr = int'(c.in_base) + (iy * int'(c.width) + ix) * int'(c.cg) + g;
            b.first = (p == 0); b.last = (p == 3);
            b.oaddr = int'(c.out_base) + (oy * ow + ox) * int'(c.cg) + g;
            exp_q.push_back(b);
          end
  endtask

  task automatic run_layer(layer_cfg_t c);
    longint t0, nb;
    if (c.mode == MODE_CONV) expect_conv(c); else expect_pool(c);
    nb = exp_q.size();
    @(negedge clk); cfg = c; start = 1;
    t0 = cycle;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d beats not issued", exp_q.size()); end
    // start is sampled, the first beat follows one clock later, then one beat per clock
    checks++;
    if (last_beat_cyc - t0 != nb + 1) begin
      failures++; $display("layer took %0d clocks for %0d beats", last_beat_cyc - t0, nb);
    end
  endtask

  initial begin
    layer_cfg_t c;
    start = 0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    c = '0; c.mode = MODE_CONV; c.in_base = 100; c.w_base = 5000; c.out_base = 9000;
    c.height = 5; c.width = 4; c.cg = 2; c.og = 3; c.ksize = 3; c.relu_en = 1;
    run_layer(c);
    c = '0; c.mode = MODE_CONV; c.in_base = 7; c.w_base = 300; c.out_base = 700;
    c.height = 3; c.width = 3; c.cg = 1; c.og = 2; c.ksize = 1;
    run_layer(c);
    c = '0; c.mode = MODE_POOL; c.in_base = 50; c.out_base = 800;
    c.height = 4; c.width = 6; c.cg = 2; c.pool_stride = 2;
    run_layer(c);
    c = '0; c.mode = MODE_POOL; c.in_base = 0; c.out_base = 400;
    c.height = 3; c.width = 3; c.cg = 3; c.pool_stride = 1;
    run_layer(c);
    checks++;
    if (n_pad == 0 || n_bias < 2 || n_clamp == 0) begin
      failures++; $display("coverage pad=%0d bias=%0d clamp=%0d", n_pad, n_bias, n_clamp);
    end
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
