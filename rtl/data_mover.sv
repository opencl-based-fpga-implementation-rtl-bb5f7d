// data_mover: the data mover kernel, the address generator of the accelerator.
//
// On `start` it latches the layer description and walks the layer's loops,
// issuing one global-memory read beat per clock until the layer is done:
//
//   convolution: for og (output group of NUM_CU channels)
//                  one bias beat (weight read of word 0 of the group's block)
//                  for oy, ox (output pixel, 'same' padding, stride 1)
//                    for ky, kx (kernel tap), cg (input channel group)
//                      read feature word (iy*W+ix)*CG+cg and the weight word
//   max-pool:    for oy, ox, cg
//                  for the 2x2 window: read feature word of pixel
//                  (min(oy*S+py, H-1), min(ox*S+px, W-1))
//
// Taps that fall outside the map are issued with no feature read and the
// `pad` flag set, so the convolution kernel sees zeros. Every beat carries a
// beat_tag_t with first/last flags and the address and lane of the value it
// contributes to. Outputs are registered: a beat is on the read ports and on
// beat_valid/beat_tag for one clock; the first beat leaves one clock after the
// edge that samples start, the memory data follows MEM_LAT clocks
// later (delayed outside). `done` pulses together with the last beat.
// A layer takes OG*(1 + H*W*K*K*CG) beats (convolution) or OH*OW*CG*4 beats
// (pool). A separate data-mover stage feeding the convolution kernel follows
// the original OpenCL accelerator; the loop order and layout are this
// design's choices.
module data_mover
  import cnn_pkg::layer_cfg_t, cnn_pkg::beat_tag_t, cnn_pkg::layer_mode_e,
         cnn_pkg::MODE_CONV, cnn_pkg::MODE_POOL, cnn_pkg::ADDR_W, cnn_pkg::DIM_W;
#(
  parameter int unsigned NUM_CU = cnn_pkg::NUM_CU,
  parameter int unsigned VEC    = cnn_pkg::VEC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  output logic              done,
  // read beat
  output logic              beat_valid,
  output layer_mode_e       beat_mode,
  output beat_tag_t         beat_tag,
  output logic              feat_re,
  output logic [ADDR_W-1:0] feat_addr,
  output logic              w_re,
  output logic [ADDR_W-1:0] w_addr
);
  localparam int unsigned VEC_SH = $clog2(VEC);
  initial assert (VEC == (1 << VEC_SH)) else $error("VEC must be a power of two");

  typedef enum logic [1:0] {S_IDLE, S_BIAS, S_RUN} state_e;
  state_e     state;
  layer_cfg_t c;

  logic [DIM_W-1:0] og, oy, ox, ky, kx, cg;
  logic [1:0]       p;

  // Derived sizes.
  logic [DIM_W-1:0]  k, pad, oh, ow;
  logic [ADDR_W-1:0] taps, wblk, ocg;
  always_comb begin
    k    = DIM_W'(c.ksize);
    pad  = (k - 1) >> 1;
    oh   = (c.mode == MODE_POOL && c.pool_stride == 2'd2) ? c.height >> 1 : c.height;
    ow   = (c.mode == MODE_POOL && c.pool_stride == 2'd2) ? c.width  >> 1 : c.width;
    taps = ADDR_W'(k) * ADDR_W'(k) * ADDR_W'(c.cg);
    wblk = taps + 1;
    ocg  = ((ADDR_W'(c.og) * NUM_CU) + VEC - 1) >> VEC_SH;
  end

  // Loop-end flags.
  logic e_cg, e_kx, e_ky, e_ox, e_oy, e_og, e_p;
  always_comb begin
    e_cg = (cg == c.cg - 1);
    e_kx = (kx == k - 1);
    e_ky = (ky == k - 1);
    e_ox = (ox == ow - 1);
    e_oy = (oy == oh - 1);
    e_og = (og == c.og - 1);
    e_p  = (p == 2'd3);
  end

  // Address of the current beat.
  logic signed [DIM_W+1:0] iy_s, ix_s;
  logic [DIM_W-1:0]        iy, ix;
  logic                    oob;
  logic [ADDR_W-1:0]       f_addr_n, w_addr_n, o_addr_n, og_ch;
  logic                    first_n, last_n;
  always_comb begin
    if (c.mode == MODE_CONV) begin
      iy_s = $signed({2'b0, oy}) + $signed({2'b0, ky}) - $signed({2'b0, pad});
      ix_s = $signed({2'b0, ox}) + $signed({2'b0, kx}) - $signed({2'b0, pad});
      oob  = iy_s < 0 || ix_s < 0 ||
             iy_s >= $signed({2'b0, c.height}) || ix_s >= $signed({2'b0, c.width});
      iy   = iy_s[DIM_W-1:0];
      ix   = ix_s[DIM_W-1:0];
    end else begin
      iy = (c.pool_stride == 2'd2) ? ((oy << 1) | DIM_W'(p[1])) : oy + DIM_W'(p[1]);
      ix = (c.pool_stride == 2'd2) ? ((ox << 1) | DIM_W'(p[0])) : ox + DIM_W'(p[0]);
      if (iy > c.height - 1) iy = c.height - 1;
      if (ix > c.width - 1)  ix = c.width - 1;
      iy_s = '0; ix_s = '0;
      oob  = 1'b0;
    end
    f_addr_n = c.in_base + (ADDR_W'(iy) * ADDR_W'(c.width) + ADDR_W'(ix)) * ADDR_W'(c.cg)
             + ADDR_W'(cg);
    og_ch    = ADDR_W'(og) * NUM_CU;
    w_addr_n = c.w_base + ADDR_W'(og) * wblk
             + ((state == S_BIAS) ? '0
                : 1 + (ADDR_W'(ky) * ADDR_W'(k) + ADDR_W'(kx)) * ADDR_W'(c.cg) + ADDR_W'(cg));
    if (c.mode == MODE_CONV) begin
      o_addr_n = c.out_base + (ADDR_W'(oy) * ADDR_W'(ow) + ADDR_W'(ox)) * ocg + (og_ch >> VEC_SH);
      first_n  = (ky == 0) && (kx == 0) && (cg == 0);
      last_n   = e_ky && e_kx && e_cg;
    end else begin
      o_addr_n = c.out_base + (ADDR_W'(oy) * ADDR_W'(ow) + ADDR_W'(ox)) * ADDR_W'(c.cg) + ADDR_W'(cg);
      first_n  = (p == 2'd0);
      last_n   = e_p;
    end
  end

  logic final_beat;
  always_comb begin
    if (c.mode == MODE_CONV) final_beat = (state == S_RUN) && e_og && e_oy && e_ox && e_ky && e_kx && e_cg;
    else                     final_beat = (state == S_RUN) && e_oy && e_ox && e_cg && e_p;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c     <= '0;
      {og, oy, ox, ky, kx, cg} <= '0;
      p     <= '0;
      done  <= 1'b0;
      beat_valid <= 1'b0; beat_mode <= MODE_CONV; beat_tag <= '0;
      feat_re <= 1'b0; feat_addr <= '0; w_re <= 1'b0; w_addr <= '0;
    end else begin
      done       <= 1'b0;
      beat_valid <= 1'b0;
      feat_re    <= 1'b0;
      w_re       <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          c <= cfg;
          {og, oy, ox, ky, kx, cg} <= '0;
          p <= '0;
          state <= (cfg.mode == MODE_CONV) ? S_BIAS : S_RUN;
        end
        S_BIAS: begin
          beat_valid        <= 1'b1;
          beat_mode         <= MODE_CONV;
          beat_tag          <= '0;
          beat_tag.bias     <= 1'b1;
          w_re              <= 1'b1;
          w_addr            <= w_addr_n;
          state             <= S_RUN;
        end
        S_RUN: begin
          beat_valid        <= 1'b1;
          beat_mode         <= c.mode;
          beat_tag.bias     <= 1'b0;
          beat_tag.pad      <= oob;
          beat_tag.first    <= first_n;
          beat_tag.last     <= last_n;
          beat_tag.out_addr <= o_addr_n;
          beat_tag.lane     <= $bits(beat_tag.lane)'(og_ch & ADDR_W'(VEC - 1));
          feat_re           <= !oob;
          feat_addr         <= f_addr_n;
          w_re              <= (c.mode == MODE_CONV);
          w_addr            <= w_addr_n;
          if (final_beat) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (c.mode == MODE_CONV) begin
            // cg innermost, then kx, ky, ox, oy, og
            cg <= e_cg ? '0 : cg + 1;
            if (e_cg) begin
              kx <= e_kx ? '0 : kx + 1;
              if (e_kx) begin
                ky <= e_ky ? '0 : ky + 1;
                if (e_ky) begin
                  ox <= e_ox ? '0 : ox + 1;
                  if (e_ox) begin
                    oy <= e_oy ? '0 : oy + 1;
                    if (e_oy) begin
                      og    <= og + 1;
                      state <= S_BIAS;
                    end
                  end
                end
              end
            end
          end else begin
            // window position innermost, then cg, ox, oy
            p <= p + 1;
            if (e_p) begin
              cg <= e_cg ? '0 : cg + 1;
              if (e_cg) begin
                ox <= e_ox ? '0 : ox + 1;
                if (e_ox) oy <= oy + 1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
