// cnn_pkg: constants and types shared by the CNN accelerator.
//
// The accelerator runs one Tiny-YOLOv2 layer (a 3x3 or 1x1 convolution with
// optional leaky ReLU, or a 2x2 max-pool) per start. NUM_CU compute units each
// produce one output channel while consuming VEC input channels per clock; the
// 4-CU, 8-lane configuration is the one reported as the fastest. The number
// format (16-bit two's-complement fixed point with 8 fraction bits), the
// accumulator width and the leaky-ReLU slope are this design's own choices.
//
// Memory layout (chosen here, the host is expected to rearrange data to it):
//   feature map : word (y*W + x)*CG + cg holds channels cg*VEC .. cg*VEC+VEC-1
//                 of pixel (y,x); CG = ceil(C/VEC), unused lanes are zero.
//   weights     : per output group og (NUM_CU output channels) a block of
//                 1 + K*K*CG words; word 0 carries the NUM_CU biases (lane 0 of
//                 each CU's vector), word 1 + (ky*K+kx)*CG + cg the NUM_CU
//                 weight vectors for that tap and channel group.
package cnn_pkg;

  parameter int unsigned NUM_CU  = 4;   // compute units (output channels in parallel)
  parameter int unsigned VEC     = 8;   // lanes per vector (input channels per clock)
  parameter int unsigned DATA_W  = 16;  // feature / weight width
  parameter int unsigned FRAC    = 8;   // fraction bits of DATA_W values
  parameter int unsigned ACC_W   = 48;  // accumulator width (products carry 2*FRAC fraction bits)
  parameter int unsigned ADDR_W  = 32;  // global-memory word address width
  parameter int unsigned DIM_W   = 16;  // width of layer dimensions and loop counters

  // Leaky ReLU slope for negative inputs: LEAKY_NUM / 2**LEAKY_SH (26/256 = 0.1016).
  parameter int unsigned LEAKY_NUM = 26;
  parameter int unsigned LEAKY_SH  = 8;

  typedef enum logic {
    MODE_CONV = 1'b0,
    MODE_POOL = 1'b1
  } layer_mode_e;

  // One layer as the host describes it.
  typedef struct packed {
    layer_mode_e       mode;
    logic [ADDR_W-1:0] in_base;     // first word of the input feature map
    logic [ADDR_W-1:0] w_base;      // first word of the weight blocks (conv only)
    logic [ADDR_W-1:0] out_base;    // first word of the output feature map
    logic [DIM_W-1:0]  height;      // input rows
    logic [DIM_W-1:0]  width;       // input columns
    logic [DIM_W-1:0]  cg;          // input channel groups, ceil(C/VEC)
    logic [DIM_W-1:0]  og;          // output groups of NUM_CU channels (conv only)
    logic [1:0]        ksize;       // convolution kernel side, 1 or 3
    logic              relu_en;     // apply leaky ReLU (conv only)
    logic [1:0]        pool_stride; // 2: halve the map, 1: keep its size (pool only)
  } layer_cfg_t;

  // Side information that travels with every beat through the pipeline.
  typedef struct packed {
    logic              bias;      // beat carries the biases of a new output group
    logic              pad;       // tap lies outside the map: feature is zero
    logic              first;     // first beat of an output value
    logic              last;      // last beat of an output value
    logic [ADDR_W-1:0] out_addr;  // word the finished value goes to
    logic [$clog2(VEC)-1:0] lane; // first lane the NUM_CU results occupy
  } beat_tag_t;

endpackage
