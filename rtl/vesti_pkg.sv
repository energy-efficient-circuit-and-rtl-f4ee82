// vesti_pkg -- layer configuration record of the Vesti accelerator. One record
// per core describes the layer that core computes next: input map size and its
// 3x3 tiling, bit-plane spacing in activation memory, padding, fully-connected
// mode, pooling, activation precision (1..4 bits) and the quantization shift.
// The record's layout is this implementation's choice.
package vesti_pkg;
  localparam int RA = 7;   // activation-memory row address bits (128 rows)
  typedef struct packed {
    logic [5:0]    map_w;
    logic [5:0]    map_h;
    logic [4:0]    tiles_w;
    logic [RA-1:0] plane_words;
    logic          pad;
    logic          fc;
    logic [RA-1:0] fc_addr;
    logic          pool;
    logic [2:0]    prec;
    logic [3:0]    qshift;
    // where this core's results go in the other core's activation memory
    logic          dst_fc;
    logic [3:0]    dst_fc_blk;
    logic [RA-1:0] dst_fc_addr;
  } layer_cfg_t;
endpackage
