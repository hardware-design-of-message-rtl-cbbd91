// mpe_pkg: types and constants shared by the message-passing node.
//
// Every unit on the node talks to the crossbar router through a LocalLink-style
// stream (data, start-of-frame, end-of-frame, valid/ready). A packet is two
// header words followed by zero or more payload words:
//   H0 = {dst_node[5:0], dst_port[3:0], src_node[5:0], src_port[3:0], mtype[3:0], tag[7:0]}
//   H1 = auxiliary word (memory address, stage number, ... depending on mtype)
// Node IDs are 6 bits: {z[1:0], y[1:0], x[1:0]} on the 4-ary 3-cube torus.
// The header layout, the message types and the port numbering are this
// design's own choices; the 64-node 4-ary 3-cube, the 16-port crossbar and the
// 32-bit data word come from the system being modelled.
package mpe_pkg;

  localparam int unsigned WORD_W  = 32;
  localparam int unsigned NODE_W  = 6;
  localparam int unsigned PORT_W  = 4;
  localparam int unsigned NPORTS  = 16;
  localparam int unsigned TORUS_K = 4;

  // Crossbar port numbering.
  localparam logic [PORT_W-1:0] P_XP    = 4'd0;
  localparam logic [PORT_W-1:0] P_XM    = 4'd1;
  localparam logic [PORT_W-1:0] P_YP    = 4'd2;
  localparam logic [PORT_W-1:0] P_YM    = 4'd3;
  localparam logic [PORT_W-1:0] P_ZP    = 4'd4;
  localparam logic [PORT_W-1:0] P_ZM    = 4'd5;
  localparam logic [PORT_W-1:0] P_DMA   = 4'd6;
  localparam logic [PORT_W-1:0] P_MPE   = 4'd7;
  localparam logic [PORT_W-1:0] P_SRC   = 4'd8;
  localparam logic [PORT_W-1:0] P_FFT   = 4'd9;
  localparam logic [PORT_W-1:0] P_MACC0 = 4'd10;

  typedef enum logic [3:0] {
    MT_DMA_WRITE  = 4'd0,  // payload written to memory at H1 (DMA port)
    MT_COLL_DATA  = 4'd1,  // collective payload (MPE port)
    MT_READY      = 4'd2,  // parent/child handshake: "send me your data"
    MT_BAR_UP     = 4'd3,  // barrier arrival, child -> parent
    MT_BAR_DOWN   = 4'd4,  // barrier release, parent -> child
    MT_STREAM     = 4'd5,  // generic stream (source/sink core)
    MT_MACC_VEC   = 4'd6,  // vector B load (MACC core)
    MT_MACC_ROWS  = 4'd7,  // rows of partial matrix A (MACC core)
    MT_FFT_LOCAL  = 4'd8,  // local FFT data load (FFT I/O)
    MT_FFT_REMOTE = 4'd9   // partner data of one inter-node stage (FFT I/O)
  } mtype_e;

  typedef struct packed {
    logic [NODE_W-1:0] dst_node;
    logic [PORT_W-1:0] dst_port;
    logic [NODE_W-1:0] src_node;
    logic [PORT_W-1:0] src_port;
    mtype_e            mtype;
    logic [7:0]        tag;
  } hdr_t;

  // One word of a LocalLink stream (valid/ready travel beside it).
  typedef struct packed {
    logic [WORD_W-1:0] data;
    logic              sof;
    logic              eof;
  } flit_t;

  // Collective operations started through the MPE control register.
  typedef enum logic [2:0] {
    OP_NONE      = 3'd0,
    OP_BARRIER   = 3'd1,
    OP_BCAST     = 3'd2,
    OP_REDUCE    = 3'd3,
    OP_ALLREDUCE = 3'd4
  } coll_op_e;

  // Reduce computations.
  typedef enum logic [1:0] {
    ALU_FADD = 2'd0,
    ALU_FMAX = 2'd1,
    ALU_IADD = 2'd2,
    ALU_IMAX = 2'd3
  } alu_op_e;

  function automatic logic [WORD_W-1:0] mk_hdr(
      input logic [NODE_W-1:0] dn, input logic [PORT_W-1:0] dp,
      input logic [NODE_W-1:0] sn, input logic [PORT_W-1:0] sp,
      input mtype_e mt, input logic [7:0] tg);
    hdr_t h;
    h.dst_node = dn; h.dst_port = dp; h.src_node = sn; h.src_port = sp;
    h.mtype = mt; h.tag = tg;
    return h;
  endfunction

endpackage
