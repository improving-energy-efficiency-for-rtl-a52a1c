// cgra_pkg: types and constants shared by the CGRA fabric.
//
// The fabric is a 2D array of PE tiles and MEM tiles joined by a statically
// configured island-style interconnect: a 16-bit data network and a separate
// 1-bit control network, each with NUM_TRACKS tracks per side. Each PE tile
// holds a "pond", a 32-entry x 16-bit streaming register file (64 B) with
// two read ports and one write port, whose controllers are configured with
// the fields of pond_cfg_t below. Every tile is its own power domain: an
// always-on part (configuration decode, the ps_en_reg power switch register,
// configuration read-back) and a switched part (everything else).
//
// Numbers that follow the source design: 16-bit data and 1-bit control
// networks, 32x16 tiles with 128 MEM tiles, 32-entry ponds, the bit widths of
// the pond configuration fields (log2 of the pond size for ranges, offsets,
// strides and block factors, 9 bits for multicast index and pond count,
// 8 bits for the cycle stride, 3 bits for the accumulation delay), 4 KB MEM
// tile SRAM. Numbers that are this design's own choice: 5 tracks per side,
// the configuration bus layout (32-bit address and data, tile id in the low
// 16 address bits, register index in bits 23:16), the PE opcode list and
// the MEM tile's three-level read address generator.
`timescale 1ns/1ps
package cgra_pkg;

  // ---------------------------------------------------------------- fabric
  localparam int DATA_W      = 16;  // word-level data network
  localparam int NUM_TRACKS  = 5;   // tracks per side, per network (assumed)
  localparam int NUM_SIDES   = 4;

  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_E = 2'd1,
    SIDE_S = 2'd2,
    SIDE_W = 2'd3
  } side_e;

  typedef logic [DATA_W-1:0] word_t;

  // ------------------------------------------------------- configuration bus
  localparam int CFG_ADDR_W    = 32;
  localparam int CFG_DATA_W    = 32;
  localparam int TILE_ID_W     = 16;  // {x[7:0], y[7:0]}
  localparam int CFG_REG_W     = 8;   // register index, address bits 23:16
  localparam int NUM_CFG_WORDS = 16;  // switched-domain words per tile
  localparam logic [CFG_REG_W-1:0] PS_EN_REG_IDX = '0;  // always-on register

  typedef struct packed {
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
    logic                  write;
    logic                  read;
  } cfg_bus_t;

  // ------------------------------------------------------------------ pond
  localparam int POND_DEPTH = 32;                 // 64 B of 16-bit words
  localparam int POND_AW    = $clog2(POND_DEPTH); // log2 rf_size
  localparam int POND_DIM   = 2;                  // affine loop levels
  localparam int POND_IDX_W = 9;                  // multicast index / count
  localparam int POND_CYC_W = 8;                  // cycle stride
  localparam int POND_DLY_W = 3;                  // RMW delay
  localparam int POND_MAX_DELAY = (1 << POND_DLY_W) - 1;

  typedef logic [POND_AW-1:0] pond_addr_t;

  // Initialization (write) controller: contiguous writes from init_offset,
  // capturing only the blocks of the multicast stream that belong to this
  // pond.
  typedef struct packed {
    pond_addr_t            offset;
    logic [POND_IDX_W-1:0] index;
    pond_addr_t            block_factor;   // 0 means POND_DEPTH
    logic [POND_IDX_W-1:0] cyclic_factor;  // 0 means 1
  } pond_init_cfg_t;

  // Write-back (read) controller: contiguous reads, internally timed valid.
  typedef struct packed {
    pond_addr_t            range;          // 0 means POND_DEPTH
    pond_addr_t            offset;
    logic [POND_IDX_W-1:0] index;
    pond_addr_t            block_factor;   // 0 means POND_DEPTH
    logic [POND_IDX_W-1:0] cyclic_factor;  // 0 means 1
  } pond_wb_cfg_t;

  // Update (read) controller: two-level affine address pattern.
  typedef struct packed {
    pond_addr_t [POND_DIM-1:0] range;      // per level, 0 means POND_DEPTH
    pond_addr_t                offset;
    pond_addr_t [POND_DIM-1:0] stride;     // modulo POND_DEPTH
    logic [POND_CYC_W-1:0]     cycle_stride; // 0 means 1
  } pond_update_cfg_t;

  // Complete 2R/1W pond: two initialization controllers on the write port,
  // update controller 0 with read-modify-write support on read port 0,
  // update controller 1 and the write-back controller sharing read port 1.
  typedef struct packed {
    pond_init_cfg_t        init0;
    pond_init_cfg_t        init1;
    pond_wb_cfg_t          wb;
    pond_update_cfg_t      update0;
    logic                  update_acc_en;
    logic [POND_DLY_W-1:0] update_acc_delay;
    pond_update_cfg_t      update1;
  } pond_cfg_t;

  // -------------------------------------------------------------- PE core
  typedef enum logic [4:0] {
    OP_ADD     = 5'd0,
    OP_SUB     = 5'd1,
    OP_MUL     = 5'd2,   // low 16 bits of the product
    OP_MAC     = 5'd3,   // a*b + c
    OP_MIN     = 5'd4,   // signed
    OP_MAX     = 5'd5,   // signed
    OP_ABS     = 5'd6,
    OP_RELU    = 5'd7,
    OP_SHL     = 5'd8,
    OP_SHR     = 5'd9,   // logical
    OP_ASHR    = 5'd10,
    OP_AND     = 5'd11,
    OP_OR      = 5'd12,
    OP_XOR     = 5'd13,
    OP_SEL     = 5'd14,  // bit0 ? a : b
    OP_PASS    = 5'd15,  // a
    OP_EQ      = 5'd16,  // bit out = (a == b), data out = a
    OP_LT      = 5'd17,  // bit out = (a < b) signed, data out = a
    OP_BF_ADD  = 5'd18,  // BFloat16 a + b
    OP_BF_MUL  = 5'd19,  // BFloat16 a * b
    OP_BF_MAC  = 5'd20   // BFloat16 a * b + c (two roundings)
  } pe_op_e;

  typedef struct packed {
    pe_op_e op;
  } pe_cfg_t;

  // --------------------------------------------------------------- MEM core
  localparam int MEM_DEPTH = 2048;             // 4 KB of 16-bit words
  localparam int MEM_AW    = $clog2(MEM_DEPTH);
  localparam int MEM_DIM   = 3;                // read loop levels (assumed)

  typedef logic [MEM_AW-1:0] mem_addr_t;

  typedef struct packed {
    mem_addr_t                wr_offset;
    mem_addr_t                rd_offset;
    mem_addr_t [MEM_DIM-1:0]  rd_range;        // per level, 0 means MEM_DEPTH
    mem_addr_t [MEM_DIM-1:0]  rd_stride;       // modulo MEM_DEPTH
    logic [1:0]               start_level;     // see mem_core
  } mem_cfg_t;

  // ------------------------------------------------------ tile interconnect
  // Core outputs seen by the switch boxes (PE: ALU, pond port 0, pond port
  // 1; MEM: read data and two zero-tied spares so both tile kinds share one
  // switch box shape).
  localparam int CORE_OUTS  = 3;
  localparam int SB_INPUTS  = 3 + CORE_OUTS;          // three other sides
  localparam int SB_SEL_W   = $clog2(SB_INPUTS + 1);

  // Connection box: all tracks of all sides, extra core-local inputs, and a
  // constant zero as the last input.
  localparam int CB_TRACK_INPUTS = NUM_SIDES * NUM_TRACKS;

  // PE tile connection boxes
  localparam int PE_DATA_INS = 4;   // alu a, alu b, alu c, pond write data
  localparam int PE_BIT_INS  = 10;  // alu bit0..2, init0 start/valid,
                                    // init1 start/valid, wb start,
                                    // update0 start, update1 start
  // MEM tile connection boxes
  localparam int MEM_DATA_INS = 1;  // write data
  localparam int MEM_BIT_INS  = 3;  // write valid, write start, read start

  localparam int CB_SEL_W = 5;      // up to 32 inputs

  typedef logic [SB_SEL_W-1:0] sb_sel_t;
  typedef logic [CB_SEL_W-1:0] cb_sel_t;

  typedef struct packed {
    sb_sel_t [NUM_SIDES-1:0][NUM_TRACKS-1:0] sb16;
    sb_sel_t [NUM_SIDES-1:0][NUM_TRACKS-1:0] sb1;
    cb_sel_t [PE_DATA_INS-1:0]               cb16;
    cb_sel_t [PE_BIT_INS-1:0]                cb1;
  } route_cfg_t;

  // Switched-domain configuration of a tile, packed into NUM_CFG_WORDS words.
  localparam int CORE_CFG_W =
      ($bits(pond_cfg_t) + $bits(pe_cfg_t) > $bits(mem_cfg_t)) ?
      ($bits(pond_cfg_t) + $bits(pe_cfg_t)) : $bits(mem_cfg_t);

  typedef struct packed {
    logic [CORE_CFG_W-1:0] core;
    route_cfg_t            route;
  } tile_cfg_t;

endpackage
