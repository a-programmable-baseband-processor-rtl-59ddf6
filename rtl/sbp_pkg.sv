// sbp_pkg: shared types and constants of the stream baseband processor.
//
// The processor is a SIMD array of VLIW arithmetic clusters fed from a banked
// stream register file (SRF). Eight clusters with three adders and three
// multipliers each is the configuration the design is built around (the
// division unit of the older configuration is replaced by a third multiplier).
// Word width, register count, SRF size, microcode depth, instruction format,
// fixed-point format and command format are this design's own choices.
package sbp_pkg;

  // ---- machine shape --------------------------------------------------------
  localparam int unsigned NUM_CLUSTERS = 8;   // SIMD clusters
  localparam int unsigned NUM_ADD      = 3;   // adders per cluster
  localparam int unsigned NUM_MUL      = 3;   // multipliers per cluster
  localparam int unsigned DATA_W       = 32;  // datapath word
  localparam int unsigned FRAC_BITS    = 15;  // fixed-point fraction (Q15 scaling)
  localparam int unsigned NUM_REGS     = 16;  // local registers per cluster
  localparam int unsigned REG_AW       = $clog2(NUM_REGS);
  localparam int unsigned UCODE_DEPTH  = 256; // microcode words
  localparam int unsigned PC_W         = $clog2(UCODE_DEPTH);
  localparam int unsigned NUM_IN       = 8;   // kernel input streams
  localparam int unsigned NUM_OUT      = 2;   // kernel output streams
  localparam int unsigned SRF_ROWS     = 4096; // words per SRF bank (8 banks)
  localparam int unsigned SRF_AW       = $clog2(SRF_ROWS * NUM_CLUSTERS); // element address
  localparam int unsigned MEM_CHANNELS = 4;   // SDRAM channels
  localparam int unsigned MEM_AW       = 24;  // word address into external memory
  localparam int unsigned CNT_W        = 16;  // transfer counts and strides
  localparam int unsigned IMM_W        = 16;

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic [REG_AW-1:0]        reg_idx_t;
  typedef logic [PC_W-1:0]          pc_t;
  typedef logic [SRF_AW-1:0]        srf_addr_t;
  typedef logic [MEM_AW-1:0]        mem_addr_t;
  typedef logic [CNT_W-1:0]         cnt_t;

  // ---- functional unit operations ------------------------------------------
  typedef enum logic [3:0] {
    A_NOP  = 4'd0,  // no operation, no write
    A_ADD  = 4'd1,  // a + b
    A_SUB  = 4'd2,  // a - b
    A_MIN  = 4'd3,  // signed minimum
    A_MAX  = 4'd4,  // signed maximum
    A_ABS  = 4'd5,  // |a|
    A_SGN  = 4'd6,  // +1.0 if a >= 0 else -1.0 (in the Q format)
    A_PASS = 4'd7,  // a
    A_LDI  = 4'd8,  // sign-extended instruction immediate
    A_CID  = 4'd9,  // index of this cluster
    A_SHR  = 4'd10, // a >>> b[4:0]
    A_SHL  = 4'd11, // a << b[4:0]
    A_AND  = 4'd12,
    A_OR   = 4'd13,
    A_XOR  = 4'd14,
    A_LT   = 4'd15  // 1 if a < b (signed) else 0
  } add_op_e;

  typedef enum logic [1:0] {
    M_NOP  = 2'd0,  // no operation, no write
    M_MUL  = 2'd1,  // low word of a * b (integer)
    M_MULQ = 2'd2,  // (a * b) >>> FRAC_BITS (fixed point)
    M_MULH = 2'd3   // high word of a * b
  } mul_op_e;

  typedef enum logic [1:0] {
    C_NOP  = 2'd0,
    C_SETC = 2'd1,  // loop counter [csel] := imm
    C_LOOP = 2'd2,  // counter [csel] -= 1; jump to target while it stays non-zero
    C_HALT = 2'd3   // end of kernel
  } ctrl_op_e;

  typedef struct packed {
    add_op_e  op;
    reg_idx_t dst;
    reg_idx_t a;
    reg_idx_t b;
  } add_slot_t;

  typedef struct packed {
    mul_op_e  op;
    reg_idx_t dst;
    reg_idx_t a;
    reg_idx_t b;
  } mul_slot_t;

  // Stream read: each cluster gets the next record word of its own lane, or
  // (bcast) all clusters get the same next element. The word is written to
  // dst at the end of the following cycle.
  typedef struct packed {
    logic                      en;
    logic                      bcast;
    logic [$clog2(NUM_IN)-1:0] sid;
    reg_idx_t                  dst;
  } in_slot_t;

  // Stream write: every cluster writes register src to its lane of the next
  // record of output stream sid.
  typedef struct packed {
    logic                       en;
    logic [$clog2(NUM_OUT)-1:0] sid;
    reg_idx_t                   src;
  } out_slot_t;

  typedef struct packed {
    ctrl_op_e op;
    logic     csel;
    pc_t      target;
  } ctrl_slot_t;

  typedef struct packed {
    add_slot_t [NUM_ADD-1:0] add;
    mul_slot_t [NUM_MUL-1:0] mul;
    in_slot_t                in;
    out_slot_t               out;
    ctrl_slot_t              ctrl;
    logic [IMM_W-1:0]        imm;
  } instr_t;

  // ---- host commands ----------------------------------------------------------
  typedef enum logic [2:0] {
    CMD_LOAD     = 3'd0, // SDRAM -> SRF
    CMD_STORE    = 3'd1, // SRF -> SDRAM
    CMD_KERNEL   = 3'd2, // run microcode from pc
    CMD_NET_SEND = 3'd3, // SRF -> network
    CMD_NET_RECV = 3'd4  // network -> SRF
  } cmd_op_e;

  // Two-level memory access pattern: element j = o*inner_cnt + i of the SRF
  // stream starting at srf_addr maps to external word
  // mem_addr + o*outer_stride + i*inner_stride. Network commands move
  // inner_cnt*outer_cnt consecutive SRF elements.
  typedef struct packed {
    cmd_op_e                     op;
    mem_addr_t                   mem_addr;
    cnt_t                        inner_cnt;
    cnt_t                        inner_stride;
    cnt_t                        outer_cnt;
    cnt_t                        outer_stride;
    srf_addr_t                   srf_addr;
    pc_t                         pc;
    srf_addr_t [NUM_IN-1:0]      in_base;
    srf_addr_t [NUM_OUT-1:0]     out_base;
  } cmd_t;

  typedef struct packed {
    mem_addr_t                   mem_addr;
    cnt_t                        inner_cnt;
    cnt_t                        inner_stride;
    cnt_t                        outer_cnt;
    cnt_t                        outer_stride;
    srf_addr_t                   srf_addr;
    logic                        store;
  } xfer_t;

  // ---- SRF client port -------------------------------------------------------
  // Reads return one cycle after the request. lane=1 addresses a whole row
  // (element address must be a multiple of NUM_CLUSTERS, lane c gets element
  // addr+c); lane=0 addresses one element and returns it on every lane.
  // Writes with lane=1 write all lanes of a row, with lane=0 only element addr
  // from wdata[0].
  typedef struct packed {
    logic                           rd_en;
    logic                           rd_lane;
    srf_addr_t                      rd_addr;
    logic                           wr_en;
    logic                           wr_lane;
    srf_addr_t                      wr_addr;
    word_t [NUM_CLUSTERS-1:0]       wdata;
  } srf_req_t;

  localparam word_t Q_ONE = word_t'(1) <<< FRAC_BITS;

endpackage
