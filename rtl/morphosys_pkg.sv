// morphosys_pkg: types and constants shared by the MorphoSys RTL.
//
// Sizes that follow the source description: 8x8 RC array, 8-bit RC data buses
// widened to 16 bits inside the cell, 32-bit RC output register, 4-deep RC
// register file, 32-bit context words, a context memory of two blocks (rows,
// columns) x 8 x 16 contexts, a frame buffer of two sets x two banks of 64-bit
// words, a 32-bit Tiny RISC with 16 general and 5 special registers.
//
// The context word layout follows the source's format for constant
// operations (field order and boundaries); its second format, without a
// constant, is merged into it. The other encodings are this design's own
// choice, because the source gives names but no values: the RC ALU operation
// codes, the MUX A / MUX B input numbering and the Tiny RISC instruction
// encoding.
package morphosys_pkg;

  // ---------------------------------------------------------------- RC array
  localparam int unsigned RC_DIM  = 8;   // 8x8 array
  localparam int unsigned QUAD    = 4;   // quadrants are 4x4
  localparam int unsigned NCTX    = 16;  // contexts per row / column
  localparam int unsigned RC_BUS_W   = 8;   // RC data bus width
  localparam int unsigned RC_INT_W   = 16;  // RC internal datapath width
  localparam int unsigned RC_OUT_W   = 32;  // RC output register width
  localparam int unsigned RC_RF_DEPTH = 4;  // RC register file entries
  localparam int unsigned CTX_W      = 32;  // context word width

  // MUX A inputs (4-bit select). IA..R3 as listed for port A, plus E (express lane).
  typedef enum logic [3:0] {
    MA_IA = 4'd0, MA_LA = 4'd1, MA_M  = 4'd2, MA_R  = 4'd3,
    MA_T  = 4'd4, MA_C  = 4'd5, MA_B  = 4'd6, MA_XQ = 4'd7,
    MA_FB = 4'd8, MA_R0 = 4'd9, MA_R1 = 4'd10, MA_R2 = 4'd11,
    MA_R3 = 4'd12, MA_E = 4'd13, MA_Z14 = 4'd14, MA_Z15 = 4'd15
  } mux_a_e;

  // MUX B inputs (3-bit select): IB, Up, Down, Left B, R0..R3.
  typedef enum logic [2:0] {
    MB_IB = 3'd0, MB_U = 3'd1, MB_D = 3'd2, MB_LB = 3'd3,
    MB_R0 = 3'd4, MB_R1 = 3'd5, MB_R2 = 3'd6, MB_R3 = 3'd7
  } mux_b_e;

  // RC ALU-MULT operations. The *K forms replace port B by the context constant.
  typedef enum logic [3:0] {
    OP_PASSA = 4'd0,  OP_ADD  = 4'd1,  OP_SUB  = 4'd2,  OP_AND  = 4'd3,
    OP_OR    = 4'd4,  OP_XOR  = 4'd5,  OP_SEQ  = 4'd6,  OP_PASSB = 4'd7,
    OP_MUL   = 4'd8,  OP_MAC  = 4'd9,  OP_ADDK = 4'd10, OP_SUBK = 4'd11,
    OP_ANDK  = 4'd12, OP_XORK = 4'd13, OP_MULK = 4'd14, OP_MACK = 4'd15
  } rc_op_e;

  // 32-bit context word.
  typedef struct packed {
    logic        wr_bus;   // [31]    drive the low 8 output bits onto the write bus
    logic        wr_exp;   // [30]    drive the express lane
    logic [1:0]  reg_ptr;  // [29:28] register file entry written with the result
    logic        rs_ls;    // [27]    shift direction: 1 right (arithmetic), 0 left
    logic [3:0]  alu_sft;  // [26:23] shift amount
    mux_a_e      mux_a;    // [22:19]
    mux_b_e      mux_b;    // [18:16]
    rc_op_e      alu_op;   // [15:12]
    logic [11:0] konst;    // [11:0]  constant, sign-extended to 16 bits
  } rc_ctx_t;

  // ------------------------------------------------------------ frame buffer
  localparam int unsigned FB_DEPTH = 64;  // 64-bit words per bank

  // ----------------------------------------------------------------- DMA
  typedef enum logic [1:0] {
    DMA_MEM2FB  = 2'd0,   // main memory -> frame buffer
    DMA_FB2MEM  = 2'd1,   // frame buffer -> main memory
    DMA_MEM2CTX = 2'd2    // main memory -> context memory
  } dma_op_e;

  // ------------------------------------------------------------- Tiny RISC
  // Instruction: [31:26] opcode, [25:22] dest, [21:18] rs1, [17:14] rs2,
  // [15:0] imm16 (rs2 and imm16 overlap; no instruction uses both).
  typedef enum logic [5:0] {
    TR_NOP  = 6'd0,  TR_ADD  = 6'd1,  TR_SUB  = 6'd2,  TR_AND  = 6'd3,
    TR_OR   = 6'd4,  TR_XOR  = 6'd5,  TR_SLL  = 6'd6,  TR_SRL  = 6'd7,
    TR_ADDI = 6'd8,  TR_LUI  = 6'd9,  TR_ORI  = 6'd10, TR_LD   = 6'd11,
    TR_ST   = 6'd12, TR_JMP  = 6'd13, TR_BEQ  = 6'd14, TR_BGT  = 6'd15,
    TR_BLT  = 6'd16, TR_MTS  = 6'd17, TR_MFS  = 6'd18, TR_RETI = 6'd19,
    TR_JR   = 6'd20,
    // MorphoSys instructions
    TR_LDCTX = 6'd32,  // DMA: R[rs1] mem address, imm[7:0] context word address, R[dest] count
    TR_LDFB  = 6'd33,  // DMA: R[rs1] mem address, imm[7:0] {set,bank,offset}, R[dest] count
    TR_STFB  = 6'd34,  // DMA: R[rs1] mem address, imm[7:0] {set,bank,offset}, R[dest] count
    TR_CBC   = 6'd35,  // context broadcast: imm[4] column mode, imm[3:0] context number
    TR_SBC   = 6'd36,  // single-RC context load: imm[15:13] row, imm[12:10] col, imm[7:0] word address
    TR_RCEX  = 6'd37,  // RC execute: imm[4] column mode, imm[7] FB set, R[rs1][5:0] FB offset
    TR_RCWB  = 6'd38,  // RC write back: imm[4] column mode, imm[3:1] row/col, imm[7] set, imm[8] bank, R[rs1][5:0] offset
    TR_ALU_UNUSED = 6'd63
  } tr_opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_PASSB
  } tr_aluop_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_JMP, BR_JR, BR_EQ, BR_GT, BR_LT, BR_RETI
  } tr_brop_e;

  // Tiny RISC commands to the array side, issued from the Execute stage.
  typedef struct packed {
    logic        dma_start;
    dma_op_e     dma_op;
    logic [31:0] dma_mem_addr;
    logic [7:0]  dma_loc_addr;   // FB {set,bank,offset} or context word address
    logic [8:0]  dma_count;      // words to move
    logic        ctx_bcast;      // load contexts into all rows / columns
    logic        ctx_single;     // load one RC's context
    logic        col_mode;       // 1: column broadcast/buses, 0: row
    logic [7:0]  ctx_addr;       // context memory word address {block,rowcol,ctx}
    logic [2:0]  sel_row;
    logic [2:0]  sel_col;
    logic        rc_exec;        // one RC array step, FB read feeds IA/IB
    logic        rc_wb;          // RC array row/column output written to FB
    logic        fb_set;
    logic        fb_bank;
    logic [5:0]  fb_offset;
  } tr_cmd_t;

endpackage
