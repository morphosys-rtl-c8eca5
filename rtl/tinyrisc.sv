// tinyrisc: the Tiny RISC control processor of MorphoSys, a 32-bit, 4-stage
// pipeline: Fetch, Decode, Execute (ALU, branch unit, data memory interface)
// and Writeback.
//
// Fetch: the PC addresses the instruction cache. Pipeline register 1 is loaded
// only when the cache lowers the active-low acknowledge `i_ack_n`; otherwise a
// bubble enters Decode and the PC holds. The PC counts in words (PC+1).
// Decode: reads RS1, RS2 and DEST from the register file; the Decode
// forwarding unit overrides them with the data being written back this cycle.
// Execute: the Execute forwarding unit overrides the operands with the
// Writeback data again (the instruction just ahead). The ALU computes results
// and load/store addresses; the branch unit resolves jumps and branches here,
// and a taken one flushes the two younger instructions (two-cycle penalty).
// Data memory requests leave in Execute; load data returns in the next cycle
// and is written back then. MFS reads a special register in Execute; MTS
// writes one in Writeback.
// MorphoSys instructions (context load/broadcast, frame-buffer and DMA
// transfers, RC array execute and write-back) drive `cmd` from Execute. An
// Execute-stage instruction stalls, holding Fetch and Decode, while it needs
// the DMA controller and the controller is busy, or while it wants the frame
// buffer set that the DMA controller is using.
// Interrupts: when irq & IMASK is non-zero, the instruction in Execute
// completes, the two younger ones are flushed, SREG1/SREG2/SREG4 are saved and
// the PC jumps to SREG3. RETI returns to SREG4 and restores SREG0.
// From the source: four stages, three pipeline registers plus PC, 16 general
// and 5 special registers, two forwarding units in Decode and Execute, branch
// unit in Execute, the acknowledge-gated first pipeline register, branch
// if greater/less/equal, MTS/MFS. This design's own choices: the instruction
// encoding and set (see morphosys_pkg), flush on taken branch, the memory
// timing, the stall rules and the interrupt sequencing.
module tinyrisc
  import morphosys_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction cache
  output logic [31:0] i_addr,
  input  logic [31:0] i_data,
  input  logic        i_ack_n,
  // data cache
  output logic        d_rd,
  output logic        d_wr,
  output logic [31:0] d_addr,
  output logic [31:0] d_wdata,
  input  logic [31:0] d_rdata,
  // interrupts
  input  logic [7:0]  irq,
  // MorphoSys array side
  output tr_cmd_t     cmd,
  input  logic        dma_busy,
  input  logic        dma_busy_set,
  input  logic        rc_wr_busy,
  output logic        stall
);

  typedef struct packed {
    tr_opcode_e opc;
    tr_aluop_e  alu;
    tr_brop_e   br;
    logic       use_imm;
    logic       zext;
    logic       lui;
    logic       wb_we;
    logic       ld;
    logic       st;
    logic       mts;
    logic       mfs;
    logic       reti;
    logic       dma;
    logic       fbuse;   // RCEX / RCWB use the frame buffer
  } ctrl_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } pr1_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    ctrl_t       c;
    logic [3:0]  dest, rs1, rs2;
    logic [15:0] imm;
    logic [31:0] rs1_v, rs2_v, dest_v;
  } pr2_t;

  typedef struct packed {
    logic        valid;
    logic        wb_we;
    logic        ld;
    logic        mts;
    logic [3:0]  rd;
    logic [2:0]  sreg;
    logic [31:0] result;
  } pr3_t;

  logic [31:0] pc;
  pr1_t        pr1;
  pr2_t        pr2;
  pr3_t        pr3;

  // ------------------------------------------------------------ Writeback
  logic        wb_we;
  logic [31:0] wb_data;
  assign wb_we   = pr3.valid && pr3.wb_we;
  assign wb_data = pr3.ld ? d_rdata : pr3.result;

  // --------------------------------------------------------------- Decode
  function automatic ctrl_t decode(logic [5:0] op);
    ctrl_t c;
    c = '0;
    c.opc = tr_opcode_e'(op);
    c.alu = ALU_ADD;
    c.br  = BR_NONE;
    unique case (tr_opcode_e'(op))
      TR_ADD:  begin c.alu = ALU_ADD; c.wb_we = 1'b1; end
      TR_SUB:  begin c.alu = ALU_SUB; c.wb_we = 1'b1; end
      TR_AND:  begin c.alu = ALU_AND; c.wb_we = 1'b1; end
      TR_OR:   begin c.alu = ALU_OR;  c.wb_we = 1'b1; end
      TR_XOR:  begin c.alu = ALU_XOR; c.wb_we = 1'b1; end
      TR_SLL:  begin c.alu = ALU_SLL; c.wb_we = 1'b1; end
      TR_SRL:  begin c.alu = ALU_SRL; c.wb_we = 1'b1; end
      TR_ADDI: begin c.alu = ALU_ADD; c.use_imm = 1'b1; c.wb_we = 1'b1; end
      TR_LUI:  begin c.alu = ALU_PASSB; c.use_imm = 1'b1; c.lui = 1'b1; c.wb_we = 1'b1; end
      TR_ORI:  begin c.alu = ALU_OR; c.use_imm = 1'b1; c.zext = 1'b1; c.wb_we = 1'b1; end
      TR_LD:   begin c.use_imm = 1'b1; c.ld = 1'b1; c.wb_we = 1'b1; end
      TR_ST:   begin c.use_imm = 1'b1; c.st = 1'b1; end
      TR_JMP:  c.br = BR_JMP;
      TR_JR:   c.br = BR_JR;
      TR_BEQ:  c.br = BR_EQ;
      TR_BGT:  c.br = BR_GT;
      TR_BLT:  c.br = BR_LT;
      TR_MTS:  c.mts = 1'b1;
      TR_MFS:  begin c.mfs = 1'b1; c.wb_we = 1'b1; end
      TR_RETI: begin c.br = BR_RETI; c.reti = 1'b1; end
      TR_LDCTX, TR_LDFB, TR_STFB: c.dma = 1'b1;
      TR_RCEX, TR_RCWB: c.fbuse = 1'b1;
      default: ;
    endcase
    return c;
  endfunction

  logic [3:0]  id_dest, id_rs1, id_rs2;
  logic [31:0] rf_rs1, rf_rs2, rf_dest;
  logic [31:0] id_rs1_v, id_rs2_v, id_dest_v;

  assign id_dest = pr1.instr[25:22];
  assign id_rs1  = pr1.instr[21:18];
  assign id_rs2  = pr1.instr[17:14];

  tinyrisc_regfile u_rf (
    .clk, .rst_n,
    .rs1(id_rs1), .rs2(id_rs2), .dest(id_dest),
    .rs1_val(rf_rs1), .rs2_val(rf_rs2), .dest_val(rf_dest),
    .we(wb_we), .waddr(pr3.rd), .wdata(wb_data)
  );

  tinyrisc_fwd u_fwd_id (
    .rs1(id_rs1), .rs2(id_rs2), .dest(id_dest),
    .rs1_val(rf_rs1), .rs2_val(rf_rs2), .dest_val(rf_dest),
    .wb_we, .wb_rd(pr3.rd), .wb_data,
    .rs1_fwd(id_rs1_v), .rs2_fwd(id_rs2_v), .dest_fwd(id_dest_v)
  );

  // -------------------------------------------------------------- Execute
  logic [31:0] ex_rs1, ex_rs2, ex_dest;
  tinyrisc_fwd u_fwd_ex (
    .rs1(pr2.rs1), .rs2(pr2.rs2), .dest(pr2.dest),
    .rs1_val(pr2.rs1_v), .rs2_val(pr2.rs2_v), .dest_val(pr2.dest_v),
    .wb_we, .wb_rd(pr3.rd), .wb_data,
    .rs1_fwd(ex_rs1), .rs2_fwd(ex_rs2), .dest_fwd(ex_dest)
  );

  logic [31:0] alu_b, alu_y;
  always_comb begin
    if (!pr2.c.use_imm)  alu_b = ex_rs2;
    else if (pr2.c.lui)  alu_b = {pr2.imm, 16'h0000};
    else if (pr2.c.zext) alu_b = {16'h0000, pr2.imm};
    else                 alu_b = {{16{pr2.imm[15]}}, pr2.imm};
  end

  tinyrisc_alu u_alu (.op(pr2.c.alu), .a(ex_rs1), .b(alu_b), .y(alu_y));

  logic        irq_pending, take_irq;
  logic [31:0] sreg_rdata, vector, resume_pc;
  logic        br_taken;
  logic [31:0] br_target;

  tinyrisc_branch u_br (
    .op(pr2.c.br), .pc(pr2.pc), .imm(pr2.imm),
    .dest_val(ex_dest), .rs1_val(ex_rs1), .resume_pc,
    .taken(br_taken), .target(br_target)
  );

  // Stall: DMA instruction while the DMA is busy, or frame-buffer access to
  // the set the DMA controller holds.
  logic ex_fb_set;
  assign ex_fb_set = pr2.imm[7];
  assign stall = pr2.valid &&
                 ((dma_busy && (pr2.c.dma || (pr2.c.fbuse && ex_fb_set == dma_busy_set))) ||
                  (rc_wr_busy && pr2.c.opc == TR_RCEX));

  logic ex_go;       // instruction in Execute completes this cycle
  logic redirect;
  assign ex_go    = pr2.valid && !stall;
  assign take_irq = ex_go && irq_pending && !pr2.c.reti;
  assign redirect = (ex_go && br_taken) || take_irq;

  logic [31:0] next_pc_after_ex;
  assign next_pc_after_ex = br_taken ? br_target : (pr1.valid ? pr1.pc : pc);

  // MTS in Writeback forwards to MFS in Execute
  logic [31:0] mfs_val;
  assign mfs_val = (pr3.valid && pr3.mts && pr3.sreg == pr2.imm[2:0]) ? pr3.result : sreg_rdata;

  tinyrisc_sregfile u_sreg (
    .clk, .rst_n,
    .raddr(pr2.imm[2:0]), .rdata(sreg_rdata),
    .we(pr3.valid && pr3.mts), .waddr(pr3.sreg), .wdata(pr3.result),
    .irq, .irq_pending,
    .take(take_irq), .cur_pc(pr2.pc), .next_pc(next_pc_after_ex),
    .reti(ex_go && pr2.c.reti),
    .vector, .resume_pc
  );

  // data memory
  assign d_rd    = ex_go && pr2.c.ld;
  assign d_wr    = ex_go && pr2.c.st;
  assign d_addr  = alu_y;
  assign d_wdata = ex_dest;

  // MorphoSys commands
  always_comb begin
    cmd = '0;
    if (ex_go) begin
      unique case (pr2.c.opc)
        TR_LDCTX, TR_LDFB, TR_STFB: begin
          cmd.dma_start    = 1'b1;
          cmd.dma_op       = (pr2.c.opc == TR_LDCTX) ? DMA_MEM2CTX :
                             (pr2.c.opc == TR_LDFB)  ? DMA_MEM2FB : DMA_FB2MEM;
          cmd.dma_mem_addr = ex_rs1;
          cmd.dma_loc_addr = pr2.imm[7:0];
          cmd.dma_count    = ex_dest[8:0];
        end
        TR_CBC: begin
          cmd.ctx_bcast = 1'b1;
          cmd.col_mode  = pr2.imm[4];
          cmd.ctx_addr  = {pr2.imm[4], 3'd0, pr2.imm[3:0]};
        end
        TR_SBC: begin
          cmd.ctx_single = 1'b1;
          cmd.sel_row    = pr2.imm[15:13];
          cmd.sel_col    = pr2.imm[12:10];
          cmd.ctx_addr   = pr2.imm[7:0];
        end
        TR_RCEX: begin
          cmd.rc_exec   = 1'b1;
          cmd.col_mode  = pr2.imm[4];
          cmd.fb_set    = pr2.imm[7];
          cmd.fb_offset = ex_rs1[5:0];
        end
        TR_RCWB: begin
          cmd.rc_wb     = 1'b1;
          cmd.col_mode  = pr2.imm[4];
          cmd.sel_row   = pr2.imm[3:1];
          cmd.sel_col   = pr2.imm[3:1];
          cmd.fb_set    = pr2.imm[7];
          cmd.fb_bank   = pr2.imm[8];
          cmd.fb_offset = ex_rs1[5:0];
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------ pipeline update
  logic [31:0] ex_result;
  assign ex_result = pr2.c.mfs ? mfs_val : (pr2.c.mts ? ex_rs1 : alu_y);

  assign i_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      pr1 <= '0;
      pr2 <= '0;
      pr3 <= '0;
    end else begin
      // Writeback register
      pr3.valid  <= ex_go;
      pr3.wb_we  <= pr2.c.wb_we;
      pr3.ld     <= pr2.c.ld;
      pr3.mts    <= pr2.c.mts;
      pr3.rd     <= pr2.dest;
      pr3.sreg   <= pr2.imm[2:0];
      pr3.result <= ex_result;

      if (stall) begin
        // hold Fetch/Decode/Execute; keep Execute operands current
        pr2.rs1_v  <= ex_rs1;
        pr2.rs2_v  <= ex_rs2;
        pr2.dest_v <= ex_dest;
      end else if (redirect) begin
        pc        <= take_irq ? vector : br_target;
        pr1.valid <= 1'b0;
        pr2.valid <= 1'b0;
      end else begin
        // Decode -> Execute
        pr2.valid  <= pr1.valid;
        pr2.pc     <= pr1.pc;
        pr2.c      <= decode(pr1.instr[31:26]);
        pr2.dest   <= id_dest;
        pr2.rs1    <= id_rs1;
        pr2.rs2    <= id_rs2;
        pr2.imm    <= pr1.instr[15:0];
        pr2.rs1_v  <= id_rs1_v;
        pr2.rs2_v  <= id_rs2_v;
        pr2.dest_v <= id_dest_v;
        // Fetch -> Decode
        if (!i_ack_n) begin
          pr1.valid <= 1'b1;
          pr1.pc    <= pc;
          pr1.instr <= i_data;
          pc        <= pc + 32'd1;
        end else begin
          pr1.valid <= 1'b0;
        end
      end
    end
  end

endmodule
