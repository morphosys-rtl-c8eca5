// rc: one Reconfigurable Cell of the MorphoSys RC array.
//
// The cell executes the operation held in its context register once per cycle
// in which `exec` is high. Operand A comes from MUX A (frame-buffer bus IA, the
// quadrant-row inputs LA/M/R, the quadrant-column inputs T/C/B, the
// cross-quadrant input XQ, the express lane E, the feedback register or one of
// the four register-file entries). Operand B comes from MUX B (bus IB, the Up,
// Down and Left-B neighbours or the register file), or from the 12-bit context
// constant for the constant operations. Bus data is 8 bits and is zero-extended;
// the internal datapath is 16 bits, the multiplier gives 32 bits and the result,
// after the shifter, lands in the 32-bit output register. Multiply-accumulate
// adds the product to the output register. Neighbours see the low 16 bits of
// the output register; the write-back bus sees its low 8 bits.
//
// Timing: the context register loads on `ctx_we`; output register, feedback
// register and register-file entry REG_PTR are written at the clock edge that
// ends an `exec` cycle, so a result is visible one cycle after the operation.
//
// From the source: operand sources, 8/16/32-bit widths, ADD/SUB/AND/XOR/shift/
// set-if-equal/multiply/multiply-accumulate, feedback = last cycle's MUX A
// value, 4-deep register file of previous outputs, context register, the
// context field layout.
// This design's own choices: the operation codes (see morphosys_pkg), one
// context format for operations with and without a constant, signed arithmetic, the shifter placed after the ALU, the
// register file and neighbour links being 16 bits, and writing the register
// file on every executed cycle.
module rc
  import morphosys_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // context
  input  logic        ctx_we,
  input  rc_ctx_t     ctx_in,
  output rc_ctx_t     ctx_q,
  input  logic        exec,
  // frame-buffer data buses
  input  logic [RC_BUS_W-1:0] ia,
  input  logic [RC_BUS_W-1:0] ib,
  // port A neighbour inputs
  input  logic [RC_INT_W-1:0] in_la, in_m, in_r, in_t, in_c, in_b, in_xq, in_e,
  // port B neighbour inputs
  input  logic [RC_INT_W-1:0] in_u, in_d, in_lb,
  // outputs
  output logic [RC_INT_W-1:0] out16,
  output logic [RC_BUS_W-1:0] out8,
  output logic [RC_OUT_W-1:0] out_reg
);

  logic [RC_INT_W-1:0] rf [RC_RF_DEPTH];
  logic [RC_INT_W-1:0] fb_q;
  logic [RC_INT_W-1:0] a, b_mux, b;
  logic signed [31:0] alu_r, sh_r;
  logic signed [31:0] prod;
  logic        use_k;

  always_comb begin
    unique case (ctx_q.mux_a)
      MA_IA:   a = {8'h00, ia};
      MA_LA:   a = in_la;
      MA_M:    a = in_m;
      MA_R:    a = in_r;
      MA_T:    a = in_t;
      MA_C:    a = in_c;
      MA_B:    a = in_b;
      MA_XQ:   a = in_xq;
      MA_FB:   a = fb_q;
      MA_R0:   a = rf[0];
      MA_R1:   a = rf[1];
      MA_R2:   a = rf[2];
      MA_R3:   a = rf[3];
      MA_E:    a = in_e;
      default: a = '0;
    endcase
    unique case (ctx_q.mux_b)
      MB_IB:   b_mux = {8'h00, ib};
      MB_U:    b_mux = in_u;
      MB_D:    b_mux = in_d;
      MB_LB:   b_mux = in_lb;
      MB_R0:   b_mux = rf[0];
      MB_R1:   b_mux = rf[1];
      MB_R2:   b_mux = rf[2];
      default: b_mux = rf[3];
    endcase
    use_k = ctx_q.alu_op inside {OP_ADDK, OP_SUBK, OP_ANDK, OP_XORK, OP_MULK, OP_MACK};
    b     = use_k ? {{4{ctx_q.konst[11]}}, ctx_q.konst} : b_mux;
    prod  = $signed(a) * $signed(b);
    unique case (ctx_q.alu_op)
      OP_PASSA:         alu_r = 32'($signed(a));
      OP_ADD, OP_ADDK:  alu_r = 32'($signed(a)) + 32'($signed(b));
      OP_SUB, OP_SUBK:  alu_r = 32'($signed(a)) - 32'($signed(b));
      OP_AND, OP_ANDK:  alu_r = 32'($signed(a & b));
      OP_OR:            alu_r = 32'($signed(a | b));
      OP_XOR, OP_XORK:  alu_r = 32'($signed(a ^ b));
      OP_SEQ:           alu_r = (a == b) ? 32'sd1 : 32'sd0;
      OP_PASSB:         alu_r = 32'($signed(b));
      OP_MUL, OP_MULK:  alu_r = prod;
      default:          alu_r = $signed(out_reg) + prod;   // OP_MAC, OP_MACK
    endcase
    sh_r = ctx_q.rs_ls ? (alu_r >>> ctx_q.alu_sft) : (alu_r <<< ctx_q.alu_sft);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_q   <= '0;
      out_reg <= '0;
      fb_q    <= '0;
      rf      <= '{default: '0};
    end else begin
      if (ctx_we) ctx_q <= ctx_in;
      if (exec) begin
        out_reg            <= sh_r;
        fb_q               <= a;
        rf[ctx_q.reg_ptr]  <= sh_r[RC_INT_W-1:0];
      end
    end
  end

  assign out16 = out_reg[RC_INT_W-1:0];
  assign out8  = out_reg[RC_BUS_W-1:0];

endmodule
