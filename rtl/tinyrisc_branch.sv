// tinyrisc_branch: the Tiny RISC branch unit, in the Execute stage.
//
// Decides whether the instruction in Execute redirects the program and where
// to: relative jump, jump to a register, branch if equal / greater than / less
// than (signed compare of the DEST register value with the RS1 register
// value), and return from interrupt (to the saved resume PC). Relative targets
// are the instruction's own PC plus the sign-extended 16-bit offset.
// Combinational. Otherwise the PC simply increments, which the core does.
// From the source: the branch unit's job and the branch-if-greater/less/equal
// instructions. The operand choice and target arithmetic are this design's.
module tinyrisc_branch
  import morphosys_pkg::*;
(
  input  tr_brop_e    op,
  input  logic [31:0] pc,
  input  logic [15:0] imm,
  input  logic [31:0] dest_val,
  input  logic [31:0] rs1_val,
  input  logic [31:0] resume_pc,
  output logic        taken,
  output logic [31:0] target
);
  logic [31:0] rel;
  assign rel = pc + {{16{imm[15]}}, imm};

  always_comb begin
    taken  = 1'b0;
    target = rel;
    unique case (op)
      BR_JMP:  taken = 1'b1;
      BR_JR:   begin taken = 1'b1; target = rs1_val; end
      BR_EQ:   taken = (dest_val == rs1_val);
      BR_GT:   taken = ($signed(dest_val) > $signed(rs1_val));
      BR_LT:   taken = ($signed(dest_val) < $signed(rs1_val));
      BR_RETI: begin taken = 1'b1; target = resume_pc; end
      default: ;
    endcase
  end
endmodule
