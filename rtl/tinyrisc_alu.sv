// tinyrisc_alu: the 32-bit arithmetic logic unit of the Tiny RISC Execute
// stage. Combinational: add, subtract, and, or, xor, shift left/right logical
// by b[4:0], and pass b (for load-upper-immediate). Loads and stores use the
// add to form their address.
// From the source: an ALU in the Execute stage. The operation set is this
// design's own choice (the source does not list the Tiny RISC instructions).
module tinyrisc_alu
  import morphosys_pkg::*;
(
  input  tr_aluop_e   op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      default:   y = b;
    endcase
  end
endmodule
