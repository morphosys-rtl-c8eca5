// tinyrisc_fwd: a Tiny RISC forwarding unit.
//
// Replaces each of the three register operands (RS1, RS2, DEST) by the data
// being written back when the Writeback stage writes the same register, so a
// read-after-write dependency costs no cycles. Purely combinational. The core
// uses two: one in Decode (for the second instruction after the writer, whose
// register-file read happens in the writer's writeback cycle) and one in
// Execute (for the instruction right after the writer).
// From the source: two forwarding units, their placement and purpose, the
// RS1/RS2/DEST values. This design's own choice: the match logic.
module tinyrisc_fwd (
  input  logic [3:0]  rs1,
  input  logic [3:0]  rs2,
  input  logic [3:0]  dest,
  input  logic [31:0] rs1_val,
  input  logic [31:0] rs2_val,
  input  logic [31:0] dest_val,
  input  logic        wb_we,
  input  logic [3:0]  wb_rd,
  input  logic [31:0] wb_data,
  output logic [31:0] rs1_fwd,
  output logic [31:0] rs2_fwd,
  output logic [31:0] dest_fwd
);
  assign rs1_fwd  = (wb_we && wb_rd == rs1)  ? wb_data : rs1_val;
  assign rs2_fwd  = (wb_we && wb_rd == rs2)  ? wb_data : rs2_val;
  assign dest_fwd = (wb_we && wb_rd == dest) ? wb_data : dest_val;
endmodule
