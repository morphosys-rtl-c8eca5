// tinyrisc_regfile: the sixteen 32-bit general registers of Tiny RISC.
//
// Three combinational read ports serve the instruction in Decode: RS1, RS2 and
// DEST (the destination field is also read, for stores and branches). One
// write port, driven by the Writeback stage, writes at the clock edge; a read
// of the register being written in the same cycle returns the old value (the
// Decode-stage forwarding unit supplies the new one). All registers reset to 0.
// From the source: sixteen 32-bit registers in Decode, the RS1/RS2/DEST read
// values and the writeback input of the Decode stage figure. This design's own
// choice: reset value, no hard-wired zero register.
module tinyrisc_regfile #(
  parameter int unsigned NREGS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  input  logic [$clog2(NREGS)-1:0] dest,
  output logic [31:0] rs1_val,
  output logic [31:0] rs2_val,
  output logic [31:0] dest_val,
  input  logic        we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] r [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '{default: '0};
    else if (we) r[waddr] <= wdata;
  end

  assign rs1_val  = r[rs1];
  assign rs2_val  = r[rs2];
  assign dest_val = r[dest];
endmodule
