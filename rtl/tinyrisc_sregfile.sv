// tinyrisc_sregfile: the five 32-bit special registers of Tiny RISC, which
// hold the interrupt state.
//   SREG0  IMASK in [31:24] (interrupts that may be serviced), INUM in [2:0]
//          (the interrupt now requesting service); [23:3] read as zero.
//   SREG1  copy of SREG0 taken when an interrupt is accepted.
//   SREG2  PC of the instruction executing when the interrupt was accepted.
//   SREG3  interrupt vector: the address the PC jumps to.
//   SREG4  PC to resume at (the next PC: PC+1, or a taken branch's target).
// INUM is updated every cycle with the lowest-numbered request in irq & IMASK;
// `irq_pending` is high while any such request exists. `take` (from the core)
// saves SREG0/PCs and clears IMASK, so the handler is not interrupted again;
// `reti` copies SREG1 back into SREG0. MTS writes (`we`) happen at the clock
// edge; `take` has priority over a write to the same register. Reads are
// combinational.
// From the source: the five registers and their purposes, the IMASK and INUM
// fields. This design's own choices: the field positions (8-bit IMASK at the
// top, 3-bit INUM at the bottom), priority by lowest number, clearing IMASK on
// entry, restoring it on return.
module tinyrisc_sregfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [2:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [7:0]  irq,
  output logic        irq_pending,
  input  logic        take,
  input  logic [31:0] cur_pc,
  input  logic [31:0] next_pc,
  input  logic        reti,
  output logic [31:0] vector,
  output logic [31:0] resume_pc
);
  logic [7:0]  imask, saved_mask;
  logic [2:0]  inum,  saved_num;
  logic [31:0] s2, s3, s4;
  logic [7:0]  req;
  logic [2:0]  inum_nx;

  assign req         = irq & imask;
  assign irq_pending = |req;

  always_comb begin
    inum_nx = inum;
    for (int k = 7; k >= 0; k--) if (req[k]) inum_nx = 3'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      imask <= '0; inum <= '0; saved_mask <= '0; saved_num <= '0;
      s2 <= '0; s3 <= '0; s4 <= '0;
    end else begin
      inum <= inum_nx;
      if (we) begin
        unique case (waddr)
          3'd0: imask <= wdata[31:24];
          3'd1: {saved_mask, saved_num} <= {wdata[31:24], wdata[2:0]};
          3'd2: s2 <= wdata;
          3'd3: s3 <= wdata;
          3'd4: s4 <= wdata;
          default: ;
        endcase
      end
      if (take) begin
        saved_mask <= imask;
        saved_num  <= inum_nx;
        imask      <= '0;
        s2         <= cur_pc;
        s4         <= next_pc;
      end else if (reti) begin
        imask <= saved_mask;
      end
    end
  end

  always_comb begin
    unique case (raddr)
      3'd0:    rdata = {imask, 21'd0, inum};
      3'd1:    rdata = {saved_mask, 21'd0, saved_num};
      3'd2:    rdata = s2;
      3'd3:    rdata = s3;
      3'd4:    rdata = s4;
      default: rdata = '0;
    endcase
  end
  assign vector    = s3;
  assign resume_pc = s4;
endmodule
