// tb_tinyrisc: runs a small program on the Tiny RISC core with an instruction
// memory whose acknowledge is randomly withheld and a data memory that returns
// load data the cycle after the request. The program exercises back-to-back
// register dependencies (both forwarding paths, including a load followed by
// its use), taken and untaken branches (whose shadow instructions must not
// write), shifts, logic ops, MTS/MFS, an interrupt taken during a loop and the
// return from it, and the MorphoSys instructions: their command fields, the
// stall while the DMA holds the requested frame-buffer set and the one-cycle
// stall of an RC execute right after an RC write-back.
module tb_tinyrisc;
  import morphosys_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [31:0] i_addr, i_data, d_addr, d_wdata, d_rdata;
  logic        i_ack_n, d_rd, d_wr, dma_busy, dma_busy_set, rc_wr_busy, stall;
  logic [7:0]  irq;
  tr_cmd_t     cmd;
  int checks = 0, failures = 0;

  logic [31:0] prog [64];
  logic [31:0] dmem [128];
  int          np;

  tinyrisc dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] R(tr_opcode_e op, int d, int s1, int s2);
    return {op, 4'(d), 4'(s1), 4'(s2), 14'd0};
  endfunction
  function automatic logic [31:0] I(tr_opcode_e op, int d, int s1, int imm);
    return {op, 4'(d), 4'(s1), 2'd0, 16'(imm)};
  endfunction
  task automatic emit(logic [31:0] w); prog[np] = w; np++; endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  // memories
  assign i_data = prog[i_addr[5:0]];
  always_ff @(posedge clk) begin
    if (d_rd) d_rdata <= dmem[d_addr[6:0]];
    if (d_wr) dmem[d_addr[6:0]] <= d_wdata;
  end

  // array-side environment
  int busy_left = 0, stall_dma = 0, stall_turn = 0, irq_taken = 0, n_exec = 0, n_wb = 0;
  logic done = 0;
  always_ff @(posedge clk) rc_wr_busy <= rst_n && cmd.rc_wb;

  // environment inputs change right after the clock edge, like flip-flops
  always @(posedge clk) if (rst_n) begin
    i_ack_n <= ($urandom % 5 == 0);
    if (busy_left > 0) busy_left--;
    dma_busy <= (busy_left > 0);
  end

  // outputs are sampled mid-cycle
  always @(negedge clk) if (rst_n) begin
    if (stall && dma_busy) stall_dma++;
    if (stall && rc_wr_busy) stall_turn++;
    if (i_addr == 33 && irq_taken == 0) irq <= 8'h08;
    if (d_wr && d_addr == 101) begin irq <= 0; irq_taken++; end
    if (cmd.dma_start) begin
      expect_eq("dma op", cmd.dma_op, DMA_MEM2FB);
      expect_eq("dma mem", cmd.dma_mem_addr, 500);
      expect_eq("dma loc", cmd.dma_loc_addr, 8'h85);
      expect_eq("dma cnt", cmd.dma_count, 9);
      busy_left = 12; dma_busy_set <= 1;
    end
    if (cmd.rc_exec) begin
      n_exec++;
      expect_eq("exec offset", cmd.fb_offset, 17);
      if (n_exec == 1) begin expect_eq("exec1 set", cmd.fb_set, 0); expect_eq("exec1 busy", dma_busy, 1); end
      if (n_exec == 2) begin
        expect_eq("exec2 set", cmd.fb_set, 1); expect_eq("exec2 col", cmd.col_mode, 1);
        expect_eq("exec2 after dma", dma_busy, 0);
      end
    end
    if (cmd.rc_wb) begin
      n_wb++;
      expect_eq("wb bank", cmd.fb_bank, 1); expect_eq("wb set", cmd.fb_set, 0);
      expect_eq("wb sel", cmd.sel_row, 2);
    end
    if (cmd.ctx_bcast) begin expect_eq("cbc col", cmd.col_mode, 1); expect_eq("cbc addr", cmd.ctx_addr, 8'h8A); end
    if (cmd.ctx_single) begin
      expect_eq("sbc row", cmd.sel_row, 5); expect_eq("sbc col", cmd.sel_col, 2); expect_eq("sbc addr", cmd.ctx_addr, 8'h33);
    end
    if (d_wr && d_addr == 127) done <= 1;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    np = 0;
    for (int k = 0; k < 64; k++) prog[k] = 0;
    for (int k = 0; k < 128; k++) dmem[k] = 0;
    irq = 0; i_ack_n = 1; dma_busy = 0; dma_busy_set = 0;
    emit(I(TR_LUI, 1, 0, 1));        // 0  r1 = 0x10000
    emit(I(TR_ORI, 1, 1, 5));        // 1  r1 = 0x10005
    emit(I(TR_ADDI, 2, 0, 7));       // 2  r2 = 7
    emit(R(TR_ADD, 3, 1, 2));        // 3  r3 = 0x1000C
    emit(R(TR_SUB, 4, 3, 2));        // 4  r4 = 0x10005
    emit(R(TR_XOR, 5, 4, 1));        // 5  r5 = 0
    emit(I(TR_ST, 3, 0, 100));       // 6
    emit(I(TR_LD, 6, 0, 100));       // 7
    emit(R(TR_ADD, 7, 6, 6));        // 8  r7 = 0x20018
    emit(I(TR_BEQ, 5, 0, 3));        // 9  -> 12
    emit(I(TR_ADDI, 8, 0, 1));       // 10
    emit(I(TR_ADDI, 8, 0, 2));       // 11
    emit(I(TR_BGT, 2, 0, 2));        // 12 -> 14
    emit(I(TR_ADDI, 8, 0, 3));       // 13
    emit(I(TR_BLT, 2, 0, 5));        // 14 not taken
    emit(I(TR_ADDI, 9, 0, -1));      // 15 r9 = -1
    emit(I(TR_BLT, 9, 0, 2));        // 16 -> 18
    emit(I(TR_ADDI, 8, 0, 4));       // 17
    emit(R(TR_SLL, 10, 2, 2));       // 18 r10 = 0x380
    emit(R(TR_SRL, 11, 9, 2));       // 19 r11 = 0x01FFFFFF
    emit(R(TR_AND, 12, 9, 1));       // 20 r12 = 0x10005
    emit(R(TR_OR, 13, 2, 10));       // 21 r13 = 0x387
    emit(I(TR_ST, 8, 0, 105));       // 22
    emit(I(TR_ST, 7, 0, 106));       // 23
    emit(I(TR_ST, 10, 0, 107));      // 24
    emit(I(TR_ST, 11, 0, 108));      // 25
    emit(I(TR_ST, 12, 0, 109));      // 26
    emit(I(TR_ST, 13, 0, 110));      // 27
    emit(I(TR_ADDI, 14, 0, 56));     // 28
    emit(I(TR_MTS, 0, 14, 3));       // 29 SREG3 = 56
    emit(I(TR_LUI, 15, 0, 16'hFF00));// 30
    emit(I(TR_MTS, 0, 15, 0));       // 31 IMASK = FF
    emit(I(TR_ADDI, 14, 0, 20));     // 32
    emit(I(TR_ADDI, 13, 13, 1));     // 33 loop
    emit(I(TR_ADDI, 14, 14, -1));    // 34
    emit(I(TR_BGT, 14, 0, -2));      // 35 -> 33
    emit(I(TR_ST, 13, 0, 102));      // 36
    emit(I(TR_ST, 8, 0, 103));       // 37
    emit(I(TR_MFS, 12, 0, 0));       // 38
    emit(I(TR_ST, 12, 0, 104));      // 39
    emit(I(TR_ADDI, 1, 0, 500));     // 40
    emit(I(TR_ADDI, 2, 0, 9));       // 41
    emit(I(TR_LDFB, 2, 1, 8'h85));   // 42
    emit(I(TR_ADDI, 3, 0, 17));      // 43
    emit(I(TR_RCEX, 0, 3, 8'h00));   // 44 set 0: no wait
    emit(I(TR_RCEX, 0, 3, 8'h90));   // 45 set 1, column: waits for DMA
    emit(I(TR_RCWB, 0, 3, 16'h104)); // 46 bank 1, row 2
    emit(I(TR_RCEX, 0, 3, 8'h00));   // 47 bus turnaround
    emit(I(TR_CBC, 0, 0, 8'h1A));    // 48
    emit(I(TR_SBC, 0, 0, (5 << 13) | (2 << 10) | 8'h33)); // 49
    emit(I(TR_ST, 0, 0, 127));       // 50
    emit(I(TR_JMP, 0, 0, 0));        // 51
    np = 56;
    emit(I(TR_ADDI, 8, 8, 100));     // 56 handler
    emit(I(TR_ST, 8, 0, 101));       // 57
    emit(I(TR_RETI, 0, 0, 0));       // 58
    #22 rst_n = 1;
    wait (done);
    repeat (3) @(posedge clk);
    expect_eq("shadow writes", dmem[105], 0);
    expect_eq("r3 store/load fwd", dmem[100], 32'h1000C);
    expect_eq("r7 load-use", dmem[106], 32'h20018);
    expect_eq("sll", dmem[107], 32'h380);
    expect_eq("srl", dmem[108], 32'h01FFFFFF);
    expect_eq("and", dmem[109], 32'h10005);
    expect_eq("or", dmem[110], 32'h387);
    expect_eq("loop", dmem[102], 32'h387 + 20);
    expect_eq("handler", dmem[101], 100);
    expect_eq("after irq", dmem[103], 100);
    expect_eq("sreg0", dmem[104], 32'hFF00_0003);
    expect_eq("irq once", irq_taken, 1);
    expect_eq("execs", n_exec, 3);
    expect_eq("wbs", n_wb, 1);
    checks++; if (stall_dma == 0)  begin failures++; $display("FAIL no DMA stall"); end
    checks++; if (stall_turn != 1) begin failures++; $display("FAIL turnaround stalls %0d", stall_turn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
