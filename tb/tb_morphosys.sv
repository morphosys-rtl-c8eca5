// tb_morphosys: end-to-end run of the whole MorphoSys top at its default
// sizes. Tiny RISC executes a program that
//  1. loads 128 row contexts and 128 column contexts into the context memory
//     through the DMA controller,
//  2. loads an 8x8 block of 8-bit pixels X into frame-buffer set 0 and, in the
//     background, a second block into set 1,
//  3. computes Y = C * X (an 8-point transform of each pixel column, C an 8x8
//     matrix of small coefficients): for t = 0..7 it broadcasts row context t,
//     in which row i holds multiply(-accumulate) by C[i][t], and executes the
//     array on frame-buffer word t. The array is thus reconfigured between
//     every two execution steps,
//  4. writes the eight result rows into set 1 (low 8 bits of each cell),
//  5. switches to column mode, reconfigures the single cell (5,3) to add 1,
//     passes pixel word 0 through the array and writes column 3 back, which
//     must reproduce word 0 with byte 5 incremented,
//  6. stores both result areas and the second block to main memory,
// with an interrupt arriving during the computation.
// Checks the memory contents against a reference computed here and counts
// each mechanism: DMA-busy stalls, frame-buffer set conflict stalls, RC bus
// turnaround stalls, DMA running while the array computes, context
// broadcasts in both modes, the single-cell context load, forwarding in both Tiny RISC stages, taken
// branches and the interrupt. A mechanism that never happened is a failure.
module tb_morphosys;
  import morphosys_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic [31:0] i_addr, i_data, d_addr, d_wdata, d_rdata, mem_addr, mem_wdata, mem_rdata;
  logic        i_ack_n, d_rd, d_wr, mem_rd, mem_wr, dma_busy, cpu_stall;
  logic [7:0]  irq;
  int checks = 0, failures = 0;

  logic [31:0] prog [256];
  logic [31:0] dmem [128];
  logic [31:0] mem  [4096];
  int          np;
  logic [7:0]  X  [8][8];
  logic [7:0]  X2 [40][8];
  int          C  [8][8];

  morphosys dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so every flip-flop resets

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

  // instruction cache, data cache and main memory models
  assign i_data = prog[i_addr[7:0]];
  always_ff @(posedge clk) begin
    if (d_rd) d_rdata <= dmem[d_addr[6:0]];
    if (d_wr) dmem[d_addr[6:0]] <= d_wdata;
    if (mem_rd) mem_rdata <= mem[mem_addr[11:0]];
    if (mem_wr) mem[mem_addr[11:0]] <= mem_wdata;
  end

  // mechanism counters
  int n_dma_stall = 0, n_set_stall = 0, n_turn_stall = 0, n_overlap = 0;
  int n_bcast_row = 0, n_bcast_col = 0, n_single = 0, n_fwd_ex = 0, n_fwd_id = 0, n_branch = 0, n_irq = 0;
  logic done = 0;
  int   cycles = 0;

  // inputs change right after the clock edge, like flip-flop outputs
  logic irq_done = 0;
  int   turn_pc = 1000;
  always @(posedge clk) if (rst_n) begin
    // the cache answers at once around the write-back/execute pair, so that
    // the two reach Execute back to back
    i_ack_n <= (i_addr + 2 >= turn_pc && i_addr <= turn_pc + 2) ? 1'b0 : ($urandom % 8 == 0);
    if (d_wr && d_addr == 120) begin irq <= 0; irq_done <= 1; end
    else if (n_bcast_row == 3 && !irq_done) irq <= 8'h02;
  end

  always @(negedge clk) if (rst_n) begin
    cycles++;
    if (cpu_stall && dut.u_cpu.pr2.c.dma) n_dma_stall++;
    if (cpu_stall && dut.u_cpu.pr2.c.fbuse && dma_busy) n_set_stall++;
    if (cpu_stall && dut.cmd_q.rc_wb) n_turn_stall++;
    if (dma_busy && dut.cmd_q.rc_exec) n_overlap++;
    if (dut.cmd_q.ctx_bcast && !dut.cmd_q.col_mode) n_bcast_row++;
    if (dut.cmd_q.ctx_bcast &&  dut.cmd_q.col_mode) n_bcast_col++;
    if (dut.cmd_q.ctx_single) n_single++;
    if (dut.u_cpu.pr2.valid && dut.u_cpu.wb_we && dut.u_cpu.pr3.rd == dut.u_cpu.pr2.rs1) n_fwd_ex++;
    if (dut.u_cpu.pr1.valid && dut.u_cpu.wb_we && dut.u_cpu.pr3.rd == dut.u_cpu.pr1.instr[21:18]) n_fwd_id++;
    if (dut.u_cpu.ex_go && dut.u_cpu.br_taken) n_branch++;
    if (dut.u_cpu.take_irq) n_irq++;
    if (d_wr && d_addr == 127) done <= 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rc_ctx_t c;
    irq = 0; i_ack_n = 1;
    for (int k = 0; k < 256; k++) prog[k] = 0;
    for (int k = 0; k < 128; k++) dmem[k] = 0;
    for (int k = 0; k < 4096; k++) mem[k] = 0;
    // data
    for (int i = 0; i < 8; i++) for (int t = 0; t < 8; t++) C[i][t] = int'($urandom % 15) - 7;
    for (int t = 0; t < 8; t++) for (int j = 0; j < 8; j++) X[t][j] = 8'($urandom);
    for (int w = 0; w < 40; w++) for (int j = 0; j < 8; j++) X2[w][j] = 8'($urandom);
    // row contexts: block 0, row i, context t at word i*16+t
    for (int i = 0; i < 8; i++)
      for (int t = 0; t < 8; t++) begin
        c = '0; c.wr_bus = 1; c.mux_a = MA_IA; c.mux_b = MB_IB;
        c.alu_op = (t == 0) ? OP_MULK : OP_MACK; c.konst = 12'(C[i][t]);
        mem[i*16 + t] = c;
      end
    // column contexts: block 1, column j, context 0: pass IA through
    for (int j = 0; j < 8; j++) begin
      c = '0; c.wr_bus = 1; c.mux_a = MA_IA; c.alu_op = OP_PASSA;
      mem[128 + j*16] = c;
    end
    // a single-cell context: IA + 1
    c = '0; c.wr_bus = 1; c.mux_a = MA_IA; c.alu_op = OP_ADDK; c.konst = 12'd1;
    mem['hB1] = c;
    for (int t = 0; t < 8; t++) begin
      mem[16'h200 + 2*t]     = {X[t][3], X[t][2], X[t][1], X[t][0]};
      mem[16'h200 + 2*t + 1] = {X[t][7], X[t][6], X[t][5], X[t][4]};
    end
    for (int w = 0; w < 40; w++) begin
      mem[16'h400 + 2*w]     = {X2[w][3], X2[w][2], X2[w][1], X2[w][0]};
      mem[16'h400 + 2*w + 1] = {X2[w][7], X2[w][6], X2[w][5], X2[w][4]};
    end

    // program
    np = 0;
    emit(I(TR_ADDI, 14, 0, 200));    // interrupt vector
    emit(I(TR_MTS, 0, 14, 3));
    emit(I(TR_LUI, 15, 0, 16'hFF00));
    emit(I(TR_MTS, 0, 15, 0));
    emit(I(TR_ADDI, 2, 0, 256));     // 256 context words (both blocks)
    emit(I(TR_LDCTX, 2, 0, 0));      // mem 0 -> context memory 0
    emit(I(TR_ADDI, 1, 0, 16'h200));
    emit(I(TR_ADDI, 2, 0, 8));
    emit(I(TR_LDFB, 2, 1, 8'h00));   // X -> set 0 bank 0, waits for the DMA
    emit(I(TR_ADDI, 1, 0, 16'h400));
    emit(I(TR_ADDI, 2, 0, 40));
    emit(I(TR_LDFB, 2, 1, 8'hA0));   // X2 -> set 1 offset 32, in background
    emit(I(TR_ADDI, 3, 0, 0));
    for (int t = 0; t < 8; t++) begin
      emit(I(TR_CBC, 0, 0, t));      // row mode, context t
      emit(I(TR_RCEX, 0, 3, 8'h00)); // set 0, offset r3
      emit(I(TR_ADDI, 3, 3, 1));
    end
    emit(I(TR_ADDI, 3, 0, 0));
    for (int i = 0; i < 8; i++) begin
      emit(I(TR_RCWB, 0, 3, 8'h80 | (i << 1)));   // row i -> set 1 bank 0 offset i
      emit(I(TR_ADDI, 3, 3, 1));
    end
    // column mode: pass word 0 through, write column 3 to set 1 bank 1 offset 5
    emit(I(TR_ADDI, 3, 0, 0));
    emit(I(TR_CBC, 0, 0, 8'h10));
    emit(I(TR_SBC, 0, 0, (5 << 13) | (3 << 10) | 8'hB1));   // cell (5,3) <- word 0xB1
    emit(I(TR_RCEX, 0, 3, 8'h10));
    emit(I(TR_ADDI, 4, 0, 40));
    turn_pc = np;
    emit(I(TR_RCWB, 0, 4, 16'h190 | (3 << 1)));
    emit(I(TR_RCEX, 0, 3, 8'h10));   // right after a write-back: bus turnaround
    // results out
    emit(I(TR_ADDI, 1, 0, 16'h300));
    emit(I(TR_ADDI, 2, 0, 8));
    emit(I(TR_STFB, 2, 1, 8'h80));
    emit(I(TR_ADDI, 1, 0, 16'h500));
    emit(I(TR_ADDI, 2, 0, 40));
    emit(I(TR_STFB, 2, 1, 8'hA0));
    emit(I(TR_ADDI, 1, 0, 16'h600));
    emit(I(TR_ADDI, 2, 0, 1));
    emit(I(TR_STFB, 2, 1, 8'hE8));
    emit(I(TR_LDCTX, 0, 0, 0));      // zero-length transfer: waits for the DMA
    emit(I(TR_ST, 8, 0, 127));
    emit(I(TR_JMP, 0, 0, 0));
    np = 200;
    emit(I(TR_ADDI, 8, 8, 1));       // interrupt handler
    emit(I(TR_ST, 8, 0, 120));
    emit(I(TR_RETI, 0, 0, 0));

    #22 rst_n = 1;
    wait (done);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int y;
        y = 0;
        for (int t = 0; t < 8; t++) y += C[i][t] * int'(X[t][j]);
        expect_eq($sformatf("Y[%0d][%0d]", i, j), mem[16'h300 + 2*i + j/4][8*(j%4) +: 8], y & 255);
      end
    for (int w = 0; w < 40; w++)
      for (int j = 0; j < 8; j++)
        expect_eq("X2 copy", mem[16'h500 + 2*w + j/4][8*(j%4) +: 8], X2[w][j]);
    for (int j = 0; j < 8; j++)
      expect_eq("column pass", mem[16'h600 + j/4][8*(j%4) +: 8], X[0][j] + ((j == 5) ? 8'd1 : 8'd0));
    expect_eq("irq handler ran", dmem[120], 1);
    expect_eq("irq count", dmem[127], 1);
    if (n_dma_stall == 0)  begin failures++; $display("FAIL no DMA-busy stall"); end
    if (n_set_stall == 0)  begin failures++; $display("FAIL no set-conflict stall"); end
    if (n_turn_stall == 0) begin failures++; $display("FAIL no bus turnaround stall"); end
    if (n_overlap == 0)    begin failures++; $display("FAIL DMA never overlapped RC execution"); end
    if (n_bcast_row < 8)   begin failures++; $display("FAIL row broadcasts %0d", n_bcast_row); end
    if (n_bcast_col == 0)  begin failures++; $display("FAIL no column broadcast"); end
    if (n_fwd_ex == 0)     begin failures++; $display("FAIL no Execute forwarding"); end
    if (n_fwd_id == 0)     begin failures++; $display("FAIL no Decode forwarding"); end
    if (n_branch == 0)     begin failures++; $display("FAIL no taken branch"); end
    if (n_irq != 1)        begin failures++; $display("FAIL interrupts %0d", n_irq); end
    if (n_single != 1)     begin failures++; $display("FAIL single-cell loads %0d", n_single); end
    checks += 11;
    $display("mechanisms: dma_stall=%0d set_stall=%0d turn_stall=%0d overlap=%0d bcast_row=%0d bcast_col=%0d fwd_ex=%0d fwd_id=%0d branch=%0d irq=%0d cycles=%0d",
             n_dma_stall, n_set_stall, n_turn_stall, n_overlap, n_bcast_row, n_bcast_col, n_fwd_ex, n_fwd_id, n_branch, n_irq, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
