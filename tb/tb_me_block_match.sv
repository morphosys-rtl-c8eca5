// tb_me_block_match: full-search block matching for motion estimation, run
// on the whole MorphoSys top at its default sizes.
//
// A current 8x8 block CUR is matched against all 64 positions (8 horizontal
// x 8 vertical displacements) in a 15-row, 16-pixel-wide search window W.
// The matching error is the sum of squared differences (the array has no
// absolute-difference operation). Main memory holds the window once for
// each horizontal displacement h, as 15 rows of 8 pixels starting at column
// h. One pass of the array handles one h:
//  * Window rows stream down the array: at step s row 0 loads window row s
//    from frame-buffer bank 0 (input IA) and every other row takes the value
//    of the cell above it (input U), so after step s row i holds row s-i.
//  * From step 7 on, bank 1 carries CUR row s-7 (input IB). Each row then
//    runs four more contexts: d = R0 - IB, d*d, acc += d*d, and restoring
//    the window value on the output for the next shift. Row i thus pairs
//    window row r+7-i with CUR row r: it evaluates vertical displacement 7-i.
//  * The accumulators are written back as low and high bytes, and stored to
//    main memory.
// The passes alternate between the two frame-buffer sets: while the array
// works on one set, the DMA controller stores the previous results and loads
// the next window into the other. Tiny RISC runs the loops with counted
// branches and reconfigures the array with a context broadcast before every
// step. CUR is copied from W at a random displacement, which must give error
// 0 and be the best match. The testbench checks every partial sum, the best
// displacement, and that the DMA really ran while the array computed.
module tb_me_block_match;
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
  logic [7:0]  W   [15][16];
  logic [7:0]  CUR [8][8];
  int          dv, dh;

  morphosys dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge, so every flip-flop resets

  function automatic logic [31:0] I(tr_opcode_e op, int d, int s1, int imm);
    return {op, 4'(d), 4'(s1), 2'd0, 16'(imm)};
  endfunction
  task automatic emit(logic [31:0] w); prog[np] = w; np++; endtask

  task automatic expect_eq(string what, int got, int exp);
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

  logic done = 0;
  int   cycles = 0, n_exec = 0, n_bcast = 0, n_branch = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) i_ack_n <= ($urandom % 8 == 0);
  always @(negedge clk) if (rst_n) begin
    cycles++;
    if (dut.cmd_q.rc_exec) n_exec++;
    if (dut.cmd_q.ctx_bcast) n_bcast++;
    if (dut.cmd_q.rc_exec && dma_busy) n_overlap++;
    if (dut.u_cpu.ex_go && dut.u_cpu.br_taken && dut.u_cpu.pr2.c.opc == TR_BLT) n_branch++;
    if (d_wr && d_addr == 127) done <= 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rc_ctx_t ctx(mux_a_e ma, mux_b_e mb, rc_op_e op, int rp);
    rc_ctx_t c;
    c = '0; c.mux_a = ma; c.mux_b = mb; c.alu_op = op; c.reg_ptr = 2'(rp);
    return c;
  endfunction

  initial begin
    rc_ctx_t c;
    irq = 0; i_ack_n = 1;
    for (int k = 0; k < 256; k++) prog[k] = 0;
    for (int k = 0; k < 128; k++) dmem[k] = 0;
    for (int k = 0; k < 4096; k++) mem[k] = 0;
    // pixels kept below 32 so that a column's sum of eight squares fits 16 bits
    dv = int'($urandom % 8);
    dh = int'($urandom % 8);
    for (int r = 0; r < 15; r++) for (int c = 0; c < 16; c++) W[r][c] = 8'($urandom % 32);
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) CUR[r][c] = W[r + dv][c + dh];
    // row contexts, row i context t at word i*16+t
    for (int i = 0; i < 8; i++) begin
      mem[i*16 + 0] = (i == 0) ? ctx(MA_IA, MB_IB, OP_PASSA, 0)          // shift window down
                              : ctx(MA_IA, MB_U,  OP_PASSB, 0);
      mem[i*16 + 1] = ctx(MA_R0, MB_IB, OP_SUB,   1);                   // d = W - CUR
      mem[i*16 + 2] = ctx(MA_R1, MB_R1, OP_MUL,   2);                   // d*d
      mem[i*16 + 3] = ctx(MA_R2, MB_R3, OP_ADD,   3);                   // acc += d*d
      mem[i*16 + 4] = ctx(MA_R0, MB_IB, OP_PASSA, 0);                   // W back on the output
      c = ctx(MA_R3, MB_IB, OP_PASSA, 3); c.wr_bus = 1;
      mem[i*16 + 5] = c;                                                // acc, low byte
      c.rs_ls = 1; c.alu_sft = 4'd8; c.reg_ptr = 2'd1;
      mem[i*16 + 6] = c;                                                // acc >> 8
      mem[i*16 + 7] = ctx(MA_R0, MB_IB, OP_ANDK, 3);                    // acc = 0
    end
    // window for displacement h at 'h400 + 32*h, CUR at 'h240
    for (int h = 0; h < 8; h++)
      for (int r = 0; r < 15; r++) begin
        mem['h400 + 32*h + 2*r]     = {W[r][h+3], W[r][h+2], W[r][h+1], W[r][h]};
        mem['h400 + 32*h + 2*r + 1] = {W[r][h+7], W[r][h+6], W[r][h+5], W[r][h+4]};
      end
    for (int r = 0; r < 8; r++) begin
      mem['h240 + 2*r]     = {CUR[r][3], CUR[r][2], CUR[r][1], CUR[r][0]};
      mem['h240 + 2*r + 1] = {CUR[r][7], CUR[r][6], CUR[r][5], CUR[r][4]};
    end

    // program. Registers: r1/r2 DMA address/count, r3 step, r5 step limit,
    // r9 next window, r10 next result area, r12/r13 pass-pair counter/limit
    np = 0;
    emit(I(TR_ADDI, 2, 0, 128));     // 128 row contexts
    emit(I(TR_LDCTX, 2, 0, 0));
    emit(I(TR_ADDI, 1, 0, 'h240));
    emit(I(TR_ADDI, 2, 0, 8));
    emit(I(TR_LDFB, 2, 1, 'h47));    // CUR -> set 0 bank 1 offsets 7..14
    emit(I(TR_LDFB, 2, 1, 'hC7));    // CUR -> set 1 bank 1 offsets 7..14
    emit(I(TR_ADDI, 1, 0, 'h400));
    emit(I(TR_ADDI, 2, 0, 15));
    emit(I(TR_LDFB, 2, 1, 'h00));    // window h=0 -> set 0 bank 0 offsets 0..14
    emit(I(TR_ADDI, 9, 0, 'h420));
    emit(I(TR_ADDI, 10, 0, 'h800));
    emit(I(TR_ADDI, 12, 0, 0));
    emit(I(TR_ADDI, 13, 0, 4));
    begin
      int outer, l1, l2;
      outer = np;
      for (int S = 0; S < 2; S++) begin
        int set_a;
        set_a = S << 7;
        // load the next window into the other set, in the background (the
        // last pass loads a ninth, unused one)
        emit(I(TR_ADDI, 1, 9, 0));
        emit(I(TR_ADDI, 2, 0, 15));
        emit(I(TR_LDFB, 2, 1, (1 - S) << 7));
        emit(I(TR_ADDI, 9, 9, 32));
        // clear the accumulators, then fill: s = 0..6, shift only
        emit(I(TR_CBC, 0, 0, 7));
        emit(I(TR_RCEX, 0, 0, set_a));
        emit(I(TR_ADDI, 3, 0, 0));
        emit(I(TR_ADDI, 5, 0, 7));
        emit(I(TR_CBC, 0, 0, 0));
        l1 = np;
        emit(I(TR_RCEX, 0, 3, set_a));
        emit(I(TR_ADDI, 3, 3, 1));
        emit(I(TR_BLT, 3, 5, l1 - np));
        // s = 7..14: shift, difference, square, accumulate, restore
        emit(I(TR_ADDI, 5, 0, 15));
        l2 = np;
        for (int t = 0; t < 5; t++) begin
          emit(I(TR_CBC, 0, 0, t));
          emit(I(TR_RCEX, 0, 3, set_a));
        end
        emit(I(TR_ADDI, 3, 3, 1));
        emit(I(TR_BLT, 3, 5, l2 - np));
        // low bytes to bank 1 offsets 16..23, high bytes to 24..31
        for (int h = 0; h < 2; h++) begin
          emit(I(TR_CBC, 0, 0, 5 + h));
          emit(I(TR_RCEX, 0, 0, set_a));
          emit(I(TR_ADDI, 3, 0, 16 + 8*h));
          for (int i = 0; i < 8; i++) begin
            emit(I(TR_RCWB, 0, 3, 'h100 | set_a | (i << 1)));
            emit(I(TR_ADDI, 3, 3, 1));
          end
        end
        emit(I(TR_ADDI, 1, 10, 0));
        emit(I(TR_ADDI, 2, 0, 16));
        emit(I(TR_STFB, 2, 1, set_a | 'h50));
        emit(I(TR_ADDI, 10, 10, 32));
      end
      emit(I(TR_ADDI, 12, 12, 1));
      emit(I(TR_BLT, 12, 13, outer - np));
    end
    emit(I(TR_LDCTX, 0, 0, 0));      // zero-length transfer: waits for the DMA
    emit(I(TR_ST, 8, 0, 127));
    emit(I(TR_JMP, 0, 0, 0));
    if (np > 256) $fatal(1, "program too long");

    #22 rst_n = 1;
    wait (done);
    repeat (4) @(posedge clk);
    begin
      int ssd [8][8];
      int best_h, best_v, best_err;
      for (int h = 0; h < 8; h++)
        for (int i = 0; i < 8; i++) begin
          ssd[h][7 - i] = 0;
          for (int j = 0; j < 8; j++) begin
            int acc, got;
            acc = 0;
            for (int r = 0; r < 8; r++) begin
              int d;
              d = int'(W[r + 7 - i][j + h]) - int'(CUR[r][j]);
              acc += d * d;
            end
            got = int'({mem['h800 + 32*h + 2*(8+i) + j/4][8*(j%4) +: 8],
                        mem['h800 + 32*h + 2*i + j/4][8*(j%4) +: 8]});
            expect_eq($sformatf("partial error h=%0d row %0d col %0d", h, i, j), got, acc);
            ssd[h][7 - i] += got;
          end
        end
      best_h = 0; best_v = 0; best_err = ssd[0][0];
      for (int h = 0; h < 8; h++)
        for (int v = 0; v < 8; v++)
          if (ssd[h][v] < best_err) begin best_h = h; best_v = v; best_err = ssd[h][v]; end
      expect_eq("best horizontal displacement", best_h, dh);
      expect_eq("best vertical displacement", best_v, dv);
      expect_eq("best error", best_err, 0);
    end
    expect_eq("array steps", n_exec, 8 * (1 + 7 + 8*5 + 2));
    expect_eq("context broadcasts", n_bcast, 8 * (2 + 8*5 + 2));
    expect_eq("taken loop branches", n_branch, 8 * (6 + 7) + 3);
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL the DMA never ran while the array computed"); end
    $display("match at (%0d,%0d) found in %0d cycles, %0d array steps overlapped a DMA transfer",
             dh, dv, cycles, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
