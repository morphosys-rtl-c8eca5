// tb_atr_template: binary template matching as used in automatic target
// recognition, run on the whole MorphoSys top at its default sizes.
//
// A binary image of 15 rows by 64 pixels is stored one row per frame-buffer
// word (one bit per pixel, pixel 8j+b in bit b of byte j). An 8x8 binary
// template T (one byte per row) is correlated with the image at 64
// positions: 8 vertical offsets times the 8 byte-aligned horizontal offsets.
// The score of a position is the number of template ones that meet image
// ones, sum_r popcount(image row & T[r]).
//  * Image rows stream down the array as in block matching: row 0 loads
//    image row s from bank 0 (input IA), every other row copies the cell
//    above it (input U). Row i evaluates vertical offset 7-i, column j the
//    horizontal offset 8j.
//  * From step 7 on, bank 1 carries template row s-7 in all eight bytes
//    (input IB). Each row ANDs it with its image byte and counts the ones
//    with the usual shift-mask-add sequence (no population-count operation
//    exists), then adds the count to R3 and restores the image byte on its
//    output. Fourteen contexts per step; with the clearing and read-out
//    contexts all 16 contexts of a row are used.
//  * The scores (at most 64) are written back one byte per cell.
// The template is cut out of the image at a random position, which must
// score highest. The testbench checks all 64 scores.
module tb_atr_template;
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
  logic [7:0]  W [15][8];
  logic [7:0]  T [8];
  int          dv, dj;

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
  int   cycles = 0, n_exec = 0, n_bcast = 0;
  always @(posedge clk) if (rst_n) i_ack_n <= ($urandom % 8 == 0);
  always @(negedge clk) if (rst_n) begin
    cycles++;
    if (dut.cmd_q.rc_exec) n_exec++;
    if (dut.cmd_q.ctx_bcast) n_bcast++;
    if (d_wr && d_addr == 127) done <= 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end



  function automatic rc_ctx_t ctx(mux_a_e ma, mux_b_e mb, rc_op_e op, int k, int rp, int sft);
    rc_ctx_t c;
    c = '0; c.mux_a = ma; c.mux_b = mb; c.alu_op = op; c.konst = 12'(k); c.reg_ptr = 2'(rp);
    c.rs_ls = 1'b1; c.alu_sft = 4'(sft);
    return c;
  endfunction

  initial begin
    rc_ctx_t c;
    irq = 0; i_ack_n = 1;
    for (int k = 0; k < 256; k++) prog[k] = 0;
    for (int k = 0; k < 128; k++) dmem[k] = 0;
    for (int k = 0; k < 4096; k++) mem[k] = 0;
    dv = int'($urandom % 8);
    dj = int'($urandom % 8);
    for (int r = 0; r < 15; r++) for (int j = 0; j < 8; j++) W[r][j] = 8'($urandom);
    for (int r = 0; r < 8; r++) T[r] = W[r + dv][dj];
    // row contexts, row i context t at word i*16+t. R0 image byte, R1 value
    // being counted, R2 scratch, R3 score.
    for (int i = 0; i < 8; i++) begin
      mem[i*16 + 0]  = (i == 0) ? ctx(MA_IA, MB_IB, OP_PASSA, 0, 0, 0)   // shift image down
                               : ctx(MA_IA, MB_U,  OP_PASSB, 0, 0, 0);
      mem[i*16 + 1]  = ctx(MA_R0, MB_IB, OP_AND,   0,    1, 0);  // v = image & T
      mem[i*16 + 2]  = ctx(MA_R1, MB_IB, OP_PASSA, 0,    2, 1);  // v >> 1
      mem[i*16 + 3]  = ctx(MA_R2, MB_IB, OP_ANDK,  'h55, 2, 0);
      mem[i*16 + 4]  = ctx(MA_R1, MB_R2, OP_SUB,   0,    1, 0);  // 2-bit counts
      mem[i*16 + 5]  = ctx(MA_R1, MB_IB, OP_PASSA, 0,    2, 2);  // v >> 2
      mem[i*16 + 6]  = ctx(MA_R2, MB_IB, OP_ANDK,  'h33, 2, 0);
      mem[i*16 + 7]  = ctx(MA_R1, MB_IB, OP_ANDK,  'h33, 1, 0);
      mem[i*16 + 8]  = ctx(MA_R1, MB_R2, OP_ADD,   0,    1, 0);  // 4-bit counts
      mem[i*16 + 9]  = ctx(MA_R1, MB_IB, OP_PASSA, 0,    2, 4);  // v >> 4
      mem[i*16 + 10] = ctx(MA_R1, MB_R2, OP_ADD,   0,    1, 0);
      mem[i*16 + 11] = ctx(MA_R1, MB_IB, OP_ANDK,  'h0F, 1, 0);  // popcount
      mem[i*16 + 12] = ctx(MA_R1, MB_R3, OP_ADD,   0,    3, 0);  // score += popcount
      mem[i*16 + 13] = ctx(MA_R0, MB_IB, OP_PASSA, 0,    0, 0);  // image byte back on the output
      mem[i*16 + 14] = ctx(MA_R0, MB_IB, OP_ANDK,  0,    3, 0);  // score = 0
      c = ctx(MA_R3, MB_IB, OP_PASSA, 0, 3, 0); c.wr_bus = 1;
      mem[i*16 + 15] = c;                                        // score out
    end
    // image rows at 'h200, template rows (each byte repeated) at 'h240
    for (int r = 0; r < 15; r++) begin
      mem['h200 + 2*r]     = {W[r][3], W[r][2], W[r][1], W[r][0]};
      mem['h200 + 2*r + 1] = {W[r][7], W[r][6], W[r][5], W[r][4]};
    end
    for (int r = 0; r < 8; r++) begin
      mem['h240 + 2*r]     = {4{T[r]}};
      mem['h240 + 2*r + 1] = {4{T[r]}};
    end

    // program
    np = 0;
    emit(I(TR_ADDI, 2, 0, 128));     // 128 row contexts
    emit(I(TR_LDCTX, 2, 0, 0));
    emit(I(TR_ADDI, 1, 0, 'h200));
    emit(I(TR_ADDI, 2, 0, 15));
    emit(I(TR_LDFB, 2, 1, 'h00));    // image -> set 0 bank 0 offsets 0..14
    emit(I(TR_ADDI, 1, 0, 'h240));
    emit(I(TR_ADDI, 2, 0, 8));
    emit(I(TR_LDFB, 2, 1, 'h47));    // template -> set 0 bank 1 offsets 7..14
    emit(I(TR_CBC, 0, 0, 14));
    emit(I(TR_RCEX, 0, 0, 'h00));    // scores = 0
    emit(I(TR_ADDI, 3, 0, 0));       // r3: step s
    emit(I(TR_ADDI, 5, 0, 7));
    emit(I(TR_CBC, 0, 0, 0));        // s = 0..6: shift only
    begin
      int l1, l2;
      l1 = np;
      emit(I(TR_RCEX, 0, 3, 'h00));
      emit(I(TR_ADDI, 3, 3, 1));
      emit(I(TR_BLT, 3, 5, l1 - np));
      emit(I(TR_ADDI, 5, 0, 15));
      l2 = np;                       // s = 7..14
      for (int t = 0; t < 14; t++) begin
        emit(I(TR_CBC, 0, 0, t));
        emit(I(TR_RCEX, 0, 3, 'h00));
      end
      emit(I(TR_ADDI, 3, 3, 1));
      emit(I(TR_BLT, 3, 5, l2 - np));
    end
    emit(I(TR_CBC, 0, 0, 15));
    emit(I(TR_RCEX, 0, 0, 'h00));
    emit(I(TR_ADDI, 3, 0, 0));
    for (int i = 0; i < 8; i++) begin
      emit(I(TR_RCWB, 0, 3, 'h80 | (i << 1)));   // scores of row i -> set 1 word i
      emit(I(TR_ADDI, 3, 3, 1));
    end
    emit(I(TR_ADDI, 1, 0, 'h300));
    emit(I(TR_ADDI, 2, 0, 8));
    emit(I(TR_STFB, 2, 1, 'h80));
    emit(I(TR_LDCTX, 0, 0, 0));      // zero-length transfer: waits for the DMA
    emit(I(TR_ST, 8, 0, 127));
    emit(I(TR_JMP, 0, 0, 0));

    #22 rst_n = 1;
    wait (done);
    repeat (4) @(posedge clk);
    begin
      int best_v, best_j, best;
      best = -1; best_v = 0; best_j = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          int score, got;
          score = 0;
          for (int r = 0; r < 8; r++) score += $countones(W[r + 7 - i][j] & T[r]);
          got = int'(mem['h300 + 2*i + j/4][8*(j%4) +: 8]);
          expect_eq($sformatf("score at vertical %0d, byte %0d", 7 - i, j), got, score);
          if (got > best) begin best = got; best_v = 7 - i; best_j = j; end
        end
      expect_eq("best vertical offset", best_v, dv);
      expect_eq("best horizontal byte", best_j, dj);
    end
    expect_eq("array steps", n_exec, 1 + 7 + 8*14 + 1);
    expect_eq("context broadcasts", n_bcast, 2 + 8*14 + 1);
    $display("template at (%0d,%0d) found in %0d cycles", dv, dj, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
