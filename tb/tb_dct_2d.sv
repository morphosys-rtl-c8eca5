// tb_dct_2d: a two-dimensional 8x8 discrete cosine transform in fixed
// point, run on the whole MorphoSys top at its default sizes.
//
// C is the 8-point DCT-II matrix scaled by 8 and rounded,
// C[u][x] = round(8 * a(u) * cos((2x+1) u pi / 16)), a(0) = sqrt(1/8),
// a(u) = 1/2 otherwise. The transform Z = C * X * C^T is done in two passes:
//  1. Row mode. Frame-buffer word t holds pixel row X[t]; byte j reaches
//     column j. Row i multiplies-accumulates with C[i][t], so cell (i,j)
//     ends with Y[i][j] = sum_t C[i][t] X[t][j]. Two more contexts scale it
//     to a byte: Y' = (Y >>> 6) + 128.
//  2. The array writes Y' back column by column (column mode), so frame
//     buffer word j holds column j of Y'. This is the transposition.
//  3. Column mode. Word t now carries column t of Y'; byte k reaches row k.
//     Column m multiplies-accumulates with C[m][t], so cell (k,m) ends with
//     Z[k][m] = sum_t Y'[k][t] C[m][t].
//  4. Z leaves the array row by row, low bytes and then high bytes.
// The testbench computes the same fixed-point steps and checks Y' and Z
// exactly. It also checks that Z is close to the exact DCT of the block,
// which only holds if the two passes really combine into C * X * C^T.
module tb_dct_2d;
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
  logic [7:0]  X [8][8];
  int          C [8][8];

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
  int   cycles = 0, n_exec = 0, n_bcast_row = 0, n_bcast_col = 0, n_wb_row = 0, n_wb_col = 0;
  always @(posedge clk) if (rst_n) i_ack_n <= ($urandom % 8 == 0);
  always @(negedge clk) if (rst_n) begin
    cycles++;
    if (dut.cmd_q.rc_exec) n_exec++;
    if (dut.cmd_q.ctx_bcast && !dut.cmd_q.col_mode) n_bcast_row++;
    if (dut.cmd_q.ctx_bcast &&  dut.cmd_q.col_mode) n_bcast_col++;
    if (dut.cmd_q.rc_wb && !dut.cmd_q.col_mode) n_wb_row++;
    if (dut.cmd_q.rc_wb &&  dut.cmd_q.col_mode) n_wb_col++;
    if (d_wr && d_addr == 127) done <= 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  function automatic rc_ctx_t ctx(mux_a_e ma, rc_op_e op, int k, int rp);
    rc_ctx_t c;
    c = '0; c.mux_a = ma; c.mux_b = MB_IB; c.alu_op = op; c.konst = 12'(k); c.reg_ptr = 2'(rp);
    return c;
  endfunction

  initial begin
    rc_ctx_t c;
    int      Yq [8][8];
    irq = 0; i_ack_n = 1;
    for (int k = 0; k < 256; k++) prog[k] = 0;
    for (int k = 0; k < 128; k++) dmem[k] = 0;
    for (int k = 0; k < 4096; k++) mem[k] = 0;
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++)
        C[u][x] = int'($rtoi($floor(8.0 * ((u == 0) ? $sqrt(0.125) : 0.5) *
                                    $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0) + 0.5)));
    // pixels below 128 keep the scaled first-pass result inside one byte
    for (int t = 0; t < 8; t++) for (int j = 0; j < 8; j++) X[t][j] = 8'($urandom % 128);
    // contexts: block 0 row i / block 1 column m, context t at word
    // block*128 + i*16 + t
    for (int i = 0; i < 8; i++) begin
      for (int t = 0; t < 8; t++) begin
        mem[i*16 + t]       = ctx(MA_IA, (t == 0) ? OP_MULK : OP_MACK, C[i][t], 0);
        mem[128 + i*16 + t] = ctx(MA_IA, (t == 0) ? OP_MULK : OP_MACK, C[i][t], 0);
      end
      c = ctx(MA_R0, OP_PASSA, 0, 1); c.rs_ls = 1; c.alu_sft = 4'd6;
      mem[i*16 + 8] = c;                              // Y >>> 6
      c = ctx(MA_R1, OP_ADDK, 128, 2); c.wr_bus = 1;
      mem[i*16 + 9] = c;                              // + 128
      c = ctx(MA_R0, OP_PASSA, 0, 0); c.wr_bus = 1;
      mem[128 + i*16 + 8] = c;                        // Z, low byte
      c.rs_ls = 1; c.alu_sft = 4'd8; c.reg_ptr = 2'd1;
      mem[128 + i*16 + 9] = c;                        // Z >>> 8
    end
    for (int t = 0; t < 8; t++) begin
      mem['h200 + 2*t]     = {X[t][3], X[t][2], X[t][1], X[t][0]};
      mem['h200 + 2*t + 1] = {X[t][7], X[t][6], X[t][5], X[t][4]};
    end

    // program
    np = 0;
    emit(I(TR_ADDI, 2, 0, 256));
    emit(I(TR_LDCTX, 2, 0, 0));
    emit(I(TR_ADDI, 1, 0, 'h200));
    emit(I(TR_ADDI, 2, 0, 8));
    emit(I(TR_LDFB, 2, 1, 'h00));    // X -> set 0 bank 0
    // pass 1, row mode, on set 0
    emit(I(TR_ADDI, 3, 0, 0));
    for (int t = 0; t < 10; t++) begin
      emit(I(TR_CBC, 0, 0, t));
      emit(I(TR_RCEX, 0, 3, 'h00));
      emit(I(TR_ADDI, 3, 3, 1));
    end
    // transpose: column j of Y' -> set 1 bank 0 word j
    emit(I(TR_ADDI, 3, 0, 0));
    for (int j = 0; j < 8; j++) begin
      emit(I(TR_RCWB, 0, 3, 'h90 | (j << 1)));
      emit(I(TR_ADDI, 3, 3, 1));
    end
    // pass 2, column mode, on set 1
    emit(I(TR_ADDI, 3, 0, 0));
    for (int t = 0; t < 8; t++) begin
      emit(I(TR_CBC, 0, 0, 'h10 | t));
      emit(I(TR_RCEX, 0, 3, 'h90));
      emit(I(TR_ADDI, 3, 3, 1));
    end
    // Z rows: low bytes to words 8..15, high bytes to 16..23
    for (int h = 0; h < 2; h++) begin
      emit(I(TR_CBC, 0, 0, 'h18 + h));
      emit(I(TR_RCEX, 0, 0, 'h90));
      emit(I(TR_ADDI, 3, 0, 8 + 8*h));
      for (int i = 0; i < 8; i++) begin
        emit(I(TR_RCWB, 0, 3, 'h80 | (i << 1)));
        emit(I(TR_ADDI, 3, 3, 1));
      end
    end
    emit(I(TR_ADDI, 1, 0, 'h300));
    emit(I(TR_ADDI, 2, 0, 24));
    emit(I(TR_STFB, 2, 1, 'h80));
    emit(I(TR_LDCTX, 0, 0, 0));      // zero-length transfer: waits for the DMA
    emit(I(TR_ST, 8, 0, 127));
    emit(I(TR_JMP, 0, 0, 0));

    #22 rst_n = 1;
    wait (done);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int y;
        y = 0;
        for (int t = 0; t < 8; t++) y += C[i][t] * int'(X[t][j]);
        Yq[i][j] = (y >>> 6) + 128;
        expect_eq($sformatf("Y' [%0d][%0d]", i, j),
                  int'(mem['h300 + 2*j + i/4][8*(i%4) +: 8]), Yq[i][j]);
      end
    for (int k = 0; k < 8; k++)
      for (int m = 0; m < 8; m++) begin
        int z, got, bias, tol;
        real d;
        z = 0; bias = 0; tol = 0; d = 0.0;
        for (int t = 0; t < 8; t++) begin
          z    += Yq[k][t] * C[m][t];
          bias += 128 * C[m][t];
          tol  += (C[m][t] < 0) ? -C[m][t] : C[m][t];
          for (int x = 0; x < 8; x++) d += real'(C[k][x] * int'(X[x][t]) * C[m][t]) / 64.0;
        end
        got = int'($signed({mem['h300 + 2*(16+k) + m/4][8*(m%4) +: 8],
                            mem['h300 + 2*(8+k)  + m/4][8*(m%4) +: 8]}));
        expect_eq($sformatf("Z[%0d][%0d]", k, m), got, z);
        // truncation by >>> 6 moves each first-pass value by less than 1
        checks++;
        if (real'(got - bias) > d + real'(tol) || real'(got - bias) < d - real'(tol)) begin
          failures++;
          $display("FAIL Z[%0d][%0d] - bias = %0d, far from the exact transform %f", k, m, got - bias, d);
        end
      end
    expect_eq("array steps", n_exec, 10 + 8 + 2);
    expect_eq("row-mode broadcasts", n_bcast_row, 10);
    expect_eq("column-mode broadcasts", n_bcast_col, 10);
    expect_eq("column write-backs", n_wb_col, 8);
    expect_eq("row write-backs", n_wb_row, 16);
    $display("8x8 transform done in %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
