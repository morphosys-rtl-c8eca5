// tb_rc_array: exercises the RC array's context broadcast (row and column),
// single-cell reconfiguration, the two data buses in both modes, every
// interconnect input (LA, M, R, T, C, B, XQ, E on port A; Up, Down, Left-B on
// port B), the express lanes in both directions and modes, and the write-back
// bus with its mask. Each cell is first given a unique value through a
// single-cell context with a constant; then every cell passes one neighbour
// input through, and the result is compared with the neighbour's value
// computed here from the connection rules.
module tb_rc_array;
  import morphosys_pkg::*;
  logic                  clk = 0, rst_n = 0;
  logic                  col_mode, ctx_bcast, ctx_single, exec;
  logic [7:0][31:0]      ctx_bus;
  logic [2:0]            sel_row, sel_col, wb_sel;
  logic [31:0]           ctx_word;
  logic [63:0]           bus_a, bus_b, wb_data;
  logic [7:0]            wb_mask;
  logic [7:0][7:0][15:0] cell_out;
  logic [15:0]           v [8][8];
  int checks = 0, failures = 0;

  rc_array dut (.*);

  always #5 clk = ~clk;

  function automatic rc_ctx_t mk(rc_op_e op, mux_a_e ma, mux_b_e mb, logic [11:0] k);
    rc_ctx_t c;
    c = '0; c.alu_op = op; c.mux_a = ma; c.mux_b = mb; c.konst = k;
    return c;
  endfunction

  task automatic chk(string what, int i, int j, logic [15:0] exp);
    checks++;
    if (cell_out[i][j] !== exp) begin
      failures++; $display("FAIL %s cell(%0d,%0d)=%h exp=%h", what, i, j, cell_out[i][j], exp);
    end
  endtask

  // give every cell a unique 11-bit value
  task automatic seed();
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        v[i][j] = 16'(($urandom % 2040) + 1);
        ctx_single = 1; sel_row = 3'(i); sel_col = 3'(j);
        ctx_word = mk(OP_ADDK, MA_Z14, MB_IB, 12'(v[i][j]));
      end
    @(negedge clk); ctx_single = 0; exec = 1;
    @(negedge clk); exec = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) chk("seed", i, j, v[i][j]);
  endtask

  task automatic bcast(logic cm, rc_ctx_t c);
    @(negedge clk); col_mode = cm; ctx_bcast = 1;
    for (int k = 0; k < 8; k++) ctx_bus[k] = c;
    @(negedge clk); ctx_bcast = 0; exec = 1;
    @(negedge clk); exec = 0;
  endtask

  // the three other cells of a quadrant row/column, in order
  function automatic int other(int p, int which);
    int q, n;
    q = p & ~3; n = 0;
    for (int k = 0; k < 4; k++) if (q + k != p) begin
      if (n == which) return q + k;
      n++;
    end
    return 0;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_mode = 0; ctx_bcast = 0; ctx_single = 0; exec = 0; ctx_bus = '0;
    sel_row = 0; sel_col = 0; wb_sel = 0; ctx_word = 0; bus_a = 0; bus_b = 0;
    #12 rst_n = 1;

    // row broadcast with distinct context per row, data from bus A
    @(negedge clk); col_mode = 0; ctx_bcast = 1;
    for (int k = 0; k < 8; k++) ctx_bus[k] = mk(OP_ADDK, MA_IA, MB_IB, 12'(k * 256));
    @(negedge clk); ctx_bcast = 0; exec = 1; bus_a = {$urandom, $urandom}; bus_b = {$urandom, $urandom};
    @(negedge clk); exec = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
      chk("row bcast", i, j, 16'(bus_a[8*j +: 8]) + 16'(i * 256));
    // column broadcast, bus B via MUX B
    @(negedge clk); col_mode = 1; ctx_bcast = 1;
    for (int k = 0; k < 8; k++) ctx_bus[k] = mk(OP_SUB, MA_Z14, MB_IB, 12'(0));
    for (int k = 0; k < 8; k++) ctx_bus[k][11:0] = 12'(k);
    @(negedge clk); ctx_bcast = 0; exec = 1; bus_b = {$urandom, $urandom};
    @(negedge clk); exec = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
      chk("col bcast", i, j, 16'(0) - 16'(bus_b[8*i +: 8]));

    // port A quadrant connections and XQ
    for (int src = 1; src <= 7; src++) begin
      seed();
      bcast(0, mk(OP_PASSA, mux_a_e'(src), MB_IB, 0));
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        logic [15:0] e;
        case (src)
          1: e = v[i][other(j, 0)];
          2: e = v[i][other(j, 1)];
          3: e = v[i][other(j, 2)];
          4: e = v[other(i, 0)][j];
          5: e = v[other(i, 1)][j];
          6: e = v[other(i, 2)][j];
          default: e = v[i][(j + 4) % 8];
        endcase
        chk($sformatf("muxA %0d", src), i, j, e);
      end
    end
    // port B: Up, Down, Left-B
    for (int src = 1; src <= 3; src++) begin
      seed();
      bcast(0, mk(OP_PASSB, MA_IA, mux_b_e'(src), 0));
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        logic [15:0] e;
        case (src)
          1: e = (i > 0) ? v[i-1][j] : 0;
          2: e = (i < 7) ? v[i+1][j] : 0;
          default: e = (j > 0) ? v[i][j-1] : 0;
        endcase
        chk($sformatf("muxB %0d", src), i, j, e);
      end
    end
    // feedback and register file: after seed, R0 holds the seed value
    seed();
    bcast(0, mk(OP_PASSA, MA_R0, MB_IB, 0));
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) chk("R0", i, j, v[i][j]);
    // express lanes, row mode then column mode
    for (int cm = 0; cm < 2; cm++) begin
      seed();
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          rc_ctx_t c;
          c = mk(OP_PASSA, MA_E, MB_IB, 0);
          c.wr_exp = cm ? (i == 1 || i == 6) : (j == 2 || j == 5);
          @(negedge clk); ctx_single = 1; sel_row = 3'(i); sel_col = 3'(j); ctx_word = c;
        end
      @(negedge clk); ctx_single = 0; col_mode = 1'(cm); exec = 1;
      @(negedge clk); exec = 0;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
        if (cm) chk("express col", i, j, (i < 4) ? v[6][j] : v[1][j]);
        else    chk("express row", i, j, (j < 4) ? v[i][5] : v[i][2]);
    end
    // write-back bus and mask
    seed();
    for (int cm = 0; cm < 2; cm++)
      for (int s = 0; s < 8; s++) begin
        col_mode = 1'(cm); wb_sel = 3'(s); #1;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (wb_data[8*k +: 8] !== (cm ? v[k][s][7:0] : v[s][k][7:0])) begin
            failures++; $display("FAIL wb cm=%0d s=%0d k=%0d", cm, s, k);
          end
        end
      end
    @(negedge clk); ctx_single = 1; sel_row = 3; sel_col = 6; ctx_word = 32'h8000_0000;
    @(negedge clk); ctx_single = 0; col_mode = 0; wb_sel = 3; #1;
    checks++; if (wb_mask !== 8'b0100_0000) begin failures++; $display("FAIL mask %b", wb_mask); end
    col_mode = 1; wb_sel = 6; #1;
    checks++; if (wb_mask !== 8'b0000_1000) begin failures++; $display("FAIL cmask %b", wb_mask); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
