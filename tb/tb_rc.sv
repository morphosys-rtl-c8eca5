// tb_rc: random contexts and operands for one Reconfigurable Cell, compared
// cycle by cycle with a reference model of the cell kept here (output
// register, feedback register, register file). Checks that results appear
// one cycle after the operation and that nothing changes without `exec`.
module tb_rc;
  import morphosys_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        ctx_we, exec;
  rc_ctx_t     ctx_in, ctx_q;
  logic [7:0]  ia, ib, out8;
  logic [15:0] in_la, in_m, in_r, in_t, in_c, in_b, in_xq, in_e, in_u, in_d, in_lb, out16;
  logic [31:0] out_reg;
  int checks = 0, failures = 0;
  int opcount [16];

  rc dut (.*);

  always #5 clk = ~clk;

  // reference state
  logic [15:0] m_rf [4];
  logic [15:0] m_fb;
  longint      m_out;

  function automatic longint sx16(logic [15:0] v); return longint'($signed(v)); endfunction

  task automatic step(rc_ctx_t c);
    longint a, b, r;
    logic [15:0] av, bv;
    case (c.mux_a)
      MA_IA: av = {8'h00, ia};  MA_LA: av = in_la; MA_M: av = in_m;  MA_R: av = in_r;
      MA_T:  av = in_t;         MA_C:  av = in_c;  MA_B: av = in_b;  MA_XQ: av = in_xq;
      MA_FB: av = m_fb;         MA_R0: av = m_rf[0]; MA_R1: av = m_rf[1];
      MA_R2: av = m_rf[2];      MA_R3: av = m_rf[3]; MA_E: av = in_e;
      default: av = 0;
    endcase
    case (c.mux_b)
      MB_IB: bv = {8'h00, ib}; MB_U: bv = in_u; MB_D: bv = in_d; MB_LB: bv = in_lb;
      default: bv = m_rf[int'(c.mux_b) - 4];
    endcase
    if (int'(c.alu_op) >= 10) bv = {{4{c.konst[11]}}, c.konst};
    a = sx16(av); b = sx16(bv);
    case (int'(c.alu_op))
      0: r = a;
      1, 10: r = a + b;
      2, 11: r = a - b;
      3, 12: r = sx16(av & bv);
      4: r = sx16(av | bv);
      5, 13: r = sx16(av ^ bv);
      6: r = (av == bv) ? 1 : 0;
      7: r = b;
      8, 14: r = a * b;
      default: r = longint'($signed(32'(m_out))) + a * b;
    endcase
    r = longint'($signed(32'(r)));
    if (c.rs_ls) r = r >>> c.alu_sft; else r = r << c.alu_sft;
    m_out = longint'(32'(r));
    m_fb  = av;
    m_rf[c.reg_ptr] = 16'(r);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctx_we = 0; exec = 0; ctx_in = '0;
    {ia, ib} = '0;
    {in_la, in_m, in_r, in_t, in_c, in_b, in_xq, in_e, in_u, in_d, in_lb} = '0;
    for (int k = 0; k < 4; k++) m_rf[k] = 0;
    m_fb = 0; m_out = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      rc_ctx_t c;
      @(negedge clk);
      c = rc_ctx_t'($urandom);
      if (c.mux_a inside {MA_Z14, MA_Z15}) c.mux_a = MA_FB;
      if (n % 3 != 0) c.alu_sft = 0;           // keep many unshifted results
      ctx_we = 1; ctx_in = c; exec = 0;
      @(negedge clk);
      ctx_we = 0;
      ia = 8'($urandom); ib = 8'($urandom);
      {in_la, in_m, in_r, in_t} = {$urandom, $urandom};
      {in_c, in_b, in_xq, in_e} = {$urandom, $urandom};
      {in_u, in_d, in_lb} = 48'({$urandom, $urandom});
      exec = (n % 10 != 0);
      if (exec) begin step(c); opcount[c.alu_op]++; end
      @(negedge clk);
      exec = 0;
      checks += 3;
      if (out_reg !== 32'(m_out)) begin
        failures++; $display("FAIL n=%0d op=%0d ma=%0d mb=%0d out=%h exp=%h", n, c.alu_op, c.mux_a, c.mux_b, out_reg, 32'(m_out));
      end
      if (out16 !== out_reg[15:0] || out8 !== out_reg[7:0]) failures++;
      if (ctx_q !== c) failures++;
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (opcount[k] == 0) begin failures++; $display("FAIL op %0d never ran", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
