// tb_context_memory: fills all 256 words, then checks the single-word read
// port for every address and the 8-wide broadcast read for every block and
// context number.
module tb_context_memory;
  logic             clk = 0;
  logic             we, rd_block;
  logic [7:0]       waddr, raddr;
  logic [31:0]      wdata, rdata;
  logic [3:0]       rd_ctx;
  logic [7:0][31:0] ctx_bus;
  logic [31:0]      model [256];
  int checks = 0, failures = 0;

  context_memory dut (.clk, .we, .waddr, .wdata, .rd_block, .rd_ctx, .ctx_bus, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0; rd_block = 0; rd_ctx = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a); #1; checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL word %0d", a); end
    end
    for (int blk = 0; blk < 2; blk++)
      for (int c = 0; c < 16; c++) begin
        rd_block = 1'(blk); rd_ctx = 4'(c); #1;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (ctx_bus[k] !== model[blk*128 + k*16 + c]) begin
            failures++; $display("FAIL bus blk=%0d ctx=%0d k=%0d", blk, c, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
