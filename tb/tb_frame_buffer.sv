// tb_frame_buffer: the DMA port fills both sets bank by bank; the RC port
// reads both banks of a set at once (bank 0 on bus A, bank 1 on bus B) with
// one cycle latency; masked RC writes; the DMA port works on one set while the
// RC port uses the other in the same cycles.
module tb_frame_buffer;
  logic        clk = 0;
  logic        dma_rd, dma_wr, dma_set, dma_bank, rc_rd, rc_wr, rc_set, rc_bank;
  logic [5:0]  dma_addr, rc_addr;
  logic [63:0] dma_wdata, dma_rdata, rc_wdata, rc_rdata_a, rc_rdata_b;
  logic [7:0]  rc_wmask;
  logic [63:0] model [4][64];
  int checks = 0, failures = 0;

  frame_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic expect64(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {dma_rd, dma_wr, dma_set, dma_bank, rc_rd, rc_wr, rc_set, rc_bank} = '0;
    dma_addr = 0; rc_addr = 0; dma_wdata = 0; rc_wdata = 0; rc_wmask = 0;
    // fill everything through the DMA port
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        dma_wr = 1; dma_set = 1'(s >> 1); dma_bank = 1'(s & 1); dma_addr = 6'(a);
        dma_wdata = {$urandom, $urandom}; model[s][a] = dma_wdata;
      end
    @(negedge clk); dma_wr = 0;
    // RC reads of set 0 while DMA reads set 1
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rc_rd = 1; rc_set = 0; rc_addr = 6'(a);
      dma_rd = 1; dma_set = 1; dma_bank = 1'(a & 1); dma_addr = 6'(63 - a);
      @(negedge clk);
      rc_rd = 0; dma_rd = 0;
      expect64("rc A", rc_rdata_a, model[0][a]);
      expect64("rc B", rc_rdata_b, model[1][a]);
      expect64("dma",  dma_rdata,  model[2 + (a & 1)][63 - a]);
    end
    // masked RC writes into set 1 while DMA writes set 0
    for (int a = 0; a < 32; a++) begin
      logic [63:0] d;
      logic [7:0]  m;
      @(negedge clk);
      d = {$urandom, $urandom}; m = 8'($urandom);
      rc_wr = 1; rc_set = 1; rc_bank = 1'(a & 1); rc_addr = 6'(a); rc_wdata = d; rc_wmask = m;
      for (int k = 0; k < 8; k++) if (m[k]) model[2 + (a & 1)][a][8*k +: 8] = d[8*k +: 8];
      dma_wr = 1; dma_set = 0; dma_bank = 0; dma_addr = 6'(a); dma_wdata = ~d; model[0][a] = ~d;
    end
    @(negedge clk); rc_wr = 0; dma_wr = 0;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); rc_rd = 1; rc_set = 1; rc_addr = 6'(a);
      @(negedge clk); rc_rd = 0;
      expect64("masked A", rc_rdata_a, model[2][a]);
      expect64("masked B", rc_rdata_b, model[3][a]);
      rc_rd = 1; rc_set = 0;
      @(negedge clk); rc_rd = 0;
      expect64("dma wrote", rc_rdata_a, model[0][a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
