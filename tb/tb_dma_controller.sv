// tb_dma_controller: memory-to-frame-buffer, frame-buffer-to-memory and
// memory-to-context-memory transfers against behavioural memories defined
// here (main memory: one request per cycle, read data the next cycle; frame
// buffer: synchronous read). Checks the data, the addresses, the busy set and
// the cycle counts: 2 cycles per 64-bit frame-buffer word and 1 per context
// word, plus 2 cycles of start/finish overhead.
module tb_dma_controller;
  import morphosys_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        start, busy, busy_set, done;
  dma_op_e     op;
  logic [31:0] mem_addr_in;
  logic [7:0]  loc_addr_in;
  logic [8:0]  count_in;
  logic        mem_rd, mem_wr, fb_rd, fb_wr, fb_set, fb_bank, ctx_we;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, ctx_wdata;
  logic [5:0]  fb_addr;
  logic [63:0] fb_wdata, fb_rdata;
  logic [7:0]  ctx_addr;
  int checks = 0, failures = 0;

  logic [31:0] mem [1024];
  logic [63:0] fbm [256];
  logic [31:0] cm  [256];

  dma_controller dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_rd) mem_rdata <= mem[mem_addr[9:0]];
    if (mem_wr) mem[mem_addr[9:0]] <= mem_wdata;
    if (fb_rd)  fb_rdata <= fbm[{fb_set, fb_bank, fb_addr}];
    if (fb_wr)  fbm[{fb_set, fb_bank, fb_addr}] <= fb_wdata;
    if (ctx_we) cm[ctx_addr] <= ctx_wdata;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  task automatic run(dma_op_e o, int maddr, int laddr, int n, int exp_cycles);
    int cyc;
    logic set_seen;
    @(negedge clk);
    start = 1; op = o; mem_addr_in = 32'(maddr); loc_addr_in = 8'(laddr); count_in = 9'(n);
    @(negedge clk);
    start = 0;
    cyc = 1;
    set_seen = busy_set;
    while (!done) begin @(negedge clk); cyc++; end
    expect_eq("cycles", cyc, exp_cycles);
    if (o != DMA_MEM2CTX) expect_eq("busy_set", set_seen, laddr >> 7);
    expect_eq("not busy", busy, 0);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; op = DMA_MEM2FB; mem_addr_in = 0; loc_addr_in = 0; count_in = 0;
    for (int k = 0; k < 1024; k++) mem[k] = $urandom;
    for (int k = 0; k < 256; k++) begin fbm[k] = 0; cm[k] = 0; end
    #22 rst_n = 1;
    // memory -> FB, set 1 bank 0 offset 60, 10 words (crosses into bank 1)
    run(DMA_MEM2FB, 100, 8'h80 | 60, 10, 2*10 + 2);
    for (int w = 0; w < 10; w++)
      expect_eq("m2fb", fbm[128 + 60 + w], {mem[100 + 2*w + 1], mem[100 + 2*w]});
    expect_eq("m2fb untouched", fbm[128 + 70], 0);
    // a whole set
    run(DMA_MEM2FB, 300, 8'h00, 128, 2*128 + 2);
    for (int w = 0; w < 128; w++)
      expect_eq("m2fb set", fbm[w], {mem[300 + 2*w + 1], mem[300 + 2*w]});
    // FB -> memory
    run(DMA_FB2MEM, 700, 8'h00 | 5, 7, 2*7 + 2);
    for (int w = 0; w < 7; w++) begin
      expect_eq("fb2m lo", mem[700 + 2*w],     fbm[5 + w][31:0]);
      expect_eq("fb2m hi", mem[700 + 2*w + 1], fbm[5 + w][63:32]);
    end
    run(DMA_FB2MEM, 900, 8'h80 | 63, 1, 2*1 + 2);
    expect_eq("fb2m one lo", mem[900], fbm[128 + 63][31:0]);
    expect_eq("fb2m one hi", mem[901], fbm[128 + 63][63:32]);
    // memory -> context memory
    run(DMA_MEM2CTX, 40, 8'd16, 32, 32 + 2);
    for (int w = 0; w < 32; w++) expect_eq("ctx", cm[16 + w], mem[40 + w]);
    expect_eq("ctx untouched", cm[48], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
