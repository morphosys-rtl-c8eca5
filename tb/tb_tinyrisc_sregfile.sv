// tb_tinyrisc_sregfile: MTS-style writes and reads, INUM priority from the
// masked requests, interrupt entry (save and mask) and return (restore).
module tb_tinyrisc_sregfile;
  logic        clk = 0, rst_n = 0;
  logic [2:0]  raddr, waddr;
  logic [31:0] rdata, wdata, cur_pc, next_pc, vector, resume_pc;
  logic        we, take, reti, irq_pending;
  logic [7:0]  irq;
  int checks = 0, failures = 0;

  tinyrisc_sregfile dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata, .irq, .irq_pending,
                         .take, .cur_pc, .next_pc, .reti, .vector, .resume_pc);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk); we = 1; waddr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; take = 0; reti = 0; irq = 0; raddr = 0; waddr = 0; wdata = 0; cur_pc = 0; next_pc = 0;
    #12 rst_n = 1;
    wr(3, 32'h0000_0100); raddr = 3; #1 expect_eq("sreg3", rdata, 32'h100); expect_eq("vector", vector, 32'h100);
    wr(2, 32'hdead_beef); raddr = 2; #1 expect_eq("sreg2", rdata, 32'hdead_beef);
    wr(4, 32'h1234_5678); raddr = 4; #1 expect_eq("sreg4", rdata, 32'h1234_5678);
    // no mask: no pending interrupt
    irq = 8'b0010_0100; @(negedge clk);
    expect_eq("pending masked", irq_pending, 0);
    wr(0, 32'hFF00_0000);
    @(negedge clk);
    expect_eq("pending", irq_pending, 1);
    raddr = 0; #1 expect_eq("sreg0 inum=2", rdata, 32'hFF00_0002);
    wr(0, 32'hF000_0000);              // mask out 2: request 5 remains
    @(negedge clk); raddr = 0; #1 expect_eq("sreg0 inum=5", rdata, 32'hF000_0005);
    // take the interrupt
    @(negedge clk); take = 1; cur_pc = 32'd40; next_pc = 32'd77;
    @(negedge clk); take = 0;
    raddr = 1; #1 expect_eq("sreg1 saved", rdata, 32'hF000_0005);
    raddr = 2; #1 expect_eq("sreg2 pc", rdata, 32'd40);
    raddr = 4; #1 expect_eq("sreg4 next", rdata, 32'd77);
    expect_eq("resume", resume_pc, 32'd77);
    raddr = 0; #1 expect_eq("imask cleared", rdata[31:24], 0);
    expect_eq("no pending in handler", irq_pending, 0);
    // return
    @(negedge clk); reti = 1;
    @(negedge clk); reti = 0;
    raddr = 0; #1 expect_eq("imask restored", rdata[31:24], 8'hF0);
    expect_eq("pending again", irq_pending, 1);
    // random writes/reads
    for (int n = 0; n < 100; n++) begin
      logic [31:0] d;
      logic [2:0]  a;
      d = $urandom; a = 3'(2 + $urandom % 3);
      wr(a, d); raddr = a; #1 expect_eq("rand", rdata, d);
    end
    raddr = 5; #1 expect_eq("unused", rdata, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
