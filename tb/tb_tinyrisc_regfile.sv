// tb_tinyrisc_regfile: random writes and reads on all three read ports,
// compared with a model array; also checks reset and read-before-write.
module tb_tinyrisc_regfile;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  rs1, rs2, dest, waddr;
  logic [31:0] v1, v2, vd, wdata;
  logic        we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  tinyrisc_regfile dut (.clk, .rst_n, .rs1, .rs2, .dest, .rs1_val(v1), .rs2_val(v2), .dest_val(vd),
                        .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; rs1 = 0; rs2 = 0; dest = 0;
    for (int k = 0; k < 16; k++) model[k] = 0;
    #12 rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      rs1 = 4'(k); #1; checks++;
      if (v1 !== 0) begin failures++; $display("FAIL reset r%0d=%h", k, v1); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom;
      rs1 = 4'($urandom); rs2 = 4'($urandom); dest = (n % 4 == 0) ? waddr : 4'($urandom);
      #1;
      checks += 3;
      if (v1 !== model[rs1])  begin failures++; $display("FAIL rs1 r%0d=%h exp %h", rs1, v1, model[rs1]); end
      if (v2 !== model[rs2])  begin failures++; $display("FAIL rs2"); end
      if (vd !== model[dest]) begin failures++; $display("FAIL dest r%0d=%h exp %h", dest, vd, model[dest]); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
