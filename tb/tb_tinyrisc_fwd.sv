// tb_tinyrisc_fwd: register numbers drawn from a small range so matches with
// the writeback destination are frequent; each operand is checked against the
// forwarding rule.
module tb_tinyrisc_fwd;
  logic [3:0]  rs1, rs2, dest, wb_rd;
  logic [31:0] v1, v2, vd, wbd, f1, f2, fd;
  logic        wb_we;
  int checks = 0, failures = 0, hits = 0;

  tinyrisc_fwd dut (.rs1, .rs2, .dest, .rs1_val(v1), .rs2_val(v2), .dest_val(vd),
                    .wb_we, .wb_rd, .wb_data(wbd), .rs1_fwd(f1), .rs2_fwd(f2), .dest_fwd(fd));

  task automatic chk(logic [3:0] r, logic [31:0] v, logic [31:0] got);
    logic [31:0] e;
    e = (wb_we && r == wb_rd) ? wbd : v;
    if (wb_we && r == wb_rd) hits++;
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL r=%0d wb_rd=%0d we=%b got=%h exp=%h", r, wb_rd, wb_we, got, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      rs1 = 4'($urandom % 4); rs2 = 4'($urandom % 4); dest = 4'($urandom % 4);
      wb_rd = 4'($urandom % 4); wb_we = 1'($urandom);
      v1 = $urandom; v2 = $urandom; vd = $urandom; wbd = $urandom;
      #1;
      chk(rs1, v1, f1); chk(rs2, v2, f2); chk(dest, vd, fd);
    end
    checks++;
    if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
