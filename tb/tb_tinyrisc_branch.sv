// tb_tinyrisc_branch: every branch kind, taken and not taken, with targets
// compared with a reference computed here.
module tb_tinyrisc_branch;
  import morphosys_pkg::*;
  tr_brop_e    op;
  logic [31:0] pc, dv, rv, resume, target;
  logic [15:0] imm;
  logic        taken;
  logic        exp_t;
  logic [31:0] exp_tg;
  int checks = 0, failures = 0;

  tinyrisc_branch dut (.op, .pc, .imm, .dest_val(dv), .rs1_val(rv), .resume_pc(resume), .taken, .target);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 700; n++) begin
      op     = tr_brop_e'(n % 7);
      pc     = $urandom % 100000;
      imm    = 16'($urandom);
      dv     = (n % 3 == 0) ? 32'(int'($urandom % 7) - 3) : $urandom;
      rv     = (n % 3 == 0) ? 32'(int'($urandom % 7) - 3) : $urandom;
      resume = $urandom;
      #1;
      exp_tg = 32'(int'(pc) + int'($signed(imm)));
      case (n % 7)
        0: exp_t = 0;
        1: exp_t = 1;
        2: begin exp_t = 1; exp_tg = rv; end
        3: exp_t = (dv == rv);
        4: exp_t = (int'(dv) > int'(rv));
        5: exp_t = (int'(dv) < int'(rv));
        default: begin exp_t = 1; exp_tg = resume; end
      endcase
      checks++;
      if (taken !== exp_t || (exp_t && target !== exp_tg)) begin
        failures++;
        $display("FAIL op=%0d dv=%h rv=%h taken=%b exp=%b tg=%h exp=%h", n % 7, dv, rv, taken, exp_t, target, exp_tg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
