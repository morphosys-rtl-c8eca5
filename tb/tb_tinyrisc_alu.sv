// tb_tinyrisc_alu: random operands for every ALU operation, compared with a
// reference computed here.
module tb_tinyrisc_alu;
  import morphosys_pkg::*;
  tr_aluop_e   op;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  tinyrisc_alu dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      op = tr_aluop_e'(n % 8);
      a  = $urandom;
      b  = (n % 5 == 0) ? 32'($urandom % 40) : $urandom;
      #1;
      case (n % 8)
        0: exp_y = a + b;
        1: exp_y = a + ~b + 1;
        2: exp_y = a & b;
        3: exp_y = a | b;
        4: exp_y = a ^ b;
        5: begin exp_y = a; repeat (b % 32) exp_y = {exp_y[30:0], 1'b0}; end
        6: begin exp_y = a; repeat (b % 32) exp_y = {1'b0, exp_y[31:1]}; end
        default: exp_y = b;
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", n % 8, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
