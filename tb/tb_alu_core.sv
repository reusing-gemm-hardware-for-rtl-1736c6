// Self-checking testbench for alu_core: every operation on random signed
// operands (including negative shift amounts) against arithmetic done in
// the testbench.
module tb_alu_core;
  import ged_pkg::*;
  localparam int unsigned K = 32;
  alu_op_e     op;
  logic [31:0] a [K];
  logic [31:0] b [K];
  logic [31:0] y [K];
  int checks = 0, failures = 0;

  alu_core #(.K(K), .ACC_W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      op = alu_op_e'(t % 5);
      for (int k = 0; k < K; k++) begin
        a[k] = $urandom;
        if (op == ALU_SHR) b[k] = 32'($signed(($urandom % 63)) - 31);
        else if (k % 4 == 0) b[k] = 32'($signed(($urandom % 200)) - 100);
        else b[k] = $urandom;
      end
      #1;
      for (int k = 0; k < K; k++) begin
        int sa, sb, e;
        sa = a[k]; sb = b[k];
        case (op)
          ALU_MIN: e = (sa < sb) ? sa : sb;
          ALU_MAX: e = (sa > sb) ? sa : sb;
          ALU_ADD: e = sa + sb;
          ALU_SHR: e = (sb < 0) ? (sa << (-sb)) : (sa >>> sb);
          default: e = sa * sb;
        endcase
        checks++;
        if (y[k] !== 32'(e)) begin
          failures++;
          if (failures < 10) $display("op %0d a=%0d b=%0d: %0d expected %0d", op, sa, sb, y[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
