// Self-checking testbench for pe_column: random signed 8-bit vectors,
// including the extreme values, against a dot product computed in the
// testbench.
module tb_pe_column;
  localparam int unsigned J = 32;
  logic signed [7:0]  a [J];
  logic signed [7:0]  b [J];
  logic signed [31:0] dot;
  int checks = 0, failures = 0;

  pe_column #(.J(J), .IN_W(8), .ACC_W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int expv;
      expv = 0;
      for (int j = 0; j < J; j++) begin
        case (t % 4)
          0: begin a[j] = -8'sd128; b[j] = -8'sd128; end
          1: begin a[j] = 8'sd127;  b[j] = -8'sd128; end
          default: begin a[j] = 8'($urandom); b[j] = 8'($urandom); end
        endcase
        expv += int'(a[j]) * int'(b[j]);
      end
      #1;
      checks++;
      if (dot !== expv) begin
        failures++;
        if (failures < 10) $display("t=%0d dot=%0d expected %0d", t, dot, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
