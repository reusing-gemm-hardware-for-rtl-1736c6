// Self-checking testbench for gemm_core: random per-column vectors, weight
// matrices and psums; every column must output psum + dot product, or zero
// when reset is set. Also checks the Conv2D case of one shared vector.
module tb_gemm_core;
  localparam int unsigned J = 32, K = 32;
  logic        reset;
  logic [7:0]  vec [K][J];
  logic [7:0]  wgt [K][J];
  logic [31:0] acc_in [K];
  logic [31:0] acc_out [K];
  int checks = 0, failures = 0;

  gemm_core #(.J(J), .K(K), .IN_W(8), .ACC_W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [7:0] shared [J];
      reset = (t % 7) == 3;
      for (int j = 0; j < J; j++) shared[j] = 8'($urandom);
      for (int k = 0; k < K; k++) begin
        acc_in[k] = $urandom;
        for (int j = 0; j < J; j++) begin
          vec[k][j] = (t % 2) ? shared[j] : 8'($urandom);
          wgt[k][j] = 8'($urandom);
        end
      end
      #1;
      for (int k = 0; k < K; k++) begin
        int expv;
        expv = int'(acc_in[k]);
        for (int j = 0; j < J; j++) expv += int'($signed(vec[k][j])) * int'($signed(wgt[k][j]));
        if (reset) expv = 0;
        checks++;
        if (acc_out[k] !== 32'(expv)) begin
          failures++;
          if (failures < 10) $display("t=%0d col %0d: %h expected %h", t, k, acc_out[k], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
