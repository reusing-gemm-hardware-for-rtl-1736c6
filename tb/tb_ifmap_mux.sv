// Self-checking testbench for ifmap_mux: Conv2D mode must broadcast the
// ifmap vector to every column, DwC mode must give column k its own
// Im2Col column in the first NW rows and zeros below.
module tb_ifmap_mux;
  localparam int unsigned J = 32, K = 32, NW = 9;
  logic       dwc_mode;
  logic [7:0] inp [J];
  logic [7:0] win [K][NW];
  logic [7:0] vec [K][J];
  int checks = 0, failures = 0;

  ifmap_mux #(.J(J), .K(K), .NW(NW), .IN_W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      dwc_mode = t[0];
      for (int j = 0; j < J; j++) inp[j] = 8'($urandom);
      for (int k = 0; k < K; k++) for (int n = 0; n < NW; n++) win[k][n] = 8'($urandom);
      #1;
      for (int k = 0; k < K; k++)
        for (int j = 0; j < J; j++) begin
          logic [7:0] e;
          e = !dwc_mode ? inp[j] : (j < NW) ? win[k][j] : 8'd0;
          checks++;
          if (vec[k][j] !== e) begin
            failures++;
            if (failures < 10) $display("mode %0d col %0d row %0d: %h expected %h", dwc_mode, k, j, vec[k][j], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
