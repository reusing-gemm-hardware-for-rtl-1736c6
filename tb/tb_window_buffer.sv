// Self-checking testbench for window_buffer: after each shift the window
// must hold the last KW columns shifted in, oldest on the left, in
// row-major order; without shift it must hold its contents.
module tb_window_buffer;
  localparam int unsigned KH = 3, KW = 3;
  logic       clk = 1'b0;
  logic       shift;
  logic [7:0] col [KH];
  logic [7:0] win [KH*KW];
  typedef logic [KH-1:0][7:0] col_t;
  col_t       cols [$];
  int checks = 0, failures = 0;

  window_buffer #(.W(8), .KH(KH), .KW(KW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_t c;
    shift = 0;
    for (int h = 0; h < KH; h++) col[h] = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      shift = (t < KW) || (($urandom % 3) != 0);
      for (int h = 0; h < KH; h++) begin
        col[h] = 8'($urandom);
        c[h] = col[h];
      end
      if (shift) cols.push_back(c);
      @(posedge clk); #1;
      if (cols.size() >= KW) begin
        for (int h = 0; h < KH; h++)
          for (int w = 0; w < KW; w++) begin
            checks++;
            if (win[h*KW + w] !== cols[cols.size() - KW + w][h]) begin
              failures++;
              if (failures < 10) $display("t=%0d win[%0d][%0d] = %h expected %h", t, h, w,
                                          win[h*KW+w], cols[cols.size()-KW+w][h]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
