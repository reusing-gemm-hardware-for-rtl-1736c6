// Self-checking testbench for line_buffer: for several row lengths, every
// pixel leaving the line must be the one pushed exactly len pushes earlier,
// with idle cycles between pushes, and clear must restart the row.
module tb_line_buffer;
  localparam int unsigned DEPTH = 58;
  localparam int unsigned AW    = $clog2(DEPTH + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clear, push;
  logic [AW-1:0] len;
  logic [7:0]    din, dout;
  logic [7:0]    hist [$];
  int checks = 0, failures = 0;

  line_buffer #(.W(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; push = 0; len = AW'(DEPTH); din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 12; l++) begin
      int unsigned L;
      L = (l == 0) ? DEPTH : (l == 1) ? 5 : (l == 2) ? 1 : (l == 3) ? 30 : 1 + ($urandom % DEPTH);
      @(negedge clk); clear = 1; len = AW'(L);
      @(negedge clk); clear = 0;
      hist = {};
      for (int n = 0; n < 6 * L + 20; n++) begin
        @(negedge clk);
        push = ($urandom % 4) != 0;
        din  = 8'($urandom);
        if (push) begin
          if (hist.size() >= L) begin
            checks++;
            if (dout !== hist[hist.size() - L]) begin
              failures++;
              if (failures < 10) $display("len %0d: got %h expected %h", L, dout, hist[hist.size()-L]);
            end
          end
          hist.push_back(din);
        end
      end
      @(negedge clk); push = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
