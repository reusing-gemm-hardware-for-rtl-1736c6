// Self-checking testbench for sram_buffer: random writes and reads on both
// ports against a reference array, including read-before-write when a
// read and a write hit the same word in one cycle.
module tb_sram_buffer;
  localparam int unsigned WIDTH = 40;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             we, re_a, re_b;
  logic [AW-1:0]    waddr, raddr_a, raddr_b;
  logic [WIDTH-1:0] wdata, rdata_a, rdata_b;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  sram_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re_a = 0; re_b = 0; waddr = '0; raddr_a = '0; raddr_b = '0; wdata = '0;
    // initialise every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = AW'($urandom); wdata = {$urandom, $urandom};
      re_a = 1; re_b = 1;
      raddr_a = AW'($urandom);
      raddr_b = (t % 4 == 0) ? waddr : AW'($urandom);
      exp_a = ref_mem[raddr_a];
      exp_b = ref_mem[raddr_b];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks += 2;
      if (rdata_a !== exp_a) begin
        failures++;
        if (failures < 10) $display("port A addr %0d: got %h expected %h", raddr_a, rdata_a, exp_a);
      end
      if (rdata_b !== exp_b) begin
        failures++;
        if (failures < 10) $display("port B addr %0d: got %h expected %h", raddr_b, rdata_b, exp_b);
      end
    end
    // a read with re low holds its data
    @(negedge clk); we = 0; re_a = 0; raddr_a = raddr_a + 1'b1; exp_a = rdata_a;
    @(posedge clk); #1;
    checks++;
    if (rdata_a !== exp_a) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
