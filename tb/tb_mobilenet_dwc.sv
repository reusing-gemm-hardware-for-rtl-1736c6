// Workload testbench: two MobileNet-v1 depthwise layers run on ged_top at
// its default size, checked against a direct convolution computed in the
// testbench from the unpadded feature map.
//
//  * 14 x 14 x 64, 3 x 3, stride 1, padding 1 (two groups of 32 channels,
//    one 16 x 16 padded tile each), outputs packed densely (14 x 14 words
//    per group), then bias addition, ReLU, a right shift by 4 and clipping
//    at 127 in the ALU core;
//  * 28 x 28 x 32, 3 x 3, stride 2, padding 1 (one 30 x 30 tile), outputs
//    written at the input geometry and picked out at even positions.
//
// Each DwC tile must take one cycle per streamed pixel (IH*IW slots, N + 5
// cycles per instruction).
module tb_mobilenet_dwc;
  import ged_pkg::*;
  localparam int unsigned J = 32, K = 32;
  localparam int unsigned INP_D = 1024, WGT_D = 32, ACC_D = 1024, UOP_D = 1024;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic                     insn_valid, insn_ready, done, busy;
  logic [127:0]             insn;
  logic                     host_inp_we, host_wgt_we, host_uop_we, host_acc_we, host_acc_re;
  logic [$clog2(INP_D)-1:0] host_inp_addr;
  logic [J*8-1:0]           host_inp_wdata;
  logic [$clog2(WGT_D)-1:0] host_wgt_addr;
  logic [J*K*8-1:0]         host_wgt_wdata;
  logic [$clog2(UOP_D)-1:0] host_uop_addr;
  logic [31:0]              host_uop_wdata;
  logic [$clog2(ACC_D)-1:0] host_acc_waddr, host_acc_raddr;
  logic [K*32-1:0]          host_acc_wdata, host_acc_rdata;

  ged_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int total_cycles = 0;

  // feature maps and weights: channel, row, column
  logic signed [7:0] x1 [64][14][14];
  logic signed [7:0] w1 [64][3][3];
  int                b1 [64];
  logic signed [7:0] x2 [32][28][28];
  logic signed [7:0] w2 [32][3][3];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_inp(int a, logic [J*8-1:0] d);
    @(negedge clk); host_inp_we = 1; host_inp_addr = a[9:0]; host_inp_wdata = d;
    @(negedge clk); host_inp_we = 0;
  endtask

  task automatic wr_wgt(int a, logic [J*K*8-1:0] d);
    @(negedge clk); host_wgt_we = 1; host_wgt_addr = a[4:0]; host_wgt_wdata = d;
    @(negedge clk); host_wgt_we = 0;
  endtask

  task automatic wr_acc(int a, logic [K*32-1:0] d);
    @(negedge clk); host_acc_we = 1; host_acc_waddr = a[9:0]; host_acc_wdata = d;
    @(negedge clk); host_acc_we = 0;
  endtask

  task automatic wr_uop(int a, int d, int s, int w);
    uop_t u;
    u = '{wgt_idx: 10'(w), src_idx: 11'(s), dst_idx: 11'(d)};
    @(negedge clk); host_uop_we = 1; host_uop_addr = a[9:0]; host_uop_wdata = 32'(u);
    @(negedge clk); host_uop_we = 0;
  endtask

  task automatic rd_acc(int a, output logic [K*32-1:0] d);
    @(negedge clk); host_acc_re = 1; host_acc_raddr = a[9:0];
    @(negedge clk); host_acc_re = 0; d = host_acc_rdata;
  endtask

  task automatic issue(logic [127:0] word, int slots);
    int cyc;
    @(negedge clk);
    insn_valid = 1; insn = word;
    @(negedge clk);
    insn_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    total_cycles += cyc;
    checks++;
    if (cyc != slots + 5) begin
      failures++; $display("instruction with %0d slots took %0d cycles", slots, cyc);
    end
  endtask

  function automatic logic [127:0] dwc_insn(bit s2, int u, int ih, int iw, int fdo, int fdi);
    gemm_insn_t g;
    g = '0;
    g.head.opcode = OP_DWC_GEMM; g.head.stride2 = s2;
    g.head.uop_bgn = 13'(u); g.head.uop_end = 14'(u + 1);
    g.head.iter_out = 14'(ih); g.head.iter_in = 14'(iw);
    g.dst_factor_out = 11'(fdo); g.dst_factor_in = 11'(fdi);
    g.src_factor_out = 11'(iw); g.src_factor_in = 11'd1;
    return 128'(g);
  endfunction

  function automatic logic [127:0] alu_insn(alu_op_e op, bit use_imm, int imm, int u, int n);
    alu_insn_t a;
    a = '0;
    a.head.opcode = OP_ALU; a.head.uop_bgn = 13'(u); a.head.uop_end = 14'(u + 1);
    a.head.iter_out = 14'd1; a.head.iter_in = 14'(n);
    a.dst_factor_in = 11'd1;
    a.alu_op = op; a.use_imm = use_imm; a.imm = 16'(imm);
    return 128'(a);
  endfunction

  initial begin
    logic [J*8-1:0]   iw_;
    logic [J*K*8-1:0] ww_;
    logic [K*32-1:0]  aw_;
    insn_valid = 0; insn = '0;
    host_inp_we = 0; host_wgt_we = 0; host_uop_we = 0; host_acc_we = 0; host_acc_re = 0;
    host_inp_addr = '0; host_wgt_addr = '0; host_uop_addr = '0; host_acc_waddr = '0; host_acc_raddr = '0;
    host_inp_wdata = '0; host_wgt_wdata = '0; host_uop_wdata = '0; host_acc_wdata = '0;
    for (int c = 0; c < 64; c++) begin
      for (int r = 0; r < 14; r++) for (int q = 0; q < 14; q++) x1[c][r][q] = 8'($urandom);
      for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++) w1[c][r][q] = 8'($urandom);
      b1[c] = int'($urandom % 4001) - 2000;
    end
    for (int c = 0; c < 32; c++) begin
      for (int r = 0; r < 28; r++) for (int q = 0; q < 28; q++) x2[c][r][q] = 8'($urandom);
      for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++) w2[c][r][q] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- layer 1: 14x14x64 stride 1
    for (int g = 0; g < 2; g++) begin
      // padded 16 x 16 tile of channels 32g..32g+31 at ifmap words 256g..
      for (int r = 0; r < 16; r++) for (int q = 0; q < 16; q++) begin
        for (int j = 0; j < J; j++)
          iw_[j*8 +: 8] = (r == 0 || r == 15 || q == 0 || q == 15) ? 8'd0 : x1[32*g + j][r-1][q-1];
        wr_inp(256*g + 16*r + q, iw_);
      end
      ww_ = '0;
      for (int k = 0; k < K; k++) for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++)
        ww_[(k*J + 3*r + q)*8 +: 8] = w1[32*g + k][r][q];
      wr_wgt(g, ww_);
      for (int k = 0; k < K; k++) aw_[k*32 +: 32] = b1[32*g + k];
      wr_acc(1000 + g, aw_);
      // dense output: word 200g + 14*(o-2) + (i-2); first a reset pass, then the layer
      wr_uop(2*g, (200*g - 2*14 - 2) & 2047, 256*g, g);
      wr_uop(2*g + 1, 200*g, 1000 + g, 0);   // ALU: dst 200g.., src bias word
    end
    for (int g = 0; g < 2; g++) begin
      gemm_insn_t r;
      r = gemm_insn_t'(dwc_insn(0, 2*g, 16, 16, 14, 1));
      r.head.reset = 1'b1;
      issue(128'(r), 256);                                 // clear the outputs
      issue(dwc_insn(0, 2*g, 16, 16, 14, 1), 256);         // the layer
    end
    for (int g = 0; g < 2; g++) begin
      gemm_insn_t a;
      a = gemm_insn_t'(alu_insn(ALU_ADD, 0, 0, 2*g + 1, 196));
      a.src_factor_in = 11'd0;                             // same bias word for all pixels
      issue(128'(a), 196);
      issue(alu_insn(ALU_MAX, 1, 0, 2*g + 1, 196), 196);   // ReLU
      issue(alu_insn(ALU_SHR, 1, 4, 2*g + 1, 196), 196);   // requantise
      issue(alu_insn(ALU_MIN, 1, 127, 2*g + 1, 196), 196); // clip
    end
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < 14; r++) for (int q = 0; q < 14; q++) begin
        rd_acc(200*g + 14*r + q, aw_);
        for (int k = 0; k < K; k++) begin
          int c, s;
          c = 32*g + k;
          s = b1[c];
          for (int dr = 0; dr < 3; dr++) for (int dq = 0; dq < 3; dq++)
            if (r+dr-1 >= 0 && r+dr-1 < 14 && q+dq-1 >= 0 && q+dq-1 < 14)
              s += int'(x1[c][r+dr-1][q+dq-1]) * int'(w1[c][dr][dq]);
          s = (s > 0) ? s : 0;
          s = s >>> 4;
          s = (s < 127) ? s : 127;
          checks++;
          if (aw_[k*32 +: 32] !== 32'(s)) begin
            failures++;
            if (failures < 10) $display("layer1 ch %0d (%0d,%0d): %0d expected %0d", c, r, q,
                                        $signed(aw_[k*32 +: 32]), s);
          end
        end
      end

    // ---------------- layer 2: 28x28x32 stride 2 -> 14x14x32
    for (int r = 0; r < 30; r++) for (int q = 0; q < 30; q++) begin
      for (int j = 0; j < J; j++)
        iw_[j*8 +: 8] = (r == 0 || r == 29 || q == 0 || q == 29) ? 8'd0 : x2[j][r-1][q-1];
      wr_inp(30*r + q, iw_);
    end
    ww_ = '0;
    for (int k = 0; k < K; k++) for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++)
      ww_[(k*J + 3*r + q)*8 +: 8] = w2[k][r][q];
    wr_wgt(5, ww_);
    wr_uop(10, 0, 0, 5);
    begin
      gemm_insn_t r;
      r = gemm_insn_t'(dwc_insn(1, 10, 30, 30, 30, 1));
      r.head.reset = 1'b1;
      issue(128'(r), 900);
      issue(dwc_insn(1, 10, 30, 30, 30, 1), 900);
    end
    for (int r = 0; r < 14; r++) for (int q = 0; q < 14; q++) begin
      rd_acc((2*r + 2)*30 + (2*q + 2), aw_);
      for (int k = 0; k < K; k++) begin
        int s;
        s = 0;
        for (int dr = 0; dr < 3; dr++) for (int dq = 0; dq < 3; dq++)
          if (2*r+dr-1 >= 0 && 2*r+dr-1 < 28 && 2*q+dq-1 >= 0 && 2*q+dq-1 < 28)
            s += int'(x2[k][2*r+dr-1][2*q+dq-1]) * int'(w2[k][dr][dq]);
        checks++;
        if (aw_[k*32 +: 32] !== 32'(s)) begin
          failures++;
          if (failures < 10) $display("layer2 ch %0d (%0d,%0d): %0d expected %0d", k, r, q,
                                      $signed(aw_[k*32 +: 32]), s);
        end
      end
    end
    $display("layers took %0d core cycles", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
