// End-to-end testbench for ged_top at its default size (32 x 32 PE array,
// 32 kB ifmap, 32 kB weight, 128 kB output buffer, 58-byte Im2Col lines).
//
// The buffers are loaded through the host ports with random data; then a
// program of GEMM (Conv2D), DwC-GEMM (stride 1 and 2, including a full
// 58-pixel-wide tile), ALU and FINISH instructions runs. After every
// instruction the whole output buffer is read back and compared with a
// model computed in the testbench from the instruction's loop nest, and
// the instruction's cycle count is checked (one slot per cycle, N + 5
// cycles). It counts how often each mechanism occurred: Conv2D slots, DwC
// windows, Im2Col fill-stall slots, stride-2 discards, psum bypasses,
// reset writes, each ALU operation and Conv2D/DwC mode switches; a
// mechanism that never occurred counts as a failure.
module tb_ged_top;
  import ged_pkg::*;
  localparam int unsigned J = 32, K = 32;
  localparam int unsigned INP_D = 32768 / J, WGT_D = 32768 / (J * K), ACC_D = 131072 / (K * 4);
  localparam int unsigned UOP_D = 1024;

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

  logic [7:0]  inp_m [INP_D][J];
  logic [7:0]  wgt_m [WGT_D][K][J];
  int          acc_m [ACC_D][K];
  uop_t        uop_m [UOP_D];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_conv, n_dwc_win, n_fill, n_s2_drop, n_bypass, n_reset, n_switch;
  int n_alu [5];
  opcode_e last_mode;
  bit have_last;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.s3_valid) begin
      if (dut.mode == OP_GEMM) n_conv++;
      if (dut.mode == OP_DWC_GEMM && dut.p3_we) n_dwc_win++;
      if (dut.mode == OP_ALU) n_alu[int'(dut.alu_op)]++;
      if (dut.p3_we && dut.mode != OP_ALU && dut.reset_q) n_reset++;
    end
    if (dut.dwc_push) begin
      // pixel that completes no window: fill stall (or row start) vs stride-2 drop
      if (!(dut.g_im2col[0].u_im2col.full)) n_fill++;
      else if (!dut.g_im2col[0].u_im2col.keep) n_s2_drop++;
    end
    if (dut.fwd_a || dut.fwd_b) n_bypass++;
  end

  // ---------------------------------------------------------------- host
  task automatic write_inp(int a);
    @(negedge clk);
    host_inp_we = 1; host_inp_addr = a[$clog2(INP_D)-1:0];
    for (int j = 0; j < J; j++) host_inp_wdata[j*8 +: 8] = inp_m[a][j];
    @(negedge clk); host_inp_we = 0;
  endtask

  task automatic write_wgt(int a);
    @(negedge clk);
    host_wgt_we = 1; host_wgt_addr = a[$clog2(WGT_D)-1:0];
    for (int k = 0; k < K; k++) for (int j = 0; j < J; j++)
      host_wgt_wdata[(k*J + j)*8 +: 8] = wgt_m[a][k][j];
    @(negedge clk); host_wgt_we = 0;
  endtask

  task automatic write_acc(int a);
    @(negedge clk);
    host_acc_we = 1; host_acc_waddr = a[$clog2(ACC_D)-1:0];
    for (int k = 0; k < K; k++) host_acc_wdata[k*32 +: 32] = acc_m[a][k];
    @(negedge clk); host_acc_we = 0;
  endtask

  task automatic write_uop(int a, int d, int s, int w);
    uop_m[a] = '{wgt_idx: 10'(w), src_idx: 11'(s), dst_idx: 11'(d)};
    @(negedge clk);
    host_uop_we = 1; host_uop_addr = a[$clog2(UOP_D)-1:0]; host_uop_wdata = 32'(uop_m[a]);
    @(negedge clk); host_uop_we = 0;
  endtask

  task automatic compare_all(string what);
    int bad;
    bad = 0;
    for (int a = 0; a < ACC_D; a++) begin
      @(negedge clk);
      host_acc_re = 1; host_acc_raddr = a[$clog2(ACC_D)-1:0];
      @(negedge clk);
      host_acc_re = 0;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (host_acc_rdata[k*32 +: 32] !== 32'(acc_m[a][k])) begin
          failures++; bad++;
          if (bad < 5) $display("%s: out[%0d][%0d] = %0d expected %0d", what, a, k,
                                $signed(host_acc_rdata[k*32 +: 32]), acc_m[a][k]);
        end
      end
    end
  endtask

  // ------------------------------------------------------------- program
  task automatic issue(logic [127:0] word, int slots, string what);
    int cyc;
    opcode_e op;
    op = opcode_e'(word[2:0]);
    if (op == OP_GEMM || op == OP_DWC_GEMM) begin
      if (have_last && last_mode != op) n_switch++;
      last_mode = op; have_last = 1;
    end
    @(negedge clk);
    while (!insn_ready) @(negedge clk);
    insn_valid = 1; insn = word;
    @(negedge clk);
    insn_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ((slots > 0) ? slots + 5 : 1)) begin
      failures++;
      $display("%s: %0d slots took %0d cycles", what, slots, cyc);
    end
    compare_all(what);
  endtask

  function automatic gemm_insn_t mk(opcode_e op, bit rst, bit s2, int ub, int ue, int lo, int li,
                                     int fdo, int fdi, int fso, int fsi, int fwo, int fwi);
    gemm_insn_t g;
    g = '0;
    g.head.opcode = op; g.head.reset = rst; g.head.stride2 = s2;
    g.head.uop_bgn = 13'(ub); g.head.uop_end = 14'(ue);
    g.head.iter_out = 14'(lo); g.head.iter_in = 14'(li);
    g.dst_factor_out = 11'(fdo); g.dst_factor_in = 11'(fdi);
    g.src_factor_out = 11'(fso); g.src_factor_in = 11'(fsi);
    g.wgt_factor_out = 10'(fwo); g.wgt_factor_in = 10'(fwi);
    return g;
  endfunction

  // Conv2D GEMM model
  task automatic gemm(bit rst, int ub, int ue, int lo, int li,
                      int fdo, int fdi, int fso, int fsi, int fwo, int fwi);
    for (int o = 0; o < lo; o++) for (int i = 0; i < li; i++) for (int u = ub; u < ue; u++) begin
      int d, s, w;
      d = (int'(uop_m[u].dst_idx) + o*fdo + i*fdi) % ACC_D;
      s = (int'(uop_m[u].src_idx) + o*fso + i*fsi) % INP_D;
      w = (int'(uop_m[u].wgt_idx) + o*fwo + i*fwi) % WGT_D;
      for (int k = 0; k < K; k++) begin
        int sum;
        sum = 0;
        for (int j = 0; j < J; j++) sum += int'($signed(inp_m[s][j])) * int'($signed(wgt_m[w][k][j]));
        acc_m[d][k] = rst ? 0 : acc_m[d][k] + sum;
      end
    end
    issue(128'(mk(OP_GEMM, rst, 0, ub, ue, lo, li, fdo, fdi, fso, fsi, fwo, fwi)),
          lo * li * (ue - ub), "GEMM");
  endtask

  // DwC-GEMM model: 3x3 windows over the streamed tile, channel k in column k
  task automatic dwc(bit rst, bit s2, int u, int ih, int iw, int fdo, int fdi);
    for (int o = 0; o < ih; o++) for (int i = 0; i < iw; i++) begin
      if (o >= 2 && i >= 2 && (!s2 || ((o - 2) % 2 == 0 && (i - 2) % 2 == 0))) begin
        int d, w;
        d = (int'(uop_m[u].dst_idx) + o*fdo + i*fdi) % ACC_D;
        w = int'(uop_m[u].wgt_idx) % WGT_D;
        for (int k = 0; k < K; k++) begin
          int sum;
          sum = 0;
          for (int kh = 0; kh < 3; kh++) for (int kw = 0; kw < 3; kw++) begin
            int s;
            s = (int'(uop_m[u].src_idx) + (o - 2 + kh) * iw + (i - 2 + kw)) % INP_D;
            sum += int'($signed(inp_m[s][k])) * int'($signed(wgt_m[w][k][kh*3 + kw]));
          end
          acc_m[d][k] = rst ? 0 : acc_m[d][k] + sum;
        end
      end
    end
    // DwC arguments: uop [u, u+1), L_out = IH_tile, L_in = IW_tile,
    // ifmap factors (IW_tile, 1), weight factors 0
    issue(128'(mk(OP_DWC_GEMM, rst, s2, u, u + 1, ih, iw, fdo, fdi, iw, 1, 0, 0)),
          ih * iw, s2 ? "DwC stride 2" : "DwC stride 1");
  endtask

  task automatic alu(alu_op_e op, bit use_imm, int imm, int ub, int ue, int lo, int li,
                     int fdo, int fdi, int fso, int fsi);
    alu_insn_t a;
    for (int o = 0; o < lo; o++) for (int i = 0; i < li; i++) for (int u = ub; u < ue; u++) begin
      int d, s;
      d = (int'(uop_m[u].dst_idx) + o*fdo + i*fdi) % ACC_D;
      s = (int'(uop_m[u].src_idx) + o*fso + i*fsi) % ACC_D;
      for (int k = 0; k < K; k++) begin
        int x, y, r;
        x = acc_m[d][k];
        y = use_imm ? int'($signed(16'(imm))) : acc_m[s][k];
        case (op)
          ALU_MIN: r = (x < y) ? x : y;
          ALU_MAX: r = (x > y) ? x : y;
          ALU_ADD: r = x + y;
          ALU_SHR: r = (y < 0) ? (x << (-y)) : (x >>> y);
          default: r = x * y;
        endcase
        acc_m[d][k] = r;
      end
    end
    a = '0;
    a.head.opcode = OP_ALU; a.head.uop_bgn = 13'(ub); a.head.uop_end = 14'(ue);
    a.head.iter_out = 14'(lo); a.head.iter_in = 14'(li);
    a.dst_factor_out = 11'(fdo); a.dst_factor_in = 11'(fdi);
    a.src_factor_out = 11'(fso); a.src_factor_in = 11'(fsi);
    a.alu_op = op; a.use_imm = use_imm; a.imm = 16'(imm);
    issue(128'(a), lo * li * (ue - ub), "ALU");
  endtask

  initial begin
    int tstart;
    insn_valid = 0; insn = '0;
    host_inp_we = 0; host_wgt_we = 0; host_uop_we = 0; host_acc_we = 0; host_acc_re = 0;
    host_inp_addr = '0; host_wgt_addr = '0; host_uop_addr = '0; host_acc_waddr = '0; host_acc_raddr = '0;
    host_inp_wdata = '0; host_wgt_wdata = '0; host_uop_wdata = '0; host_acc_wdata = '0;
    n_conv = 0; n_dwc_win = 0; n_fill = 0; n_s2_drop = 0; n_bypass = 0; n_reset = 0; n_switch = 0;
    for (int i = 0; i < 5; i++) n_alu[i] = 0;
    have_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // load all buffers
    for (int a = 0; a < INP_D; a++) begin
      for (int j = 0; j < J; j++) inp_m[a][j] = 8'($urandom);
      write_inp(a);
    end
    for (int a = 0; a < WGT_D; a++) begin
      for (int k = 0; k < K; k++) for (int j = 0; j < J; j++) wgt_m[a][k][j] = 8'($urandom);
      write_wgt(a);
    end
    for (int a = 0; a < ACC_D; a++) begin
      for (int k = 0; k < K; k++) acc_m[a][k] = int'($urandom % 2001) - 1000;
      write_acc(a);
    end
    // micro-ops: 0..3 one output word, four ifmap vectors / filters (Conv2D
    // over 4 x 32 input channels); 8..11 DwC tiles; 16..17 ALU
    for (int u = 0; u < 4; u++) write_uop(u, 0, u, u);
    write_uop(8, 300, 0, 5);     // DwC tile at ifmap 0
    write_uop(9, 300, 0, 6);
    write_uop(10, 500, 200, 7);  // stride-2 tile
    write_uop(11, 0, 0, 9);      // full-width 58-pixel tile
    write_uop(16, 0, 1000, 0);   // ALU: out[d] op= out[1000] (bias word)
    write_uop(17, 0, 0, 0);

    // Conv2D layer piece: 4 x 8 output pixels, accumulation over 4 uops
    gemm(0, 0, 4, 4, 8, 8, 1, 32, 4, 0, 0);
    // reset a block of outputs, then DwC on a 10 x 12 tile: clear, compute
    gemm(1, 0, 1, 2, 16, 16, 1, 0, 0, 0, 0);
    dwc(1, 0, 8, 10, 12, 10, 1);
    dwc(0, 0, 8, 10, 12, 10, 1);
    dwc(0, 0, 9, 10, 12, 10, 1);
    // back to Conv2D, then a stride-2 DwC tile of 11 x 13
    gemm(0, 1, 3, 3, 5, 5, 1, 7, 3, 1, 0);
    dwc(0, 1, 10, 11, 13, 6, 1);
    // full line-buffer width: 17 x 58 tile, dense output rows of 56
    dwc(0, 0, 11, 17, 58, 56, 1);
    // post-processing in the ALU core
    alu(ALU_ADD, 0, 0, 16, 17, 4, 56, 56, 1, 0, 0);     // bias add from word 1000
    alu(ALU_MAX, 1, 0, 17, 18, 4, 56, 56, 1, 0, 0);     // ReLU
    alu(ALU_SHR, 1, 3, 17, 18, 2, 64, 64, 1, 0, 0);     // requantise
    alu(ALU_SHR, 1, -2, 17, 18, 1, 8, 8, 1, 0, 0);      // negative amount: left
    alu(ALU_MIN, 1, 127, 17, 18, 4, 56, 56, 1, 0, 0);   // clip
    alu(ALU_MUL, 1, -3, 17, 18, 1, 30, 30, 1, 0, 0);
    alu(ALU_ADD, 0, 0, 16, 17, 1, 20, 1, 1, 1, 1);      // out[i] += out[1000+i], overlapping words
    // FINISH retires at once
    issue(128'(mk(OP_FINISH, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0)), 0, "FINISH");

    $display("conv slots %0d, DwC windows %0d, fill-stall pushes %0d, stride-2 drops %0d",
             n_conv, n_dwc_win, n_fill, n_s2_drop);
    $display("bypasses %0d, reset writes %0d, mode switches %0d, ALU min/max/add/shr/mul %0d/%0d/%0d/%0d/%0d",
             n_bypass, n_reset, n_switch, n_alu[0], n_alu[1], n_alu[2], n_alu[3], n_alu[4]);
    checks += 12;
    if (n_conv == 0)    begin failures++; $display("no Conv2D slot"); end
    if (n_dwc_win == 0) begin failures++; $display("no DwC window"); end
    if (n_fill == 0)    begin failures++; $display("no fill stall"); end
    if (n_s2_drop == 0) begin failures++; $display("no stride-2 drop"); end
    if (n_bypass == 0)  begin failures++; $display("no bypass"); end
    if (n_reset == 0)   begin failures++; $display("no reset write"); end
    if (n_switch < 2)   begin failures++; $display("no mode switch"); end
    for (int i = 0; i < 5; i++) if (n_alu[i] == 0) begin failures++; $display("ALU op %0d unused", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
