// Self-checking testbench for ged_controller. A micro-op memory model
// answers the controller's reads one cycle later. For random GEMM, DwC-GEMM
// and ALU instructions the testbench computes the loop nest itself and
// checks the ifmap, weight and output-buffer addresses issued in each
// pipeline stage, the order of the writes in P3, one slot per cycle (the
// instruction retires N + 5 cycles after it was accepted, N slots) and
// that FINISH and empty loops retire at once.
module tb_ged_controller;
  import ged_pkg::*;
  localparam int unsigned INP_AW = 10, WGT_AW = 5, ACC_AW = 10, UOP_AW = 10, LAW = 6;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              insn_valid, insn_ready, done, busy;
  logic [127:0]      insn;
  logic              uop_re, inp_re, wgt_re, acc_re_a, acc_re_b, s2_valid, s3_valid;
  logic [UOP_AW-1:0] uop_raddr;
  uop_t              uop_rdata;
  logic [INP_AW-1:0] inp_raddr;
  logic [WGT_AW-1:0] wgt_raddr;
  logic [ACC_AW-1:0] acc_raddr_a, acc_raddr_b, s3_dst;
  opcode_e           mode;
  logic              reset_q, stride2_q, use_imm, im2col_clear;
  logic [LAW-1:0]    row_len;
  alu_op_e           alu_op;
  logic [15:0]       imm;
  uop_t              uops [1024];
  int checks = 0, failures = 0;

  ged_controller #(.INP_AW(INP_AW), .WGT_AW(WGT_AW), .ACC_AW(ACC_AW), .UOP_AW(UOP_AW), .LAW(LAW))
    dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (uop_re) uop_rdata <= uops[uop_raddr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_src[$], exp_wgt[$], exp_dst[$], exp_alub[$];
  int got_src[$], got_wgt[$], got_dst[$], got_acc[$], got_alub[$], got_wr[$];

  always @(posedge clk) begin
    if (inp_re)   got_src.push_back(int'(inp_raddr));
    if (wgt_re)   got_wgt.push_back(int'(wgt_raddr));
    if (acc_re_a) got_acc.push_back(int'(acc_raddr_a));
    if (acc_re_b) got_alub.push_back(int'(acc_raddr_b));
    if (s3_valid) got_wr.push_back(int'(s3_dst));
  end

  function automatic bit same(int a[$], int b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic run(input opcode_e op, input int ub, input int ue, input int lo, input int li,
                     input int fdo, input int fdi, input int fso, input int fsi,
                     input int fwo, input int fwi, input bit imm_mode);
    gemm_insn_t g;
    alu_insn_t  a;
    int n, cyc;
    g = '0; a = '0;
    g.head.opcode = op; g.head.uop_bgn = 13'(ub); g.head.uop_end = 14'(ue);
    g.head.iter_out = 14'(lo); g.head.iter_in = 14'(li);
    g.dst_factor_out = 11'(fdo); g.dst_factor_in = 11'(fdi);
    g.src_factor_out = 11'(fso); g.src_factor_in = 11'(fsi);
    g.wgt_factor_out = 10'(fwo); g.wgt_factor_in = 10'(fwi);
    a.head = g.head;
    a.dst_factor_out = 11'(fdo); a.dst_factor_in = 11'(fdi);
    a.src_factor_out = 11'(fso); a.src_factor_in = 11'(fsi);
    a.alu_op = ALU_ADD; a.use_imm = imm_mode; a.imm = 16'd3;
    exp_src = {}; exp_wgt = {}; exp_dst = {}; exp_alub = {};
    got_src = {}; got_wgt = {}; got_acc = {}; got_alub = {}; got_wr = {};
    n = 0;
    if (op != OP_FINISH)
    for (int o = 0; o < lo; o++)
      for (int i = 0; i < li; i++)
        for (int u = ub; u < ue; u++) begin
          int d, s, w;
          d = (int'(uops[u].dst_idx) + o*fdo + i*fdi) % (1 << ACC_AW);
          s = (int'(uops[u].src_idx) + o*fso + i*fsi);
          w = (int'(uops[u].wgt_idx) + o*fwo + i*fwi) % (1 << WGT_AW);
          exp_dst.push_back(d);
          if (op == OP_ALU) begin
            if (!imm_mode) exp_alub.push_back(s % (1 << ACC_AW));
          end else begin
            exp_src.push_back(s % (1 << INP_AW));
            exp_wgt.push_back(w);
          end
          n++;
        end
    @(negedge clk);
    insn_valid = 1; insn = (op == OP_ALU) ? 128'(a) : 128'(g);
    checks++;
    if (!insn_ready) failures++;
    @(negedge clk);
    insn_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 6;
    if (!same(got_src, exp_src)) begin failures++; $display("op %0d: ifmap addresses differ (%0d vs %0d)", op, got_src.size(), exp_src.size()); end
    if (!same(got_wgt, exp_wgt)) begin failures++; $display("op %0d: weight addresses differ", op); end
    if (!same(got_acc, exp_dst)) begin failures++; $display("op %0d: output read addresses differ", op); end
    if (!same(got_wr, exp_dst))  begin failures++; $display("op %0d: write slots differ", op); end
    if (!same(got_alub, exp_alub)) begin failures++; $display("op %0d: ALU source addresses differ", op); end
    if (n > 0 && op != OP_FINISH) begin
      if (cyc != n + 5) begin failures++; $display("op %0d: %0d slots took %0d cycles", op, n, cyc); end
    end else begin
      if (cyc != 1) begin failures++; $display("op %0d: empty instruction took %0d cycles", op, cyc); end
    end
  endtask

  initial begin
    insn_valid = 0; insn = '0;
    for (int i = 0; i < 1024; i++) uops[i] = uop_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Conv2D-style GEMM: several uops accumulating over the inner loop
    run(OP_GEMM, 4, 8, 3, 5, 16, 1, 40, 2, 1, 0, 0);
    // DwC-GEMM: uop [0,1), L_out = IH, L_in = IW, ifmap factors (IW, 1), weight fixed
    uops[0] = '{wgt_idx: 10'd2, src_idx: 11'd100, dst_idx: 11'd7};
    run(OP_DWC_GEMM, 0, 1, 10, 12, 10, 1, 12, 1, 0, 0, 0);
    // ALU with vector and with immediate operand
    run(OP_ALU, 10, 12, 4, 6, 12, 2, 3, 1, 0, 0, 0);
    run(OP_ALU, 0, 1, 7, 9, 9, 1, 0, 0, 0, 0, 1);
    // random GEMMs
    for (int t = 0; t < 20; t++)
      run(OP_GEMM, t, t + 1 + ($urandom % 4), 1 + ($urandom % 5), 1 + ($urandom % 6),
          $urandom % 64, $urandom % 8, $urandom % 64, $urandom % 8, $urandom % 4, $urandom % 4, 0);
    // instructions that do no work
    run(OP_FINISH, 0, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0);
    run(OP_GEMM, 5, 5, 2, 2, 0, 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
