// GED accelerator core: a J x K GEMM array that executes both standard
// convolution and depthwise convolution (DwC), plus a K-lane ALU core.
//
// Conv2D/FC (GEMM opcode): each cycle one J-element ifmap vector (J input
// channels of one pixel) is multiplied by a J x K weight matrix (one 3D
// filter per column) and the 1 x K psum vector is accumulated into the
// output buffer.
// DwC (DwC-GEMM opcode): each column owns one channel. The ifmap buffer
// word read each cycle holds one pixel of J channels; byte k goes to the
// Im2Col unit of column k, which turns the pixel stream into one KH*KW
// im2col column per cycle. Column k multiplies it with the KH*KW weights of
// channel k held in rows 0..KH*KW-1 of weight column k, and the K results
// (one output pixel of K channels) are written to the output buffer. The
// weight and output datapaths are the same as for Conv2D; only the ifmap
// path is switched by ifmap_mux. Outputs are written only for complete
// windows (after the Im2Col fill stall, and at even positions for stride
// 2), at the index the loop nest gives for the pixel that completed them.
// ALU opcode: out[dst] = op(out[dst], imm or out[src]).
//
// Buffers: ifmap (INP_BYTES, J bytes per word), weight (WGT_BYTES, J*K
// bytes per word), output (ACC_BYTES, K 32-bit psums per word) and micro-op
// (UOP_DEPTH x 32 bit). Buffer word layouts: ifmap byte j = channel j;
// weight byte k*J+j = row j of column k; output word k = column k.
// The host ports load and read the buffers while the core is idle (busy
// low); they stand in for the platform's load/store units.
//
// Pipeline: micro-op read, ifmap/weight read, output read (Im2Col push),
// compute and write; one slot per cycle. A read of the output word written
// in the same cycle is served from the write register (bypass), so
// back-to-back accumulation into one word is exact. Sizes default to the
// 32 x 32 configuration with 32 kB / 32 kB / 128 kB of SRAM and 58-byte
// Im2Col lines; pipeline, bypass and host ports are this design's choices.
module ged_top
  import ged_pkg::*;
#(
  parameter int unsigned J         = 32,
  parameter int unsigned K         = 32,
  parameter int unsigned INP_BYTES = 32768,
  parameter int unsigned WGT_BYTES = 32768,
  parameter int unsigned ACC_BYTES = 131072,
  parameter int unsigned UOP_DEPTH = 1024,
  parameter int unsigned LB_DEPTH  = 58,
  localparam int unsigned IN_W      = 8,
  localparam int unsigned ACC_W     = 32,
  localparam int unsigned INP_DEPTH = INP_BYTES / J,
  localparam int unsigned WGT_DEPTH = WGT_BYTES / (J * K),
  localparam int unsigned ACC_DEPTH = ACC_BYTES / (K * ACC_W / 8),
  localparam int unsigned INP_AW    = $clog2(INP_DEPTH),
  localparam int unsigned WGT_AW    = $clog2(WGT_DEPTH),
  localparam int unsigned ACC_AW    = $clog2(ACC_DEPTH),
  localparam int unsigned UOP_AW    = $clog2(UOP_DEPTH),
  localparam int unsigned LAW       = $clog2(LB_DEPTH + 1),
  localparam int unsigned NW        = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instructions
  input  logic                    insn_valid,
  output logic                    insn_ready,
  input  logic [127:0]            insn,
  output logic                    done,
  output logic                    busy,
  // host access to the buffers (ignored while busy)
  input  logic                    host_inp_we,
  input  logic [INP_AW-1:0]       host_inp_addr,
  input  logic [J*IN_W-1:0]       host_inp_wdata,
  input  logic                    host_wgt_we,
  input  logic [WGT_AW-1:0]       host_wgt_addr,
  input  logic [J*K*IN_W-1:0]     host_wgt_wdata,
  input  logic                    host_uop_we,
  input  logic [UOP_AW-1:0]       host_uop_addr,
  input  logic [31:0]             host_uop_wdata,
  input  logic                    host_acc_we,
  input  logic [ACC_AW-1:0]       host_acc_waddr,
  input  logic [K*ACC_W-1:0]      host_acc_wdata,
  input  logic                    host_acc_re,
  input  logic [ACC_AW-1:0]       host_acc_raddr,
  output logic [K*ACC_W-1:0]      host_acc_rdata   // one cycle after host_acc_re
);

  // ------------------------------------------------------------ control
  logic              uop_re, inp_re, wgt_re, acc_re_a, acc_re_b;
  logic [UOP_AW-1:0] uop_raddr;
  logic [INP_AW-1:0] inp_raddr;
  logic [WGT_AW-1:0] wgt_raddr;
  logic [ACC_AW-1:0] acc_raddr_a, acc_raddr_b, s3_dst;
  logic              s2_valid, s3_valid, reset_q, stride2_q, use_imm, im2col_clear;
  logic [LAW-1:0]    row_len;
  logic [15:0]       imm;
  opcode_e           mode;
  alu_op_e           alu_op;
  logic [31:0]       uop_word;

  ged_controller #(
    .INP_AW(INP_AW), .WGT_AW(WGT_AW), .ACC_AW(ACC_AW), .UOP_AW(UOP_AW), .LAW(LAW)
  ) u_ctrl (
    .clk, .rst_n,
    .insn_valid, .insn_ready, .insn, .done, .busy,
    .uop_re, .uop_raddr, .uop_rdata(uop_t'(uop_word)),
    .inp_re, .inp_raddr, .wgt_re, .wgt_raddr,
    .s2_valid, .acc_re_a, .acc_raddr_a, .acc_re_b, .acc_raddr_b,
    .s3_valid, .s3_dst,
    .mode, .reset_q, .stride2_q, .row_len, .alu_op, .use_imm, .imm, .im2col_clear
  );

  // ------------------------------------------------------------ buffers
  logic [J*IN_W-1:0]   inp_rdata;
  logic [J*K*IN_W-1:0] wgt_rdata;
  logic [K*ACC_W-1:0]  acc_rdata_a, acc_rdata_b;
  logic                acc_we;
  logic [ACC_AW-1:0]   acc_waddr;
  logic [K*ACC_W-1:0]  acc_wdata;
  logic                p3_we;
  logic [K*ACC_W-1:0]  p3_wdata;

  sram_buffer #(.WIDTH(32), .DEPTH(UOP_DEPTH)) u_uop_buf (
    .clk,
    .we(host_uop_we && !busy), .waddr(host_uop_addr), .wdata(host_uop_wdata),
    .re_a(uop_re), .raddr_a(uop_raddr), .rdata_a(uop_word),
    .re_b(1'b0), .raddr_b('0), .rdata_b()
  );

  sram_buffer #(.WIDTH(J*IN_W), .DEPTH(INP_DEPTH)) u_inp_buf (
    .clk,
    .we(host_inp_we && !busy), .waddr(host_inp_addr), .wdata(host_inp_wdata),
    .re_a(inp_re), .raddr_a(inp_raddr), .rdata_a(inp_rdata),
    .re_b(1'b0), .raddr_b('0), .rdata_b()
  );

  sram_buffer #(.WIDTH(J*K*IN_W), .DEPTH(WGT_DEPTH)) u_wgt_buf (
    .clk,
    .we(host_wgt_we && !busy), .waddr(host_wgt_addr), .wdata(host_wgt_wdata),
    .re_a(wgt_re), .raddr_a(wgt_raddr), .rdata_a(wgt_rdata),
    .re_b(1'b0), .raddr_b('0), .rdata_b()
  );

  assign acc_we    = busy ? p3_we    : host_acc_we;
  assign acc_waddr = busy ? s3_dst   : host_acc_waddr;
  assign acc_wdata = busy ? p3_wdata : host_acc_wdata;

  sram_buffer #(.WIDTH(K*ACC_W), .DEPTH(ACC_DEPTH)) u_acc_buf (
    .clk,
    .we(acc_we), .waddr(acc_waddr), .wdata(acc_wdata),
    .re_a(busy ? acc_re_a : host_acc_re), .raddr_a(busy ? acc_raddr_a : host_acc_raddr),
    .rdata_a(acc_rdata_a),
    .re_b(acc_re_b), .raddr_b(acc_raddr_b), .rdata_b(acc_rdata_b)
  );

  assign host_acc_rdata = acc_rdata_a;

  // ------------------------------------------------ P2: Im2Col per column
  logic [IN_W-1:0] win [K][NW];
  logic [K-1:0]    win_valid;
  logic            dwc_push;

  assign dwc_push = s2_valid && (mode == OP_DWC_GEMM);

  for (genvar k = 0; k < K; k++) begin : g_im2col
    logic [IN_W-1:0] w_k [NW];
    im2col #(.W(IN_W), .KH(3), .KW(3), .LB_DEPTH(LB_DEPTH)) u_im2col (
      .clk, .rst_n,
      .clear   (im2col_clear),
      .row_len (row_len),
      .stride2 (stride2_q),
      .push    (dwc_push),
      .pix     (inp_rdata[k*IN_W +: IN_W]),
      .win_valid(win_valid[k]),
      .win     (w_k)
    );
    for (genvar n = 0; n < NW; n++) begin : g_n
      assign win[k][n] = w_k[n];
    end
  end

  // ------------------------------------------------ P2 -> P3 registers
  logic [J*IN_W-1:0]   inp_q;
  logic [J*K*IN_W-1:0] wgt_q;
  logic                fwd_a, fwd_b;
  logic [K*ACC_W-1:0]  fwd_data;

  always_ff @(posedge clk) begin
    if (s2_valid) begin
      inp_q <= inp_rdata;
      wgt_q <= wgt_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_a    <= 1'b0;
      fwd_b    <= 1'b0;
      fwd_data <= '0;
    end else begin
      fwd_a    <= p3_we && acc_re_a && (acc_raddr_a == s3_dst);
      fwd_b    <= p3_we && acc_re_b && (acc_raddr_b == s3_dst);
      fwd_data <= p3_wdata;
    end
  end

  // ------------------------------------------------ P3: compute
  logic [IN_W-1:0]  inp_v [J];
  logic [IN_W-1:0]  vec   [K][J];
  logic [IN_W-1:0]  wgt_m [K][J];
  logic [ACC_W-1:0] acc_a [K];
  logic [ACC_W-1:0] opb   [K];
  logic [ACC_W-1:0] gemm_y[K];
  logic [ACC_W-1:0] alu_y [K];
  logic [K*ACC_W-1:0] acc_av, acc_bv;

  assign acc_av = fwd_a ? fwd_data : acc_rdata_a;
  assign acc_bv = fwd_b ? fwd_data : acc_rdata_b;

  for (genvar j = 0; j < J; j++) begin : g_inp
    assign inp_v[j] = inp_q[j*IN_W +: IN_W];
  end

  for (genvar k = 0; k < K; k++) begin : g_lane
    for (genvar j = 0; j < J; j++) begin : g_w
      assign wgt_m[k][j] = wgt_q[(k*J + j)*IN_W +: IN_W];
    end
    assign acc_a[k] = acc_av[k*ACC_W +: ACC_W];
    assign opb[k]   = use_imm ? ACC_W'(signed'(imm)) : acc_bv[k*ACC_W +: ACC_W];
    assign p3_wdata[k*ACC_W +: ACC_W] = (mode == OP_ALU) ? alu_y[k] : gemm_y[k];
  end

  ifmap_mux #(.J(J), .K(K), .NW(NW), .IN_W(IN_W)) u_mux (
    .dwc_mode(mode == OP_DWC_GEMM), .inp(inp_v), .win, .vec
  );

  gemm_core #(.J(J), .K(K), .IN_W(IN_W), .ACC_W(ACC_W)) u_gemm (
    .reset(reset_q), .vec, .wgt(wgt_m), .acc_in(acc_a), .acc_out(gemm_y)
  );

  alu_core #(.K(K), .ACC_W(ACC_W)) u_alu (
    .op(alu_op), .a(acc_a), .b(opb), .y(alu_y)
  );

  assign p3_we = s3_valid && ((mode != OP_DWC_GEMM) || &win_valid);

  initial begin
    assert (J >= NW) else $error("ged_top: J must hold a %0d-element Im2Col column", NW);
    assert (K <= J)  else $error("ged_top: DwC maps channel k of the ifmap word to column k");
  end

endmodule
