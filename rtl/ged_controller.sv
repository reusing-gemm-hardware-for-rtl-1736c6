// Instruction controller of the GED core.
//
// Accepts one 128-bit instruction at a time (valid/ready) and runs its
// affine loop nest: for o < L_out, for i < L_in, for u in [uop_begin,
// uop_end) one pipeline slot is issued with
//   dst = uop.dst + o*f_dst,out + i*f_dst,in
//   src = uop.src + o*f_src,out + i*f_src,in
//   wgt = uop.wgt + o*f_wgt,out + i*f_wgt,in
// (products kept as running sums, no multipliers). GEMM and the DwC-GEMM
// opcode share this word; for DwC the software passes uop range [0,1),
// L_out = IH_tile, L_in = IW_tile, unit ifmap factors and zero weight
// factors, so one ifmap pixel per cycle streams through the Im2Col units
// while the weight index stays fixed. ALU instructions use dst and src as
// output-buffer indices.
//
// Pipeline (one slot per cycle, no stalls):
//   P0 read micro-op     P1 read ifmap and weight buffers
//   P2 read output buffer (and Im2Col push)     P3 compute and write (ged_top)
// done pulses for one cycle when the last slot has left P3, or at once for
// FINISH, LOAD, STORE and empty loops. The dependency flags are ignored:
// there are no load/store queues in this core. Loop semantics follow the
// VTA instruction set; the pipeline is this design's choice.
module ged_controller
  import ged_pkg::*;
#(
  parameter int unsigned INP_AW = 10,
  parameter int unsigned WGT_AW = 5,
  parameter int unsigned ACC_AW = 10,
  parameter int unsigned UOP_AW = 10,
  parameter int unsigned LAW    = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction stream
  input  logic              insn_valid,
  output logic              insn_ready,
  input  logic [127:0]      insn,
  output logic              done,
  output logic              busy,
  // P0: micro-op buffer
  output logic              uop_re,
  output logic [UOP_AW-1:0] uop_raddr,
  input  uop_t              uop_rdata,
  // P1: ifmap and weight buffers
  output logic              inp_re,
  output logic [INP_AW-1:0] inp_raddr,
  output logic              wgt_re,
  output logic [WGT_AW-1:0] wgt_raddr,
  // P2: output buffer reads, Im2Col push
  output logic              s2_valid,
  output logic              acc_re_a,
  output logic [ACC_AW-1:0] acc_raddr_a,
  output logic              acc_re_b,
  output logic [ACC_AW-1:0] acc_raddr_b,
  // P3: compute and write
  output logic              s3_valid,
  output logic [ACC_AW-1:0] s3_dst,
  // held for the running instruction
  output opcode_e           mode,
  output logic              reset_q,
  output logic              stride2_q,
  output logic [LAW-1:0]    row_len,
  output alu_op_e           alu_op,
  output logic              use_imm,
  output logic [15:0]       imm,
  output logic              im2col_clear
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e      state;
  gemm_insn_t  gi;
  alu_insn_t   ai;
  gemm_insn_t  g_q;
  alu_insn_t   a_q;

  logic [13:0] o_cnt, i_cnt, u_cnt;
  logic [10:0] dst_o, dst_i, src_o, src_i;
  logic [9:0]  wgt_o, wgt_i;
  logic [10:0] f_dst_out, f_dst_in, f_src_out, f_src_in;

  // P1 and P2 slot registers
  logic        s1_valid;
  logic [10:0] s1_dst, s1_src;
  logic [9:0]  s1_wgt;
  logic [10:0] s2_dst, s2_src;
  logic [10:0] p1_dst, p1_src;
  logic [9:0]  p1_wgt;
  logic        last_slot, empty_loop, runs;

  assign gi = gemm_insn_t'(insn);
  assign ai = alu_insn_t'(insn);

  assign insn_ready = (state == S_IDLE);
  assign busy       = (state != S_IDLE);

  // ALU words carry their own factor fields in the same positions
  assign f_dst_out = (mode == OP_ALU) ? a_q.dst_factor_out : g_q.dst_factor_out;
  assign f_dst_in  = (mode == OP_ALU) ? a_q.dst_factor_in  : g_q.dst_factor_in;
  assign f_src_out = (mode == OP_ALU) ? a_q.src_factor_out : g_q.src_factor_out;
  assign f_src_in  = (mode == OP_ALU) ? a_q.src_factor_in  : g_q.src_factor_in;

  assign runs       = (gi.head.opcode == OP_GEMM) || (gi.head.opcode == OP_DWC_GEMM) ||
                      (gi.head.opcode == OP_ALU);
  assign empty_loop = (gi.head.iter_out == '0) || (gi.head.iter_in == '0) ||
                      (14'(gi.head.uop_bgn) >= gi.head.uop_end);
  assign last_slot  = (u_cnt + 1'b1 >= g_q.head.uop_end) &&
                      (i_cnt + 1'b1 >= g_q.head.iter_in) &&
                      (o_cnt + 1'b1 >= g_q.head.iter_out);

  // ---- P0
  assign uop_re    = (state == S_RUN);
  assign uop_raddr = u_cnt[UOP_AW-1:0];

  // ---- P1: add the loop offsets to the micro-op
  assign p1_dst    = uop_rdata.dst_idx + s1_dst;
  assign p1_src    = uop_rdata.src_idx + s1_src;
  assign p1_wgt    = uop_rdata.wgt_idx + s1_wgt;
  assign inp_re    = s1_valid && (mode != OP_ALU);
  assign wgt_re    = s1_valid && (mode != OP_ALU);
  assign inp_raddr = p1_src[INP_AW-1:0];
  assign wgt_raddr = p1_wgt[WGT_AW-1:0];

  // ---- P2
  assign acc_re_a    = s2_valid;
  assign acc_raddr_a = s2_dst[ACC_AW-1:0];
  assign acc_re_b    = s2_valid && (mode == OP_ALU) && !use_imm;
  assign acc_raddr_b = s2_src[ACC_AW-1:0];

  assign reset_q   = g_q.head.reset;
  assign stride2_q = g_q.head.stride2;
  assign row_len   = g_q.head.iter_in[LAW-1:0];
  assign alu_op    = a_q.alu_op;
  assign use_imm   = a_q.use_imm;
  assign imm       = a_q.imm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      g_q          <= '0;
      a_q          <= '0;
      mode         <= OP_FINISH;
      done         <= 1'b0;
      im2col_clear <= 1'b0;
      o_cnt <= '0; i_cnt <= '0; u_cnt <= '0;
      dst_o <= '0; dst_i <= '0; src_o <= '0; src_i <= '0; wgt_o <= '0; wgt_i <= '0;
      s1_valid <= 1'b0; s1_dst <= '0; s1_src <= '0; s1_wgt <= '0;
      s2_valid <= 1'b0; s2_dst <= '0; s2_src <= '0;
      s3_valid <= 1'b0; s3_dst <= '0;
    end else begin
      done         <= 1'b0;
      im2col_clear <= 1'b0;

      // pipeline advance
      s2_valid <= s1_valid;
      s2_dst   <= p1_dst;
      s2_src   <= p1_src;
      s3_valid <= s2_valid;
      s3_dst   <= s2_dst[ACC_AW-1:0];
      s1_valid <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (insn_valid) begin
            g_q  <= gi;
            a_q  <= ai;
            mode <= gi.head.opcode;
            o_cnt <= '0; i_cnt <= '0; u_cnt <= 14'(gi.head.uop_bgn);
            dst_o <= '0; dst_i <= '0; src_o <= '0; src_i <= '0; wgt_o <= '0; wgt_i <= '0;
            im2col_clear <= 1'b1;
            if (runs && !empty_loop) state <= S_RUN;
            else                     done  <= 1'b1;
          end
        end
        S_RUN: begin
          s1_valid <= 1'b1;
          s1_dst   <= dst_o + dst_i;
          s1_src   <= src_o + src_i;
          s1_wgt   <= wgt_o + wgt_i;
          if (last_slot) begin
            state <= S_DRAIN;
          end else if (u_cnt + 1'b1 < g_q.head.uop_end) begin
            u_cnt <= u_cnt + 1'b1;
          end else begin
            u_cnt <= 14'(g_q.head.uop_bgn);
            if (i_cnt + 1'b1 < g_q.head.iter_in) begin
              i_cnt <= i_cnt + 1'b1;
              dst_i <= dst_i + f_dst_in;
              src_i <= src_i + f_src_in;
              wgt_i <= wgt_i + g_q.wgt_factor_in;
            end else begin
              i_cnt <= '0;
              dst_i <= '0; src_i <= '0; wgt_i <= '0;
              o_cnt <= o_cnt + 1'b1;
              dst_o <= dst_o + f_dst_out;
              src_o <= src_o + f_src_out;
              wgt_o <= wgt_o + g_q.wgt_factor_out;
            end
          end
        end
        S_DRAIN: begin
          if (!s1_valid && !s2_valid && !s3_valid) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a DwC tile row must fit the Im2Col line buffers
  always_ff @(posedge clk) begin
    if (rst_n && state == S_IDLE && insn_valid && gi.head.opcode == OP_DWC_GEMM)
      assert (gi.head.iter_in < 14'(1 << LAW))
        else $error("ged_controller: DwC tile width %0d too large", gi.head.iter_in);
  end

endmodule
