// Shared constants and types of the GEMM-based depthwise-convolution (GED)
// accelerator.
//
// The core is a J x K GEMM array with an Im2Col unit in front of every
// column, so that the same multipliers run standard convolution (Conv2D,
// one ifmap vector broadcast to all columns) and depthwise convolution
// (DwC, each column runs the matrix-vector product of its own channel).
// Array size, data widths and buffer sizes follow the main configuration
// of the design (32 x 32 PEs, 8-bit ifmap/weight, 32-bit psums,
// 32 kB / 32 kB / 128 kB of SRAM, 58-byte Im2Col lines).
//
// Instructions are 128-bit words in the VTA format. The GEMM word is
// reused unchanged for the DwC-GEMM opcode; opcode value 5, the stride-2
// flag in bit 63 and the ALU word's operand fields are choices of this
// implementation.
package ged_pkg;

  // ------------------------------------------------------------- opcodes
  typedef enum logic [2:0] {
    OP_LOAD     = 3'd0,
    OP_STORE    = 3'd1,
    OP_GEMM     = 3'd2,
    OP_FINISH   = 3'd3,
    OP_ALU      = 3'd4,
    OP_DWC_GEMM = 3'd5
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_MIN = 3'd0,
    ALU_MAX = 3'd1,
    ALU_ADD = 3'd2,
    ALU_SHR = 3'd3,
    ALU_MUL = 3'd4
  } alu_op_e;

  // ------------------------------------------------------- instructions
  // Common first 64 bits (LSB first: opcode, dependency flags, reset,
  // uop_begin, uop_end, L_out, L_in, spare bit).
  typedef struct packed {
    logic        stride2;     // bit 63: DwC stride 2 (otherwise unused)
    logic [13:0] iter_in;     // L_in  (DwC: IW_tile)
    logic [13:0] iter_out;    // L_out (DwC: IH_tile)
    logic [13:0] uop_end;
    logic [12:0] uop_bgn;
    logic        reset;       // write zero instead of accumulating
    logic        push_next;
    logic        push_prev;
    logic        pop_next;
    logic        pop_prev;
    opcode_e     opcode;
  } insn_head_t;

  typedef struct packed {
    logic [9:0]  wgt_factor_in;
    logic [9:0]  wgt_factor_out;
    logic [10:0] src_factor_in;
    logic [10:0] src_factor_out;
    logic [10:0] dst_factor_in;
    logic [10:0] dst_factor_out;
    insn_head_t  head;
  } gemm_insn_t;

  typedef struct packed {
    logic [15:0] imm;
    logic        use_imm;
    alu_op_e     alu_op;
    logic [10:0] src_factor_in;
    logic [10:0] src_factor_out;
    logic [10:0] dst_factor_in;
    logic [10:0] dst_factor_out;
    insn_head_t  head;
  } alu_insn_t;

  // Micro-op: base indices into the output (dst), ifmap/output (src) and
  // weight buffers.
  typedef struct packed {
    logic [9:0]  wgt_idx;
    logic [10:0] src_idx;
    logic [10:0] dst_idx;
  } uop_t;

endpackage
