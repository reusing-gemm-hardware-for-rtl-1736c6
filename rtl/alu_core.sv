// ALU core: K 32-bit ALUs that all perform the same operation on one psum
// vector (bias addition, ReLU as max with 0, clipping as min, requantising
// shift, scaling multiply).
//
// y[k] = op(a[k], b[k]) for MIN, MAX, ADD, SHR and MUL; all signed. SHR
// shifts arithmetically right by b[k], or left by -b[k] when b[k] is
// negative. The operation set follows the ALU core of the design (mul, add, min,
// max, shift); the encodings and the shift rule are this design's choice.
// Combinational.
module alu_core
  import ged_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned ACC_W = 32
) (
  input  alu_op_e          op,
  input  logic [ACC_W-1:0] a [K],
  input  logic [ACC_W-1:0] b [K],
  output logic [ACC_W-1:0] y [K]
);

  localparam int unsigned SW = $clog2(ACC_W);

  always_comb begin
    for (int k = 0; k < K; k++) begin
      logic signed [ACC_W-1:0] sa, sb, nb;
      sa = a[k];
      sb = b[k];
      nb = -sb;
      unique case (op)
        ALU_MIN: y[k] = (sa < sb) ? sa : sb;
        ALU_MAX: y[k] = (sa > sb) ? sa : sb;
        ALU_ADD: y[k] = sa + sb;
        ALU_SHR: y[k] = sb[ACC_W-1] ? (sa <<  nb[SW-1:0])
                                    : (sa >>> sb[SW-1:0]);
        ALU_MUL: y[k] = sa * sb;
        default: y[k] = sa;
      endcase
    end
  end

endmodule
