// One column of the PE array: J signed 8-bit multipliers whose products are
// reduced vertically by an adder tree into one 32-bit psum.
//
// In Conv2D mode the column sees the ifmap vector shared by all columns and
// its own 3D filter; in DwC mode it sees its own Im2Col column and the
// KH*KW weights of its channel. Purely combinational; the registers around
// it are in ged_top. Signed operands are this design's choice.
module pe_column #(
  parameter int unsigned J     = 32,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic signed [IN_W-1:0]  a   [J],
  input  logic signed [IN_W-1:0]  b   [J],
  output logic signed [ACC_W-1:0] dot
);

  // binary adder tree over the next power of two
  localparam int unsigned LVL = (J <= 1) ? 1 : $clog2(J);
  localparam int unsigned NP  = 1 << LVL;

  logic signed [2*IN_W-1:0] prod [J];
  logic signed [ACC_W-1:0]  node [2*NP];

  always_comb begin
    for (int i = 0; i < J; i++) prod[i] = a[i] * b[i];
    for (int i = 0; i < NP; i++)
      node[NP + i] = (i < J) ? ACC_W'(prod[i]) : '0;
    for (int i = NP - 1; i >= 1; i--)
      node[i] = node[2*i] + node[2*i + 1];
    node[0] = '0;
  end

  assign dot = node[1];

endmodule
