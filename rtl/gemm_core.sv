// GEMM core: a J x K PE array built from K pe_column instances.
//
// Column k multiplies its J-element ifmap vector vec[k] with its weight
// column wgt[k] and adds the reduced product to the incoming psum
// acc_in[k]; with reset the column outputs zero instead (the reset flag of
// a GEMM instruction). In Conv2D mode all vec[k] are the same ifmap vector
// (the vector is shared horizontally); in DwC mode each is that column's
// Im2Col output. One 1 x K psum vector per evaluation; combinational, the
// pipeline registers are in ged_top.
module gemm_core #(
  parameter int unsigned J     = 32,
  parameter int unsigned K     = 32,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic              reset,
  input  logic [IN_W-1:0]   vec    [K][J],
  input  logic [IN_W-1:0]   wgt    [K][J],
  input  logic [ACC_W-1:0]  acc_in [K],
  output logic [ACC_W-1:0]  acc_out[K]
);

  for (genvar k = 0; k < K; k++) begin : g_col
    logic signed [IN_W-1:0]  a [J];
    logic signed [IN_W-1:0]  b [J];
    logic signed [ACC_W-1:0] dot;

    always_comb begin
      for (int j = 0; j < J; j++) begin
        a[j] = vec[k][j];
        b[j] = wgt[k][j];
      end
    end

    pe_column #(.J(J), .IN_W(IN_W), .ACC_W(ACC_W)) u_col (.a, .b, .dot);

    assign acc_out[k] = reset ? '0 : acc_in[k] + ACC_W'(dot);
  end

endmodule
