// Im2Col window buffer: KH x KW shift registers.
//
// On shift, every row moves one position left and the new column (top row
// first: the two line-buffer outputs and the incoming pixel) enters on the
// right. The window is presented as one vector, element kh*KW + kw, which
// is one column of the im2col ifmap matrix. The element order is this
// design's choice; weights are stored in the same order.
module window_buffer #(
  parameter int unsigned W  = 8,
  parameter int unsigned KH = 3,
  parameter int unsigned KW = 3
) (
  input  logic         clk,
  input  logic         shift,
  input  logic [W-1:0] col [KH],
  output logic [W-1:0] win [KH*KW]
);

  logic [W-1:0] r [KH][KW];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int h = 0; h < KH; h++) begin
        for (int w = 0; w < KW - 1; w++) r[h][w] <= r[h][w+1];
        r[h][KW-1] <= col[h];
      end
    end
  end

  always_comb begin
    for (int h = 0; h < KH; h++)
      for (int w = 0; w < KW; w++)
        win[h*KW + w] = r[h][w];
  end

endmodule
