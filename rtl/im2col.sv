// Im2Col unit of one PE-array column.
//
// The ifmap tile of one channel is streamed in raster order, one 8-bit
// pixel per push. KH-1 line buffers keep the previous KH-1 rows; together
// with the incoming pixel they form the new right-hand column of the
// KH x KW window buffer. Once KH-1 full rows and KW-1 pixels have entered
// (the initial fill stall), every push at column >= KW-1 completes a
// window and win_valid rises one cycle later with the window on win, so in
// steady state one im2col column leaves per cycle. Pushes at the first
// KW-1 columns of a row only fill the window.
//
// Stride 2 uses the same stride-1 hardware: every window is formed, but
// only those at even offsets in both directions are flagged valid, so a
// stride-2 layer takes as many cycles as a stride-1 layer of the same
// input size. The tile is assumed to be padded already; row_len is the
// padded tile width (at most LB_DEPTH). clear restarts at the tile origin.
module im2col #(
  parameter int unsigned W        = 8,
  parameter int unsigned KH       = 3,
  parameter int unsigned KW       = 3,
  parameter int unsigned LB_DEPTH = 58,
  localparam int unsigned LAW     = $clog2(LB_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic [LAW-1:0] row_len,
  input  logic           stride2,
  input  logic           push,
  input  logic [W-1:0]   pix,
  output logic           win_valid,
  output logic [W-1:0]   win [KH*KW]
);

  logic [W-1:0]   lb_out [KH-1];
  logic [W-1:0]   newcol [KH];
  logic [LAW-1:0] col_cnt;
  logic [13:0]    row_cnt;
  logic           full, keep;

  // line m delays by one row relative to line m-1; line 0 takes the pixel
  for (genvar m = 0; m < KH - 1; m++) begin : g_line
    line_buffer #(.W(W), .DEPTH(LB_DEPTH)) u_line (
      .clk, .rst_n, .clear,
      .len  (row_len),
      .push,
      .din  (m == 0 ? pix : lb_out[m == 0 ? 0 : m - 1]),
      .dout (lb_out[m])
    );
  end

  always_comb begin
    newcol[KH-1] = pix;
    for (int m = 0; m < KH - 1; m++) newcol[KH-2-m] = lb_out[m];
  end

  window_buffer #(.W(W), .KH(KH), .KW(KW)) u_win (
    .clk, .shift(push), .col(newcol), .win
  );

  // position of the pixel being pushed
  assign full = (row_cnt >= 14'(KH - 1)) && (col_cnt >= LAW'(KW - 1));
  assign keep = !stride2 ||
                (((row_cnt - 14'(KH - 1)) & 14'd1) == 14'd0 &&
                 ((col_cnt - LAW'(KW - 1)) & LAW'(1)) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt   <= '0;
      row_cnt   <= '0;
      win_valid <= 1'b0;
    end else if (clear) begin
      col_cnt   <= '0;
      row_cnt   <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= push && full && keep;
      if (push) begin
        if (col_cnt + 1'b1 >= row_len) begin
          col_cnt <= '0;
          row_cnt <= row_cnt + 1'b1;
        end else begin
          col_cnt <= col_cnt + 1'b1;
        end
      end
    end
  end

endmodule
