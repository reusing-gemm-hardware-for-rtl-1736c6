// Self-checking testbench for im2col. Streams random padded tiles of one
// channel (several widths, stride 1 and 2) one pixel per cycle and checks
// every valid window against windows cut directly from the tile, the
// number of windows, the fill stall before the first window and that a
// window leaves every cycle in steady state.
module tb_im2col;
  localparam int unsigned KH = 3, KW = 3, LB = 58;
  localparam int unsigned LAW = $clog2(LB + 1);

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           clear, stride2, push, win_valid;
  logic [LAW-1:0] row_len;
  logic [7:0]     pix;
  logic [7:0]     win [KH*KW];
  logic [7:0]     tile [64][LB];
  int checks = 0, failures = 0;

  im2col #(.W(8), .KH(KH), .KW(KW), .LB_DEPTH(LB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tile(input int ih, input int iw, input bit s2);
    int nwin, exp_win, first, r_q, c_q, back_to_back;
    bit pend;
    for (int r = 0; r < ih; r++)
      for (int c = 0; c < iw; c++) tile[r][c] = 8'($urandom);
    @(negedge clk); clear = 1; row_len = LAW'(iw); stride2 = s2;
    @(negedge clk); clear = 0;
    nwin = 0; first = -1; pend = 0; back_to_back = 0;
    for (int n = 0; n <= ih * iw; n++) begin
      // check the window completed by the previous push
      if (pend) begin
        int rr, cc;
        rr = r_q; cc = c_q;
        if (win_valid) begin
          nwin++;
          if (first < 0) first = n - 1;
          for (int h = 0; h < KH; h++)
            for (int w = 0; w < KW; w++) begin
              checks++;
              if (win[h*KW+w] !== tile[rr-KH+1+h][cc-KW+1+w]) begin
                failures++;
                if (failures < 10) $display("tile %0dx%0d s%0d: window at (%0d,%0d) elem %0d,%0d wrong",
                                            ih, iw, s2 ? 2 : 1, rr, cc, h, w);
              end
            end
        end
        // a window must appear exactly where one is complete
        checks++;
        if (win_valid !== (rr >= KH-1 && cc >= KW-1 &&
                           (!s2 || (((rr-KH+1) % 2) == 0 && ((cc-KW+1) % 2) == 0)))) begin
          failures++;
          if (failures < 10) $display("valid wrong at (%0d,%0d)", rr, cc);
        end
        if (win_valid && !s2 && cc > KW-1) back_to_back++;
      end
      if (n < ih * iw) begin
        push = 1; pix = tile[n / iw][n % iw]; r_q = n / iw; c_q = n % iw; pend = 1;
      end else begin
        push = 0; pend = 0;
      end
      @(negedge clk);
    end
    push = 0;
    exp_win = s2 ? ((ih - KH) / 2 + 1) * ((iw - KW) / 2 + 1) : (ih - KH + 1) * (iw - KW + 1);
    checks += 2;
    if (nwin != exp_win) begin
      failures++; $display("tile %0dx%0d: %0d windows, expected %0d", ih, iw, nwin, exp_win);
    end
    // fill stall: (KH-1) rows and KW-1 pixels before the first window
    if (first != (KH - 1) * iw + KW - 1) begin
      failures++; $display("tile %0dx%0d: first window after %0d pushes", ih, iw, first);
    end
    if (!s2) begin
      checks++;
      if (back_to_back != (ih - KH + 1) * (iw - KW)) begin
        failures++; $display("windows not produced every cycle");
      end
    end
  endtask

  initial begin
    clear = 0; stride2 = 0; push = 0; pix = '0; row_len = LAW'(LB);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_tile(6, 8, 0);
    run_tile(58, 58, 0);
    run_tile(9, 11, 1);
    run_tile(30, 58, 1);
    run_tile(3, 3, 0);
    run_tile(5, 17, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
