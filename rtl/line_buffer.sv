// One Im2Col line buffer: a dual-port memory (one write, one synchronous
// read per cycle) used as a FIFO that holds one ifmap row.
//
// Every push writes the incoming pixel at the pointer and presents, on
// dout, the pixel stored at that pointer before the write, i.e. the pixel
// pushed exactly `len` pushes earlier (the same column of the previous
// row). The pointer wraps at len, so a tile narrower than DEPTH uses only
// part of the memory; clear returns it to column 0.
//
// Timing: the read port is registered. Each cycle it reads the word the
// next push will replace (the pointer after this cycle's update), so dout
// is ready in the cycle of that push. With len = 1 the word read is the
// one being written, and the written pixel is forwarded instead. DEPTH = 58
// bytes holds a 56-pixel row plus two padding pixels.
module line_buffer #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 58,
  localparam int unsigned AW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [AW-1:0] len,     // row length, 1..DEPTH
  input  logic          push,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr, ptr_nx;
  logic [W-1:0]  rd_q, din_q;
  logic          fwd_q;

  always_comb begin
    if (clear)                     ptr_nx = '0;
    else if (!push)                ptr_nx = ptr;
    else if (ptr + 1'b1 >= len)    ptr_nx = '0;
    else                           ptr_nx = ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
    rd_q  <= mem[ptr_nx];
    fwd_q <= push && (ptr_nx == ptr);
    din_q <= din;
  end

  assign dout = fwd_q ? din_q : rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= ptr_nx;
  end

  initial assert (DEPTH >= 2) else $error("line_buffer: DEPTH must be at least 2");
  always_ff @(posedge clk) begin
    if (rst_n && push)
      assert (len >= 1 && len <= AW'(DEPTH))
        else $error("line_buffer: row length %0d exceeds %0d", len, DEPTH);
  end

endmodule
