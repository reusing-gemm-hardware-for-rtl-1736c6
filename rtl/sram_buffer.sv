// On-chip buffer: one write port and two synchronous read ports.
//
// Used for the ifmap, weight, output (psum) and micro-op buffers. A read
// issued in cycle t returns data in cycle t+1; a read of the word written
// in the same cycle returns the old contents (read-before-write), which
// the pipeline in ged_top bypasses. Port B is needed only by the output
// buffer, for ALU instructions with a vector source operand. The
// organisation (register array, read-before-write) is this design's
// choice; the sizes come from the instantiating module.
module sram_buffer #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re_a,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             re_b,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= mem[raddr_a];
  end

  always_ff @(posedge clk) begin
    if (re_b) rdata_b <= mem[raddr_b];
  end

endmodule
