// Mode multiplexer in front of the PE array.
//
// Conv2D mode: every column receives the J-element ifmap vector read from
// the ifmap buffer (J input channels of one pixel, shared across columns).
// DwC mode: column k receives the NW-element column produced by its own
// Im2Col unit, in rows 0..NW-1, with the remaining rows driven to zero.
// Combinational.
module ifmap_mux #(
  parameter int unsigned J    = 32,
  parameter int unsigned K    = 32,
  parameter int unsigned NW   = 9,
  parameter int unsigned IN_W = 8
) (
  input  logic            dwc_mode,
  input  logic [IN_W-1:0] inp [J],
  input  logic [IN_W-1:0] win [K][NW],
  output logic [IN_W-1:0] vec [K][J]
);

  for (genvar k = 0; k < K; k++) begin : g_col
    for (genvar j = 0; j < J; j++) begin : g_row
      if (j < NW) begin : g_win
        assign vec[k][j] = dwc_mode ? win[k][j] : inp[j];
      end else begin : g_zero
        assign vec[k][j] = dwc_mode ? '0 : inp[j];
      end
    end
  end

endmodule
