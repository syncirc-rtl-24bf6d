// LUT gate of the gate layer: DELTA inputs, SIGMA outputs.
//
// A lookup table is the alternative to the AND/XOR gate set: one table
// replaces a whole sub-circuit of up to 8 inputs and 8 outputs and is
// evaluated as one gate. In logic it is a 2^DELTA : 1 selection of SIGMA-bit
// entries, built here on the depth-optimized multiplexer. The table itself
// is an input, because in a lookup-table protocol it is data. The 8 x 8
// default is the largest LUT size the design allows.
//
// Interface: tbl (entry i in tbl[i]), x (DELTA bits) in; y = tbl[x] out.
// Combinational.
module sc_lut #(
  parameter int unsigned DELTA = 8,
  parameter int unsigned SIGMA = 8
) (
  input  logic [(2**DELTA)-1:0][SIGMA-1:0] tbl,
  input  logic [DELTA-1:0]                 x,
  output logic [SIGMA-1:0]                 y
);
  if (DELTA < 1 || DELTA > 8 || SIGMA < 1 || SIGMA > 8) begin : g_bad_size
    $error("sc_lut: DELTA and SIGMA must be 1..8");
  end

  mux_n #(.N(2 ** DELTA), .W(SIGMA)) u_sel (.a(tbl), .s(x), .y(y));
endmodule
