// Multi-input AND cell of the gate layer (AND2, AND3 or AND4).
//
// In the secret-sharing protocols this library targets, XOR, XNOR and NOT are
// evaluated locally and are free, while an AND gate of any fan-in up to four
// costs one communication round. This cell is therefore the unit in which
// multiplicative depth is counted. The fan-in limit of four is the one the
// cell library of the design offers; it is checked at elaboration.
//
// Interface: a[N-1:0] in, y = &a out. Purely combinational, no clock.
module sc_and #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  output logic         y
);
  if (N < 2 || N > 4) begin : g_bad_fanin
    $error("sc_and: fan-in must be 2..4");
  end

  assign y = &a;
endmodule
