// Compare-exchange unit: one COMP and two 2:1 MUXes.
//
// lo = min(a, b) and hi = max(a, b) for unsigned W-bit keys. The comparator
// decides gt = a > b; both multiplexers use it as select, so the unit has the
// comparator's depth plus one.
//
// Interface: a, b (W bits) in; lo, hi (W bits) out. Combinational.
module cmp_swap #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] lo,
  output logic [W-1:0] hi
);
  logic gt;

  comp_gt #(.W(W)) u_cmp (.x(a), .y(b), .gt(gt));
  mux2    #(.W(W)) u_lo  (.a0(a), .a1(b), .s(gt), .y(lo));
  mux2    #(.W(W)) u_hi  (.a0(b), .a1(a), .s(gt), .y(hi));
endmodule
