// Coefficient unit: multiplication of a word by a constant made of at most two
// signed power-of-two terms, placed in one PB processing element.
//
// For C = sign * (2^-p +/- 2^-q) the unit outputs the magnitude
//   m = (v >>> p) +/- (v >>> q)
// with two wired shifts and the element's adder/subtractor; the sign of the
// leading term is left to the adder that consumes m (see iir_pkg::fold_signs).
// A one-term coefficient gives m = v >>> p (the adder sees a zero operand and
// reduces to wires), a zero coefficient gives m = 0. Each shift truncates
// towards minus infinity on its own.
//
// The element's register is independent of the adder and is brought out as
// d -> q, so that a delay placed with the coefficient (R4 next to C1 in the
// biquad) can share the element.
//
// Interface: v -> m combinational; d -> q one clock; rst is synchronous and
// clears q.
module spt_coef
  import iir_pkg::*;
#(
  parameter int unsigned W = 17,
  parameter spt2_t       C = iir_pkg::BQ1.b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] v,
  output logic signed [W-1:0] m,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  localparam logic signed [W-1:0] ZERO = '0;

  logic signed [W-1:0] op_p, op_q;

  // Wired shifts. The zero operand is signed so that the shifts stay
  // arithmetic.
  always_comb begin
    op_p = C.has_t0              ? (v >>> C.t0.sh) : ZERO;
    op_q = C.has_t0 && C.has_t1 ? (v >>> C.t1.sh) : ZERO;
  end

  pe_pb #(.W(W), .SUB(coef_sub(C))) u_pb (
    .clk, .rst, .a(op_p), .b(op_q), .s(m), .d, .q
  );

endmodule
