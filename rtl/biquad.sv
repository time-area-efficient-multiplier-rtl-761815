// Pipelined multiplier-free biquad (second-order recursive section).
//
// Transfer function, with every coefficient a sum of at most two signed
// powers of two (see iir_pkg):
//   H(z) = S * (a0 + a1 z^-1 + a2 z^-2) / (b0 + b1 z^-1 + b2 z^-2)
//
// Structure. The direct form is split into an all-pole part, producing the
// state sequence v[n], and an all-zero part that forms y from v. Both parts
// are pipelined, and a cut-set retiming moves one delay of the all-pole part
// in front of the b2 adder (register R1) and one delay of the all-zero part
// into the numerator sum (register R3):
//   C2      = |b2| * R2            (coefficient unit)
//   A1 / R1 : R1 <= S*x - b2*R2
//   C1      = |b1| * R2, sharing its element with R4 <= R2
//   A2 / R2 : R2 <= (R1 - b1*R2) * (1/b0)
//   A4 / R3 : R3 <= a1*R2 + a2*R4
//   A3 / R5 : R5 <= a0*R2 + R3     (R5 is the section's output register)
// R2 holds v[n-2] while S*x[n] is at the input, so
//   v[n] = (S*x[n] - b1*v[n-1] - b2*v[n-2]) / b0
//   y[n] = a0*v[n] + a1*v[n-1] + a2*v[n-2]
// and y[n] appears on the output three clocks after x[n] was at the input.
//
// Speed. A one-term coefficient is only a wired shift; a two-term coefficient
// costs one adder. With one-term 1/b0 (the Butterworth sections) the longest
// combinational path is two adders (R2 -> C1 -> A2 -> R2, R2 -> C2 -> A1 -> R1,
// R2 -> a1 unit -> A4 -> R3); a two-term 1/b0 adds its adder to the first of
// these, giving three. The section accepts one sample every clock.
//
// Arithmetic. W-bit two's complement, most significant bit at weight 2^0.
// A wired shift is an arithmetic right shift that drops the bits below
// 2^-(W-1) (truncation towards minus infinity); each term of a coefficient is
// truncated on its own. Sums wrap modulo 2^W, as in a plain adder: the input
// scale S is what keeps the values in range, and the caller must keep the
// input amplitude within what S was chosen for. Signs: a coefficient unit
// delivers |leading term| +/- second term, and the adder that uses it adds,
// subtracts or swaps its operands to apply the signs (iir_pkg::fold_signs).
// R3 may hold the negated partial sum; A3 corrects for it. Two
// configurations are rejected at elaboration: a numerator whose three
// coefficients all have negative leading terms (it would need a negated
// output; negate the section instead) and a zero or negative 1/b0.
//
// Every coefficient goes through a coefficient unit (spt_coef, one PB element).
// For a one-term coefficient the unit is wiring only: its adder sees a zero
// operand and its spare register loads zero, so synthesis removes both, and
// the Butterworth sections keep the six elements listed above. The spare
// registers are the zero_q outputs, which nothing reads.
//
// The pipelining, the retiming, the register names, the grouping into
// processing elements (A1/R1, A4/R3, A3/R5 in PA elements; C2, A2/R2, C1/R4
// in PB elements; extra coefficient adders in PB elements of their own), the
// add/subtract choices of the Butterworth sections and the 17-bit width follow
// the published structure. The sign folding, the per-term truncation, where
// the input scale is applied and the synchronous reset are this design's.
//
// Interface: clk, rst (synchronous, active high, clears all registers),
// x (one sample per clock), y (the filtered sample, latency 3 clocks).
module biquad
  import iir_pkg::*;
#(
  parameter int unsigned W   = 17,
  parameter biquad_cfg_t CFG = iir_pkg::BQ1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  // Sign folding of the five adders.
  localparam fold_t F_A1 = fold_signs(1'b0, CFG.b2.has_t0 && !CFG.b2.t0.neg);  // S*x + (-b2)*v
  localparam fold_t F_A2 = fold_signs(1'b0, CFG.b1.has_t0 && !CFG.b1.t0.neg);  // R1  + (-b1)*v
  localparam fold_t F_A4 = fold_signs(coef_neg(CFG.a1), coef_neg(CFG.a2));
  localparam fold_t F_A3 = fold_signs(coef_neg(CFG.a0), F_A4.neg);

  if (!CFG.b0inv.has_t0 || CFG.b0inv.t0.neg) begin : g_bad_b0
    $error("biquad: 1/b0 must be non-zero with a positive leading term");
  end
  if (F_A3.neg) begin : g_bad_num
    $error("biquad: numerator signs would need a negated output; negate a0, a1, a2");
  end

  logic signed [W-1:0] xs;          // S * x
  logic signed [W-1:0] r1;          // retiming register of the all-pole part
  logic signed [W-1:0] r2;          // state register, holds v[n-2]
  logic signed [W-1:0] r3;          // retiming register of the all-zero part
  logic signed [W-1:0] r4;          // second state delay, holds v[n-3]
  logic signed [W-1:0] c1, c2;      // |b1| * R2, |b2| * R2
  logic signed [W-1:0] a2_sum;      // A2 output, before 1/b0
  logic signed [W-1:0] v_next;      // A2 output times 1/b0, into R2
  logic signed [W-1:0] m0, m1, m2;  // |a0| * R2, |a1| * R2, |a2| * R4
  logic signed [W-1:0] zero_q [5];  // spare registers of coefficient units, always 0

  always_comb xs = x >>> CFG.s_sh;

  // All-pole part ----------------------------------------------------------

  // C2 (PB element; its register is spare).
  spt_coef #(.W(W), .C(CFG.b2)) u_c2 (
    .clk, .rst, .v(r2), .m(c2), .d('0), .q(zero_q[0])
  );

  // A1 / R1 (PA element).
  pe_pa #(.W(W), .SUB(F_A1.sub)) u_a1_r1 (
    .clk, .rst, .a(xs), .b(c2), .q(r1)
  );

  // C1 / R4 (PB element): coefficient adder for b1 and the second state delay.
  spt_coef #(.W(W), .C(CFG.b1)) u_c1_r4 (
    .clk, .rst, .v(r2), .m(c1), .d(r2), .q(r4)
  );

  // A2 / R2 (PB element): the sum leaves the element, is multiplied by 1/b0
  // and comes back into the register.
  pe_pb #(.W(W), .SUB(F_A2.sub)) u_a2_r2 (
    .clk, .rst, .a(r1), .b(c1), .s(a2_sum), .d(v_next), .q(r2)
  );

  // 1/b0: a wired shift, or a PB element of its own for two terms.
  spt_coef #(.W(W), .C(CFG.b0inv)) u_b0inv (
    .clk, .rst, .v(a2_sum), .m(v_next), .d('0), .q(zero_q[1])
  );

  // All-zero part ----------------------------------------------------------

  spt_coef #(.W(W), .C(CFG.a0)) u_a0 (
    .clk, .rst, .v(r2), .m(m0), .d('0), .q(zero_q[2])
  );
  spt_coef #(.W(W), .C(CFG.a1)) u_a1 (
    .clk, .rst, .v(r2), .m(m1), .d('0), .q(zero_q[3])
  );
  spt_coef #(.W(W), .C(CFG.a2)) u_a2 (
    .clk, .rst, .v(r4), .m(m2), .d('0), .q(zero_q[4])
  );

  logic signed [W-1:0] a4_a, a4_b, a3_a, a3_b;

  always_comb begin
    a4_a = F_A4.swap ? m2 : m1;
    a4_b = F_A4.swap ? m1 : m2;
    a3_a = F_A3.swap ? r3 : m0;
    a3_b = F_A3.swap ? m0 : r3;
  end

  // A4 / R3 (PA element); R3 holds -(a1*v[n-1] + a2*v[n-2]) when F_A4.neg.
  pe_pa #(.W(W), .SUB(F_A4.sub)) u_a4_r3 (
    .clk, .rst, .a(a4_a), .b(a4_b), .q(r3)
  );

  // A3 / R5 (PA element), the section's output register.
  pe_pa #(.W(W), .SUB(F_A3.sub)) u_a3_r5 (
    .clk, .rst, .a(a3_a), .b(a3_b), .q(y)
  );

endmodule
