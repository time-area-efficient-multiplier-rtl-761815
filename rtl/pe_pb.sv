// Processing element PB: a W-bit adder/subtractor and a W-bit register that
// share one element but are not connected to each other.
//
// s = SUB ? a - b : a + b is a combinational output; q <= d is a register with
// its own input. The sum leaves the element so that it can be wired on (for
// instance through a wired shift) to another element or back into this one's
// register. In the biquad this element holds the coefficient adder C2 alone,
// the pair A2/R2 (with the 1/b0 shift between sum and register) and the pair
// C1/R4.
//
// Interface: a, b -> s combinationally; d -> q with one clock of latency.
// The synchronous, active-high reset of q is a choice of this design.
module pe_pb #(
  parameter int unsigned W   = 17,
  parameter bit          SUB = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] s,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  always_comb s = SUB ? a - b : a + b;

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
