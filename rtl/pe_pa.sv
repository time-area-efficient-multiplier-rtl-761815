// Processing element PA: a W-bit adder/subtractor followed by a W-bit register.
//
// q <= SUB ? a - b : a + b on every rising clock edge. The sum wraps modulo
// 2^W like a plain ripple-carry adder; a subtraction is the adder with b
// inverted and a carry-in of 1. In the biquad this element holds the pairs
// A1/R1, A4/R3 and A3/R5, i.e. an adder whose only consumer is its register.
//
// Interface: a, b in; q out, one clock of latency, one result per clock.
// The operation is fixed by the parameter SUB, as it is fixed when an FPGA is
// configured. The synchronous, active-high reset that clears q is a choice of
// this design; the filter needs it only to start from a known zero state.
module pe_pa #(
  parameter int unsigned W   = 17,
  parameter bit          SUB = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] q
);

  logic signed [W-1:0] sum;

  always_comb sum = SUB ? a - b : a + b;

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= sum;
  end

endmodule
