// 10th-order low-pass Butterworth filter without multipliers.
//
// Five biquad sections in cascade, all coefficients sums of at most two
// signed powers of two (iir_pkg::BUTTERWORTH10). Passband edge near 0.28 and
// stopband from about 0.45 of the Nyquist frequency; DC gain about 2.29
// (the product of the section scales and gains), ripple about +/-2.5 %.
//
// The sections are placed as in a two-FPGA realisation: sections 1-3 form
// the first chip's array, sections 4-5 the second's. The signal between the
// chips comes straight from section 3's output register, so the chip boundary
// adds no delay and no combinational path.
//
// Interface: clk, rst (synchronous, active high, clears the filter state),
// x (W-bit two's complement sample, weight of the MSB 2^0, one per clock),
// y (filtered sample, 15 clocks after the input). Keep |x| below about 0.2
// of full scale for arbitrary signals: the largest gain from the input to an
// internal node is about 4 and the adders wrap around on overflow.
module iir_butterworth10
  import iir_pkg::*;
#(
  parameter int unsigned W = iir_pkg::W_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int unsigned N_CHIP1 = 3;
  localparam int unsigned N_CHIP2 = N_SECTIONS - N_CHIP1;

  logic signed [W-1:0] chip_link;

  biquad_cascade #(
    .W(W), .N(N_CHIP1), .CFG(BUTTERWORTH10[N_CHIP1-1:0])
  ) u_fpga1 (
    .clk, .rst, .x, .y(chip_link)
  );

  biquad_cascade #(
    .W(W), .N(N_CHIP2), .CFG(BUTTERWORTH10[N_SECTIONS-1:N_CHIP1])
  ) u_fpga2 (
    .clk, .rst, .x(chip_link), .y
  );

endmodule
