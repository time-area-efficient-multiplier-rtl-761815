// Linear systolic array of biquad sections.
//
// N biquads in series, section i feeding section i+1. Each section ends in
// its own output register, so the array is temporally and spatially local:
// no combinational path crosses a section boundary, and the clock rate is
// set by one section alone (two adders). CFG[0] is the first section.
//
// Interface: clk, rst (synchronous, active high), x (one sample per clock),
// y (the output of the last section, 3*N clocks after the input).
// In the two-chip realisation of the 10th-order filter one instance of this
// array is one FPGA: sections 1-3 in the first, 4-5 in the second.
module biquad_cascade
  import iir_pkg::*;
#(
  parameter int unsigned          W   = 17,
  parameter int unsigned          N   = iir_pkg::N_SECTIONS,
  parameter biquad_cfg_t [N-1:0]  CFG = iir_pkg::BUTTERWORTH10
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] link [N+1];

  assign link[0] = x;

  for (genvar i = 0; i < N; i++) begin : g_section
    biquad #(.W(W), .CFG(CFG[i])) u_biquad (
      .clk, .rst, .x(link[i]), .y(link[i+1])
    );
  end

  assign y = link[N];

endmodule
