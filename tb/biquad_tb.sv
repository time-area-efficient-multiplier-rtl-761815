// Testbench of the pipelined biquad.
//
// Six sections run side by side on the same input: sections 1 and 4 of the
// Butterworth filter and four extra sections that between them use every
// add/subtract/swap combination of the adders, one-term, two-term and zero
// coefficients, an all-pole section and a two-term 1/b0. Each output is compared bit for bit with the
// difference-equation model in iir_ref_pkg, delayed by the section latency of
// 3 clocks. The add/subtract setting of each adder of section 1 is checked
// against the published bit-level graph of that section. The stimulus is an impulse (whose first output must appear
// exactly 3 clocks later), a step, random samples, and a reset in the middle of
// the random run. Inputs stay small enough that the model sees no overflow;
// an overflow would invalidate the comparison and is counted as a failure.
module biquad_tb;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam int W   = 17;
  localparam int LAT = 3;
  localparam int NC  = 6;

  // Extra sections covering the other sign patterns, zero and two-term
  // numerator coefficients and a two-term 1/b0:
  //  C: b1 = 1/2 - 1/8, b2 = 1/4, a = (1/4, -(1/2 + 1/8), 1/4)
  //  D: all-pole, 1/b0 = 1 - 1/8, b1 = -1 + 1/4, b2 = -1/8, a = (1, 0, 0)
  //  E: b1 = -1/2, b2 = -1/4 + 1/16, a = (-1/2, -1, 1/2 + 1/8)
  //  F: b1 = -1 - 1/8, b2 = 1/2, a = (1 - 1/4, -1/2, -1/4)
  localparam biquad_cfg_t CFG_C = '{s_sh: 4'd1, b0inv: spt1(1'b0, 4'd0),
                                    b1: spt2(1'b0, 4'd1, 1'b1, 4'd3), b2: spt1(1'b0, 4'd2),
                                    a0: spt1(1'b0, 4'd2), a1: spt2(1'b1, 4'd1, 1'b1, 4'd3),
                                    a2: spt1(1'b0, 4'd2)};
  localparam biquad_cfg_t CFG_D = '{s_sh: 4'd1, b0inv: spt2(1'b0, 4'd0, 1'b1, 4'd3),
                                    b1: spt2(1'b1, 4'd0, 1'b0, 4'd2), b2: spt1(1'b1, 4'd3),
                                    a0: spt1(1'b0, 4'd0), a1: SPT_ZERO, a2: SPT_ZERO};
  localparam biquad_cfg_t CFG_E = '{s_sh: 4'd2, b0inv: spt1(1'b0, 4'd0),
                                    b1: spt1(1'b1, 4'd1), b2: spt2(1'b1, 4'd2, 1'b0, 4'd4),
                                    a0: spt1(1'b1, 4'd1), a1: spt1(1'b1, 4'd0),
                                    a2: spt2(1'b0, 4'd1, 1'b0, 4'd3)};
  localparam biquad_cfg_t CFG_F = '{s_sh: 4'd2, b0inv: spt1(1'b0, 4'd0),
                                    b1: spt2(1'b1, 4'd0, 1'b1, 4'd3), b2: spt1(1'b0, 4'd1),
                                    a0: spt2(1'b0, 4'd0, 1'b1, 4'd2), a1: spt1(1'b1, 4'd1),
                                    a2: spt1(1'b1, 4'd2)};
  localparam biquad_cfg_t [NC-1:0] CFGS = {CFG_F, CFG_E, CFG_D, CFG_C, BQ4, BQ1};

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] x;
  logic signed [W-1:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    biquad #(.W(W), .CFG(CFGS[i])) dut (.clk, .rst, .x, .y(y[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  biquad_ref ref_m [NC];
  longint    expq  [NC][$];

  task automatic restart_model();
    for (int i = 0; i < NC; i++) begin
      ref_m[i].clear();
      expq[i] = {};
      repeat (LAT) expq[i].push_back(0);
    end
  endtask

  // Called at a falling edge: check the outputs, then apply the next input.
  task automatic cycle(longint xv);
    for (int i = 0; i < NC; i++) begin
      longint e;
      e = expq[i].pop_front();
      checks++;
      if (longint'(y[i]) != e) begin
        failures++;
        if (failures < 20) $display("FAIL section %0d t=%0t: got %0d expected %0d", i, $time, y[i], e);
      end
      expq[i].push_back(ref_m[i].step(xv));
    end
    x = W'(xv);
    @(negedge clk);
  endtask

  initial begin
    int first_out;
    for (int i = 0; i < NC; i++) ref_m[i] = new(CFGS[i], W);

    // Add/subtract settings of Butterworth section 1: A1 and C2 subtract
    // (carry-in 1), A2, C1, A4 and A3 add (carry-in 0).
    checks += 6;
    if (g_dut[0].dut.u_a1_r1.SUB !== 1'b1)        begin failures++; $display("FAIL A1 mode"); end
    if (g_dut[0].dut.u_c2.u_pb.SUB !== 1'b1)      begin failures++; $display("FAIL C2 mode"); end
    if (g_dut[0].dut.u_a2_r2.SUB !== 1'b0)        begin failures++; $display("FAIL A2 mode"); end
    if (g_dut[0].dut.u_c1_r4.u_pb.SUB !== 1'b0)   begin failures++; $display("FAIL C1 mode"); end
    if (g_dut[0].dut.u_a4_r3.SUB !== 1'b0)        begin failures++; $display("FAIL A4 mode"); end
    if (g_dut[0].dut.u_a3_r5.SUB !== 1'b0)        begin failures++; $display("FAIL A3 mode"); end
    x   = '0;
    rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    restart_model();

    // Impulse: the first non-zero output must come LAT clocks after it.
    cycle(16384);
    first_out = -1;
    for (int t = 1; t < 40; t++) begin
      if (first_out < 0 && y[0] != 0) first_out = t;
      cycle(0);
    end
    checks++;
    if (first_out != LAT) begin
      failures++;
      $display("FAIL latency: first output after %0d clocks, expected %0d", first_out, LAT);
    end

    // Step.
    repeat (80) cycle(6000);

    // Random samples, with a reset in the middle.
    for (int t = 0; t < 1500; t++) begin
      if (t == 700) begin
        rst = 1'b1;
        x   = W'(1234);
        @(negedge clk);
        rst = 1'b0;
        for (int i = 0; i < NC; i++) begin
          checks++;
          if (y[i] != 0) begin
            failures++;
            $display("FAIL reset: section %0d output %0d", i, y[i]);
          end
        end
        restart_model();
      end
      cycle(longint'($signed(14'($urandom))));
    end
    repeat (LAT) cycle(0);

    for (int i = 0; i < NC; i++) begin
      checks++;
      if (ref_m[i].overflows != 0) begin
        failures++;
        $display("FAIL stimulus overflows section %0d (%0d times)", i, ref_m[i].overflows);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
