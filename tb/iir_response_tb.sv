// Frequency-response sweep of the 10th-order filter at its default size.
//
// For each test frequency a sine of amplitude 0.15 of full scale is applied;
// after 400 samples of settling the output is correlated with a sine and a
// cosine of the same frequency over 2000 samples, which gives the output
// amplitude without depending on where the samples fall on the waveform. The
// gain is compared with the ideal magnitude response computed from the
// coefficients: within 0.5 % up to the passband edge, within 2 % at the
// -30 dB point (0.4 of Nyquist) and within 10 % at -57 dB (0.5 of Nyquist),
// where truncation noise starts to matter. Every output is
// also compared bit for bit with the reference model.
module iir_response_tb;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam int  W    = W_DEFAULT;
  localparam int  LAT  = 3 * N_SECTIONS;
  localparam real FS   = real'(longint'(1) <<< (W - 1));
  localparam real PI   = 3.14159265358979;
  localparam real AMP  = 0.15;
  localparam int  NF   = 9;
  localparam real FREQ [NF] = '{0.05, 0.10, 0.15, 0.20, 0.25, 0.28, 0.30, 0.40, 0.50};

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;

  iir_butterworth10 dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cascade_ref ref_m;
  longint     expq[$];
  longint     xhist[$];

  function automatic real ideal_gain(real f);
    real g;
    g = 1.0;
    for (int i = 0; i < N_SECTIONS; i++) g *= section_mag(BUTTERWORTH10[i], f);
    return g;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real g0, gi, gm, si, co, ph, tol;
    ref_m = new();
    for (int i = 0; i < N_SECTIONS; i++) ref_m.add(BUTTERWORTH10[i], W);
    g0  = ideal_gain(0.0);
    x   = '0;
    rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (LAT) expq.push_back(0);

    for (int k = 0; k < NF; k++) begin
      si = 0.0;
      co = 0.0;
      for (int t = 0; t < 2400 + LAT; t++) begin
        longint xv, e;
        // y now belongs to the input applied LAT clocks ago (time t - LAT).
        e = expq.pop_front();
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 20) $display("FAIL f=%0.2f t=%0d: got %0d expected %0d", FREQ[k], t, y, e);
        end
        if (t - LAT >= 400 && t - LAT < 2400) begin
          ph = PI * FREQ[k] * real'(t - LAT);
          si += real'(y) * $sin(ph);
          co += real'(y) * $cos(ph);
        end
        xv = (t < 2400) ? longint'($rtoi(AMP * FS * $sin(PI * FREQ[k] * real'(t)))) : 0;
        expq.push_back(ref_m.step(xv));
        x = W'(xv);
        @(negedge clk);
      end
      gm = 2.0 * $sqrt(si * si + co * co) / 2000.0 / (AMP * FS);
      gi = ideal_gain(FREQ[k]);
      checks++;
      if (FREQ[k] < 0.35) tol = 0.005 * gi;
      else if (FREQ[k] < 0.45) tol = 0.02 * gi;
      else tol = 0.10 * gi;
      if (absr(gm - gi) > tol) begin
        failures++;
        $display("FAIL f=%0.2f: gain %f, ideal %f", FREQ[k], gm, gi);
      end
      $display("f=%0.2f of Nyquist: gain %f (%0.1f dB re DC), ideal %f (%0.1f dB)", FREQ[k], gm,
               20.0 * $log10(gm / g0 + 1.0e-12), gi, 20.0 * $log10(gi / g0));
      // flush the tail so every frequency starts from rest
      for (int t = 0; t < 300; t++) begin
        void'(expq.pop_front());
        expq.push_back(ref_m.step(0));
        x = '0;
        @(negedge clk);
      end
    end

    checks++;
    if (ref_m.overflows() != 0) begin
      failures++;
      $display("FAIL stimulus overflows the model (%0d times)", ref_m.overflows());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
