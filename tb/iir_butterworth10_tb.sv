// End-to-end testbench of the 10th-order multiplier-free Butterworth filter,
// with every parameter at its default.
//
// Every clock a new sample goes in, and every output is compared bit for bit
// with the chained difference-equation model, 15 clocks later. The signal
// between the two chip arrays is compared with the model of sections 1-3 as
// well. The stimulus, in order:
//   impulse      first output exactly 15 clocks later; the response must
//                keep ringing long after the numerator taps (recursion)
//   step         settled output / input must match the DC gain computed from
//                the coefficients (within 1 %)
//   sine 0.10    passband: output amplitude within 3 % of the ideal response
//   sine 0.60    stopband: output amplitude below 1 % of the passband one
//   random       white noise of small amplitude, with a reset in the middle
// Each of these events is counted; one that never happened is a failure.
module iir_butterworth10_tb;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam int W        = W_DEFAULT;
  localparam int LAT      = 3 * N_SECTIONS;
  localparam int LAT_LINK = 3 * 3;
  localparam real FS      = real'(longint'(1) <<< (W - 1));   // full scale

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;

  iir_butterworth10 dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cascade_ref ref_m, ref_link;
  longint     expq[$], linkq[$];
  int         n_recursion_tail = 0, n_link_active = 0, n_reset = 0;
  int         n_dc = 0, n_pass = 0, n_stop = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
  endtask

  // At a falling edge: check the output and the chip link, apply the input.
  task automatic cycle(longint xv);
    longint e, el;
    e  = expq.pop_front();
    el = linkq.pop_front();
    checks += 2;
    if (longint'(y) != e) fail($sformatf("output %0d expected %0d", y, e));
    if (longint'(dut.chip_link) != el) fail($sformatf("link %0d expected %0d", dut.chip_link, el));
    if (dut.chip_link != 0) n_link_active++;
    expq.push_back(ref_m.step(xv));
    linkq.push_back(ref_link.step(xv));
    x = W'(xv);
    @(negedge clk);
  endtask

  task automatic restart_model();
    ref_m.clear();
    ref_link.clear();
    expq  = {};
    linkq = {};
    repeat (LAT) expq.push_back(0);
    repeat (LAT_LINK) linkq.push_back(0);
  endtask

  function automatic real ideal_gain(real f);
    real g;
    g = 1.0;
    for (int i = 0; i < N_SECTIONS; i++) g *= section_mag(BUTTERWORTH10[i], f);
    return g;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Drive a sine of normalised frequency f and amplitude a for n samples and
  // return the largest output magnitude over the last half.
  task automatic sine(real f, real a, int n, output real peak);
    peak = 0.0;
    for (int t = 0; t < n; t++) begin
      if (t >= n / 2 && absr(real'(y)) > peak) peak = absr(real'(y));
      cycle(longint'($rtoi(a * FS * $sin(3.14159265358979 * f * t))));
    end
    peak = peak / FS;
  endtask

  initial begin
    int  first_out;
    real g0, gm, pk_pass, pk_stop, exp_pass;
    ref_m    = new();
    ref_link = new();
    for (int i = 0; i < N_SECTIONS; i++) ref_m.add(BUTTERWORTH10[i], W);
    for (int i = 0; i < 3; i++) ref_link.add(BUTTERWORTH10[i], W);
    x   = '0;
    rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    restart_model();

    // Impulse.
    cycle(30000);
    first_out = -1;
    for (int t = 1; t < 300; t++) begin
      if (first_out < 0 && y != 0) first_out = t;
      if (t > LAT + 2 * N_SECTIONS && y != 0) n_recursion_tail++;
      cycle(0);
    end
    checks++;
    if (first_out != LAT) fail($sformatf("first output after %0d clocks, expected %0d", first_out, LAT));

    // Step: DC gain.
    for (int t = 0; t < 400; t++) cycle(6554);
    g0 = ideal_gain(0.0);
    gm = real'(y) / 6554.0;
    checks++;
    if (absr(gm - g0) > 0.01 * g0) fail($sformatf("DC gain %f, expected %f", gm, g0));
    else n_dc++;
    $display("DC gain measured %f, from the coefficients %f", gm, g0);

    // Passband and stopband sines.
    sine(0.10, 0.15, 1200, pk_pass);
    exp_pass = 0.15 * ideal_gain(0.10);
    checks++;
    if (absr(pk_pass - exp_pass) > 0.03 * exp_pass)
      fail($sformatf("passband amplitude %f, expected %f", pk_pass, exp_pass));
    else n_pass++;
    sine(0.60, 0.15, 1200, pk_stop);
    checks++;
    if (pk_stop > 0.01 * pk_pass) fail($sformatf("stopband amplitude %f", pk_stop));
    else n_stop++;
    $display("passband amplitude %f (ideal %f), stopband amplitude %e (ideal %e)",
             pk_pass, exp_pass, pk_stop, 0.15 * ideal_gain(0.60));

    // Random samples with a reset in the middle.
    for (int t = 0; t < 3000; t++) begin
      if (t == 1500) begin
        rst = 1'b1;
        x   = W'(4321);
        @(negedge clk);
        rst = 1'b0;
        checks++;
        if (y != 0 || dut.chip_link != 0) fail("state not cleared by reset");
        n_reset++;
        restart_model();
      end
      cycle(longint'($signed(13'($urandom))));
    end
    repeat (LAT) cycle(0);

    checks++;
    if (ref_m.overflows() != 0) fail($sformatf("stimulus overflows the model (%0d times)", ref_m.overflows()));

    $display("events: recursion tail samples=%0d, chip link active=%0d, DC=%0d, passband=%0d, stopband=%0d, resets=%0d",
             n_recursion_tail, n_link_active, n_dc, n_pass, n_stop, n_reset);
    checks++;
    if (n_recursion_tail == 0 || n_link_active == 0 || n_dc == 0 || n_pass == 0 ||
        n_stop == 0 || n_reset == 0) fail("an event never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
