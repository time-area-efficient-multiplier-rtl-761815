// Testbench of the systolic biquad array at its default size (the five
// sections of the 10th-order Butterworth filter). Random samples and an
// impulse go through the array; the output is compared bit for bit with the
// chained difference-equation model delayed by 3 clocks per section, and the
// first impulse output must come exactly 15 clocks after the impulse.
module biquad_cascade_tb;
  import iir_pkg::*;
  import iir_ref_pkg::*;

  localparam int W   = 17;
  localparam int N   = N_SECTIONS;
  localparam int LAT = 3 * N;

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;

  biquad_cascade dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cascade_ref ref_m;
  longint     expq[$];

  task automatic cycle(longint xv);
    longint e;
    e = expq.pop_front();
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: got %0d expected %0d", $time, y, e);
    end
    expq.push_back(ref_m.step(xv));
    x = W'(xv);
    @(negedge clk);
  endtask

  initial begin
    int first_out;
    ref_m = new();
    for (int i = 0; i < N; i++) ref_m.add(BUTTERWORTH10[i], W);
    x   = '0;
    rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (LAT) expq.push_back(0);

    cycle(20000);
    first_out = -1;
    for (int t = 1; t < 200; t++) begin
      if (first_out < 0 && y != 0) first_out = t;
      cycle(0);
    end
    checks++;
    if (first_out != LAT) begin
      failures++;
      $display("FAIL latency: first output after %0d clocks, expected %0d", first_out, LAT);
    end

    for (int t = 0; t < 2000; t++) cycle(longint'($signed(13'($urandom))));
    repeat (LAT) cycle(0);

    checks++;
    if (ref_m.overflows() != 0) begin
      failures++;
      $display("FAIL stimulus overflows the model (%0d times)", ref_m.overflows());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
