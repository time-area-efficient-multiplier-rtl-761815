// Testbench of the coefficient unit. Five units with a zero, a one-term and
// two-term coefficients of every sign pattern get the same random words
// (including the most negative word); each magnitude output is compared with
// |leading sign| * (sum of the individually truncated terms) computed on
// 64-bit integers, and the spare register must delay d by one clock.
module spt_coef_tb;
  import iir_pkg::*;

  localparam int W  = 17;
  localparam int NC = 5;
  localparam spt2_t [NC-1:0] CS = {spt2(1'b1, 4'd1, 1'b0, 4'd6), spt2(1'b1, 4'd0, 1'b1, 4'd4),
                                   spt2(1'b0, 4'd0, 1'b1, 4'd2), spt1(1'b1, 4'd3), SPT_ZERO};

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] v, d;
  logic signed [W-1:0] m [NC];
  logic signed [W-1:0] q [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    spt_coef #(.W(W), .C(CS[i])) dut (.clk, .rst, .v, .m(m[i]), .d, .q(q[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected_mag(longint x, spt2_t c);
    longint t0, t1;
    if (!c.has_t0) return 0;
    t0 = x >>> c.t0.sh;
    t1 = c.has_t1 ? (x >>> c.t1.sh) : 0;
    // magnitude: leading term taken positive, second term relative to it
    return (c.has_t1 && (c.t1.neg != c.t0.neg)) ? t0 - t1 : t0 + t1;
  endfunction

  initial begin
    logic signed [W-1:0] ed;
    rst = 1'b1;
    v   = '0;
    d   = W'(77);
    @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (q[i] != 0) begin failures++; $display("FAIL reset %0d", i); end
    end
    rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      v = (t == 0) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
      d = W'($urandom);
      ed = d;
      #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (m[i] != W'(expected_mag(longint'(v), CS[i]))) begin
          failures++;
          if (failures < 20) $display("FAIL unit %0d v=%0d: m=%0d expected %0d", i, v, m[i],
                                      W'(expected_mag(longint'(v), CS[i])));
        end
      end
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (q[i] != ed) begin failures++; $display("FAIL register %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
