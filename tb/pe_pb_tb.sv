// Testbench of processing element PB (combinational adder/subtractor and an
// independent register). Checks the sum and difference outputs in the same
// cycle as their operands, and that the register delays its own input by one
// clock, is not affected by the adder operands, and clears on reset.
module pe_pb_tb;
  localparam int W = 17;

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] a, b, d, s_add, s_sub, q_add, q_sub;
  int checks = 0, failures = 0;

  pe_pb #(.W(W), .SUB(1'b0)) dut_add (.clk, .rst, .a, .b, .s(s_add), .d, .q(q_add));
  pe_pb #(.W(W), .SUB(1'b1)) dut_sub (.clk, .rst, .a, .b, .s(s_sub), .d, .q(q_sub));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic signed [W-1:0] got, logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic signed [W-1:0] ed;
    rst = 1'b1;
    a = W'(5);
    b = W'(3);
    d = W'(99);
    @(posedge clk);
    @(negedge clk);
    check("reset add", q_add, '0);
    check("reset sub", q_sub, '0);
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      a = W'($urandom);
      b = W'($urandom);
      d = W'($urandom);
      ed = d;
      #1;
      check("comb add", s_add, W'(longint'(a) + longint'(b)));
      check("comb sub", s_sub, W'(longint'(a) - longint'(b)));
      @(negedge clk);
      check("reg add", q_add, ed);
      check("reg sub", q_sub, ed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
