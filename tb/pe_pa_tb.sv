// Testbench of processing element PA (adder/subtractor + register).
// Two instances, one adding and one subtracting, are driven with random
// operands, including the extremes that wrap around; each registered result is
// compared with the modulo-2^W sum or difference one clock later. Also checks
// that reset clears the register.
module pe_pa_tb;
  localparam int W = 17;

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] a, b, q_add, q_sub;
  int checks = 0, failures = 0;

  pe_pa #(.W(W), .SUB(1'b0)) dut_add (.clk, .rst, .a, .b, .q(q_add));
  pe_pa #(.W(W), .SUB(1'b1)) dut_sub (.clk, .rst, .a, .b, .q(q_sub));

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
    logic signed [W-1:0] ea, eb;
    rst = 1'b1;
    a = W'(12345);
    b = W'(-777);
    @(posedge clk);
    @(negedge clk);
    check("reset add", q_add, '0);
    check("reset sub", q_sub, '0);
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      case (i)
        0: begin a = {1'b0, {(W-1){1'b1}}}; b = W'(1); end
        1: begin a = {1'b1, {(W-1){1'b0}}}; b = W'(1); end
        2: begin a = '0; b = {1'b1, {(W-1){1'b0}}}; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      ea = a;
      eb = b;
      @(negedge clk);
      check("add", q_add, W'(longint'(ea) + longint'(eb)));
      check("sub", q_sub, W'(longint'(ea) - longint'(eb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
