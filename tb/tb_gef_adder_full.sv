// Full-size testbench of gef_adder: the adder at its default parameters
// (17 bits, and-or operator on (g, r), equal delay profile) is run through
// all carry-chain corner cases (a + ~a, a + -a for every single-bit a, all
// ones plus one) and 200000 random operand pairs, each sum compared with
// the simulator's addition modulo 2^17.
module tb_gef_adder_full;

  localparam int unsigned W = 17;
  localparam int unsigned NRAND = 200000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, b, s;

  gef_adder dut (.a(a), .b(b), .s(s));

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] e;
    @(posedge clk);
    a = x;
    b = y;
    @(negedge clk);
    e = x + y;
    checks++;
    if (s !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %h + %h = %h, expected %h", x, y, s, e);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    apply('1, W'(1));
    apply('1, '1);
    apply('0, '0);
    for (int i = 0; i < int'(W); i++) begin
      apply(W'(1) << i, ~(W'(1) << i));
      apply(W'(1) << i, -(W'(1) << i));
      apply('1 << i, W'(1) << i);
    end
    for (int v = 0; v < int'(NRAND); v++) apply(W'($urandom()), W'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
