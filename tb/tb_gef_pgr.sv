// Self-checking testbench of gef_pgr: random and corner operands, each of
// p, g and r compared bit by bit with a reference built from a one-bit
// half adder (sum is p, carry is g) and the inclusive or.
module tb_gef_pgr;

  localparam int unsigned W = 17;
  localparam int unsigned NVEC = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, b, p, g, r;

  gef_pgr #(.W(W)) dut (.a(a), .b(b), .p(p), .g(g), .r(r));

  initial begin
    logic [1:0] hs;
    a = '0;
    b = '0;
    for (int v = 0; v < int'(NVEC); v++) begin
      @(posedge clk);
      a = W'($urandom());
      b = W'($urandom());
      if (v == 0) begin a = '0; b = '0; end
      if (v == 1) begin a = '1; b = '1; end
      if (v == 2) begin a = '1; b = '0; end
      @(negedge clk);
      for (int i = 0; i < int'(W); i++) begin
        hs = 2'(a[i]) + 2'(b[i]);
        checks++;
        if (p[i] !== hs[0] || g[i] !== hs[1] || r[i] !== (hs != 2'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d a=%b b=%b p=%b g=%b r=%b", i, a[i], b[i], p[i], g[i], r[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
