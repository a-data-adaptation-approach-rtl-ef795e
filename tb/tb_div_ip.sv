// tb_div_ip: self-checking test of the sequential divider. Random signed
// operands (and edge cases: zero dividend, divisor 1 and -1, most negative
// dividend, division by zero) are compared with the language's own / and %
// operators, which truncate toward zero like the divider. Every division is
// also timed: done must rise on the 67th clock edge counting the one that
// samples start.
module tb_div_ip;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start;
  logic signed [31:0] a, b, q, r;
  logic busy, done;
  int checks = 0, failures = 0;

  div_ip dut (.clk, .rst_n, .start, .dividend(a), .divisor(b), .busy, .done,
              .quotient(q), .remainder(r));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [31:0] x, input logic signed [31:0] y);
    int n;
    logic signed [31:0] eq, er;
    a = x; b = y; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk); #1 n++;
    end
    if (y == 0) begin eq = 0; er = x; end
    else if (x == 32'sh8000_0000 && y == -1) begin eq = x; er = 0; end
    else begin eq = x / y; er = x % y; end
    checks++;
    if (q !== eq || r !== er) begin
      failures++;
      $display("FAIL %0d / %0d: got q=%0d r=%0d expected q=%0d r=%0d", x, y, q, r, eq, er);
    end
    checks++;
    if (n != 67) begin
      failures++;
      $display("FAIL latency %0d, expected 67", n);
    end
  endtask

  initial begin
    start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    run(100, 7);
    run(-100, 7);
    run(100, -7);
    run(-100, -7);
    run(0, 5);
    run(12345, 1);
    run(12345, -1);
    run(32'sh8000_0000, 3);
    run(7, 0);
    run(3, 100);
    run(32'sh7fff_ffff, 32'sh7fff_ffff);
    for (int i = 0; i < 300; i++) begin
      logic signed [31:0] x, y;
      x = $urandom;
      y = (i % 3 == 0) ? ($urandom % 1000) - 500 : $signed($urandom) >>> ($urandom % 31);
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
