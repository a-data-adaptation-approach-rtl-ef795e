// tb_normal_unit: feeds triangles to the normal unit and compares the three
// Q2.14 components with a model written here: vector product with 64-bit
// integers, common right shift until all components fit in 15 bits, integer
// square root by bisection, truncating division of (N_i << 14) by the length.
// For well-conditioned triangles it also checks that the result has unit
// length within 1 %, and that a degenerate triangle gives the zero vector.
module tb_normal_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic signed [15:0] p [9];
  logic signed [31:0] n [3];
  int checks = 0, failures = 0;

  normal_unit dut (.clk, .rst_n, .start, .p, .busy, .done, .n);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int q [9], input bit check_len);
    longint u[3], w[3], c[3], len, sumsq, e[3];
    bit big;
    for (int i = 0; i < 9; i++) p[i] = 16'(q[i]);
    for (int i = 0; i < 3; i++) begin
      u[i] = longint'($signed(p[3+i])) - longint'($signed(p[i]));
      w[i] = longint'($signed(p[6+i])) - longint'($signed(p[i]));
    end
    c[0] = u[1] * w[2] - u[2] * w[1];
    c[1] = u[2] * w[0] - u[0] * w[2];
    c[2] = u[0] * w[1] - u[1] * w[0];
    do begin
      big = 0;
      for (int i = 0; i < 3; i++) if (c[i] > 16383 || c[i] < -16383) big = 1;
      if (big) for (int i = 0; i < 3; i++) c[i] = c[i] >>> 1;
    end while (big);
    sumsq = c[0] * c[0] + c[1] * c[1] + c[2] * c[2];
    len = 0;
    for (int b = 16; b >= 0; b--) if ((len + (64'd1 << b)) ** 2 <= sumsq) len += (64'd1 << b);
    for (int i = 0; i < 3; i++) e[i] = (len == 0) ? 0 : (c[i] * 16384) / len;
    start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1; end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (longint'(n[i]) != e[i]) begin
        failures++; $display("FAIL component %0d got %0d expected %0d", i, n[i], e[i]);
      end
    end
    if (check_len) begin
      longint l2;
      l2 = longint'(n[0]) * n[0] + longint'(n[1]) * n[1] + longint'(n[2]) * n[2];
      checks++;
      if (l2 < 64'd263000000 || l2 > 64'd273900000) begin
        failures++; $display("FAIL |n|^2 = %0d, not about 2^28", l2);
      end
    end
  endtask

  initial begin
    start = 0; p = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run('{0,0,0, 10,0,0, 0,10,0}, 1);          // normal +z
    checks++;
    if (n[0] != 0 || n[1] != 0 || n[2] != 16384) begin failures++; $display("FAIL +z normal"); end
    run('{0,0,0, 0,10,0, 10,0,0}, 1);          // normal -z
    checks++;
    if (n[2] != -16384) begin failures++; $display("FAIL -z normal"); end
    run('{1,2,3, 2,4,6, 3,6,9}, 0);            // degenerate
    checks++;
    if (n[0] != 0 || n[1] != 0 || n[2] != 0) begin failures++; $display("FAIL degenerate"); end
    run('{-32768,-32768,0, 32767,-32768,100, -32768,32767,-100}, 1);  // large, needs shifting
    for (int t = 0; t < 60; t++) begin
      int q[9];
      for (int i = 0; i < 9; i++) q[i] = $urandom_range(0, 2000) - 1000;
      run(q, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
