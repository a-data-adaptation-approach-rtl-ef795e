// tb_sqrt_ip: self-checking test of the square-root unit. For edge values
// (0, 1, 2, 3, 4, perfect squares, 2^32-1) and random 32-bit radicands the
// root must be the largest r with r*r <= radicand and rem = radicand - r*r.
// Each run is timed: done must rise on the 64th clock edge counting the one
// that samples start.
module tb_sqrt_ip;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [31:0] rad;
  logic [15:0] root;
  logic [16:0] rem;
  int checks = 0, failures = 0;

  sqrt_ip dut (.clk, .rst_n, .start, .radicand(rad), .busy, .done, .root, .rem);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x);
    int n;
    longint unsigned er;
    er = 0;
    // reference: binary search for floor(sqrt(x))
    for (int bit_i = 15; bit_i >= 0; bit_i--) begin
      longint unsigned t;
      t = er | (64'd1 << bit_i);
      if (t * t <= 64'(x)) er = t;
    end
    while (busy) begin @(posedge clk); #1; end
    rad = x; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk); #1 n++;
    end
    checks++;
    if (64'(root) != er || 64'(rem) != 64'(x) - er * er) begin
      failures++;
      $display("FAIL sqrt(%0d): got %0d rem %0d expected %0d rem %0d", x, root, rem, er, 64'(x) - er * er);
    end
    checks++;
    if (n != 64) begin
      failures++;
      $display("FAIL latency %0d, expected 64", n);
    end
  endtask

  initial begin
    start = 1'b0; rad = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (rad_list[i]) run(rad_list[i]);
    for (int i = 0; i < 300; i++) run($urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rad_list [12] = '{0, 1, 2, 3, 4, 8, 9, 15, 16, 65535, 65536, 32'hffff_ffff};
endmodule
