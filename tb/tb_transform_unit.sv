// tb_transform_unit: loads 4x4 matrices (identity, a scale, a rotation about
// z by 30 degrees with a translation, and random ones) and transforms random
// vertices; each result row must equal sum_k M[r][k] * v[k] >> 16 computed
// here with 64-bit integers, and the identity must return the vertex itself.
// A transform must take 16 clocks of multiply-accumulate (done on the 17th
// edge counting the one that samples start).
module tb_transform_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic load_en, start, busy, done;
  logic signed [31:0] load_data, vx, vy, vz;
  logic signed [31:0] res [4];
  logic signed [31:0] m [16];
  int checks = 0, failures = 0;

  transform_unit dut (.clk, .rst_n, .load_en, .load_data, .start, .vx, .vy, .vz, .busy, .done, .res);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic signed [31:0] mm [16]);
    for (int i = 0; i < 16; i++) begin
      load_en = 1; load_data = mm[i]; m[i] = mm[i];
      @(posedge clk); #1;
    end
    load_en = 0;
  endtask

  task automatic xform(input logic signed [31:0] x, y, z);
    int n;
    longint v[4];
    v = '{x, y, z, 65536};
    vx = x; vy = y; vz = z; start = 1;
    @(posedge clk); #1 start = 0; n = 1;
    while (!done) begin @(posedge clk); #1 n++; end
    for (int r = 0; r < 4; r++) begin
      longint s;
      s = 0;
      for (int k = 0; k < 4; k++) s += longint'(m[r * 4 + k]) * v[k];
      checks++;
      if (res[r] !== 32'(s >>> 16)) begin
        failures++; $display("FAIL row %0d got %0d expected %0d", r, res[r], 32'(s >>> 16));
      end
    end
    checks++;
    if (n != 17) begin failures++; $display("FAIL latency %0d expected 17", n); end
  endtask

  initial begin
    logic signed [31:0] id [16], sc [16], rz [16], rnd [16];
    load_en = 0; start = 0; load_data = 0; vx = 0; vy = 0; vz = 0;
    id = '{65536,0,0,0, 0,65536,0,0, 0,0,65536,0, 0,0,0,65536};
    sc = '{131072,0,0,0, 0,32768,0,0, 0,0,196608,0, 0,0,0,65536};
    // cos 30 = 0.866025 -> 56756, sin 30 = 0.5 -> 32768; translate by (5, -3, 2)
    rz = '{56756,-32768,0,327680, 32768,56756,0,-196608, 0,0,65536,131072, 0,0,0,65536};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    load(id);
    xform(32'sh0003_8000, -32'sh0001_0000, 32'sh0000_4000);
    checks++;
    if (res[0] !== 32'sh0003_8000 || res[1] !== -32'sh0001_0000 || res[2] !== 32'sh0000_4000 ||
        res[3] !== 32'sh0001_0000) begin
      failures++; $display("FAIL identity changed the vertex");
    end
    load(sc);  xform(32'sh0001_0000, 32'sh0002_0000, -32'sh0001_0000);
    load(rz);  xform(32'sh000a_0000, 32'sh0000_0000, 32'sh0001_0000);
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 16; i++) rnd[i] = $signed($urandom) >>> 12;
      load(rnd);
      for (int j = 0; j < 5; j++) xform($signed($urandom) >>> 8, $signed($urandom) >>> 8, $signed($urandom) >>> 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
