// tb_sed: feeds triangles to the segment extremity stage and compares every
// segment record it writes with the reference model (tb_ref_pkg): y, both
// extremities, both colours, the last flag and the ring-buffer address. The
// triangles include flat tops and bottoms, a one-line triangle, a single
// point, vertices in every order and the full 12-bit x range. space_ok is
// dropped at random to exercise the back-pressure stall. The time from the
// third vertex to the first record (sort, division start and the 67-clock
// division) must be 69 clocks when there is no back-pressure.
module tb_sed;
  import ar3d_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, wr_en, space_ok, busy;
  vertex_t in_data;
  logic [6:0] wr_addr;
  line_t wr_data;
  int checks = 0, failures = 0, stalls = 0;
  tb_ref_pkg::ref_line_t exp_q[$];
  int exp_addr = 0;
  bit throttle = 0;

  sed #(.DEPTH(128)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .wr_en, .wr_addr,
                          .wr_data, .space_ok, .busy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-pressure
  always @(posedge clk) begin
    space_ok <= throttle ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // record checker
  always @(posedge clk) if (rst_n && wr_en) begin
    tb_ref_pkg::ref_line_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected record y=%0d", wr_data.y);
    end else begin
      e = exp_q.pop_front();
      if (int'(wr_data.y) != e.y || int'(wr_data.xl) != e.xl || int'(wr_data.xr) != e.xr ||
          int'(wr_data.cl) != e.cl || int'(wr_data.cr) != e.cr || wr_data.last != e.last ||
          int'(wr_addr) != exp_addr) begin
        failures++;
        $display("FAIL y=%0d: got xl=%0d xr=%0d cl=%0d cr=%0d last=%0b addr=%0d; expected y=%0d xl=%0d xr=%0d cl=%0d cr=%0d last=%0b addr=%0d",
                 wr_data.y, wr_data.xl, wr_data.xr, wr_data.cl, wr_data.cr, wr_data.last, wr_addr,
                 e.y, e.xl, e.xr, e.cl, e.cr, e.last, exp_addr);
      end
    end
    exp_addr = (exp_addr + 1) % 128;
  end
  always @(posedge clk) if (rst_n && busy && !space_ok && !wr_en && dut.state == dut.S_WALK) stalls++;

  task automatic run_tri(input int x[3], input int y[3], input int c[3], input bit timed);
    int n;
    tri_lines(x, y, c, exp_q);
    for (int i = 0; i < 3; i++) begin
      in_valid = 1'b1;
      in_data  = vertex_t'(vword(x[i], y[i], c[i]));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    n = 0;
    while (!wr_en) begin @(posedge clk); #1 n++; end
    if (timed) begin
      checks++;
      if (n != 69) begin
        failures++;
        $display("FAIL first record after %0d clocks, expected 69", n);
      end
    end
    while (busy) begin @(posedge clk); #1; end
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_tri('{10, 3, 30},     '{5, 20, 40},    '{0, 128, 255}, 1);
    run_tri('{100, 50, 150},  '{10, 10, 60},   '{200, 10, 90}, 1);    // flat top
    run_tri('{100, 50, 150},  '{60, 10, 60},   '{0, 255, 255}, 1);    // flat bottom
    run_tri('{5, 200, 90},    '{33, 33, 33},   '{7, 8, 9}, 1);        // one line
    run_tri('{77, 77, 77},    '{9, 9, 9},      '{1, 1, 1}, 1);        // a point
    run_tri('{0, 4095, 2000}, '{0, 100, 50},   '{255, 0, 128}, 1);    // full x range
    run_tri('{300, 20, 310},  '{100, 120, 10}, '{30, 60, 90}, 1);
    throttle = 1;
    for (int i = 0; i < 60; i++) begin
      int x[3], y[3], c[3], y0;
      y0 = $urandom_range(0, 3800);
      for (int k = 0; k < 3; k++) begin
        x[k] = $urandom_range(0, 4095);
        y[k] = y0 + $urandom_range(0, 150);
        c[k] = $urandom_range(0, 255);
      end
      run_tri(x, y, c, 0);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d records missing", exp_q.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never stalled the walk"); end
    $display("back-pressure stall clocks: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
