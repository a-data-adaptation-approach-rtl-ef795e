// tb_hline_array: runs the four-accelerator workload on hline_array at its
// default sizes. One set of 32 random triangles is filled twice: first all of
// it on accelerator 0 alone, then spread over all four accelerators, each
// triangle going to the one with the fewest pixels assigned so far. Every
// pixel word on every return link is compared with the reference model
// (tb_ref_pkg), in order per lane, control bit included.
// The clock counts of the two runs are compared: with four accelerators the
// set must finish at least 3 times faster than with one (the reference
// measurement of the document is 0.273 s against 0.075 s, a ratio of 3.6).
// A third phase reads the return links only now and then, so the lanes must
// wait on their output; it checks that the pixels still arrive intact and
// that the pixel BRAM of some lane filled up.
module tb_hline_array;
  import ar3d_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 4;
  localparam int NT = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] in_write, in_control, in_full, ret_exists, ret_control, ret_read;
  logic [N-1:0] busy, seg_stall, pix_stall, rd_en;
  logic [31:0]  in_data [N];
  logic [31:0]  ret_data [N];

  logic [31:0]  in_mem [N][1024];
  int           in_wp [N], in_rp [N];
  logic [32:0]  exp_q [N][$];
  int checks = 0, failures = 0, pix_stalls = 0, triangles = 0;
  int read_mode = 0;   // 0 always read, 1 read one clock in eight
  int tx [NT][3], ty [NT][3], tc [NT][3];

  hline_array dut (.clk, .rst_n, .in_write, .in_data, .in_control, .in_full,
                   .ret_exists, .ret_data, .ret_control, .ret_read,
                   .busy, .seg_full_stall(seg_stall), .pix_full_stall(pix_stall));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_write[i]   = (in_wp[i] != in_rp[i]) && !in_full[i];   // no write to a full link
      in_data[i]    = in_mem[i][in_rp[i] % 1024];
      in_control[i] = 1'b0;
      ret_read[i]   = ret_exists[i] && rd_en[i];   // the link may only be read when not empty
    end
  end

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (in_write[i]) in_rp[i] <= in_rp[i] + 1;
      rd_en[i] <= (read_mode == 0) ? 1'b1 : ($urandom_range(0, 7) == 0);
    end
    if (rst_n && pix_stall != '0) pix_stalls++;
  end

  // a word moves on a return link when exists and read are both high
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (ret_exists[i] && ret_read[i]) begin
      logic [32:0] e;
      checks++;
      if (exp_q[i].size() == 0) begin
        failures++; $display("FAIL lane %0d unexpected word %h", i, ret_data[i]);
      end else begin
        e = exp_q[i].pop_front();
        if ({ret_control[i], ret_data[i]} !== e) begin
          failures++;
          $display("FAIL lane %0d got %b %h expected %b %h", i, ret_control[i], ret_data[i], e[32], e[31:0]);
        end
        if (e[32]) triangles++;
      end
    end
  end

  function automatic int send_tri(input int lane, input int t);
    logic [32:0] q[$];
    int x[3], y[3], c[3];
    for (int k = 0; k < 3; k++) begin x[k] = tx[t][k]; y[k] = ty[t][k]; c[k] = tc[t][k]; end
    tri_pixels(x, y, c, q);
    foreach (q[j]) exp_q[lane].push_back(q[j]);
    for (int k = 0; k < 3; k++) begin
      in_mem[lane][in_wp[lane] % 1024] = vword(x[k], y[k], c[k]);
      in_wp[lane] = in_wp[lane] + 1;
    end
    return q.size();
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < N; i++)
      if (busy[i] || in_wp[i] != in_rp[i] || exp_q[i].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic run_set(input int lanes, output longint clocks);
    longint t0;
    int load [N];
    t0 = $time;
    for (int i = 0; i < N; i++) load[i] = 0;
    // like the processor would: each triangle to the lane with the fewest
    // pixels assigned so far
    for (int t = 0; t < NT; t++) begin
      int best = 0;
      for (int i = 1; i < lanes; i++) if (load[i] < load[best]) best = i;
      load[best] += send_tri(best, t);
    end
    @(posedge clk); #1;
    while (!all_done()) begin @(posedge clk); #1; end
    clocks = ($time - t0) / 10;
  endtask

  initial begin
    longint one, four;
    for (int i = 0; i < N; i++) begin in_wp[i] = 0; in_rp[i] = 0; end
    for (int t = 0; t < NT; t++) begin
      int x0, y0;
      x0 = $urandom_range(0, 3000); y0 = $urandom_range(0, 3000);
      for (int k = 0; k < 3; k++) begin
        tx[t][k] = x0 + $urandom_range(0, 80);
        ty[t][k] = y0 + $urandom_range(0, 80);
        tc[t][k] = $urandom_range(0, 255);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    run_set(1, one);
    run_set(N, four);
    $display("32 triangles: %0d clocks on one accelerator, %0d clocks on four", one, four);
    checks++;
    if (four * 3 > one) begin
      failures++; $display("FAIL four accelerators are less than 3 times faster than one");
    end

    read_mode = 1;
    run_set(N, four);
    read_mode = 0;
    checks++;
    if (triangles != 3 * NT) begin failures++; $display("FAIL %0d triangles completed, expected %0d", triangles, 3 * NT); end
    checks++;
    if (pix_stalls == 0) begin failures++; $display("FAIL no lane ever waited for pixel BRAM room"); end
    $display("triangles %0d, clocks with a pixel BRAM wait %0d", triangles, pix_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
