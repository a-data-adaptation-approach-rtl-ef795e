// tb_hline_accel: end-to-end test of the Hline accelerator at its default
// sizes. Triangles are written as vertex words on the input link; every word
// on the output link must be the next pixel of the reference model ({y, x, c}
// with the control bit on the last pixel of each triangle). Covered cases:
// a triangle taller than the segment BRAM (SED must wait for room), a long
// run with the output link held full (the pixel BRAM fills and SPF must
// wait), random triangles with random output back-pressure.
module tb_hline_accel;
  import ar3d_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_exists, s_control, s_read, m_write, m_control, m_full, busy, seg_stall, pix_stall;
  logic [31:0] s_data, m_data;
  logic [31:0] in_mem [4096];
  int in_wp = 0, in_rp = 0;
  logic [32:0] exp_q[$];
  int checks = 0, failures = 0, seg_stalls = 0, pix_stalls = 0, triangles = 0;
  int full_mode = 0;   // 0 never full, 1 random, 2 held full

  hline_accel dut (.clk, .rst_n, .s_exists, .s_data, .s_control, .s_read, .m_write, .m_data,
                   .m_control, .m_full, .busy, .seg_full_stall(seg_stall), .pix_full_stall(pix_stall));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign s_exists  = (in_wp != in_rp);
  assign s_data    = in_mem[in_rp % 4096];
  assign s_control = 1'b0;
  always @(posedge clk) begin
    if (s_read) in_rp <= in_rp + 1;
    m_full <= (full_mode == 2) ? 1'b1 : (full_mode == 1) ? ($urandom_range(0, 3) == 0) : 1'b0;
    if (rst_n && seg_stall) seg_stalls++;
    if (rst_n && pix_stall) pix_stalls++;
  end

  always @(posedge clk) if (rst_n && m_write) begin
    logic [32:0] e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output %h", m_data);
    end else begin
      e = exp_q.pop_front();
      if ({m_control, m_data} !== e) begin
        failures++; $display("FAIL output got %b %h expected %b %h", m_control, m_data, e[32], e[31:0]);
      end
      if (e[32]) triangles++;
    end
  end

  task automatic send_tri(input int x[3], input int y[3], input int c[3]);
    tri_pixels(x, y, c, exp_q);
    for (int k = 0; k < 3; k++) begin
      in_mem[in_wp % 4096] = vword(x[k], y[k], c[k]);
      in_wp = in_wp + 1;
    end
  endtask

  task automatic drain();
    while (busy || in_wp != in_rp || exp_q.size() != 0) begin @(posedge clk); #1; end
  endtask

  initial begin
    m_full = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    send_tri('{20, 10, 40}, '{5, 25, 30}, '{0, 100, 255});
    drain();
    // taller than the 128-entry segment BRAM
    send_tri('{100, 0, 300}, '{0, 200, 399}, '{255, 0, 128});
    drain();
    // output held full while a large triangle is filled
    full_mode = 2;
    send_tri('{0, 200, 60}, '{0, 10, 40}, '{10, 250, 130});
    repeat (3000) @(posedge clk);
    #1 full_mode = 0;
    drain();
    // random triangles, random output back-pressure, several queued at once
    full_mode = 1;
    for (int i = 0; i < 40; i++) begin
      int x[3], y[3], c[3], x0, y0;
      x0 = $urandom_range(0, 3900); y0 = $urandom_range(0, 3900);
      for (int k = 0; k < 3; k++) begin
        x[k] = x0 + $urandom_range(0, 150); y[k] = y0 + $urandom_range(0, 120);
        c[k] = $urandom_range(0, 255);
      end
      send_tri(x, y, c);
      if (i % 4 == 3) drain();
    end
    drain();
    checks++;
    if (triangles != 43) begin failures++; $display("FAIL %0d triangles completed, expected 43", triangles); end
    checks++;
    if (seg_stalls == 0) begin failures++; $display("FAIL SED never waited for segment BRAM room"); end
    checks++;
    if (pix_stalls == 0) begin failures++; $display("FAIL SPF never waited for pixel BRAM room"); end
    $display("triangles %0d, SED stall clocks %0d, SPF stall clocks %0d", triangles, seg_stalls, pix_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
