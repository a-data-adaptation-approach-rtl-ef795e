// tb_raster_zone: writes vertex words of random triangles into a raster
// zone's input FIFO (respecting in_full) and checks the pixel stream that
// leaves it against the reference model, with random output back-pressure.
// The input FIFO must fill up at least once (the writer outpaces the filler).
module tb_raster_zone;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_write, in_control, in_full, m_write, m_control, m_full, busy, ss, ps;
  logic [31:0] in_data, m_data;
  logic [32:0] exp_q[$];
  logic [31:0] in_q[$];
  int checks = 0, failures = 0, fulls = 0, triangles = 0;

  raster_zone dut (.clk, .rst_n, .in_write, .in_data, .in_control, .in_full, .m_write, .m_data,
                   .m_control, .m_full, .busy, .seg_full_stall(ss), .pix_full_stall(ps));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    m_full <= ($urandom_range(0, 3) == 0);
    if (rst_n && in_full) fulls++;
  end

  always @(posedge clk) if (rst_n && m_write) begin
    logic [32:0] e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected pixel"); end
    else begin
      e = exp_q.pop_front();
      if ({m_control, m_data} !== e) begin failures++; $display("FAIL got %h expected %h", {m_control, m_data}, e); end
      if (e[32]) triangles++;
    end
  end

  initial begin
    in_write = 0; in_data = 0; in_control = 0; m_full = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      int x[3], y[3], c[3];
      for (int k = 0; k < 3; k++) begin
        x[k] = $urandom_range(0, 200); y[k] = $urandom_range(0, 50); c[k] = $urandom_range(0, 255);
        in_q.push_back(vword(x[k], y[k], c[k]));
      end
      tri_pixels(x, y, c, exp_q);
    end
    while (in_q.size() != 0) begin
      in_write = !in_full; in_data = in_q[0];
      @(posedge clk);
      #1 if (in_write) void'(in_q.pop_front());
    end
    in_write = 0;
    while (busy || exp_q.size() != 0) begin @(posedge clk); #1; end
    checks++;
    if (triangles != 30) begin failures++; $display("FAIL %0d triangles", triangles); end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL input FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
