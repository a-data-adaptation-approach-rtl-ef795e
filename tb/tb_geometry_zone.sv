// tb_geometry_zone: sends a stream of commands to a geometry zone (matrix
// loads, vertex transforms, triangle normals, in random order) on its input
// link, with random gaps, and holds the output link full at random. Every
// answer word (data and control bit) must match the reference models of
// tb_geo_pkg, in order. A stray data word with no command must be dropped
// and counted.
module tb_geometry_zone;
  import tb_geo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_exists, s_control, s_read, m_write, m_control, m_full, busy;
  logic [31:0] s_data, m_data;
  logic [15:0] bad_words;
  logic [32:0] in_mem [8192];
  int in_wp = 0, in_rp = 0;
  logic [32:0] in_q[$], ans[$];
  int checks = 0, failures = 0, n_tf = 0, n_nm = 0;
  bit gap;

  geometry_zone dut (.clk, .rst_n, .s_exists, .s_data, .s_control, .s_read, .m_write, .m_data,
                     .m_control, .m_full, .busy, .bad_words);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign s_exists = (in_wp != in_rp) && !gap;
  assign {s_control, s_data} = in_mem[in_rp % 8192];
  always @(posedge clk) begin
    if (s_read) in_rp <= in_rp + 1;
    gap    <= ($urandom_range(0, 4) == 0);
    m_full <= ($urandom_range(0, 3) == 0);
  end

  always @(posedge clk) if (rst_n && m_write) begin
    logic [32:0] e;
    checks++;
    if (ans.size() == 0) begin failures++; $display("FAIL unexpected answer %h", m_data); end
    else begin
      e = ans.pop_front();
      if ({m_control, m_data} !== e) begin
        failures++; $display("FAIL answer got %b %h expected %b %h", m_control, m_data, e[32], e[31:0]);
      end
    end
  end

  task automatic flush();
    foreach (in_q[i]) begin in_mem[in_wp % 8192] = in_q[i]; in_wp++; end
    in_q.delete();
  endtask

  initial begin
    int m[16], p[9];
    gap = 0; m_full = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // stray data word first
    in_q.push_back({1'b0, 32'hdead_beef});
    rand_matrix(m);
    cmd_matrix(m, in_q);
    for (int i = 0; i < 80; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r == 0) begin rand_matrix(m); cmd_matrix(m, in_q); end
      else if (r < 6) begin
        cmd_transform(m, $signed($urandom) >>> 8, $signed($urandom) >>> 8, $signed($urandom) >>> 8, in_q, ans);
        n_tf++;
      end else begin rand_tri(p); cmd_normal(p, in_q, ans); n_nm++; end
      if (i % 10 == 0) flush();
    end
    flush();
    while (busy || in_wp != in_rp || ans.size() != 0) begin @(posedge clk); #1; end
    checks++;
    if (bad_words != 16'd1) begin failures++; $display("FAIL bad_words %0d expected 1", bad_words); end
    $display("transforms %0d normals %0d", n_tf, n_nm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
