// tb_ar3d_top: end-to-end test of the whole zoned architecture at its default
// sizes (no parameter overrides). Three writer processes play the processor
// on the three input links at once:
//   link 1 -> Z1: matrix loads, transforms and normals (plus one stray word)
//   link 2 -> Z2: geometry commands, then a switch to the raster
//                 configuration and triangles, then a switch back to geometry
//   link 3 -> Z3: triangles, one of them taller than the segment BRAM
// Geometry answers on the return links and pixels on the shared pixel FIFO
// are checked against the reference models. Pixels of Z2 and Z3 triangles lie
// in different screen bands, so the checker can tell which zone a triangle
// came from; each triangle must arrive whole and in order. The pixel reader
// stalls for a while so the back-pressure reaches the accelerators.
// Every mechanism is counted and must occur at least once: link full, stray
// word dropped, Z2 switch (two expected), merge hand-over between zones,
// SED waiting for segment BRAM room, SPF waiting for pixel BRAM room.
// A last phase drives the static configuration beside the zones: 16
// triangles spread over its four Hline accelerators, each checked pixel by
// pixel on its own return link; the four must be busy at the same time and
// one must wait for pixel BRAM room while its return link is held.
module tb_ar3d_top;
  import ar3d_pkg::*;
  import tb_ref_pkg::*;
  import tb_geo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]  fsl_m_write, fsl_m_control, fsl_m_full;
  logic [31:0] fsl_m_data [3];
  logic [1:0]  ret_s_exists, ret_s_control, ret_s_read;
  logic [31:0] ret_s_data [2];
  z2_cfg_e     z2_cfg_req, z2_cfg;
  logic        z2_reconfiguring, z2_reconf_done, pix_exists, pix_last, pix_read;
  logic [31:0] pix_data;
  logic [2:0]  zone_busy;
  logic        merge_switched, z3_seg_stall, z3_pix_stall;
  logic [15:0] z1_bad_words;
  logic [3:0]  hl_in_write, hl_in_control, hl_in_full, hl_ret_exists, hl_ret_control, hl_ret_read;
  logic [3:0]  hl_busy, hl_pix_stall;
  logic [31:0] hl_in_data [4];
  logic [31:0] hl_ret_data [4];

  ar3d_top dut (.*);

  int checks = 0, failures = 0;
  int n_link_full = 0, n_switch = 0, n_merge = 0, n_seg_stall = 0, n_pix_stall = 0;
  int tri_z2 = 0, tri_z3 = 0;
  logic [32:0] ans1[$], ans2[$], pz2[$], pz3[$];
  logic [32:0] w1[$], w2[$], w3[$];
  bit reader_pause = 0;
  logic [32:0] hw [4][$], hp [4][$];
  int n_hl_all_busy = 0, n_hl_pix_stall = 0, tri_hl = 0;
  bit hl_pause = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a broken design floods the log: stop once the verdict is clear
  always @(posedge clk) if (failures >= 1000) begin
    $display("too many failures, stopping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- writers: one word per clock per link when not full ----------------
  always @(negedge clk) begin
    fsl_m_write = '0;
    if (rst_n) begin
      if (w1.size() != 0 && !fsl_m_full[0]) begin fsl_m_write[0] = 1; {fsl_m_control[0], fsl_m_data[0]} = w1[0]; end
      if (w2.size() != 0 && !fsl_m_full[1]) begin fsl_m_write[1] = 1; {fsl_m_control[1], fsl_m_data[1]} = w2[0]; end
      if (w3.size() != 0 && !fsl_m_full[2]) begin fsl_m_write[2] = 1; {fsl_m_control[2], fsl_m_data[2]} = w3[0]; end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < 4; i++) begin
      hl_in_write[i] = rst_n && hw[i].size() != 0 && !hl_in_full[i];
      {hl_in_control[i], hl_in_data[i]} = (hw[i].size() != 0) ? hw[i][0] : 33'd0;
      hl_ret_read[i] = hl_ret_exists[i] && !hl_pause && ($urandom_range(0, 3) != 0);
    end
  end
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (hl_in_write[i]) void'(hw[i].pop_front());
    if (rst_n && hl_busy == 4'hf) n_hl_all_busy++;
    if (rst_n && hl_pix_stall != '0) n_hl_pix_stall++;
    if (fsl_m_write[0]) void'(w1.pop_front());
    if (fsl_m_write[1]) void'(w2.pop_front());
    if (fsl_m_write[2]) void'(w3.pop_front());
    if (rst_n && |fsl_m_full) n_link_full++;
    if (rst_n && z2_reconf_done) n_switch++;
    if (rst_n && merge_switched) n_merge++;
    if (rst_n && z3_seg_stall) n_seg_stall++;
    if (rst_n && z3_pix_stall) n_pix_stall++;
  end

  // ---------------- readers ----------------
  always @(negedge clk) begin
    ret_s_read = ret_s_exists & 2'($urandom_range(0, 3));
    pix_read   = pix_exists && !reader_pause && ($urandom_range(0, 4) != 0);
  end

  task automatic chk(ref logic [32:0] q[$], input logic [32:0] got, input string what);
    logic [32:0] e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL %s: unexpected %h", what, got); return; end
    e = q.pop_front();
    if (got !== e) begin failures++; $display("FAIL %s: got %h expected %h", what, got, e); end
  endtask

  int src = -1;   // zone of the triangle being received: 2 or 3
  always @(posedge clk) if (rst_n) begin
    if (ret_s_read[0]) chk(ans1, {ret_s_control[0], ret_s_data[0]}, "Z1 answer");
    if (ret_s_read[1]) chk(ans2, {ret_s_control[1], ret_s_data[1]}, "Z2 answer");
    for (int i = 0; i < 4; i++) if (hl_ret_read[i]) begin
      checks++;
      if (hp[i].size() == 0) begin
        failures++; $display("FAIL accelerator %0d pixel: unexpected %h", i, hl_ret_data[i]);
      end else if ({hl_ret_control[i], hl_ret_data[i]} !== hp[i][0]) begin
        failures++; $display("FAIL accelerator %0d pixel: got %b %h expected %h", i, hl_ret_control[i], hl_ret_data[i], hp[i][0]);
      end
      if (hp[i].size() != 0) void'(hp[i].pop_front());
      if (hl_ret_control[i]) tri_hl++;
    end
    if (pix_read) begin
      if (src < 0) src = (pix_data[31:20] >= 12'd2000) ? 2 : 3;
      if (src == 2) chk(pz2, {pix_last, pix_data}, "Z2 pixel");
      else          chk(pz3, {pix_last, pix_data}, "Z3 pixel");
      if (pix_last) begin
        if (src == 2) tri_z2++; else tri_z3++;
        src = -1;
      end
    end
  end

  task automatic add_tri(ref logic [32:0] w[$], ref logic [32:0] pq[$], input int x[3], y[3], c[3]);
    tri_pixels(x, y, c, pq);
    for (int k = 0; k < 3; k++) w.push_back({1'b0, vword(x[k], y[k], c[k])});
  endtask

  task automatic rand_tri_band(ref logic [32:0] w[$], ref logic [32:0] pq[$], input int ybase);
    int x[3], y[3], c[3], x0;
    x0 = $urandom_range(0, 3800);
    for (int k = 0; k < 3; k++) begin
      x[k] = x0 + $urandom_range(0, 120); y[k] = ybase + $urandom_range(0, 60); c[k] = $urandom_range(0, 255);
    end
    add_tri(w, pq, x, y, c);
  endtask

  function automatic bit idle();
    return w1.size() == 0 && w2.size() == 0 && w3.size() == 0 && zone_busy == '0 &&
           ans1.size() == 0 && ans2.size() == 0 && pz2.size() == 0 && pz3.size() == 0 &&
           hl_busy == '0 && hw[0].size() == 0 && hw[1].size() == 0 && hw[2].size() == 0 &&
           hw[3].size() == 0 && hp[0].size() == 0 && hp[1].size() == 0 && hp[2].size() == 0 &&
           hp[3].size() == 0;
  endfunction

  initial begin
    int m1[16], m2[16], p[9];
    fsl_m_write = '0; fsl_m_control = '0; fsl_m_data = '{default: 0};
    z2_cfg_req = Z2_GEOMETRY;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // phase 1: Z1 and Z2 geometry, Z3 raster, all at once
    w1.push_back({1'b0, 32'h1234_5678});          // stray word, dropped by Z1
    rand_matrix(m1); cmd_matrix(m1, w1);
    rand_matrix(m2); cmd_matrix(m2, w2);
    for (int i = 0; i < 10; i++) begin
      cmd_transform(m1, $signed($urandom) >>> 8, $signed($urandom) >>> 8, $signed($urandom) >>> 8, w1, ans1);
      rand_tri(p); cmd_normal(p, w1, ans1);
      cmd_transform(m2, $signed($urandom) >>> 8, $signed($urandom) >>> 8, $signed($urandom) >>> 8, w2, ans2);
      rand_tri(p); cmd_normal(p, w2, ans2);
    end
    add_tri(w3, pz3, '{100, 40, 260}, '{0, 180, 299}, '{0, 255, 90});   // 300 lines
    for (int i = 0; i < 6; i++) rand_tri_band(w3, pz3, 0);
    // hold the pixel reader so the back-pressure reaches SPF
    reader_pause = 1;
    repeat (4000) @(posedge clk);
    #1 reader_pause = 0;
    while (!idle()) begin @(posedge clk); #1; end

    // phase 2: Z2 becomes a raster zone; Z2 and Z3 share the pixel FIFO
    z2_cfg_req = Z2_RASTER;
    while (z2_cfg != Z2_RASTER) begin @(posedge clk); #1; end
    for (int i = 0; i < 8; i++) begin
      rand_tri_band(w2, pz2, 2000);
      rand_tri_band(w3, pz3, 100);
    end
    while (!idle()) begin @(posedge clk); #1; end

    // phase 3: back to geometry (matrix must be loaded again)
    z2_cfg_req = Z2_GEOMETRY;
    while (z2_cfg != Z2_GEOMETRY) begin @(posedge clk); #1; end
    rand_matrix(m2); cmd_matrix(m2, w2);
    for (int i = 0; i < 4; i++)
      cmd_transform(m2, $signed($urandom) >>> 8, $signed($urandom) >>> 8, $signed($urandom) >>> 8, w2, ans2);
    while (!idle()) begin @(posedge clk); #1; end

    // phase 4: the static configuration, 16 triangles over the four
    // accelerators, the return links held for a while
    for (int i = 0; i < 16; i++) begin
      automatic logic [32:0] q[$], w[$];
      rand_tri_band(w, q, 500);
      foreach (q[j]) hp[i % 4].push_back(q[j]);
      foreach (w[j]) hw[i % 4].push_back(w[j]);
    end
    hl_pause = 1;
    repeat (3000) @(posedge clk);
    #1 hl_pause = 0;
    while (!idle()) begin @(posedge clk); #1; end
    repeat (5) @(posedge clk);

    checks++; if (z1_bad_words != 16'd1) begin failures++; $display("FAIL stray words %0d", z1_bad_words); end
    checks++; if (tri_z3 != 15) begin failures++; $display("FAIL Z3 triangles %0d expected 15", tri_z3); end
    checks++; if (tri_z2 != 8)  begin failures++; $display("FAIL Z2 triangles %0d expected 8", tri_z2); end
    checks++; if (n_link_full == 0) begin failures++; $display("FAIL no link ever full"); end
    checks++; if (n_switch != 2) begin failures++; $display("FAIL %0d Z2 switches, expected 2", n_switch); end
    checks++; if (n_merge == 0) begin failures++; $display("FAIL merge never handed over"); end
    checks++; if (n_seg_stall == 0) begin failures++; $display("FAIL SED never waited"); end
    checks++; if (n_pix_stall == 0) begin failures++; $display("FAIL SPF never waited"); end
    checks++; if (tri_hl != 16) begin failures++; $display("FAIL static accelerators finished %0d triangles, expected 16", tri_hl); end
    checks++; if (n_hl_all_busy == 0) begin failures++; $display("FAIL the four accelerators never worked at once"); end
    checks++; if (n_hl_pix_stall == 0) begin failures++; $display("FAIL no static accelerator waited for pixel BRAM room"); end
    $display("link-full clocks %0d, Z2 switches %0d, merge hand-overs %0d, SED waits %0d, SPF waits %0d, stray words %0d",
             n_link_full, n_switch, n_merge, n_seg_stall, n_pix_stall, z1_bad_words);
    $display("static configuration: %0d triangles, all four busy %0d clocks, pixel BRAM waits %0d",
             tri_hl, n_hl_all_busy, n_hl_pix_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
