// tb_reconfig_zone: takes the reconfigurable zone through
//   geometry work -> switch to raster -> raster work -> switch to geometry
// with the switch requested while work is still in flight, and the next
// configuration's words already waiting on the input link. Checks: every
// answer and pixel matches the reference models; a switch happens only after
// all earlier output has been read; two switches happen; a freshly loaded
// geometry configuration starts with a cleared matrix (a transform before any
// matrix load answers zeros).
module tb_reconfig_zone;
  import ar3d_pkg::*;
  import tb_ref_pkg::*;
  import tb_geo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  z2_cfg_e cfg_req, cfg;
  logic reconfiguring, reconf_done, s_exists, s_control, s_read, o_exists, o_control, o_read, busy;
  logic [31:0] s_data, o_data;
  logic [32:0] in_mem [8192];
  int in_wp = 0, in_rp = 0;
  logic [32:0] in_q[$], ans[$], rq[$];
  int checks = 0, failures = 0, switches = 0;

  reconfig_zone dut (.clk, .rst_n, .cfg_req, .cfg, .reconfiguring, .reconf_done, .s_exists, .s_data,
                     .s_control, .s_read, .o_exists, .o_data, .o_control, .o_read, .busy);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign s_exists = (in_wp != in_rp);
  assign {s_control, s_data} = in_mem[in_rp % 8192];
  always @(posedge clk) begin
    if (s_read) in_rp <= in_rp + 1;
  end
  // reader of the output FIFO
  always @(negedge clk) o_read = o_exists && ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && o_read) begin
    logic [32:0] e;
    checks++;
    if (ans.size() == 0) begin failures++; $display("FAIL unexpected output %h", o_data); end
    else begin
      e = ans.pop_front();
      if ({o_control, o_data} !== e) begin failures++; $display("FAIL t=%0t got %h expected %h left %0d", $time, {o_control, o_data}, e, ans.size()); end
    end
  end
  always @(posedge clk) if (rst_n && reconf_done) begin
    switches++;
    checks++;
    if (ans.size() != 0) begin failures++; $display("FAIL switched with %0d words unread", ans.size()); end
  end

  task automatic flush();
    foreach (in_q[i]) begin in_mem[in_wp % 8192] = in_q[i]; in_wp++; end
    in_q.delete();
  endtask

  initial begin
    int m[16], p[9], zero[16];
    zero = '{default: 0};
    cfg_req = Z2_GEOMETRY;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // geometry work
    rand_matrix(m); cmd_matrix(m, in_q);
    for (int i = 0; i < 6; i++) begin
      cmd_transform(m, $signed($urandom) >>> 8, $signed($urandom) >>> 8, $signed($urandom) >>> 8, in_q, ans);
      rand_tri(p); cmd_normal(p, in_q, ans);
    end
    flush();
    // request the switch once the last command has been taken, while it runs
    while (in_wp != in_rp) begin @(posedge clk); #1; end
    cfg_req = Z2_RASTER;
    // raster work queued behind the switch
    for (int i = 0; i < 8; i++) begin
      int x[3], y[3], c[3];
      automatic logic [32:0] px[$];
      for (int k = 0; k < 3; k++) begin
        x[k] = $urandom_range(0, 300); y[k] = $urandom_range(0, 40); c[k] = $urandom_range(0, 255);
        in_q.push_back({1'b0, vword(x[k], y[k], c[k])});
      end
      tri_pixels(x, y, c, px);
      foreach (px[j]) rq.push_back(px[j]);
    end
    checks++;
    #1;
    if (!reconfiguring || !busy) begin failures++; $display("FAIL switch not pending behind running work"); end
    while (cfg != Z2_RASTER) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    foreach (rq[j]) ans.push_back(rq[j]);
    flush();
    while (busy || in_wp != in_rp || ans.size() != 0) begin @(posedge clk); #1; end
    // back to geometry: first transform must see a cleared matrix
    cfg_req = Z2_GEOMETRY;
    while (cfg != Z2_GEOMETRY) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cmd_transform(zero, 32'sh0001_0000, 32'sh0002_0000, 32'sh0003_0000, in_q, ans);
    rand_matrix(m); cmd_matrix(m, in_q);
    cmd_transform(m, 32'sh0001_0000, 32'sh0002_0000, 32'sh0003_0000, in_q, ans);
    flush();
    while (busy || in_wp != in_rp || ans.size() != 0 || cfg != Z2_GEOMETRY) begin @(posedge clk); #1; end
    checks++;
    if (switches != 2) begin failures++; $display("FAIL %0d switches, expected 2", switches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
