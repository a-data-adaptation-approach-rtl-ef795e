// tb_spf: drives the pixel filling stage from a model of the segment BRAM
// (one-clock read latency) holding the segments of random triangles made by
// the reference model, and compares every pixel written (y, x, colour, last
// flag, ring address) with the reference. space_ok is dropped at random in
// the second half (back-pressure). It also checks that the division lanes
// overlap: with many short segments, several lanes must hold a segment at
// once and the whole batch must take far less than one division time per
// segment.
module tb_spf;
  import ar3d_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int LD = 128, PD = 1024;
  logic line_avail, rd_en, wr_en, space_ok, busy;
  logic [6:0] rd_addr;
  logic [9:0] wr_addr;
  line_t rd_data;
  pixel_t wr_data;
  line_t segmem [LD];
  int seg_cnt = 0, seg_wp = 0;
  logic [32:0] exp_q[$];
  int exp_addr = 0;
  int checks = 0, failures = 0, max_lanes = 0, stall_clocks = 0;
  bit throttle = 0;

  spf #(.N_DIV(10), .LINE_DEPTH(LD), .PIX_DEPTH(PD)) dut (.clk, .rst_n, .line_avail, .rd_en,
    .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .space_ok, .busy);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign line_avail = (seg_cnt != 0);
  always @(posedge clk) begin
    if (rd_en) begin
      rd_data <= segmem[rd_addr];
      seg_cnt <= seg_cnt - 1;
    end
    space_ok <= throttle ? ($urandom_range(0, 2) != 0) : 1'b1;
  end
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.lane_busy) > max_lanes) max_lanes = $countones(dut.lane_busy);
    if (dut.filling && !space_ok) stall_clocks++;
  end

  always @(posedge clk) if (rst_n && wr_en) begin
    logic [32:0] e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected pixel");
    end else begin
      e = exp_q.pop_front();
      if (wr_data !== pixel_t'(e) || int'(wr_addr) != exp_addr) begin
        failures++;
        $display("FAIL pixel got %h @%0d expected %h @%0d", wr_data, wr_addr, e, exp_addr);
      end
    end
    exp_addr = (exp_addr + 1) % PD;
  end

  task automatic push_seg(input tb_ref_pkg::ref_line_t l);
    while (seg_cnt == LD) begin @(posedge clk); #1; end
    segmem[seg_wp] = '{last: l.last, y: 12'(l.y), xl: 12'(l.xl), xr: 12'(l.xr),
                       cl: 8'(l.cl), cr: 8'(l.cr)};
    seg_wp = (seg_wp + 1) % LD;
    seg_cnt = seg_cnt + 1;
    line_pixels(l, exp_q);
  endtask

  initial begin
    int t0, t1;
    tb_ref_pkg::ref_line_t ls[$];
    rd_data = '0; space_ok = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // a hand-made segment: 0..4 from colour 0 to 255
    push_seg('{y: 7, xl: 0, xr: 4, cl: 0, cr: 255, last: 1});
    push_seg('{y: 8, xl: 9, xr: 9, cl: 17, cr: 200, last: 1});     // one pixel
    push_seg('{y: 9, xl: 0, xr: 300, cl: 255, cr: 0, last: 0});
    while (busy || exp_q.size() != 0) begin @(posedge clk); #1; end
    // lane overlap: 40 two-pixel segments
    t0 = $time;
    for (int i = 0; i < 40; i++) push_seg('{y: i, xl: 3 * i, xr: 3 * i + 1, cl: i, cr: 255 - i, last: (i == 39)});
    @(posedge clk); #1;
    while (busy || exp_q.size() != 0) begin @(posedge clk); #1; end
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 40 * 67 / 4) begin
      failures++; $display("FAIL 40 segments took %0d clocks, lanes do not overlap", (t1 - t0) / 10);
    end
    checks++;
    if (max_lanes < 10) begin
      failures++; $display("FAIL at most %0d lanes busy at once, expected all 10", max_lanes);
    end
    // random triangles, with back-pressure in the second half
    for (int i = 0; i < 40; i++) begin
      int x[3], y[3], c[3];
      if (i == 20) throttle = 1;
      for (int k = 0; k < 3; k++) begin
        x[k] = $urandom_range(0, 400); y[k] = $urandom_range(0, 60); c[k] = $urandom_range(0, 255);
      end
      ls.delete();
      tri_lines(x, y, c, ls);
      foreach (ls[j]) push_seg(ls[j]);
    end
    while (busy || exp_q.size() != 0 || seg_cnt != 0) begin @(posedge clk); #1; end
    checks++;
    if (stall_clocks == 0) begin failures++; $display("FAIL back-pressure never stalled"); end
    $display("max lanes busy %0d, stall clocks %0d", max_lanes, stall_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
