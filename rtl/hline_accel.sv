// hline_accel: the Hline (triangle fill, "Dessine-Poly") accelerator, the
// black box of the document's Hline architecture:
//   FSL in -> SED -> segment BRAM -> SPF -> pixel BRAM -> FSL out
// The processor sends each triangle as three vertex words {x, y, c} on the
// input link. sed finds the two extremities and their colours on every line
// and stores them in the segment BRAM; spf reads them back, computes the
// colour of every pixel between them and stores {y, x, c} in the pixel BRAM;
// a sender moves the pixel BRAM contents out on the output link, one word per
// clock, with the control bit set on the last pixel of each triangle.
// Both BRAMs are used as ring buffers with occupancy counters, so the three
// stages run concurrently and a stage waits (back-pressure) when the BRAM
// after it is full or the output link is full. The two BRAMs, the SED / SPF
// split and the FSL links follow the document; the ring-buffer use and the
// word formats are this design's choices.
// Interface: FSL slave side for input (s_exists, s_data, s_control, s_read)
// and FSL master side for output (m_write, m_data, m_control, m_full).
// Status: busy while any triangle is in flight; seg_full_stall and
// pix_full_stall pulse when a stage waits for room in the BRAM after it.
module hline_accel
  import ar3d_pkg::*;
#(
  parameter int unsigned N_DIV      = 10,
  parameter int unsigned LINE_DEPTH = 128,
  parameter int unsigned PIX_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // FSL input link (slave side)
  input  logic        s_exists,
  input  logic [31:0] s_data,
  input  logic        s_control,
  output logic        s_read,
  // FSL output link (master side)
  output logic        m_write,
  output logic [31:0] m_data,
  output logic        m_control,
  input  logic        m_full,
  // status
  output logic        busy,
  output logic        seg_full_stall,
  output logic        pix_full_stall
);

  localparam int unsigned LAW = $clog2(LINE_DEPTH);
  localparam int unsigned PAW = $clog2(PIX_DEPTH);

  // ---------------- SED and segment BRAM ----------------
  logic           sed_in_ready, sed_wr, sed_busy, seg_space;
  logic [LAW-1:0] sed_waddr;
  line_t          sed_wdata;
  logic           spf_rd, spf_busy, seg_avail;
  logic [LAW-1:0] spf_raddr;
  logic [LINE_W-1:0] seg_rdata;
  logic [LAW:0]   seg_cnt;

  assign s_read = s_exists && sed_in_ready;

  sed #(.DEPTH(LINE_DEPTH)) u_sed (
    .clk, .rst_n,
    .in_valid (s_exists),
    .in_data  (vertex_t'(s_data)),
    .in_ready (sed_in_ready),
    .wr_en    (sed_wr),
    .wr_addr  (sed_waddr),
    .wr_data  (sed_wdata),
    .space_ok (seg_space),
    .busy     (sed_busy)
  );

  dp_bram #(.WIDTH(LINE_W), .DEPTH(LINE_DEPTH)) u_seg_bram (
    .clk,
    .wr_en   (sed_wr),
    .wr_addr (sed_waddr),
    .wr_data (sed_wdata),
    .rd_en   (spf_rd),
    .rd_addr (spf_raddr),
    .rd_data (seg_rdata)
  );

  assign seg_space = (seg_cnt != (LAW+1)'(LINE_DEPTH));
  assign seg_avail = (seg_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seg_cnt <= '0;
    else        seg_cnt <= seg_cnt + (LAW+1)'(sed_wr) - (LAW+1)'(spf_rd);
  end

  // ---------------- SPF and pixel BRAM ----------------
  logic           spf_wr, pix_space, snd_rd, pix_avail;
  logic [PAW-1:0] spf_waddr, snd_raddr;
  pixel_t         spf_wdata;
  logic [PIXEL_W-1:0] pix_rdata;
  logic [PAW:0]   pix_cnt;

  spf #(.N_DIV(N_DIV), .LINE_DEPTH(LINE_DEPTH), .PIX_DEPTH(PIX_DEPTH)) u_spf (
    .clk, .rst_n,
    .line_avail (seg_avail),
    .rd_en      (spf_rd),
    .rd_addr    (spf_raddr),
    .rd_data    (line_t'(seg_rdata)),
    .wr_en      (spf_wr),
    .wr_addr    (spf_waddr),
    .wr_data    (spf_wdata),
    .space_ok   (pix_space),
    .busy       (spf_busy)
  );

  dp_bram #(.WIDTH(PIXEL_W), .DEPTH(PIX_DEPTH)) u_pix_bram (
    .clk,
    .wr_en   (spf_wr),
    .wr_addr (spf_waddr),
    .wr_data (spf_wdata),
    .rd_en   (snd_rd),
    .rd_addr (snd_raddr),
    .rd_data (pix_rdata)
  );

  assign pix_space = (pix_cnt != (PAW+1)'(PIX_DEPTH));
  assign pix_avail = (pix_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pix_cnt <= '0;
    else        pix_cnt <= pix_cnt + (PAW+1)'(spf_wr) - (PAW+1)'(snd_rd);
  end

  // ---------------- sender: pixel BRAM -> FSL out ----------------
  // A read is issued only when the output register is free or drains in the
  // same clock, so no word is ever lost to m_full.
  logic   out_valid;
  pixel_t out_pix;

  assign snd_rd = pix_avail && (!out_valid || !m_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snd_raddr <= '0;
      out_valid <= 1'b0;
    end else begin
      if (snd_rd) snd_raddr <= (snd_raddr == PAW'(PIX_DEPTH - 1)) ? '0 : snd_raddr + 1'b1;
      if (snd_rd)              out_valid <= 1'b1;
      else if (!m_full)        out_valid <= 1'b0;
    end
  end

  assign out_pix   = pixel_t'(pix_rdata);
  assign m_write   = out_valid && !m_full;
  assign m_data    = {out_pix.y, out_pix.x, out_pix.c};
  assign m_control = out_pix.last;

  assign busy           = sed_busy || spf_busy || seg_avail || pix_avail || out_valid;
  assign seg_full_stall = sed_wr == 1'b0 && sed_busy && !seg_space;
  assign pix_full_stall = !pix_space && spf_busy;

  // unused: the control bit of the input words carries no meaning here
  logic unused_ctrl;
  assign unused_ctrl = s_control;

endmodule
