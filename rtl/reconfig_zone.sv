// reconfig_zone: the partially reconfigurable zone Z2. It holds either a
// geometry configuration (Normal + Transform, like Z1) or a raster
// configuration (FIFO + Dessine-Poly, like Z3). Whatever the configuration,
// the zone keeps the same input link and the same output FIFO, as the document
// requires of a reconfigurable zone.
// Partial reconfiguration is modelled at the register-transfer level: both
// configurations are present, and only the loaded one (cfg) sees the input
// and drives the output FIFO; the other is held in reset. A request for the
// other configuration (cfg_req != cfg) stops the zone taking input as soon as
// the loaded configuration is between commands (geometry) or between
// triangles (raster); once it is idle and its output FIFO is empty, cfg
// switches and
// the newly loaded one starts from reset (reconfiguring is high meanwhile and
// reconf_done pulses on the switch). Where the output goes depends on cfg:
// back to the processor for geometry, to the shared pixel FIFO for raster;
// the top does that routing.
// The swap condition and the reset on load are this design's choices; the
// bitstream loading itself is outside the RTL.
module reconfig_zone
  import ar3d_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned OUT_DEPTH  = 16,
  parameter int unsigned N_DIV      = 10,
  parameter int unsigned LINE_DEPTH = 128,
  parameter int unsigned PIX_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  z2_cfg_e     cfg_req,
  output z2_cfg_e     cfg,
  output logic        reconfiguring,
  output logic        reconf_done,
  // input link (slave side of the processor's FSL)
  input  logic        s_exists,
  input  logic [31:0] s_data,
  input  logic        s_control,
  output logic        s_read,
  // output FIFO (slave side)
  output logic        o_exists,
  output logic [31:0] o_data,
  output logic        o_control,
  input  logic        o_read,
  output logic        busy
);

  logic geo_rst_n, ras_rst_n, swap_rst;
  logic geo_busy, ras_busy, geo_sread, ras_full;
  logic geo_mw, geo_mc, ras_mw, ras_mc, of_full;
  logic [31:0] geo_md, ras_md;
  logic [15:0] geo_bad;
  logic [$clog2(OUT_DEPTH):0] of_cnt;

  assign reconfiguring = (cfg_req != cfg);
  assign geo_rst_n = rst_n && !swap_rst && (cfg == Z2_GEOMETRY);
  assign ras_rst_n = rst_n && !swap_rst && (cfg == Z2_RASTER);

  logic active_busy, take;
  assign active_busy = (cfg == Z2_GEOMETRY) ? geo_busy : ras_busy;
  // input is taken unless a switch is pending and the loaded configuration
  // sits between commands / triangles (so no command is cut in two)
  assign take = (!reconfiguring || active_busy) && !swap_rst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= Z2_GEOMETRY;
      swap_rst    <= 1'b0;
      reconf_done <= 1'b0;
    end else begin
      swap_rst    <= 1'b0;
      reconf_done <= 1'b0;
      if (reconfiguring && !active_busy && of_cnt == '0 && !swap_rst) begin
        cfg         <= cfg_req;
        swap_rst    <= 1'b1;
        reconf_done <= 1'b1;
      end
    end
  end

  geometry_zone u_geo (
    .clk, .rst_n (geo_rst_n),
    .s_exists  (s_exists && take && cfg == Z2_GEOMETRY),
    .s_data, .s_control,
    .s_read    (geo_sread),
    .m_write   (geo_mw),
    .m_data    (geo_md),
    .m_control (geo_mc),
    .m_full    (of_full),
    .busy      (geo_busy),
    .bad_words (geo_bad)
  );

  raster_zone #(.FIFO_DEPTH(FIFO_DEPTH), .N_DIV(N_DIV), .LINE_DEPTH(LINE_DEPTH),
                .PIX_DEPTH(PIX_DEPTH)) u_ras (
    .clk, .rst_n (ras_rst_n),
    .in_write   (s_exists && !ras_full && take && cfg == Z2_RASTER),
    .in_data    (s_data),
    .in_control (s_control),
    .in_full    (ras_full),
    .m_write    (ras_mw),
    .m_data     (ras_md),
    .m_control  (ras_mc),
    .m_full     (of_full),
    .busy       (ras_busy),
    .seg_full_stall (),
    .pix_full_stall ()
  );

  assign s_read = (cfg == Z2_GEOMETRY) ? geo_sread
                                       : (s_exists && !ras_full && take);

  fsl_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .m_write   ((cfg == Z2_GEOMETRY) ? geo_mw : ras_mw),
    .m_data    ((cfg == Z2_GEOMETRY) ? geo_md : ras_md),
    .m_control ((cfg == Z2_GEOMETRY) ? geo_mc : ras_mc),
    .m_full    (of_full),
    .s_exists  (o_exists),
    .s_data    (o_data),
    .s_control (o_control),
    .s_read    (o_read),
    .count     (of_cnt)
  );

  assign busy = active_busy || o_exists;

  logic [15:0] unused_bad;
  assign unused_bad = geo_bad;

endmodule
