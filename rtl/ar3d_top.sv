// ar3d_top: the partially reconfigurable 3D accelerator architecture with its
// three hardware zones around the soft processor (which is outside this RTL;
// its FSL links are the ports of this module):
//   Z1  permanent geometry zone: Normal #1 + Transform #1, on FSL link 1
//   Z2  reconfigurable zone: geometry (Normal #2 + Transform #2) or raster
//       (FIFO + Dessine-Poly #2), on FSL link 2, selected by z2_cfg_req
//   Z3  permanent raster zone: FIFO + Dessine-Poly #1 (the Hline
//       accelerator), on FSL link 3
// Raster results of Z3, and of Z2 when it is raster-configured, go through
// fsl_merge into one shared pixel FIFO, which a second processor (or a small
// controller) empties towards the VGA controller: its read side is a port.
// Geometry results of Z1, and of Z2 when geometry-configured, go back to the
// processor on return FSL links.
// Each processor-to-zone link is a DEPTH-16 fsl_fifo: the processor side is
// a master port (write / data / control / full). Each return link is a
// slave port (exists / data / control / read).
// Zone roles and the data paths follow the document's Figure 8; link depths,
// word formats and the merge arbitration are this design's choices.
// The barycentre stage in front of each Dessine-Poly block is not built (its
// computation is not given): the vertex words written on links 2 and 3 go
// straight into the raster zones' FIFOs.
// Beside the zoned architecture stands the static configuration measured in
// the document before it: N_HLINE = 4 Hline accelerators (hline_array), each
// on its own processor link pair (hl_* ports). The two share only clock and
// reset; a system uses one or the other.
module ar3d_top
  import ar3d_pkg::*;
#(
  parameter int unsigned FSL_DEPTH  = 16,
  parameter int unsigned OUT_DEPTH  = 64,
  parameter int unsigned N_DIV      = 10,
  parameter int unsigned LINE_DEPTH = 128,
  parameter int unsigned PIX_DEPTH  = 1024,
  parameter int unsigned N_HLINE    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor -> zone links 1..3 (master side), index 0 = link 1
  input  logic [2:0]  fsl_m_write,
  input  logic [31:0] fsl_m_data [3],
  input  logic [2:0]  fsl_m_control,
  output logic [2:0]  fsl_m_full,
  // zone -> processor return links of Z1 (index 0) and Z2 (index 1)
  output logic [1:0]  ret_s_exists,
  output logic [31:0] ret_s_data [2],
  output logic [1:0]  ret_s_control,
  input  logic [1:0]  ret_s_read,
  // Z2 configuration
  input  z2_cfg_e     z2_cfg_req,
  output z2_cfg_e     z2_cfg,
  output logic        z2_reconfiguring,
  output logic        z2_reconf_done,
  // shared pixel FIFO, read side (towards the VGA controller)
  output logic        pix_exists,
  output logic [31:0] pix_data,
  output logic        pix_last,
  input  logic        pix_read,
  // status
  output logic [2:0]  zone_busy,
  output logic        merge_switched,
  output logic        z3_seg_stall,
  output logic        z3_pix_stall,
  output logic [15:0] z1_bad_words,
  // static configuration: N_HLINE Hline accelerators, one link pair each
  input  logic [N_HLINE-1:0] hl_in_write,
  input  logic [31:0]        hl_in_data [N_HLINE],
  input  logic [N_HLINE-1:0] hl_in_control,
  output logic [N_HLINE-1:0] hl_in_full,
  output logic [N_HLINE-1:0] hl_ret_exists,
  output logic [31:0]        hl_ret_data [N_HLINE],
  output logic [N_HLINE-1:0] hl_ret_control,
  input  logic [N_HLINE-1:0] hl_ret_read,
  output logic [N_HLINE-1:0] hl_busy,
  output logic [N_HLINE-1:0] hl_pix_stall
);

  // ---------------- processor -> zone links ----------------
  logic [2:0]  lk_exists, lk_control, lk_read;
  logic [31:0] lk_data [3];

  for (genvar i = 0; i < 3; i++) begin : g_link
    fsl_fifo #(.WIDTH(32), .DEPTH(FSL_DEPTH)) u_link (
      .clk, .rst_n,
      .m_write   (fsl_m_write[i]),
      .m_data    (fsl_m_data[i]),
      .m_control (fsl_m_control[i]),
      .m_full    (fsl_m_full[i]),
      .s_exists  (lk_exists[i]),
      .s_data    (lk_data[i]),
      .s_control (lk_control[i]),
      .s_read    (lk_read[i]),
      .count     ()
    );
  end

  // ---------------- Z1: permanent geometry zone ----------------
  logic        z1_mw, z1_mc, z1_full;
  logic [31:0] z1_md;

  geometry_zone u_z1 (
    .clk, .rst_n,
    .s_exists  (lk_exists[0]),
    .s_data    (lk_data[0]),
    .s_control (lk_control[0]),
    .s_read    (lk_read[0]),
    .m_write   (z1_mw),
    .m_data    (z1_md),
    .m_control (z1_mc),
    .m_full    (z1_full),
    .busy      (zone_busy[0]),
    .bad_words (z1_bad_words)
  );

  fsl_fifo #(.WIDTH(32), .DEPTH(FSL_DEPTH)) u_ret1 (
    .clk, .rst_n,
    .m_write   (z1_mw),
    .m_data    (z1_md),
    .m_control (z1_mc),
    .m_full    (z1_full),
    .s_exists  (ret_s_exists[0]),
    .s_data    (ret_s_data[0]),
    .s_control (ret_s_control[0]),
    .s_read    (ret_s_read[0]),
    .count     ()
  );

  // ---------------- Z2: reconfigurable zone ----------------
  logic        z2_exists, z2_control, z2_read;
  logic [31:0] z2_data;

  reconfig_zone #(.FIFO_DEPTH(FSL_DEPTH), .OUT_DEPTH(FSL_DEPTH), .N_DIV(N_DIV),
                  .LINE_DEPTH(LINE_DEPTH), .PIX_DEPTH(PIX_DEPTH)) u_z2 (
    .clk, .rst_n,
    .cfg_req       (z2_cfg_req),
    .cfg           (z2_cfg),
    .reconfiguring (z2_reconfiguring),
    .reconf_done   (z2_reconf_done),
    .s_exists      (lk_exists[1]),
    .s_data        (lk_data[1]),
    .s_control     (lk_control[1]),
    .s_read        (lk_read[1]),
    .o_exists      (z2_exists),
    .o_data        (z2_data),
    .o_control     (z2_control),
    .o_read        (z2_read),
    .busy          (zone_busy[1])
  );

  // geometry results return to the processor, raster results go to the merge
  logic z2_to_merge;
  assign z2_to_merge      = (z2_cfg == Z2_RASTER);
  assign ret_s_exists[1]  = z2_exists && !z2_to_merge;
  assign ret_s_data[1]    = z2_data;
  assign ret_s_control[1] = z2_control;

  // ---------------- Z3: permanent raster zone ----------------
  logic        z3_mw, z3_mc, z3_full;
  logic [31:0] z3_md;
  logic        z3_in_full;

  raster_zone #(.FIFO_DEPTH(FSL_DEPTH), .N_DIV(N_DIV), .LINE_DEPTH(LINE_DEPTH),
                .PIX_DEPTH(PIX_DEPTH)) u_z3 (
    .clk, .rst_n,
    .in_write   (lk_exists[2] && !z3_in_full),
    .in_data    (lk_data[2]),
    .in_control (lk_control[2]),
    .in_full    (z3_in_full),
    .m_write    (z3_mw),
    .m_data     (z3_md),
    .m_control  (z3_mc),
    .m_full     (z3_full),
    .busy       (zone_busy[2]),
    .seg_full_stall (z3_seg_stall),
    .pix_full_stall (z3_pix_stall)
  );
  assign lk_read[2] = lk_exists[2] && !z3_in_full;

  // Z3 output is staged in a link FIFO so the merge sees an FSL slave side
  logic        z3o_exists, z3o_control, z3o_read;
  logic [31:0] z3o_data;

  fsl_fifo #(.WIDTH(32), .DEPTH(FSL_DEPTH)) u_z3_out (
    .clk, .rst_n,
    .m_write   (z3_mw),
    .m_data    (z3_md),
    .m_control (z3_mc),
    .m_full    (z3_full),
    .s_exists  (z3o_exists),
    .s_data    (z3o_data),
    .s_control (z3o_control),
    .s_read    (z3o_read),
    .count     ()
  );

  // ---------------- shared pixel FIFO ----------------
  logic [1:0]  mg_read;
  logic        mg_write, mg_control, pf_full;
  logic [31:0] mg_data;

  fsl_merge #(.N_IN(2)) u_merge (
    .clk, .rst_n,
    .s_exists  ({z2_exists && z2_to_merge, z3o_exists}),
    .s_data    ('{z3o_data, z2_data}),
    .s_control ({z2_control, z3o_control}),
    .s_read    (mg_read),
    .m_write   (mg_write),
    .m_data    (mg_data),
    .m_control (mg_control),
    .m_full    (pf_full),
    .switched  (merge_switched)
  );
  assign z3o_read = mg_read[0];
  assign z2_read  = z2_to_merge ? mg_read[1] : ret_s_read[1];

  fsl_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_pix_fifo (
    .clk, .rst_n,
    .m_write   (mg_write),
    .m_data    (mg_data),
    .m_control (mg_control),
    .m_full    (pf_full),
    .s_exists  (pix_exists),
    .s_data    (pix_data),
    .s_control (pix_last),
    .s_read    (pix_read),
    .count     ()
  );

  // ---------------- static multi-accelerator configuration ----------------
  hline_array #(.N_HLINE(N_HLINE), .FSL_DEPTH(FSL_DEPTH), .N_DIV(N_DIV),
                .LINE_DEPTH(LINE_DEPTH), .PIX_DEPTH(PIX_DEPTH)) u_hl (
    .clk, .rst_n,
    .in_write       (hl_in_write),
    .in_data        (hl_in_data),
    .in_control     (hl_in_control),
    .in_full        (hl_in_full),
    .ret_exists     (hl_ret_exists),
    .ret_data       (hl_ret_data),
    .ret_control    (hl_ret_control),
    .ret_read       (hl_ret_read),
    .busy           (hl_busy),
    .seg_full_stall (),
    .pix_full_stall (hl_pix_stall)
  );

endmodule
