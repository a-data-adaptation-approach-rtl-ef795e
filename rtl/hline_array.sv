// hline_array: the static multi-accelerator configuration, in which the
// processor drives N_HLINE Hline (triangle fill) accelerators in parallel,
// each on its own pair of FSL links. The processor spreads the triangles of a
// frame over the accelerators and collects the pixels from each return link.
// How it works: every lane is a raster_zone (input link FIFO followed by the
// Hline accelerator: SED, segment BRAM, SPF, pixel BRAM) whose output link
// feeds a return FIFO that the processor reads. The lanes share nothing but
// the clock and reset, so N_HLINE lanes fill up to N_HLINE triangles at once.
// Interface, per lane i (all arrays indexed 0..N_HLINE-1):
//   in_write / in_data / in_control / in_full      processor -> lane, master
//                                                   side of the input link;
//                                                   three vertex words
//                                                   {x, y, c} per triangle
//   ret_exists / ret_data / ret_control / ret_read lane -> processor, slave
//                                                   side of the return link;
//                                                   pixel words {y, x, c},
//                                                   control bit on the last
//                                                   pixel of a triangle
//   busy, seg_full_stall, pix_full_stall           lane status
// Timing: each lane has the timing of hline_accel (first pixel about 140
// clocks after the third vertex, then close to one pixel per clock); lanes
// run independently.
// The number of accelerators (4) and their parallel use on FSL links follow
// the document's static architecture and its four-block measurement; giving
// each accelerator its own link pair, with no interconnect between them, is
// this design's choice.
module hline_array #(
  parameter int unsigned N_HLINE    = 4,
  parameter int unsigned FSL_DEPTH  = 16,
  parameter int unsigned N_DIV      = 10,
  parameter int unsigned LINE_DEPTH = 128,
  parameter int unsigned PIX_DEPTH  = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_HLINE-1:0]  in_write,
  input  logic [31:0]         in_data [N_HLINE],
  input  logic [N_HLINE-1:0]  in_control,
  output logic [N_HLINE-1:0]  in_full,
  output logic [N_HLINE-1:0]  ret_exists,
  output logic [31:0]         ret_data [N_HLINE],
  output logic [N_HLINE-1:0]  ret_control,
  input  logic [N_HLINE-1:0]  ret_read,
  output logic [N_HLINE-1:0]  busy,
  output logic [N_HLINE-1:0]  seg_full_stall,
  output logic [N_HLINE-1:0]  pix_full_stall
);

  for (genvar i = 0; i < N_HLINE; i++) begin : g_lane
    logic        o_write, o_control, o_full, zone_busy;
    logic [31:0] o_data;

    raster_zone #(.FIFO_DEPTH(FSL_DEPTH), .N_DIV(N_DIV), .LINE_DEPTH(LINE_DEPTH),
                  .PIX_DEPTH(PIX_DEPTH)) u_zone (
      .clk, .rst_n,
      .in_write       (in_write[i]),
      .in_data        (in_data[i]),
      .in_control     (in_control[i]),
      .in_full        (in_full[i]),
      .m_write        (o_write),
      .m_data         (o_data),
      .m_control      (o_control),
      .m_full         (o_full),
      .busy           (zone_busy),
      .seg_full_stall (seg_full_stall[i]),
      .pix_full_stall (pix_full_stall[i])
    );

    fsl_fifo #(.WIDTH(32), .DEPTH(FSL_DEPTH)) u_ret (
      .clk, .rst_n,
      .m_write   (o_write),
      .m_data    (o_data),
      .m_control (o_control),
      .m_full    (o_full),
      .s_exists  (ret_exists[i]),
      .s_data    (ret_data[i]),
      .s_control (ret_control[i]),
      .s_read    (ret_read[i]),
      .count     ()
    );

    assign busy[i] = zone_busy || ret_exists[i];
  end

endmodule
