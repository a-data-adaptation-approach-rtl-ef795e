// raster_zone: a rasterisation zone (Z3, and Z2 in its raster configuration):
// an input FIFO followed by the Dessine-Poly block, which is the Hline
// triangle-fill accelerator. Vertex words {x, y, c} enter the FIFO (in the
// document they come from the barycentre block, whose computation it does not
// give, so here they come straight from the zone's input link); filled pixels
// {y, x, c} leave on the output link, the last pixel of each triangle with the
// control bit set. The FIFO lets the zone's feeder and the filler run at
// their own pace, as the document's zone FIFOs do.
// Interface: FSL master side in (in_write / in_data / in_control / in_full),
// FSL master side out (m_write / m_data / m_control / m_full).
module raster_zone #(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned N_DIV      = 10,
  parameter int unsigned LINE_DEPTH = 128,
  parameter int unsigned PIX_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_write,
  input  logic [31:0] in_data,
  input  logic        in_control,
  output logic        in_full,
  output logic        m_write,
  output logic [31:0] m_data,
  output logic        m_control,
  input  logic        m_full,
  output logic        busy,
  output logic        seg_full_stall,
  output logic        pix_full_stall
);

  logic        f_exists, f_control, f_read, hl_busy;
  logic [31:0] f_data;

  fsl_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .m_write   (in_write),
    .m_data    (in_data),
    .m_control (in_control),
    .m_full    (in_full),
    .s_exists  (f_exists),
    .s_data    (f_data),
    .s_control (f_control),
    .s_read    (f_read),
    .count     ()
  );

  hline_accel #(.N_DIV(N_DIV), .LINE_DEPTH(LINE_DEPTH), .PIX_DEPTH(PIX_DEPTH)) u_dp (
    .clk, .rst_n,
    .s_exists  (f_exists),
    .s_data    (f_data),
    .s_control (f_control),
    .s_read    (f_read),
    .m_write, .m_data, .m_control, .m_full,
    .busy      (hl_busy),
    .seg_full_stall,
    .pix_full_stall
  );

  assign busy = hl_busy || f_exists;

endmodule
