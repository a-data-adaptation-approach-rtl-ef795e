// fsl_fifo: Fast Simplex Link (FSL) style point-to-point FIFO, 32-bit data
// plus one control bit, used for every processor-to-accelerator link and for
// the FIFOs inside the zones. Master side: m_write / m_data / m_control /
// m_full. Slave side: s_exists / s_data / s_control / s_read. The head word is
// presented on s_data while s_exists is high (first-word-fall-through) and is
// removed by s_read. A write while full and a read while empty are ignored
// (and flagged by assertions). Writes and reads in the same cycle are allowed.
// The document only says the links are FSL FIFOs; the depth (16 by default,
// the usual FSL default) and this exact signal set are this design's choice.
module fsl_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // master (writer) side
  input  logic             m_write,
  input  logic [WIDTH-1:0] m_data,
  input  logic             m_control,
  output logic             m_full,
  // slave (reader) side
  output logic             s_exists,
  output logic [WIDTH-1:0] s_data,
  output logic             s_control,
  input  logic             s_read,
  output logic [AW:0]      count
);

  logic [WIDTH:0] mem [DEPTH];
  logic [AW-1:0]  wp, rp;

  logic do_wr, do_rd;
  assign do_wr = m_write && !m_full;
  assign do_rd = s_read && s_exists;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= {m_control, m_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assign m_full    = (count == (AW+1)'(DEPTH));
  assign s_exists  = (count != '0);
  assign {s_control, s_data} = mem[rp];

  // FSL rules: no write into a full link, no read from an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) m_write |-> !m_full)
    else $error("fsl_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) s_read |-> s_exists)
    else $error("fsl_fifo: read while empty");

endmodule
