// fsl_merge: joins N_IN pixel streams into one FIFO link, the shared output
// FIFO that zones Z2 and Z3 write into. A source, once granted, keeps the
// output until it has sent a word with the control bit set (the last pixel of
// a triangle), so triangles are never interleaved; the grant then moves on
// round-robin. Inputs are FSL slave sides (exists / data / control / read),
// the output is an FSL master side (write / data / control / full).
// The document only says both zones' results go into one FIFO; the
// triangle-atomic round-robin arbitration is this design's choice.
module fsl_merge #(
  parameter int unsigned N_IN = 2,
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  s_exists,
  input  logic [31:0]      s_data    [N_IN],
  input  logic [N_IN-1:0]  s_control,
  output logic [N_IN-1:0]  s_read,
  output logic             m_write,
  output logic [31:0]      m_data,
  output logic             m_control,
  input  logic             m_full,
  output logic             switched     // pulses when the grant moves to another source
);

  logic [IW-1:0] sel, nsel;
  logic          locked;

  // next requesting source after sel, round-robin
  always_comb begin
    nsel = sel;
    for (int k = N_IN; k >= 1; k--) begin
      if (s_exists[(int'(sel) + k) % N_IN]) nsel = IW'((int'(sel) + k) % N_IN);
    end
  end

  assign m_write   = s_exists[sel] && !m_full;
  assign m_data    = s_data[sel];
  assign m_control = s_control[sel];
  always_comb begin
    s_read = '0;
    s_read[sel] = m_write;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= '0;
      locked   <= 1'b0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (m_write) begin
        locked <= !s_control[sel];
      end else if (!locked && !s_exists[sel] && nsel != sel) begin
        sel      <= nsel;
        switched <= 1'b1;
      end
      if (m_write && s_control[sel] && nsel != sel) begin
        sel      <= nsel;
        switched <= 1'b1;
      end
    end
  end

endmodule
