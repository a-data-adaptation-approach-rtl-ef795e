// dp_bram: simple dual-port block RAM, one write port (A) and one read port
// (B) on the same clock, as the FPGA block RAMs the accelerator stores its
// segment and pixel data in. The read is synchronous: rd_data holds the word
// at rd_addr one clock after rd_en. A read of an address written in the same
// cycle returns the old word. The document names dual-port BRAMs; the port
// split (write on A, read on B) is this design's choice. The contents are not
// reset, as in a real block RAM; readers only read what has been written.
module dp_bram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
