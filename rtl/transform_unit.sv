// transform_unit: the "Transform" block of the geometry zones. It holds the
// 4x4 transformation matrix (rotation, scale and translation combined by the
// software) and multiplies each vertex by it:
//   [x' y' z' w']^T = M * [x y z 1]^T
// Matrix entries and coordinates are signed Q16.16. One multiply-accumulate
// per clock: 16 clocks per vertex, rows in order, each product taken as a
// 64-bit value and the row sum shifted right by 16 (truncating).
// Interface: load_en / load_data write the matrix, row major, one entry per
// clock (16 words reset the load index); start with x, y, z begins a
// transform, done pulses with the four results valid (held until the next
// start). The document gives the function (multiply each triangle vertex with
// the matrix built by the geometric operations); the fixed-point format and
// the sequential MAC are this design's choices.
module transform_unit (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_en,
  input  logic signed [31:0] load_data,
  input  logic               start,
  input  logic signed [31:0] vx,
  input  logic signed [31:0] vy,
  input  logic signed [31:0] vz,
  output logic               busy,
  output logic               done,
  output logic signed [31:0] res [4]
);

  logic signed [31:0] m [16];
  logic [3:0]         ld_idx;
  logic signed [31:0] v [4];
  logic [1:0]         row, col;
  logic signed [63:0] acc, prod;
  logic               run;

  assign prod = 64'(m[{row, col}]) * 64'(v[col]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m      <= '{default: '0};
      ld_idx <= '0;
      v      <= '{default: '0};
      row    <= '0;
      col    <= '0;
      acc    <= '0;
      run    <= 1'b0;
      done   <= 1'b0;
      res    <= '{default: '0};
    end else begin
      done <= 1'b0;
      if (load_en && !run) begin
        m[ld_idx] <= load_data;
        ld_idx    <= ld_idx + 1'b1;
      end
      if (!run) begin
        if (start) begin
          v   <= '{vx, vy, vz, 32'sh0001_0000};
          row <= '0;
          col <= '0;
          acc <= '0;
          run <= 1'b1;
        end
      end else begin
        col <= col + 1'b1;
        if (col == 2'd3) begin
          res[row] <= 32'((acc + prod) >>> 16);
          acc      <= '0;
          row      <= row + 1'b1;
          if (row == 2'd3) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          acc <= acc + prod;
        end
      end
    end
  end

  assign busy = run;

endmodule
