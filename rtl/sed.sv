// sed: Segment Extremity Determination, the first stage of the Hline (triangle
// fill) accelerator. For one Gouraud-shaded triangle it finds, on every
// horizontal screen line the triangle covers, the x of the left and right
// edges and the colour there, and writes one line_t record per line into the
// segment BRAM.
//
// How it works:
//   LOAD   take three vertex words {x, y, c} from the input stream
//   SORT   order the vertices by y: A top, B middle, C bottom
//   DIV    start six div_ip dividers in parallel: the x step per line and the
//          colour step per line of sides AC, AB and BC, in Q16.16
//          (dx << 16) / dy and (dc << 16) / dy  (the document's equation (3)
//          for the colour; its 6 parallel created dividers of Table 3)
//   WALK   from y = yA to y = yC, one record per clock while the BRAM has
//          room: side AC gives one extremity, side AB (y < yB) or BC
//          (y >= yB) the other; both are stepped by adding the slopes, and
//          rounded to the nearest pixel when written. The smaller x is the
//          left end. The last record of a triangle has last = 1.
// Interface: vertices on in_valid / in_data / in_ready (a word moves when both
// are high); records on wr_en / wr_addr / wr_data into a ring buffer of
// DEPTH entries, wr_en only while space_ok is high. busy is high from the
// first vertex to the last record.
// Timing: 3 clocks load, 1 sort, 67 clocks division, then one record per
// clock: 71 + (yC - yA + 1) clocks per triangle without back-pressure.
// The document writes the side as y = ax + b with a = dy/dx; since segments
// are horizontal lines, this design steps x per line (dx/dy) instead. Vertex
// sorting, rounding and the ring buffer are this design's choices.
module sed
  import ar3d_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  vertex_t           in_data,
  output logic              in_ready,
  output logic              wr_en,
  output logic [AW-1:0]     wr_addr,
  output line_t             wr_data,
  input  logic              space_ok,
  output logic              busy
);

  typedef enum logic [2:0] {S_LOAD, S_SORT, S_DIV, S_WAIT, S_WALK} state_e;
  state_e state;

  vertex_t v [3];
  vertex_t a, b, c;
  logic [1:0] nload;

  // division lanes: 0 dxAC, 1 dxAB, 2 dxBC, 3 dcAC, 4 dcAB, 5 dcBC
  logic               dv_start;
  logic signed [31:0] dv_num [6];
  logic signed [31:0] dv_den [6];
  logic signed [31:0] dv_q   [6];
  logic [5:0]         dv_done, dv_got;

  for (genvar i = 0; i < 6; i++) begin : g_div
    div_ip #(.W(32)) u_div (
      .clk, .rst_n,
      .start    (dv_start),
      .dividend (dv_num[i]),
      .divisor  (dv_den[i]),
      .busy     (),
      .done     (dv_done[i]),
      .quotient (dv_q[i]),
      .remainder()
    );
  end

  function automatic logic signed [31:0] dq(input logic [11:0] hi, input logic [11:0] lo);
    return ($signed({20'd0, hi}) - $signed({20'd0, lo})) <<< FRAC;
  endfunction
  function automatic logic signed [31:0] dd(input logic [11:0] hi, input logic [11:0] lo);
    return $signed({20'd0, hi}) - $signed({20'd0, lo});
  endfunction

  always_comb begin
    dv_num[0] = dq(c.x, a.x);                  dv_den[0] = dd(c.y, a.y);
    dv_num[1] = dq(b.x, a.x);                  dv_den[1] = dd(b.y, a.y);
    dv_num[2] = dq(c.x, b.x);                  dv_den[2] = dd(c.y, b.y);
    dv_num[3] = dq(12'(c.c), 12'(a.c));        dv_den[3] = dd(c.y, a.y);
    dv_num[4] = dq(12'(b.c), 12'(a.c));        dv_den[4] = dd(b.y, a.y);
    dv_num[5] = dq(12'(c.c), 12'(b.c));        dv_den[5] = dd(c.y, b.y);
  end

  // slopes and accumulators, Q16.16
  logic signed [31:0] s_xl, s_cl;            // long side AC slopes
  logic signed [31:0] s_xab, s_cab, s_xbc, s_cbc;
  logic signed [31:0] acc_xl, acc_cl, acc_xs, acc_cs;
  coord_t             y;

  // sorting network on the loaded vertices (stable: ties keep load order)
  vertex_t s0, s1, s2, t0, t1;
  always_comb begin
    {s0, s1} = (v[1].y < v[0].y) ? {v[1], v[0]} : {v[0], v[1]};
    {t1, s2} = (v[2].y < s1.y)   ? {v[2], s1}   : {s1, v[2]};
    {t0, s1} = (t1.y < s0.y)     ? {t1, s0}     : {s0, t1};
  end

  // current record
  logic signed [31:0] xl_i, xs_i, cl_i, cs_i;
  logic               swap;
  always_comb begin
    xl_i = q16_round(acc_xl);
    xs_i = q16_round(acc_xs);
    cl_i = q16_round(acc_cl);
    cs_i = q16_round(acc_cs);
    swap = (xs_i < xl_i);
    wr_data.last = (y == c.y);
    wr_data.y    = y;
    wr_data.xl   = swap ? coord_t'(xs_i) : coord_t'(xl_i);
    wr_data.xr   = swap ? coord_t'(xl_i) : coord_t'(xs_i);
    wr_data.cl   = swap ? color_t'(cs_i) : color_t'(cl_i);
    wr_data.cr   = swap ? color_t'(cl_i) : color_t'(cs_i);
  end

  assign in_ready = (state == S_LOAD);
  assign wr_en    = (state == S_WALK) && space_ok;
  assign busy     = (state != S_LOAD) || (nload != 2'd0);
  assign dv_start = (state == S_DIV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      nload  <= '0;
      v      <= '{default: '0};
      a      <= '0;
      b      <= '0;
      c      <= '0;
      dv_got <= '0;
      s_xl   <= '0; s_cl  <= '0;
      s_xab  <= '0; s_cab <= '0;
      s_xbc  <= '0; s_cbc <= '0;
      acc_xl <= '0; acc_cl <= '0;
      acc_xs <= '0; acc_cs <= '0;
      y      <= '0;
      wr_addr <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          v[nload] <= in_data;
          if (nload == 2'd2) begin
            nload <= '0;
            state <= S_SORT;
          end else begin
            nload <= nload + 1'b1;
          end
        end
        S_SORT: begin
          a <= t0; b <= s1; c <= s2;
          state <= S_DIV;
        end
        S_DIV: begin
          dv_got <= '0;
          state  <= S_WAIT;
        end
        S_WAIT: begin
          if (&(dv_got | dv_done)) begin
            s_xl  <= dv_q[0]; s_xab <= dv_q[1]; s_xbc <= dv_q[2];
            s_cl  <= dv_q[3]; s_cab <= dv_q[4]; s_cbc <= dv_q[5];
            acc_xl <= $signed({20'd0, a.x}) <<< FRAC;
            acc_cl <= $signed({24'd0, a.c}) <<< FRAC;
            // a flat top (yA == yB) starts directly on side BC
            acc_xs <= (a.y == b.y) ? ($signed({20'd0, b.x}) <<< FRAC) : ($signed({20'd0, a.x}) <<< FRAC);
            acc_cs <= (a.y == b.y) ? ($signed({24'd0, b.c}) <<< FRAC) : ($signed({24'd0, a.c}) <<< FRAC);
            y      <= a.y;
            state  <= S_WALK;
          end
          dv_got <= dv_got | dv_done;
        end
        S_WALK: if (space_ok) begin
          wr_addr <= (wr_addr == AW'(DEPTH - 1)) ? '0 : wr_addr + 1'b1;
          if (y == c.y) begin
            state <= S_LOAD;
          end else begin
            y      <= y + 1'b1;
            acc_xl <= acc_xl + s_xl;
            acc_cl <= acc_cl + s_cl;
            if (y + 1'b1 == b.y) begin
              // next line is on side BC: restart the short side at B
              acc_xs <= $signed({20'd0, b.x}) <<< FRAC;
              acc_cs <= $signed({24'd0, b.c}) <<< FRAC;
            end else if (y + 1'b1 > b.y) begin
              acc_xs <= acc_xs + s_xbc;
              acc_cs <= acc_cs + s_cbc;
            end else begin
              acc_xs <= acc_xs + s_xab;
              acc_cs <= acc_cs + s_cab;
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
