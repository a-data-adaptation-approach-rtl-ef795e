// spf: Segment Pixel Filling, the second stage of the Hline accelerator. It
// reads the segment records written by sed and gives every pixel from xl to
// xr of each segment its Gouraud colour, writing one pixel_t per pixel into
// the pixel BRAM.
//
// How it works: each segment needs one division, the colour step along the
// line inc = ((cr - cl) << 16) / (xr - xl) in Q16.16 (0 for a one-pixel
// segment). N_DIV division lanes, each a div_ip with one segment slot, work
// in parallel (the document's architecture with 10 created dividers). A loader
// reads segments from the segment BRAM into the lanes in round-robin order
// and starts each lane's division; a filler takes the lanes in the same
// order, waits for the lane's division, then emits one pixel per clock,
// colour = round(cl + inc * (x - xl)), while the pixel BRAM has room, and
// frees the lane. Segments therefore leave in the order they came.
// Interface: rd_en / rd_addr with rd_data one clock later, taken only while
// line_avail is high; wr_en / wr_addr / wr_data into the pixel ring buffer,
// only while space_ok is high. The last pixel of a segment with last = 1
// carries last = 1.
// Timing: a lone segment takes 2 clocks to load, 67 to divide, 1 per pixel;
// with several lanes the divisions of later segments overlap the filling.
module spf
  import ar3d_pkg::*;
#(
  parameter int unsigned N_DIV      = 10,
  parameter int unsigned LINE_DEPTH = 128,
  parameter int unsigned PIX_DEPTH  = 1024,
  localparam int unsigned LAW = $clog2(LINE_DEPTH),
  localparam int unsigned PAW = $clog2(PIX_DEPTH),
  localparam int unsigned NW  = (N_DIV > 1) ? $clog2(N_DIV) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // segment BRAM read side
  input  logic           line_avail,
  output logic           rd_en,
  output logic [LAW-1:0] rd_addr,
  input  line_t          rd_data,
  // pixel BRAM write side
  output logic           wr_en,
  output logic [PAW-1:0] wr_addr,
  output pixel_t         wr_data,
  input  logic           space_ok,
  output logic           busy
);

  line_t              lane_rec  [N_DIV];
  logic [N_DIV-1:0]   lane_busy, lane_ready;
  logic [N_DIV-1:0]   dv_start, dv_done;
  logic signed [31:0] dv_q [N_DIV];
  logic signed [31:0] num, den;
  logic [NW-1:0]      lp, fp;      // load and fill lane pointers
  logic               rd_pend;     // rd_data holds a new segment this clock

  assign num = ($signed({24'd0, rd_data.cr}) - $signed({24'd0, rd_data.cl})) <<< FRAC;
  assign den = $signed({20'd0, rd_data.xr}) - $signed({20'd0, rd_data.xl});

  for (genvar i = 0; i < N_DIV; i++) begin : g_lane
    assign dv_start[i] = rd_pend && (lp == NW'(i));
    div_ip #(.W(32)) u_div (
      .clk, .rst_n,
      .start    (dv_start[i]),
      .dividend (num),
      .divisor  (den),
      .busy     (),
      .done     (dv_done[i]),
      .quotient (dv_q[i]),
      .remainder()
    );
  end

  // loader
  assign rd_en = line_avail && !rd_pend && !lane_busy[lp];

  // filler
  line_t              cur;
  logic               filling;
  coord_t             x;
  logic signed [31:0] acc_c, inc;
  assign cur = lane_rec[fp];

  assign wr_en        = filling && space_ok;
  assign wr_data.last = cur.last && (x == cur.xr);
  assign wr_data.y    = cur.y;
  assign wr_data.x    = x;
  assign wr_data.c    = color_t'(q16_round(acc_c));

  assign busy = |lane_busy || rd_pend;

  function automatic logic [NW-1:0] nxt(input logic [NW-1:0] p);
    return (p == NW'(N_DIV - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_rec   <= '{default: '0};
      lane_busy  <= '0;
      lane_ready <= '0;
      lp         <= '0;
      fp         <= '0;
      rd_pend    <= 1'b0;
      rd_addr    <= '0;
      filling    <= 1'b0;
      x          <= '0;
      acc_c      <= '0;
      inc        <= '0;
      wr_addr    <= '0;
    end else begin
      // load a segment into lane lp
      if (rd_en) begin
        rd_pend <= 1'b1;
        rd_addr <= (rd_addr == LAW'(LINE_DEPTH - 1)) ? '0 : rd_addr + 1'b1;
      end
      if (rd_pend) begin
        rd_pend        <= 1'b0;
        lane_rec[lp]   <= rd_data;
        lane_busy[lp]  <= 1'b1;
        lp             <= nxt(lp);
      end
      lane_ready <= lane_ready | dv_done;

      // fill the segment of lane fp
      if (!filling) begin
        if (lane_busy[fp] && (lane_ready[fp] || dv_done[fp])) begin
          filling <= 1'b1;
          x       <= cur.xl;
          acc_c   <= $signed({24'd0, cur.cl}) <<< FRAC;
          inc     <= dv_q[fp];
        end
      end else if (space_ok) begin
        wr_addr <= (wr_addr == PAW'(PIX_DEPTH - 1)) ? '0 : wr_addr + 1'b1;
        if (x == cur.xr) begin
          filling        <= 1'b0;
          lane_busy[fp]  <= 1'b0;
          lane_ready[fp] <= 1'b0;
          fp             <= nxt(fp);
        end else begin
          x     <= x + 1'b1;
          acc_c <= acc_c + inc;
        end
      end
    end
  end

endmodule
