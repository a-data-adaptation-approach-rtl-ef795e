// normal_unit: the "Normal" block of the geometry zones (the calcnormal step:
// vector product then normalisation). For a triangle A, B, C it computes the
// unit surface normal
//   N = (B - A) x (C - A),   n = N / |N|
// Coordinates are signed 16-bit integers; the result is signed Q2.14
// (16384 = 1.0).
// How it works: the vector product is formed in 40-bit arithmetic (clock 1);
// all three components are then shifted right together until each fits in
// 15 bits (the direction is unchanged), so the sum of squares fits the 32-bit
// sqrt_ip (clock 2..); sqrt_ip gives |N| (64 clocks); three div_ip in
// parallel divide (N_i << 14) by |N| (67 clocks). A degenerate triangle
// (N = 0) gives n = 0.
// Interface: start with the nine coordinates; done pulses with nx, ny, nz
// valid (held until next start). About 150 clocks per triangle.
// The document names the square root and divisions inside the normalisation;
// the scaling, formats and sequencing are this design's choices.
module normal_unit (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [15:0] p [9],     // ax, ay, az, bx, by, bz, cx, cy, cz
  output logic               busy,
  output logic               done,
  output logic signed [31:0] n [3]
);

  typedef enum logic [2:0] {N_IDLE, N_CROSS, N_SCALE, N_SQRT, N_SQWAIT, N_DIV, N_DVWAIT} state_e;
  state_e state;

  logic signed [16:0] u [3], w [3];
  logic signed [39:0] cr [3];
  logic [31:0]        sumsq;
  logic               sq_start, sq_done;
  logic [15:0]        sq_root;
  logic               dv_start;
  logic [2:0]         dv_done, dv_got;
  logic signed [31:0] dv_q [3];

  logic signed [15:0] p_q [9];

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      u[i] = 17'(p_q[3 + i]) - 17'(p_q[i]);
      w[i] = 17'(p_q[6 + i]) - 17'(p_q[i]);
    end
  end

  // components small enough once all three fit in 15 bits plus sign
  logic fits;
  always_comb begin
    fits = 1'b1;
    for (int i = 0; i < 3; i++)
      if (cr[i] > 40'sd16383 || cr[i] < -40'sd16383) fits = 1'b0;
  end

  always_comb begin
    sumsq = '0;
    for (int i = 0; i < 3; i++) sumsq = sumsq + 32'(cr[i] * cr[i]);
  end

  sqrt_ip u_sqrt (
    .clk, .rst_n,
    .start    (sq_start),
    .radicand (sumsq),
    .busy     (),
    .done     (sq_done),
    .root     (sq_root),
    .rem      ()
  );

  for (genvar i = 0; i < 3; i++) begin : g_div
    div_ip #(.W(32)) u_div (
      .clk, .rst_n,
      .start    (dv_start),
      .dividend (32'(cr[i]) <<< 14),
      .divisor  ({16'd0, sq_root}),
      .busy     (),
      .done     (dv_done[i]),
      .quotient (dv_q[i]),
      .remainder()
    );
  end

  assign sq_start = (state == N_SQRT);
  assign dv_start = (state == N_DIV);
  assign busy     = (state != N_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= N_IDLE;
      p_q    <= '{default: '0};
      cr     <= '{default: '0};
      dv_got <= '0;
      done   <= 1'b0;
      n      <= '{default: '0};
    end else begin
      done <= 1'b0;
      unique case (state)
        N_IDLE: if (start) begin
          p_q   <= p;
          state <= N_CROSS;
        end
        N_CROSS: begin
          cr[0] <= 40'(u[1]) * 40'(w[2]) - 40'(u[2]) * 40'(w[1]);
          cr[1] <= 40'(u[2]) * 40'(w[0]) - 40'(u[0]) * 40'(w[2]);
          cr[2] <= 40'(u[0]) * 40'(w[1]) - 40'(u[1]) * 40'(w[0]);
          state <= N_SCALE;
        end
        N_SCALE: begin
          if (fits) begin
            state <= N_SQRT;
          end else begin
            for (int i = 0; i < 3; i++) cr[i] <= cr[i] >>> 1;
          end
        end
        N_SQRT:   state <= N_SQWAIT;
        N_SQWAIT: if (sq_done) state <= N_DIV;
        N_DIV: begin
          dv_got <= '0;
          state  <= N_DVWAIT;
        end
        N_DVWAIT: begin
          dv_got <= dv_got | dv_done;
          if (&(dv_got | dv_done)) begin
            for (int i = 0; i < 3; i++) n[i] <= dv_q[i];
            done  <= 1'b1;
            state <= N_IDLE;
          end
        end
        default: state <= N_IDLE;
      endcase
    end
  end

endmodule
