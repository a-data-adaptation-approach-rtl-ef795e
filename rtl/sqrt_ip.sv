// sqrt_ip: 32-bit unsigned integer square root, digit by digit (two radicand
// bits per iteration, one root bit per iteration, 16 iterations), organised as
// the document's square-root IP state machine:
//   IDLE        wait for start, capture the radicand
//   NB_IT       iteration counter; iteration 1 takes the short branch
//   PREP_COEF   bring the next two radicand bits down into the remainder
//   DIFF_1      first iteration: trial value is 1
//   PREP_VAR    later iterations: trial value (root << 2) | 1
//   DIFF_2      compare / subtract, shift the root bit in; after the 16th
//               iteration go to FIN
//   FIN         result valid (done high), back to IDLE
// The state names and the iteration limits (branch at nb_it < 2, end at
// nb_it = 16) follow the document; the arithmetic in each state is this
// design's reading of them.
// Timing: done rises on the 64th rising edge counting the one that samples
// start (3 clocks for iteration 1, 4 for each of iterations 2..16, 1 for FIN),
// matching the document's 64-clock figure. root/rem hold until next start.
module sqrt_ip (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] radicand,
  output logic        busy,
  output logic        done,
  output logic [15:0] root,
  output logic [16:0] rem
);

  typedef enum logic [2:0] {IDLE, NB_IT, PREP_COEF, DIFF_1, PREP_VAR, DIFF_2, FIN} state_e;
  state_e state;

  logic [31:0] rad;     // radicand, shifted left two bits per iteration
  logic [17:0] r;       // partial remainder
  logic [17:0] trial;
  logic [15:0] q;       // partial root
  logic [4:0]  nb_it;

  logic [18:0] diff;
  assign diff = {1'b0, r} - {1'b0, trial};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      rad   <= '0;
      r     <= '0;
      trial <= '0;
      q     <= '0;
      nb_it <= '0;
      root  <= '0;
      rem   <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start) begin
            rad   <= radicand;
            r     <= '0;
            q     <= '0;
            nb_it <= '0;
            state <= NB_IT;
          end
        end
        NB_IT: begin
          nb_it <= nb_it + 1'b1;
          state <= PREP_COEF;
        end
        PREP_COEF: begin
          r     <= {r[15:0], rad[31:30]};
          rad   <= {rad[29:0], 2'b00};
          state <= (nb_it < 5'd2) ? DIFF_1 : PREP_VAR;
        end
        DIFF_1: begin
          // trial value is 1 while the root is still empty
          if (r != '0) begin
            r <= r - 18'd1;
            q <= 16'd1;
          end else begin
            q <= 16'd0;
          end
          state <= NB_IT;
        end
        PREP_VAR: begin
          trial <= {q, 2'b01};
          state <= DIFF_2;
        end
        DIFF_2: begin
          if (!diff[18]) begin
            r <= diff[17:0];
            q <= {q[14:0], 1'b1};
          end else begin
            q <= {q[14:0], 1'b0};
          end
          state <= (nb_it == 5'd16) ? FIN : NB_IT;
        end
        FIN: begin
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (state == DIFF_2 && nb_it == 5'd16) begin
        root <= diff[18] ? {q[14:0], 1'b0} : {q[14:0], 1'b1};
        rem  <= diff[18] ? r[16:0] : diff[16:0];
      end
    end
  end

  assign busy = (state != IDLE);
  assign done = (state == FIN);

endmodule
