// div_ip: 32-bit signed sequential divider (restoring, one quotient bit per
// two clocks), built as the five-state machine of the document's division IP:
//   IDLE       capture the operands when start is high
//   SIGCALCUL  find the sign of the quotient and of the remainder
//   PRECALCUL  shift the next dividend bit into the partial remainder
//   CALCUL     trial subtraction, one quotient bit; back to PRECALCUL 32 times
//   ENDCALCUL  apply the signs and present the result
// Timing: start is sampled in IDLE; done pulses for one cycle and quotient /
// remainder become valid 67 clocks after the sampling edge (the document's
// 67-clock figure). Results hold until the next start.
// Quotient truncates toward zero and the remainder takes the dividend's sign,
// as a processor division does. Division by zero, which the document does not
// cover, returns quotient 0 and remainder = dividend (this design's choice).
module div_ip #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] dividend,
  input  logic signed [W-1:0] divisor,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quotient,
  output logic signed [W-1:0] remainder
);

  typedef enum logic [2:0] {IDLE, SIGCALCUL, PRECALCUL, CALCUL, ENDCALCUL} state_e;
  state_e state;

  logic signed [W-1:0] a_q, b_q;        // captured operands
  logic [W-1:0]        dvd, dvs;        // magnitudes
  logic [W:0]          rem;             // partial remainder
  logic [W-1:0]        quo;
  logic                neg_q, neg_r, div0;
  logic [$clog2(W+1)-1:0] nb_it;

  logic [W:0] diff;
  assign diff = rem - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      a_q       <= '0;
      b_q       <= '0;
      dvd       <= '0;
      dvs       <= '0;
      rem       <= '0;
      quo       <= '0;
      neg_q     <= 1'b0;
      neg_r     <= 1'b0;
      div0      <= 1'b0;
      nb_it     <= '0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            a_q   <= dividend;
            b_q   <= divisor;
            state <= SIGCALCUL;
          end
        end
        SIGCALCUL: begin
          neg_q <= a_q[W-1] ^ b_q[W-1];
          neg_r <= a_q[W-1];
          div0  <= (b_q == '0);
          dvd   <= a_q[W-1] ? W'(-a_q) : W'(a_q);
          dvs   <= b_q[W-1] ? W'(-b_q) : W'(b_q);
          rem   <= '0;
          quo   <= '0;
          nb_it <= '0;
          state <= PRECALCUL;
        end
        PRECALCUL: begin
          rem   <= {rem[W-1:0], dvd[W-1]};
          dvd   <= {dvd[W-2:0], 1'b0};
          state <= CALCUL;
        end
        CALCUL: begin
          if (!diff[W]) begin
            rem <= diff;
            quo <= {quo[W-2:0], 1'b1};
          end else begin
            quo <= {quo[W-2:0], 1'b0};
          end
          nb_it <= nb_it + 1'b1;
          state <= (nb_it == ($clog2(W+1))'(W - 1)) ? ENDCALCUL : PRECALCUL;
        end
        ENDCALCUL: begin
          if (div0) begin
            quotient  <= '0;
            remainder <= a_q;
          end else begin
            quotient  <= neg_q ? -$signed(quo) : $signed(quo);
            remainder <= neg_r ? -$signed(rem[W-1:0]) : $signed(rem[W-1:0]);
          end
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
