// geometry_zone: a geometry-shader zone (Z1, and Z2 in its geometry
// configuration) holding one Normal and one Transform block behind a single
// FSL link pair to the processor.
// Command stream on the input link: a header word with the control bit set,
// data[1:0] = geo_cmd_e, followed by data words with the control bit clear:
//   CMD_LOAD_MATRIX  16 matrix entries (Q16.16, row major), no answer
//   CMD_TRANSFORM    x, y, z (Q16.16)      -> answers x', y', z', w'
//   CMD_NORMAL       ax ay az bx by bz cx cy cz (signed 16-bit in data[15:0])
//                                          -> answers nx, ny, nz (Q2.14)
// The answer words leave on the output link, one per clock while it is not
// full, the last with the control bit set. A data word arriving with no
// command pending is dropped and counted in bad_words.
// The pairing of Normal and Transform in one zone on one FSL link follows
// the document's Figure 8; the command encoding is this design's choice.
module geometry_zone
  import ar3d_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // FSL input link (slave side)
  input  logic        s_exists,
  input  logic [31:0] s_data,
  input  logic        s_control,
  output logic        s_read,
  // FSL output link (master side)
  output logic        m_write,
  output logic [31:0] m_data,
  output logic        m_control,
  input  logic        m_full,
  output logic        busy,
  output logic [15:0] bad_words
);

  typedef enum logic [2:0] {G_HDR, G_MAT, G_VTX, G_TRI, G_RUN, G_SEND} state_e;
  state_e state;

  logic [3:0]         idx;
  logic               is_normal;
  logic signed [31:0] vtx [3];
  logic signed [15:0] tri_p [9];
  logic signed [31:0] outw [4];
  logic [2:0]         out_n, out_i;

  logic               tf_load, tf_start, tf_done, nm_start, nm_done;
  logic signed [31:0] tf_res [4];
  logic signed [31:0] nm_res [3];

  transform_unit u_transform (
    .clk, .rst_n,
    .load_en   (tf_load),
    .load_data (s_data),
    .start     (tf_start),
    .vx        (vtx[0]),
    .vy        (vtx[1]),
    .vz        (vtx[2]),
    .busy      (),
    .done      (tf_done),
    .res       (tf_res)
  );

  normal_unit u_normal (
    .clk, .rst_n,
    .start (nm_start),
    .p     (tri_p),
    .busy  (),
    .done  (nm_done),
    .n     (nm_res)
  );

  // the input is consumed in every state that waits for input words
  assign s_read   = s_exists && (state == G_HDR || state == G_MAT || state == G_VTX || state == G_TRI);
  assign tf_load  = s_read && (state == G_MAT) && !s_control;
  assign tf_start = (state == G_RUN) && !is_normal && (idx == 4'd0);
  assign nm_start = (state == G_RUN) &&  is_normal && (idx == 4'd0);

  assign m_write   = (state == G_SEND) && !m_full;
  assign m_data    = outw[out_i[1:0]];
  assign m_control = (out_i == out_n - 1'b1);
  assign busy      = (state != G_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= G_HDR;
      idx       <= '0;
      is_normal <= 1'b0;
      vtx       <= '{default: '0};
      tri_p     <= '{default: '0};
      outw      <= '{default: '0};
      out_n     <= '0;
      out_i     <= '0;
      bad_words <= '0;
    end else begin
      unique case (state)
        G_HDR: if (s_exists) begin
          idx <= '0;
          if (!s_control) begin
            bad_words <= bad_words + 1'b1;
          end else begin
            unique case (geo_cmd_e'(s_data[1:0]))
              CMD_LOAD_MATRIX: state <= G_MAT;
              CMD_TRANSFORM:   state <= G_VTX;
              CMD_NORMAL:      state <= G_TRI;
              default:         bad_words <= bad_words + 1'b1;
            endcase
          end
        end
        G_MAT: if (s_exists) begin
          idx <= idx + 1'b1;
          if (idx == 4'd15) state <= G_HDR;
        end
        G_VTX: if (s_exists) begin
          vtx[idx[1:0]] <= s_data;
          idx <= idx + 1'b1;
          if (idx == 4'd2) begin
            is_normal <= 1'b0;
            idx       <= '0;
            state     <= G_RUN;
          end
        end
        G_TRI: if (s_exists) begin
          tri_p[idx] <= s_data[15:0];
          idx <= idx + 1'b1;
          if (idx == 4'd8) begin
            is_normal <= 1'b1;
            idx       <= '0;
            state     <= G_RUN;
          end
        end
        G_RUN: begin
          idx <= 4'd1;   // start issued once
          if (tf_done && !is_normal) begin
            outw  <= tf_res;
            out_n <= 3'd4;
            out_i <= '0;
            state <= G_SEND;
          end else if (nm_done && is_normal) begin
            outw  <= '{nm_res[0], nm_res[1], nm_res[2], 32'sd0};
            out_n <= 3'd3;
            out_i <= '0;
            state <= G_SEND;
          end
        end
        G_SEND: if (!m_full) begin
          out_i <= out_i + 1'b1;
          if (out_i == out_n - 1'b1) state <= G_HDR;
        end
        default: state <= G_HDR;
      endcase
    end
  end

endmodule
