// Reciprocal square root unit used by the inference block's runtime
// normalisation.
//
// For an unsigned squared norm n it returns r = floor(2**RF / floor(sqrt(n))),
// the reciprocal factor that scales a dot product to a magnitude-invariant
// similarity. It is a small sequential unit: a digit-by-digit integer square
// root (two bits of n per clock) followed by a restoring division of 2**RF by
// the root (one quotient bit per clock). A zero input returns the largest
// representable factor. The architecture only states that norms are
// accumulated at runtime and applied through reciprocal factors; this
// iterative form and the RF scaling are this design's choices.
//
// Interface and timing: pulse start_i with n_i while busy_o is low; done_o
// pulses NW/2 + RF + 2 clocks later with r_o valid, and r_o holds until the
// next start.
module ghrr_rsqrt #(
  parameter int unsigned NW = 48,
  parameter int unsigned RF = 40
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            start_i,
  input  logic [NW-1:0]   n_i,
  output logic            busy_o,
  output logic            done_o,
  output logic [RF:0]     r_o
);

  localparam int unsigned HW  = (NW + 1) / 2;     // root width
  localparam int unsigned CW  = $clog2(RF + 2);

  typedef enum logic [1:0] {IDLE, SQRT, DIV} state_e;
  state_e state_q;

  logic [2*HW-1:0] n_q;
  logic [HW+1:0]   rem_s;     // square-root remainder
  logic [HW-1:0]   root_q;
  logic [HW:0]     rem_d;     // division remainder
  logic [RF:0]     quo_q;
  logic [CW-1:0]   cnt_q;

  // square-root step
  logic [HW+1:0] s_rem, s_trial;
  always_comb begin
    s_rem   = {rem_s[HW-1:0], n_q[2*HW-1 -: 2]};
    s_trial = {root_q, 2'b01};
  end

  // division step: dividend 2**RF, so bit RF is the only one set
  logic [HW:0] d_rem;
  always_comb begin
    d_rem = {rem_d[HW-1:0], (cnt_q == CW'(RF))};
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE;
      n_q     <= '0;
      rem_s   <= '0;
      root_q  <= '0;
      rem_d   <= '0;
      quo_q   <= '0;
      cnt_q   <= '0;
      r_o     <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        IDLE: if (start_i) begin
          n_q     <= (2*HW)'(n_i);
          rem_s   <= '0;
          root_q  <= '0;
          cnt_q   <= CW'(HW - 1);
          state_q <= SQRT;
        end
        SQRT: begin
          if (s_rem >= s_trial) begin
            rem_s  <= s_rem - s_trial;
            root_q <= {root_q[HW-2:0], 1'b1};
          end else begin
            rem_s  <= s_rem;
            root_q <= {root_q[HW-2:0], 1'b0};
          end
          n_q <= {n_q[2*HW-3:0], 2'b00};
          if (cnt_q == '0) begin
            cnt_q   <= CW'(RF);
            rem_d   <= '0;
            quo_q   <= '0;
            state_q <= DIV;
          end else begin
            cnt_q <= cnt_q - 1'b1;
          end
        end
        DIV: begin
          if (root_q == '0) begin
            r_o     <= '1;
            done_o  <= 1'b1;
            state_q <= IDLE;
          end else begin
            if (d_rem >= {1'b0, root_q}) begin
              rem_d <= d_rem - {1'b0, root_q};
              quo_q <= {quo_q[RF-1:0], 1'b1};
            end else begin
              rem_d <= d_rem;
              quo_q <= {quo_q[RF-1:0], 1'b0};
            end
            if (cnt_q == '0) begin
              r_o     <= {quo_q[RF-1:0], (d_rem >= {1'b0, root_q})};
              done_o  <= 1'b1;
              state_q <= IDLE;
            end else begin
              cnt_q <= cnt_q - 1'b1;
            end
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != IDLE);

endmodule
