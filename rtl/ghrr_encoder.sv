// GHRR encoder: binds a sequence of input symbols into one GHRR hypervector.
//
// Each dimension j of a GHRR hypervector is an M x M unitary matrix. For a
// sequence of L inputs, input t supplies M phases theta_{t,j,k} per
// dimension. The complex exponential stage turns them into
// diag(e^{i*theta}), the per-dimension unitary transform Q_j (held in the
// transform memory) is applied to give U_{t,j} = Q_j * diag(e^{i*theta_{t,j}}),
// and binding is the ordered matrix product
//     H_j = U_{0,j} * U_{1,j} * ... * U_{L-1,j}.
// Because matrix products do not commute, the order of the inputs is encoded
// without any permutation. The output is the flattened hypervector: one word
// of M*M complex numbers (row-major, interleaved real/imaginary) per
// dimension, streamed to the inference block's query buffer.
//
// The architecture fixes the unitary transform, the complex exponential
// stage and the pipelined complex multiply-accumulate; the order of the
// product (Q_j on the left of the diagonal), the dimension-major input order
// (all L inputs of dimension j, then dimension j+1) and the fixed-point
// format are this design's choices.
//
// Interface: the transform memory is written one dimension word at a time
// through tm_*. start_i (while idle) latches seq_len_i and dim_i and begins a
// sequence; in_* is a valid/ready stream of phase words (phase k in bits
// [k*PH_W +: PH_W]), accepted at one per clock. Timing: the result for
// dimension j appears on out_* three clocks after its last input is
// accepted; done_o pulses with the last dimension's output. There is no
// output back-pressure: the consumer must always accept.
module ghrr_encoder
  import ghrr_pkg::*;
#(
  parameter int unsigned MM     = M,
  parameter int unsigned DIMS   = DIM,
  parameter int unsigned LMAX   = SEQ_MAX,
  parameter int unsigned DIM_AW = $clog2(DIMS),
  parameter int unsigned L_W    = $clog2(LMAX + 1)
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // transform memory write port
  input  logic                  tm_we_i,
  input  logic [DIM_AW-1:0]     tm_addr_i,
  input  cplx_t [MM*MM-1:0]     tm_wdata_i,
  // control
  input  logic                  start_i,
  input  logic [L_W-1:0]        seq_len_i,
  input  logic [DIM_AW:0]       dim_i,
  output logic                  busy_o,
  output logic                  done_o,
  // phase input stream
  input  logic                  in_valid_i,
  output logic                  in_ready_o,
  input  logic [MM*PH_W-1:0]    in_phase_i,
  // flattened hypervector output
  output logic                  out_valid_o,
  output logic [DIM_AW-1:0]     out_idx_o,
  output cplx_t [MM*MM-1:0]     out_data_o
);

  typedef cplx_t [MM*MM-1:0] mat_t;
  localparam int unsigned SW = 2 * DW + 2 + $clog2(MM + 1);

  // ---------------------------------------------------------------- control
  logic [L_W-1:0]    seq_len_q, t_q;
  logic [DIM_AW:0]   dim_q;
  logic [DIM_AW-1:0] j_q;
  logic              feeding_q;       // still accepting inputs
  logic              accept;

  assign in_ready_o = feeding_q;
  assign accept     = in_valid_i & feeding_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      seq_len_q <= '0;
      dim_q     <= '0;
      t_q       <= '0;
      j_q       <= '0;
      feeding_q <= 1'b0;
    end else if (start_i && !feeding_q) begin
      seq_len_q <= seq_len_i;
      dim_q     <= dim_i;
      t_q       <= '0;
      j_q       <= '0;
      feeding_q <= (seq_len_i != '0) && (dim_i != '0);
    end else if (accept) begin
      if (t_q == seq_len_q - 1'b1) begin
        t_q <= '0;
        if ({1'b0, j_q} == dim_q - 1'b1) begin
          j_q       <= '0;
          feeding_q <= 1'b0;
        end else begin
          j_q <= j_q + 1'b1;
        end
      end else begin
        t_q <= t_q + 1'b1;
      end
    end
  end

  // ------------------------------------------------ stage 1: ROM and memory
  mat_t tm_mem [DIMS];
  mat_t q1_q;
  cplx_t [MM-1:0] e1;
  logic v1_q, first1_q, last1_q, end1_q;
  logic [DIM_AW-1:0] j1_q;

  always_ff @(posedge clk_i) begin
    if (tm_we_i) tm_mem[tm_addr_i] <= tm_wdata_i;
    if (accept)  q1_q <= tm_mem[j_q];
  end

  for (genvar k = 0; k < MM; k++) begin : g_exp
    ghrr_cexp #(.PW(PH_W)) u_cexp (
      .clk_i   (clk_i),
      .en_i    (accept),
      .phase_i (in_phase_i[k*PH_W +: PH_W]),
      .out_o   (e1[k])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      v1_q <= 1'b0; first1_q <= 1'b0; last1_q <= 1'b0; end1_q <= 1'b0; j1_q <= '0;
    end else begin
      v1_q <= accept;
      if (accept) begin
        first1_q <= (t_q == '0);
        last1_q  <= (t_q == seq_len_q - 1'b1);
        end1_q   <= (t_q == seq_len_q - 1'b1) && ({1'b0, j_q} == dim_q - 1'b1);
        j1_q     <= j_q;
      end
    end
  end

  // ------------------------------ stage 2: U = Q_j * diag(e^{i*theta})
  mat_t u_d, u2_q;
  logic v2_q, first2_q, last2_q, end2_q;
  logic [DIM_AW-1:0] j2_q;

  always_comb begin
    for (int i = 0; i < MM; i++)
      for (int k = 0; k < MM; k++)
        u_d[i*MM+k] = cmul(q1_q[i*MM+k], e1[k]);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      v2_q <= 1'b0; first2_q <= 1'b0; last2_q <= 1'b0; end2_q <= 1'b0; j2_q <= '0;
      u2_q <= '0;
    end else begin
      v2_q <= v1_q;
      if (v1_q) begin
        u2_q     <= u_d;
        first2_q <= first1_q;
        last2_q  <= last1_q;
        end2_q   <= end1_q;
        j2_q     <= j1_q;
      end
    end
  end

  // ------------------- stage 3: binding accumulator R <- R * U (complex MAC)
  mat_t r_q, r_d;
  logic signed [SW-1:0] acc_re, acc_im;

  always_comb begin
    for (int i = 0; i < MM; i++) begin
      for (int k = 0; k < MM; k++) begin
        acc_re = SW'(1 << (FRAC - 1));
        acc_im = SW'(1 << (FRAC - 1));
        for (int l = 0; l < MM; l++) begin
          acc_re = acc_re + SW'(cmul_re_full(r_q[i*MM+l], u2_q[l*MM+k]));
          acc_im = acc_im + SW'(cmul_im_full(r_q[i*MM+l], u2_q[l*MM+k]));
        end
        r_d[i*MM+k].re = DW'(acc_re >>> FRAC);
        r_d[i*MM+k].im = DW'(acc_im >>> FRAC);
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      r_q         <= '0;
      out_valid_o <= 1'b0;
      out_idx_o   <= '0;
      out_data_o  <= '0;
      done_o      <= 1'b0;
    end else begin
      out_valid_o <= v2_q && last2_q;
      done_o      <= v2_q && end2_q;
      if (v2_q) begin
        r_q <= first2_q ? u2_q : r_d;
        if (last2_q) begin
          out_idx_o  <= j2_q;
          out_data_o <= first2_q ? u2_q : r_d;
        end
      end
    end
  end

  assign busy_o = feeding_q | v1_q | v2_q;

endmodule
