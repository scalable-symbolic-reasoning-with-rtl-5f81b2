// GHRR inference block: normalised similarity search of one encoded query
// against a codebook, P candidates at a time, with top-1 selection.
//
// Flattening turns GHRR similarity into an ordinary dot product:
//     delta(H1, H2) = Re[flat(H1)^H flat(H2)] / (m*D),
// and with the real and imaginary parts held interleaved, Re[a^H b] is just
// the real dot product sum(a_re*b_re + a_im*b_im). The block keeps two query
// buffers (one written by the encoder while the other is searched) and a
// codebook buffer of P banks, bank p holding classes p, p+P, p+2P, ... in NG
// groups. A search runs one pass per group: each clock it reads one
// dimension word of the query and of all P candidates and accumulates, per
// candidate, the dot product and the squared candidate norm, plus the
// squared query norm. At the end of a pass the sums are copied to a
// snapshot and the next pass starts at once while the normaliser works on
// the snapshot: it forms reciprocal norms 1/|q| and 1/|c_p| with a shared
// ghrr_rsqrt unit, scales each dot product to
//     score_p = dot_p / (|q| |c_p|)          (Q1.14, equal to delta for
//                                              unitary hypervectors)
// and keeps the best class seen so far (strictly greater wins, so ties go to
// the lower class number). Classes at or above ncls_i are ignored.
//
// The P-way parallel dot products, runtime norm accumulation, reciprocal
// scaling, top-1 selection and overlap of accumulation with normalisation
// follow the architecture. Buffer organisation, the group scheme, widths and
// the scaling arithmetic are this design's choices.
//
// Interface: query words are written through qb_* (bank, dimension),
// codebook words through cb_* (class, dimension). start_i (accepted when
// ready_o is high) searches query bank bank_i over dim_i dimensions and
// ncls_i classes. qbuf_free_o pulses when the last pass has read the query
// bank, so the bank may be refilled. res_valid_o pulses with the winning
// class and its score. Timing: a pass takes dim_i clocks plus one; the
// result follows the last pass by about (P+1)*(NW/2+RF+3) clocks. Passes
// stall only when the previous snapshot is still being normalised.
module ghrr_inference
  import ghrr_pkg::*;
#(
  parameter int unsigned MM     = M,
  parameter int unsigned DIMS   = DIM,
  parameter int unsigned PP     = P,
  parameter int unsigned NG     = NGRP,
  parameter int unsigned RF     = 40,
  parameter int unsigned DIM_AW = $clog2(DIMS),
  parameter int unsigned CLS_W  = $clog2(PP * NG + 1),
  parameter int unsigned SC_W   = 32
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  // query buffer write port
  input  logic                     qb_we_i,
  input  logic                     qb_bank_i,
  input  logic [DIM_AW-1:0]        qb_addr_i,
  input  cplx_t [MM*MM-1:0]        qb_wdata_i,
  // codebook buffer write port
  input  logic                     cb_we_i,
  input  logic [CLS_W-1:0]         cb_class_i,
  input  logic [DIM_AW-1:0]        cb_addr_i,
  input  cplx_t [MM*MM-1:0]        cb_wdata_i,
  // search control
  input  logic                     start_i,
  input  logic                     bank_i,
  input  logic [DIM_AW:0]          dim_i,
  input  logic [CLS_W-1:0]         ncls_i,
  output logic                     ready_o,
  output logic                     busy_o,
  output logic                     qbuf_free_o,
  // result
  output logic                     res_valid_o,
  output logic [CLS_W-1:0]         res_class_o,
  output logic signed [SC_W-1:0]   res_score_o
);

  typedef cplx_t [MM*MM-1:0] mat_t;
  localparam int unsigned NTERM = 2 * MM * MM;
  localparam int unsigned NW    = 2 * DW + $clog2(NTERM * DIMS);   // squared norms
  localparam int unsigned AW    = NW + 1;                          // signed dot
  localparam int unsigned GW    = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned PW    = (PP > 1) ? $clog2(PP) : 1;
  localparam int unsigned CBD   = NG * DIMS;

  // ------------------------------------------------------------ buffers
  mat_t qmem [2*DIMS];
  mat_t q_rd;
  mat_t c_rd [PP];
  logic [DIM_AW-1:0] j_q;
  logic [GW-1:0]     g_q;
  logic              bank_q;
  logic              rd_en;

  always_ff @(posedge clk_i) begin
    if (qb_we_i) qmem[int'(qb_bank_i) * DIMS + int'(qb_addr_i)] <= qb_wdata_i;
    if (rd_en)   q_rd <= qmem[int'(bank_q) * DIMS + int'(j_q)];
  end

  for (genvar b = 0; b < PP; b++) begin : g_cb
    mat_t cmem [CBD];
    always_ff @(posedge clk_i) begin
      if (cb_we_i && (int'(cb_class_i) % PP) == b)
        cmem[(int'(cb_class_i) / PP) * DIMS + int'(cb_addr_i)] <= cb_wdata_i;
      if (rd_en)
        c_rd[b] <= cmem[int'(g_q) * DIMS + int'(j_q)];
    end
  end

  // ------------------------------------------------------- pass sequencer
  typedef enum logic [1:0] {P_IDLE, P_RUN, P_DRAIN} pstate_e;
  pstate_e           ps_q;
  logic [DIM_AW:0]   dim_q;
  logic [CLS_W-1:0]  ncls_q;
  logic [GW:0]       ngrp_q;           // groups needed for ncls classes
  logic              snap_busy;        // normaliser still owns the snapshot
  logic              last_j, stall;
  logic              v1_q, first1_q, last1_q, lastg1_q;
  logic [GW-1:0]     g1_q;

  assign last_j  = ({1'b0, j_q} == dim_q - 1'b1);
  // the final read of a pass waits until the snapshot is free
  assign stall   = last_j && (snap_busy || (v1_q && last1_q));
  assign rd_en   = (ps_q == P_RUN) && !stall;
  assign ready_o = (ps_q == P_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ps_q <= P_IDLE; dim_q <= '0; ncls_q <= '0; ngrp_q <= '0;
      j_q <= '0; g_q <= '0; bank_q <= 1'b0; qbuf_free_o <= 1'b0;
      v1_q <= 1'b0; first1_q <= 1'b0; last1_q <= 1'b0; lastg1_q <= 1'b0; g1_q <= '0;
    end else begin
      qbuf_free_o <= 1'b0;
      v1_q <= rd_en;
      if (rd_en) begin
        first1_q <= (j_q == '0);
        last1_q  <= last_j;
        lastg1_q <= ({1'b0, g_q} == ngrp_q - 1'b1);
        g1_q     <= g_q;
      end
      unique case (ps_q)
        P_IDLE: if (start_i && dim_i != '0 && ncls_i != '0) begin
          dim_q  <= dim_i;
          ncls_q <= ncls_i;
          ngrp_q <= (GW+1)'((int'(ncls_i) + PP - 1) / PP);
          bank_q <= bank_i;
          j_q    <= '0;
          g_q    <= '0;
          ps_q   <= P_RUN;
        end
        P_RUN: if (rd_en) begin
          if (last_j) begin
            j_q <= '0;
            if ({1'b0, g_q} == ngrp_q - 1'b1) ps_q <= P_DRAIN;
            else g_q <= g_q + 1'b1;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        P_DRAIN: begin
          qbuf_free_o <= 1'b1;
          ps_q        <= P_IDLE;
        end
        default: ps_q <= P_IDLE;
      endcase
    end
  end

  // -------------------------------------------------- dot / norm accumulate
  logic signed [AW-1:0] dot_q [PP];
  logic        [NW-1:0] nc_q  [PP];
  logic        [NW-1:0] nq_q;
  logic signed [AW-1:0] dot_d [PP];
  logic        [NW-1:0] nc_d  [PP];
  logic        [NW-1:0] nq_d;

  always_comb begin
    nq_d = first1_q ? '0 : nq_q;
    for (int e = 0; e < MM * MM; e++)
      nq_d = nq_d + NW'(q_rd[e].re * q_rd[e].re) + NW'(q_rd[e].im * q_rd[e].im);
    for (int p = 0; p < PP; p++) begin
      dot_d[p] = first1_q ? '0 : dot_q[p];
      nc_d[p]  = first1_q ? '0 : nc_q[p];
      for (int e = 0; e < MM * MM; e++) begin
        dot_d[p] = dot_d[p] + AW'(q_rd[e].re * c_rd[p][e].re) + AW'(q_rd[e].im * c_rd[p][e].im);
        nc_d[p]  = nc_d[p] + NW'(c_rd[p][e].re * c_rd[p][e].re) + NW'(c_rd[p][e].im * c_rd[p][e].im);
      end
    end
  end

  // snapshot handed to the normaliser
  logic signed [AW-1:0] sdot_q [PP];
  logic        [NW-1:0] snc_q  [PP];
  logic        [NW-1:0] snq_q;
  logic [GW-1:0]        sg_q;
  logic                 slast_q;
  logic [CLS_W-1:0]     sncls_q;
  logic                 snap_req;

  assign snap_req = v1_q && last1_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int p = 0; p < PP; p++) begin
        dot_q[p] <= '0; nc_q[p] <= '0; sdot_q[p] <= '0; snc_q[p] <= '0;
      end
      nq_q <= '0; snq_q <= '0; sg_q <= '0; slast_q <= 1'b0; sncls_q <= '0;
    end else if (v1_q) begin
      for (int p = 0; p < PP; p++) begin
        dot_q[p] <= dot_d[p];
        nc_q[p]  <= nc_d[p];
      end
      nq_q <= nq_d;
      if (last1_q) begin
        for (int p = 0; p < PP; p++) begin
          sdot_q[p] <= dot_d[p];
          snc_q[p]  <= nc_d[p];
        end
        snq_q   <= nq_d;
        sg_q    <= g1_q;
        slast_q <= lastg1_q;
        sncls_q <= ncls_q;
      end
    end
  end

  // ------------------------------------------- normaliser and top-1 select
  typedef enum logic [2:0] {N_IDLE, N_RQ, N_RC, N_MUL1, N_MUL2, N_SEL} nstate_e;
  nstate_e nst_q;
  logic [PW-1:0]           np_q;
  logic                    rs_start, rs_busy, rs_done;
  logic [NW-1:0]           rs_n;
  logic [RF:0]             rs_r, rq_q, rc_q;
  logic signed [AW+1:0]    t1_q;                 // dot / |q|, scaled
  logic signed [SC_W-1:0]  sc_q;
  logic signed [SC_W-1:0]  best_sc_q;
  logic [CLS_W-1:0]        best_cls_q;
  logic                    have_best_q;
  logic [CLS_W-1:0]        cand_cls;

  logic signed [AW+RF+1:0] prod1;
  logic signed [AW+RF+3:0] prod2;
  assign prod1 = (AW+RF+2)'(sdot_q[np_q]) * $signed({1'b0, rq_q});
  assign prod2 = (AW+RF+4)'(t1_q) * $signed({1'b0, rc_q});

  assign snap_busy = (nst_q != N_IDLE);
  assign cand_cls  = CLS_W'(int'(sg_q) * PP + int'(np_q));
  assign rs_n      = (nst_q == N_RQ) ? snq_q : snc_q[np_q];

  ghrr_rsqrt #(.NW(NW), .RF(RF)) u_rsqrt (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .start_i (rs_start),
    .n_i     (rs_n),
    .busy_o  (rs_busy),
    .done_o  (rs_done),
    .r_o     (rs_r)
  );

  logic rs_issued_q;
  assign rs_start = ((nst_q == N_RQ) || (nst_q == N_RC)) && !rs_busy && !rs_issued_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      nst_q <= N_IDLE; np_q <= '0; rq_q <= '0; rc_q <= '0; t1_q <= '0; sc_q <= '0;
      best_sc_q <= '0; best_cls_q <= '0; have_best_q <= 1'b0; rs_issued_q <= 1'b0;
      res_valid_o <= 1'b0; res_class_o <= '0; res_score_o <= '0;
    end else begin
      res_valid_o <= 1'b0;
      if (rs_start) rs_issued_q <= 1'b1;
      unique case (nst_q)
        N_IDLE: if (snap_req) begin
          np_q  <= '0;
          // the query norm is the same in every pass: form 1/|q| once
          nst_q <= (g1_q == '0) ? N_RQ : N_RC;
          if (g1_q == '0) have_best_q <= 1'b0;
        end
        N_RQ: if (rs_done) begin
          rq_q        <= rs_r;
          rs_issued_q <= 1'b0;
          nst_q       <= N_RC;
        end
        N_RC: if (rs_done) begin
          rc_q        <= rs_r;
          rs_issued_q <= 1'b0;
          nst_q       <= N_MUL1;
        end
        N_MUL1: begin
          t1_q  <= (AW+2)'(prod1 >>> RF);
          nst_q <= N_MUL2;
        end
        N_MUL2: begin
          sc_q  <= SC_W'(prod2 >>> (RF - FRAC));
          nst_q <= N_SEL;
        end
        N_SEL: begin
          if (cand_cls < sncls_q && (!have_best_q || sc_q > best_sc_q)) begin
            best_sc_q   <= sc_q;
            best_cls_q  <= cand_cls;
            have_best_q <= 1'b1;
          end
          if (int'(np_q) == PP - 1) begin
            nst_q <= N_IDLE;
            if (slast_q) begin
              res_valid_o <= 1'b1;
              if (cand_cls < sncls_q && (!have_best_q || sc_q > best_sc_q)) begin
                res_class_o <= cand_cls;
                res_score_o <= sc_q;
              end else begin
                res_class_o <= best_cls_q;
                res_score_o <= best_sc_q;
              end
            end
          end else begin
            np_q  <= np_q + 1'b1;
            nst_q <= N_RC;
          end
        end
        default: nst_q <= N_IDLE;
      endcase
    end
  end

  assign busy_o = (ps_q != P_IDLE) || snap_busy || v1_q;

endmodule
