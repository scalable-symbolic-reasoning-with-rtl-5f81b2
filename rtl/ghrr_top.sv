// GHRR accelerator top level: permutation-free, order-sensitive
// hyperdimensional classification.
//
// Generalised Holographic Reduced Representations bind by multiplying small
// unitary matrices, so the order of a sequence is encoded without
// permutation hardware. Flattening each hypervector into a vector of
// complex numbers turns GHRR similarity into an ordinary dot product. The
// accelerator has four parts, wired as in the architecture:
//   ghrr_host_if   registers for the host CPU, and coordination of the rest;
//   ghrr_dma       two DMA channels on one external-memory read port:
//                  channel 0 for encoder inputs (and transforms), channel 1
//                  for codebook vectors;
//   ghrr_encoder   complex exponential stage, per-dimension unitary
//                  transforms and the pipelined complex matrix MAC that binds
//                  a sequence; it writes the flattened query into a query
//                  bank of the inference block;
//   ghrr_inference P-way parallel dot products against the codebook with
//                  runtime norms, reciprocal scaling and top-1 selection.
// The DMA data words go directly to the encoder and the inference block;
// the host interface steers them through the stream handshakes and the
// write enables and addresses. Queries are double-buffered, so the encoder
// works on query n+1 while query n is searched. The four-block split and
// the DMA links follow the architecture's block diagram; the buffering,
// formats and register map are this design's own.
//
// Interface: host_* is a simple register bus (see ghrr_host_if for the map;
// read data one clock after host_re_i); irq_o is high while results wait.
// mem_* is the external memory read port (valid/ready request of one word
// address, in-order valid-only response of one WORD_W-bit word). The external
// memory and host CPU are outside this design.
module ghrr_top
  import ghrr_pkg::*;
#(
  parameter int unsigned DIMS   = DIM,
  parameter int unsigned PP     = P,
  parameter int unsigned NG     = NGRP,
  parameter int unsigned LMAX   = SEQ_MAX,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = 24
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // host register bus
  input  logic               host_we_i,
  input  logic               host_re_i,
  input  logic [3:0]         host_addr_i,
  input  logic [31:0]        host_wdata_i,
  output logic [31:0]        host_rdata_o,
  output logic               irq_o,
  // external memory read port
  output logic               mem_req_valid_o,
  input  logic               mem_req_ready_i,
  output logic [ADDR_W-1:0]  mem_req_addr_o,
  input  logic               mem_rsp_valid_i,
  input  logic [WORD_W-1:0]  mem_rsp_data_i
);

  localparam int unsigned MM     = M;
  localparam int unsigned DIM_AW = $clog2(DIMS);
  localparam int unsigned L_W    = $clog2(LMAX + 1);
  localparam int unsigned CLS_W  = $clog2(PP * NG + 1);

  typedef cplx_t [MM*MM-1:0] mat_t;

  // DMA
  logic [1:0]              dma_start, dma_busy, dma_done, st_valid, st_ready;
  logic [1:0][ADDR_W-1:0]  dma_src;
  logic [1:0][LEN_W-1:0]   dma_len;
  logic [1:0][WORD_W-1:0]  st_data;
  // encoder
  logic                    tm_we, enc_start, enc_busy, enc_done, enc_in_valid, enc_in_ready;
  logic [DIM_AW-1:0]       tm_addr, enc_out_idx;
  mat_t                    tm_wdata, enc_out_data;
  logic [L_W-1:0]          enc_seq_len;
  logic [DIM_AW:0]         enc_dim, inf_dim;
  logic [MM*PH_W-1:0]      enc_in_phase;
  logic                    enc_out_valid, qb_bank;
  // inference
  logic                    cb_we, inf_start, inf_bank, inf_ready, inf_busy, inf_qfree, res_valid;
  logic [CLS_W-1:0]        cb_class, inf_ncls, res_class;
  logic [DIM_AW-1:0]       cb_addr;
  mat_t                    cb_wdata;
  logic signed [31:0]      res_score;

  ghrr_host_if #(
    .MM(MM), .DIMS(DIMS), .LMAX(LMAX), .PP(PP), .NG(NG), .ADDR_W(ADDR_W), .LEN_W(LEN_W)
  ) u_host_if (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .host_we_i(host_we_i), .host_re_i(host_re_i), .host_addr_i(host_addr_i),
    .host_wdata_i(host_wdata_i), .host_rdata_o(host_rdata_o), .irq_o(irq_o),
    .dma_start_o(dma_start), .dma_src_o(dma_src), .dma_len_o(dma_len), .dma_busy_i(dma_busy),
    .ch0_valid_i(st_valid[0]), .ch0_ready_o(st_ready[0]),
    .ch1_valid_i(st_valid[1]), .ch1_ready_o(st_ready[1]),
    .tm_we_o(tm_we), .tm_addr_o(tm_addr),
    .enc_start_o(enc_start), .enc_seq_len_o(enc_seq_len), .enc_dim_o(enc_dim),
    .enc_done_i(enc_done), .enc_in_valid_o(enc_in_valid), .enc_in_ready_i(enc_in_ready),
    .qb_bank_o(qb_bank),
    .cb_we_o(cb_we), .cb_class_o(cb_class), .cb_addr_o(cb_addr),
    .inf_start_o(inf_start), .inf_bank_o(inf_bank), .inf_dim_o(inf_dim), .inf_ncls_o(inf_ncls),
    .inf_ready_i(inf_ready), .inf_qfree_i(inf_qfree),
    .res_valid_i(res_valid), .res_class_i(res_class), .res_score_i(res_score)
  );

  // DMA data goes straight to the encoder (channel 0) and the inference
  // block (channel 1); the host interface steers it with the handshakes
  assign tm_wdata     = mat_t'(st_data[0]);
  assign enc_in_phase = st_data[0][MM*PH_W-1:0];
  assign cb_wdata     = mat_t'(st_data[1]);

  ghrr_dma #(
    .NCH(2), .ADDR_W(ADDR_W), .LEN_W(LEN_W), .DATA_W(WORD_W), .FIFO_D(8)
  ) u_dma (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .start_i(dma_start), .src_i(dma_src), .len_i(dma_len), .busy_o(dma_busy), .done_o(dma_done),
    .mem_req_valid_o(mem_req_valid_o), .mem_req_ready_i(mem_req_ready_i),
    .mem_req_addr_o(mem_req_addr_o), .mem_rsp_valid_i(mem_rsp_valid_i),
    .mem_rsp_data_i(mem_rsp_data_i),
    .st_valid_o(st_valid), .st_ready_i(st_ready), .st_data_o(st_data)
  );

  ghrr_encoder #(.MM(MM), .DIMS(DIMS), .LMAX(LMAX)) u_encoder (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .tm_we_i(tm_we), .tm_addr_i(tm_addr), .tm_wdata_i(tm_wdata),
    .start_i(enc_start), .seq_len_i(enc_seq_len), .dim_i(enc_dim),
    .busy_o(enc_busy), .done_o(enc_done),
    .in_valid_i(enc_in_valid), .in_ready_o(enc_in_ready), .in_phase_i(enc_in_phase),
    .out_valid_o(enc_out_valid), .out_idx_o(enc_out_idx), .out_data_o(enc_out_data)
  );

  ghrr_inference #(.MM(MM), .DIMS(DIMS), .PP(PP), .NG(NG)) u_inference (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .qb_we_i(enc_out_valid), .qb_bank_i(qb_bank), .qb_addr_i(enc_out_idx), .qb_wdata_i(enc_out_data),
    .cb_we_i(cb_we), .cb_class_i(cb_class), .cb_addr_i(cb_addr), .cb_wdata_i(cb_wdata),
    .start_i(inf_start), .bank_i(inf_bank), .dim_i(inf_dim), .ncls_i(inf_ncls),
    .ready_o(inf_ready), .busy_o(inf_busy), .qbuf_free_o(inf_qfree),
    .res_valid_o(res_valid), .res_class_o(res_class), .res_score_o(res_score)
  );

  // the encoder must never write the bank the inference block is searching
  a_bank_exclusive: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (enc_out_valid && inf_busy && !inf_ready) |-> (qb_bank != inf_bank));

endmodule
