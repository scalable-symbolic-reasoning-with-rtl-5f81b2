// Host interface: the register file the host CPU programs, and the
// coordinator that ties the DMA channels, the encoder and the inference block
// together. The DMA data words go straight from the DMA engine to the encoder
// and the inference block; this block steers them by driving the stream
// handshakes and the write enables and addresses.
//
// The host writes source addresses and sizes, then issues one of three
// commands through CTRL:
//   LOAD_TM  DMA channel 0 streams DIM words (one M x M unitary transform per
//            dimension) into the encoder's transform memory;
//   LOAD_CB  DMA channel 1 streams NUM_CLASSES*DIM codebook words (class
//            after class) into the inference block's codebook buffer;
//   RUN      DMA channel 0 streams NUM_QUERIES sequences of phase words
//            (per query: for each dimension, SEQ_LEN words) into the encoder.
// During RUN the coordinator double-buffers the query: the encoder fills one
// query bank while the inference block searches the other. It starts the
// encoder whenever a bank is free and the inference block whenever a bank is
// full, and releases a bank as soon as its last search pass has read it, so
// encoding of query n+1 overlaps the search of query n. Results (class,
// score) enter a 16-entry queue; a search is only launched while the queue
// has room for every result in flight. The host pops results by reading
// RESULT. LOAD_TM and RUN both use channel 0, so a command is ignored while
// a load or run that needs the same resources is busy.
//
// The architecture says the host interface coordinates the encoder and
// inference blocks through DMA streaming; the register map, the commands,
// the memory layouts and the double buffering are this design's choices.
//
// Register map (word index on host_addr_i; reads return data one clock
// after host_re_i):
//   0 CTRL        W  bit0 LOAD_TM, bit1 LOAD_CB, bit2 RUN (write 1 to start)
//   1 STATUS      R  bit0 LOAD_TM busy, bit1 LOAD_CB busy, bit2 RUN busy,
//                    bit3 result available, [15:8] results queued
//   2 TM_SRC      RW external word address of the transforms
//   3 CB_SRC      RW external word address of the codebook
//   4 IN_SRC      RW external word address of the input sequences
//   5 DIM         RW dimensions used (1..DIMS)
//   6 SEQ_LEN     RW sequence length (1..LMAX)
//   7 NUM_CLASSES RW classes in the codebook (1..P*NG)
//   8 NUM_QUERIES RW queries in a RUN
//   9 RESULT      R  [31:24] class, [23:0] signed Q1.14 score; pops the queue
module ghrr_host_if
  import ghrr_pkg::*;
#(
  parameter int unsigned MM     = M,
  parameter int unsigned DIMS   = DIM,
  parameter int unsigned LMAX   = SEQ_MAX,
  parameter int unsigned PP     = P,
  parameter int unsigned NG     = NGRP,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = 24,
  parameter int unsigned RES_D  = 16,
  parameter int unsigned DIM_AW = $clog2(DIMS),
  parameter int unsigned L_W    = $clog2(LMAX + 1),
  parameter int unsigned CLS_W  = $clog2(PP * NG + 1),
  parameter int unsigned SC_W   = 32
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  // host bus
  input  logic                        host_we_i,
  input  logic                        host_re_i,
  input  logic [3:0]                  host_addr_i,
  input  logic [31:0]                 host_wdata_i,
  output logic [31:0]                 host_rdata_o,
  output logic                        irq_o,
  // DMA control
  output logic [1:0]                  dma_start_o,
  output logic [1:0][ADDR_W-1:0]      dma_src_o,
  output logic [1:0][LEN_W-1:0]       dma_len_o,
  input  logic [1:0]                  dma_busy_i,
  // DMA channel 0 stream handshake (transforms or phases)
  input  logic                        ch0_valid_i,
  output logic                        ch0_ready_o,
  // DMA channel 1 stream handshake (codebook)
  input  logic                        ch1_valid_i,
  output logic                        ch1_ready_o,
  // encoder
  output logic                        tm_we_o,
  output logic [DIM_AW-1:0]           tm_addr_o,
  output logic                        enc_start_o,
  output logic [L_W-1:0]              enc_seq_len_o,
  output logic [DIM_AW:0]             enc_dim_o,
  input  logic                        enc_done_i,
  output logic                        enc_in_valid_o,
  input  logic                        enc_in_ready_i,
  output logic                        qb_bank_o,
  // inference
  output logic                        cb_we_o,
  output logic [CLS_W-1:0]            cb_class_o,
  output logic [DIM_AW-1:0]           cb_addr_o,
  output logic                        inf_start_o,
  output logic                        inf_bank_o,
  output logic [DIM_AW:0]             inf_dim_o,
  output logic [CLS_W-1:0]            inf_ncls_o,
  input  logic                        inf_ready_i,
  input  logic                        inf_qfree_i,
  input  logic                        res_valid_i,
  input  logic [CLS_W-1:0]            res_class_i,
  input  logic signed [SC_W-1:0]      res_score_i
);

  localparam int unsigned RCW = $clog2(RES_D + 1);

  // ------------------------------------------------------------ registers
  logic [ADDR_W-1:0] tm_src_q, cb_src_q, in_src_q;
  logic [DIM_AW:0]   dim_q;
  logic [L_W-1:0]    seq_len_q;
  logic [CLS_W-1:0]  ncls_q;
  logic [15:0]       nq_q;

  typedef enum logic [1:0] {CH0_IDLE, CH0_TM, CH0_RUN} ch0_mode_e;
  ch0_mode_e ch0_mode_q;
  logic      cb_busy_q;

  logic cmd_tm, cmd_cb, cmd_run, run_busy;
  assign cmd_tm  = host_we_i && host_addr_i == 4'd0 && host_wdata_i[0] && ch0_mode_q == CH0_IDLE && !dma_busy_i[0];
  assign cmd_cb  = host_we_i && host_addr_i == 4'd0 && host_wdata_i[1] && !cb_busy_q && !dma_busy_i[1] && !run_busy;
  assign cmd_run = host_we_i && host_addr_i == 4'd0 && host_wdata_i[2] && ch0_mode_q == CH0_IDLE && !dma_busy_i[0]
                   && !cb_busy_q && !cmd_tm;

  // result queue
  logic [31:0]    rq_head;
  logic           rq_empty, rq_full, rq_pop;
  logic [RCW-1:0] rq_cnt;
  assign rq_pop = host_re_i && host_addr_i == 4'd9 && !rq_empty;

  ghrr_fifo #(.W(32), .DEPTH(RES_D)) u_results (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .push_i(res_valid_i), .wdata_i({8'(res_class_i), 24'(res_score_i)}),
    .pop_i(rq_pop), .rdata_o(rq_head), .empty_o(rq_empty), .full_o(rq_full), .count_o(rq_cnt));

  // ------------------------------------------------------ load counters
  logic [DIM_AW-1:0] tm_idx_q, cb_dim_q;
  logic [CLS_W-1:0]  cb_cls_q;

  assign tm_we_o    = (ch0_mode_q == CH0_TM) && ch0_valid_i;
  assign tm_addr_o  = tm_idx_q;

  assign cb_we_o    = cb_busy_q && ch1_valid_i;
  assign cb_class_o = cb_cls_q;
  assign cb_addr_o  = cb_dim_q;
  assign ch1_ready_o = cb_busy_q;

  assign enc_in_valid_o = (ch0_mode_q == CH0_RUN) && ch0_valid_i;
  assign ch0_ready_o    = (ch0_mode_q == CH0_TM) || ((ch0_mode_q == CH0_RUN) && enc_in_ready_i);

  // ------------------------------------------------- run coordination
  logic [1:0]       full_q;        // query bank holds an encoded query
  logic             wsel_q, rsel_q;
  logic             enc_active_q, inf_active_q;
  logic [15:0]      enc_left_q, inf_left_q;
  logic [RCW-1:0]   inflight_q;

  assign enc_start_o = (ch0_mode_q == CH0_RUN) && enc_left_q != '0 && !enc_active_q && !full_q[wsel_q];
  assign inf_start_o = inf_left_q != '0 && !inf_active_q
                       && inf_ready_i && full_q[rsel_q] && (32'(rq_cnt) + 32'(inflight_q) < RES_D);
  assign enc_seq_len_o = seq_len_q;
  assign enc_dim_o     = dim_q;
  assign qb_bank_o     = wsel_q;
  assign inf_bank_o    = rsel_q;
  assign inf_dim_o     = dim_q;
  assign inf_ncls_o    = ncls_q;
  assign run_busy      = (ch0_mode_q == CH0_RUN) || inf_left_q != '0 || inflight_q != '0;

  // DMA commands
  always_comb begin
    dma_start_o = '0;
    dma_src_o   = '0;
    dma_len_o   = '0;
    dma_src_o[1] = cb_src_q;
    dma_len_o[1] = LEN_W'(32'(ncls_q) * 32'(dim_q));
    if (cmd_tm) begin
      dma_start_o[0] = 1'b1;
      dma_src_o[0]   = tm_src_q;
      dma_len_o[0]   = LEN_W'(dim_q);
    end else begin
      dma_start_o[0] = cmd_run;
      dma_src_o[0]   = in_src_q;
      dma_len_o[0]   = LEN_W'(32'(nq_q) * 32'(seq_len_q) * 32'(dim_q));
    end
    dma_start_o[1] = cmd_cb;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      tm_src_q <= '0; cb_src_q <= '0; in_src_q <= '0;
      dim_q <= (DIM_AW+1)'(DIMS); seq_len_q <= L_W'(1); ncls_q <= CLS_W'(1); nq_q <= 16'd1;
      ch0_mode_q <= CH0_IDLE; cb_busy_q <= 1'b0;
      tm_idx_q <= '0; cb_dim_q <= '0; cb_cls_q <= '0;
      full_q <= '0; wsel_q <= 1'b0; rsel_q <= 1'b0;
      enc_active_q <= 1'b0; inf_active_q <= 1'b0;
      enc_left_q <= '0; inf_left_q <= '0; inflight_q <= '0;
      host_rdata_o <= '0;
    end else begin
      // register writes
      if (host_we_i) begin
        unique case (host_addr_i)
          4'd2: tm_src_q  <= host_wdata_i[ADDR_W-1:0];
          4'd3: cb_src_q  <= host_wdata_i[ADDR_W-1:0];
          4'd4: in_src_q  <= host_wdata_i[ADDR_W-1:0];
          4'd5: dim_q     <= host_wdata_i[DIM_AW:0];
          4'd6: seq_len_q <= host_wdata_i[L_W-1:0];
          4'd7: ncls_q    <= host_wdata_i[CLS_W-1:0];
          4'd8: nq_q      <= host_wdata_i[15:0];
          default: ;
        endcase
      end
      // register reads
      if (host_re_i) begin
        unique case (host_addr_i)
          4'd1: host_rdata_o <= {16'd0, 8'(rq_cnt), 4'd0, !rq_empty, run_busy, cb_busy_q,
                                 ch0_mode_q == CH0_TM};
          4'd2: host_rdata_o <= 32'(tm_src_q);
          4'd3: host_rdata_o <= 32'(cb_src_q);
          4'd4: host_rdata_o <= 32'(in_src_q);
          4'd5: host_rdata_o <= 32'(dim_q);
          4'd6: host_rdata_o <= 32'(seq_len_q);
          4'd7: host_rdata_o <= 32'(ncls_q);
          4'd8: host_rdata_o <= 32'(nq_q);
          4'd9: host_rdata_o <= rq_empty ? 32'hFFFF_FFFF : rq_head;
          default: host_rdata_o <= '0;
        endcase
      end

      // transform load
      if (cmd_tm) begin
        ch0_mode_q <= CH0_TM;
        tm_idx_q   <= '0;
      end else if (ch0_mode_q == CH0_TM && ch0_valid_i) begin
        if ({1'b0, tm_idx_q} == dim_q - 1'b1) ch0_mode_q <= CH0_IDLE;
        tm_idx_q <= tm_idx_q + 1'b1;
      end

      // codebook load
      if (cmd_cb) begin
        cb_busy_q <= 1'b1;
        cb_dim_q  <= '0;
        cb_cls_q  <= '0;
      end else if (cb_busy_q && ch1_valid_i) begin
        if ({1'b0, cb_dim_q} == dim_q - 1'b1) begin
          cb_dim_q <= '0;
          cb_cls_q <= cb_cls_q + 1'b1;
          if (cb_cls_q == ncls_q - 1'b1) cb_busy_q <= 1'b0;
        end else begin
          cb_dim_q <= cb_dim_q + 1'b1;
        end
      end

      // run
      if (cmd_run) begin
        ch0_mode_q <= (nq_q != '0) ? CH0_RUN : CH0_IDLE;
        enc_left_q <= nq_q;
        inf_left_q <= nq_q;
        full_q     <= '0;
        wsel_q     <= 1'b0;
        rsel_q     <= 1'b0;
      end else begin
        if (enc_start_o) enc_active_q <= 1'b1;
        if (enc_done_i) begin
          enc_active_q <= 1'b0;
          wsel_q       <= ~wsel_q;
          enc_left_q   <= enc_left_q - 1'b1;
          if (enc_left_q == 16'd1) ch0_mode_q <= CH0_IDLE;
        end
        if (inf_start_o) inf_active_q <= 1'b1;
        if (inf_qfree_i) begin
          inf_active_q <= 1'b0;
          rsel_q       <= ~rsel_q;
          inf_left_q   <= inf_left_q - 1'b1;
        end
        for (int b = 0; b < 2; b++) begin
          if (enc_done_i && wsel_q == b[0]) full_q[b] <= 1'b1;
          else if (inf_qfree_i && rsel_q == b[0]) full_q[b] <= 1'b0;
        end
        inflight_q <= inflight_q + RCW'(inf_start_o) - RCW'(res_valid_i);
      end
    end
  end

  assign irq_o = !rq_empty;

  a_result_room: assert property (@(posedge clk_i) disable iff (!rst_ni) res_valid_i |-> !rq_full);

endmodule
