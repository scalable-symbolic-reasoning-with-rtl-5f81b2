// Dual-channel DMA engine: streams blocks of words from external memory to
// the on-chip consumers.
//
// Each channel, once started with a source word address and a length, issues
// read requests for consecutive addresses and delivers the returned words, in
// order, on its own valid/ready stream. In the accelerator channel 0 carries
// the encoder's inputs (phase words, or transform words when the transforms
// are loaded) and channel 1 the codebook vectors, so both kinds of data move
// at once. The two channels share one memory read port: a round-robin arbiter
// picks the requesting channel, and a tag queue remembers which channel each
// outstanding request belongs to so that the in-order responses can be
// routed. A channel only requests while its words in flight plus the words
// waiting in its FIFO are fewer than FIFO_D, so a response always finds room
// and the memory port needs no response back-pressure.
//
// The two channels and their purpose follow the architecture; the memory
// port protocol, the arbiter, the credit scheme and the FIFO depth are this
// design's choices.
//
// Interface: mem_req_* is a valid/ready request (word address); mem_rsp_* is
// a valid-only response, in request order, any number of clocks later.
// start_i[c] (ignored while busy_o[c]) loads src_i[c] and len_i[c]; done_o[c]
// pulses when the last word of the block has been taken from the stream.
// Timing: with a memory that answers at once and a consumer that is always
// ready, one channel moves one word per clock.
module ghrr_dma #(
  parameter int unsigned NCH    = 2,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = 24,
  parameter int unsigned DATA_W = ghrr_pkg::WORD_W,
  parameter int unsigned FIFO_D = 8
) (
  input  logic                         clk_i,
  input  logic                         rst_ni,
  // channel control
  input  logic [NCH-1:0]               start_i,
  input  logic [NCH-1:0][ADDR_W-1:0]   src_i,
  input  logic [NCH-1:0][LEN_W-1:0]    len_i,
  output logic [NCH-1:0]               busy_o,
  output logic [NCH-1:0]               done_o,
  // external memory read port
  output logic                         mem_req_valid_o,
  input  logic                         mem_req_ready_i,
  output logic [ADDR_W-1:0]            mem_req_addr_o,
  input  logic                         mem_rsp_valid_i,
  input  logic [DATA_W-1:0]            mem_rsp_data_i,
  // output streams
  output logic [NCH-1:0]               st_valid_o,
  input  logic [NCH-1:0]               st_ready_i,
  output logic [NCH-1:0][DATA_W-1:0]   st_data_o
);

  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned FCW = $clog2(FIFO_D + 1);
  localparam int unsigned TD  = NCH * FIFO_D;

  logic [NCH-1:0][ADDR_W-1:0] addr_q;
  logic [NCH-1:0][LEN_W-1:0]  req_left_q, out_left_q;
  logic [NCH-1:0][FCW-1:0]    inflight_q;
  logic [NCH-1:0]             want, grant, pop;
  logic [CHW-1:0]             rr_q, sel;
  logic                       any_want, issue;

  // tag queue: channel of each outstanding request
  logic [CHW-1:0] tag_head;
  logic           tag_empty, tag_full;
  logic [$clog2(TD+1)-1:0] tag_cnt;

  ghrr_fifo #(.W(CHW), .DEPTH(TD)) u_tags (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .push_i(issue), .wdata_i(sel), .pop_i(mem_rsp_valid_i), .rdata_o(tag_head),
    .empty_o(tag_empty), .full_o(tag_full), .count_o(tag_cnt));

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [FCW-1:0] cnt;
    logic           empty, full;
    assign want[c] = (req_left_q[c] != '0) && (inflight_q[c] < FCW'(FIFO_D));
    assign pop[c]  = st_valid_o[c] && st_ready_i[c];
    assign st_valid_o[c] = !empty;

    ghrr_fifo #(.W(DATA_W), .DEPTH(FIFO_D)) u_fifo (
      .clk_i(clk_i), .rst_ni(rst_ni),
      .push_i(mem_rsp_valid_i && tag_head == CHW'(c)), .wdata_i(mem_rsp_data_i),
      .pop_i(pop[c]), .rdata_o(st_data_o[c]),
      .empty_o(empty), .full_o(full), .count_o(cnt));
  end

  // round-robin choice starting after the last granted channel
  always_comb begin
    sel      = rr_q;
    any_want = 1'b0;
    for (int k = NCH; k >= 1; k--) begin
      if (want[(int'(rr_q) + k) % NCH]) begin
        sel      = CHW'((int'(rr_q) + k) % NCH);
        any_want = 1'b1;
      end
    end
    grant = '0;
    if (any_want) grant[sel] = 1'b1;
  end

  assign mem_req_valid_o = any_want && !tag_full;
  assign mem_req_addr_o  = addr_q[sel];
  assign issue           = mem_req_valid_o && mem_req_ready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      addr_q     <= '0;
      req_left_q <= '0;
      out_left_q <= '0;
      inflight_q <= '0;
      rr_q       <= '0;
      done_o     <= '0;
    end else begin
      done_o <= '0;
      if (issue) rr_q <= sel;
      for (int c = 0; c < NCH; c++) begin
        if (start_i[c] && !busy_o[c]) begin
          addr_q[c]     <= src_i[c];
          req_left_q[c] <= len_i[c];
          out_left_q[c] <= len_i[c];
        end else begin
          if (issue && grant[c]) begin
            addr_q[c]     <= addr_q[c] + 1'b1;
            req_left_q[c] <= req_left_q[c] - 1'b1;
          end
          if (pop[c]) begin
            out_left_q[c] <= out_left_q[c] - 1'b1;
            if (out_left_q[c] == LEN_W'(1)) done_o[c] <= 1'b1;
          end
        end
        inflight_q[c] <= inflight_q[c] + FCW'(issue && grant[c]) - FCW'(pop[c]);
      end
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_busy
    assign busy_o[c] = (out_left_q[c] != '0);
  end

  // every response must belong to an outstanding request
  a_rsp_tagged: assert property (@(posedge clk_i) disable iff (!rst_ni) mem_rsp_valid_i |-> !tag_empty);

endmodule
