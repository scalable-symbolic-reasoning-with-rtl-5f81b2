// Self-checking testbench for ghrr_host_if.
//
// Simple stand-ins replace the DMA channels (random-valid streams of
// numbered words; the data itself bypasses this block), the encoder (takes SEQ_LEN*DIM words at random ready,
// then pulses done) and the inference block (releases its query bank and
// returns a result after random delays). Checks register read-back, the DMA
// commands of LOAD_TM, LOAD_CB and RUN, the transform and codebook write
// addresses and data, the query double-buffering (encoder and search
// alternate banks, a search only starts on a filled bank, the encoder never
// refills a bank still being searched), encoding overlapping a search, the
// result queue (order, contents, back-pressure when full) and the interrupt.
module tb_ghrr_host_if;
  import ghrr_pkg::*;

  localparam int unsigned DIMS = 32, LMAX = 8, PP = 4, NG = 3;
  localparam int unsigned AW = $clog2(DIMS), LW = $clog2(LMAX + 1), CW = $clog2(PP * NG + 1);
  localparam int unsigned D = 20, L = 5, NCLS = 11, NQ = 21;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic host_we, host_re, irq; logic [3:0] host_addr; logic [31:0] host_wdata, host_rdata;
  logic [1:0] dma_start, dma_busy; logic [1:0][31:0] dma_src; logic [1:0][23:0] dma_len;
  logic ch0_valid, ch0_ready, ch1_valid, ch1_ready; cplx_t [3:0] ch0_data, ch1_data;
  logic tm_we; logic [AW-1:0] tm_addr;
  logic enc_start, enc_done, enc_in_valid, enc_in_ready, qb_bank;
  logic [LW-1:0] enc_seq_len; logic [AW:0] enc_dim, inf_dim;
  logic cb_we, inf_start, inf_bank, inf_ready, inf_qfree, res_valid;
  logic [CW-1:0] cb_class, inf_ncls, res_class; logic [AW-1:0] cb_addr;
  logic signed [31:0] res_score;

  ghrr_host_if #(.MM(2), .DIMS(DIMS), .LMAX(LMAX), .PP(PP), .NG(NG)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .host_we_i(host_we), .host_re_i(host_re), .host_addr_i(host_addr), .host_wdata_i(host_wdata),
    .host_rdata_o(host_rdata), .irq_o(irq),
    .dma_start_o(dma_start), .dma_src_o(dma_src), .dma_len_o(dma_len), .dma_busy_i(dma_busy),
    .ch0_valid_i(ch0_valid), .ch0_ready_o(ch0_ready),
    .ch1_valid_i(ch1_valid), .ch1_ready_o(ch1_ready),
    .tm_we_o(tm_we), .tm_addr_o(tm_addr),
    .enc_start_o(enc_start), .enc_seq_len_o(enc_seq_len), .enc_dim_o(enc_dim),
    .enc_done_i(enc_done), .enc_in_valid_o(enc_in_valid), .enc_in_ready_i(enc_in_ready),
    .qb_bank_o(qb_bank),
    .cb_we_o(cb_we), .cb_class_o(cb_class), .cb_addr_o(cb_addr),
    .inf_start_o(inf_start), .inf_bank_o(inf_bank), .inf_dim_o(inf_dim), .inf_ncls_o(inf_ncls),
    .inf_ready_i(inf_ready), .inf_qfree_i(inf_qfree),
    .res_valid_i(res_valid), .res_class_i(res_class), .res_score_i(res_score));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string m);
    failures++;
    $display("FAIL: %s", m);
  endtask

  function automatic cplx_t [3:0] word_of(int ch, int k);
    cplx_t [3:0] w;
    for (int e = 0; e < 4; e++) begin
      w[e].re = DW'(k * 4 + e + ch * 1000);
      w[e].im = DW'(~(k * 4 + e));
    end
    return w;
  endfunction

  // ------------------------------------------------ DMA stand-in
  int left [2], sent [2];
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (dma_start[c]) begin
        checks++;
        if (dma_busy[c]) fail("DMA started while busy");
        left[c] = int'(dma_len[c]); sent[c] = 0;
      end else if ((c == 0 ? ch0_valid && ch0_ready : ch1_valid && ch1_ready)) begin
        left[c]--; sent[c]++;
      end
    end
  end
  always @(negedge clk) begin
    dma_busy[0] = (left[0] != 0); dma_busy[1] = (left[1] != 0);
    ch0_valid = (left[0] != 0) && ($urandom_range(0, 3) != 0);
    ch1_valid = (left[1] != 0) && ($urandom_range(0, 3) != 0);
    ch0_data  = word_of(0, sent[0]);
    ch1_data  = word_of(1, sent[1]);
  end

  // ------------------------------------------------ encoder stand-in
  int enc_need = 0, enc_got = 0, enc_done_at = -1, enc_bank = 0, n_enc = 0;
  bit bank_full [2];
  bit bank_searching [2];
  always @(posedge clk) begin
    enc_done <= 1'b0;
    if (enc_start) begin
      checks++;
      if (enc_need != 0 || enc_done_at >= 0) fail("encoder started while busy");
      if (bank_full[qb_bank] || bank_searching[qb_bank]) fail("encoder given a bank in use");
      if (enc_seq_len != LW'(L) || enc_dim != (AW+1)'(D)) fail("encoder sizes");
      enc_need = L * D; enc_got = 0; enc_bank = int'(qb_bank);
      n_enc++;
    end
    if (enc_in_valid && enc_in_ready) begin
      checks++;
      if (!ch0_valid || !ch0_ready) fail("phase word taken without a channel 0 transfer");
      enc_got++;
      if (enc_got == enc_need) begin enc_need = 0; enc_done_at = cyc + 3; end
    end
    if (enc_done_at == cyc) begin
      enc_done <= 1'b1;
      enc_done_at = -1;
      checks++;
      if (qb_bank != enc_bank[0]) fail("bank changed during encoding");
      bank_full[enc_bank] = 1;
    end
  end
  always @(negedge clk) enc_in_ready = (enc_need != 0) && ($urandom_range(0, 4) != 0);

  // ------------------------------------------------ inference stand-in
  int inf_free_at = -1, inf_bank_q = 0, n_inf = 0, n_overlap = 0;
  int res_due [$];
  int res_id [$];
  always @(posedge clk) begin
    inf_qfree <= 1'b0;
    res_valid <= 1'b0;
    if (inf_start) begin
      checks++;
      if (!bank_full[inf_bank]) fail("search of an empty bank");
      if (inf_dim != (AW+1)'(D) || inf_ncls != CW'(NCLS)) fail("search sizes");
      bank_full[inf_bank] = 0; bank_searching[inf_bank] = 1;
      inf_bank_q = int'(inf_bank);
      inf_free_at = cyc + $urandom_range(20, 60);
      res_due.push_back(inf_free_at + $urandom_range(5, 80));
      res_id.push_back(n_inf);
      n_inf++;
    end
    if (inf_free_at == cyc) begin
      inf_qfree <= 1'b1;
      bank_searching[inf_bank_q] = 0;
      inf_free_at = -1;
    end
    if (inf_free_at >= 0 && enc_need != 0) n_overlap++;
    if (res_due.size() > 0 && res_due[0] <= cyc) begin
      res_valid <= 1'b1;
      res_class <= CW'(res_id[0] % NCLS);
      res_score <= 32'(res_id[0] * 37 - 300);
      void'(res_due.pop_front());
      void'(res_id.pop_front());
      for (int i = 0; i < res_due.size(); i++) if (res_due[i] <= cyc) res_due[i] = cyc + 1;
    end
  end
  assign inf_ready = (inf_free_at < 0);

  // ------------------------------------------------ host bus
  task automatic wr(int a, int v);
    @(negedge clk);
    host_we = 1; host_addr = 4'(a); host_wdata = 32'(v);
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] v);
    @(negedge clk);
    host_re = 1; host_addr = 4'(a);
    @(negedge clk);
    host_re = 0;
    v = host_rdata;
  endtask

  // transform / codebook write checkers
  int n_tm = 0, n_cb = 0;
  always @(posedge clk) begin
    if (tm_we) begin
      checks++;
      if (tm_addr != AW'(n_tm) || !(ch0_valid && ch0_ready) || ch0_data != word_of(0, n_tm)) fail("transform write");
      n_tm++;
    end
    if (cb_we) begin
      checks++;
      if (cb_class != CW'(n_cb / D) || cb_addr != AW'(n_cb % D) || !(ch1_valid && ch1_ready) || ch1_data != word_of(1, n_cb))
        fail("codebook write");
      n_cb++;
    end
  end

  initial begin
    #20000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int nread = 0, n_full = 0, t_cmd;
    logic [1:0][31:0] src_seen;
    logic [1:0][23:0] len_seen;
    host_we = 0; host_re = 0; host_addr = '0; host_wdata = '0;
    left[0] = 0; left[1] = 0; sent[0] = 0; sent[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(2, 32'h100); wr(3, 32'h2000); wr(4, 32'h30000);
    wr(5, D); wr(6, L); wr(7, NCLS); wr(8, NQ);
    rd(2, v); checks++; if (v != 32'h100) fail("TM_SRC");
    rd(3, v); checks++; if (v != 32'h2000) fail("CB_SRC");
    rd(4, v); checks++; if (v != 32'h30000) fail("IN_SRC");
    rd(5, v); checks++; if (v != D) fail("DIM");
    rd(6, v); checks++; if (v != L) fail("SEQ_LEN");
    rd(7, v); checks++; if (v != NCLS) fail("NUM_CLASSES");
    rd(8, v); checks++; if (v != NQ) fail("NUM_QUERIES");
    rd(9, v); checks++; if (v != 32'hFFFF_FFFF || irq) fail("empty queue");

    // transforms and codebook at once
    fork
      begin
        @(posedge clk iff dma_start[0]);
        src_seen[0] = dma_src[0]; len_seen[0] = dma_len[0];
        @(posedge clk iff dma_start[1]);
        src_seen[1] = dma_src[1]; len_seen[1] = dma_len[1];
      end
      begin wr(0, 1); wr(0, 2); end
    join
    checks++; if (src_seen[0] != 32'h100 || len_seen[0] != 24'(D)) fail("LOAD_TM command");
    checks++; if (src_seen[1] != 32'h2000 || len_seen[1] != 24'(NCLS * D)) fail("LOAD_CB command");
    rd(1, v); checks++; if ((v & 3) != 3) fail("load busy flags");
    do rd(1, v); while ((v & 3) != 0);
    checks++; if (n_tm != D || n_cb != NCLS * D) fail("load counts");

    // run: do not read results until the queue is full
    fork
      begin
        @(posedge clk iff dma_start[0]);
        src_seen[0] = dma_src[0]; len_seen[0] = dma_len[0];
      end
      wr(0, 4);
    join
    checks++; if (src_seen[0] != 32'h30000 || len_seen[0] != 24'(NQ * L * D)) fail("RUN command");
    t_cmd = 0;
    do begin
      rd(1, v);
      if (((v >> 8) & 255) == 16) begin
        n_full++;
        repeat (600) @(negedge clk);        // hold the queue full while both banks fill
        rd(1, v);
        checks++; if (((v >> 8) & 255) != 16) fail("result queue overflowed");
      end
      if (((v >> 8) & 255) >= 16 || ((v & 4) == 0 && nread < NQ)) begin
        while (irq && nread < NQ) begin
          rd(9, v);
          checks++;
          if (v[31:24] != 8'(nread % NCLS) || $signed(v[23:0]) != 24'(nread * 37 - 300)) fail("result");
          nread++;
        end
        rd(1, v);
      end
    end while ((v & 4) != 0 || nread < NQ);
    checks++; if (n_enc != NQ || n_inf != NQ) fail("query count");
    checks++; if (n_overlap == 0) fail("no encoding during a search");
    checks++; if (n_full == 0) fail("queue never full");
    $display("overlap clocks %0d, queue-full events %0d", n_overlap, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
