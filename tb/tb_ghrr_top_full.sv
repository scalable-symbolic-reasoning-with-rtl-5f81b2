// End-to-end testbench of ghrr_top at its default size (DIM = 8000, m = 2,
// P = 8): the same 10-class, length-5 sequence task as the reduced testbench,
// with a batch of 18 queries, all parameters of the accelerator left at their
// defaults.
module tb_ghrr_top_full;
  import ghrr_pkg::*;

  localparam int unsigned DIMS = 8000;   // largest hypervector dimension run
  localparam int DLIST [1] = '{8000};   // dimensions run, one after the other
  localparam int unsigned NQ   = 18;     // queries in the batch
  localparam int unsigned NCLS = 10;         // classes (10-class task)
  localparam int unsigned L    = 5;          // sequence length 5
  localparam int unsigned NSYM = 16;         // symbol alphabet of the test
  localparam logic [31:0] TM_BASE = 32'h0000_0000;
  localparam logic [31:0] CB_BASE = 32'h0010_0000;
  localparam logic [31:0] IN_BASE = 32'h0100_0000;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = real'(1 << FRAC);
  localparam int  TOL = 8;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic host_we, host_re, irq; logic [3:0] host_addr; logic [31:0] host_wdata, host_rdata;
  logic req_valid, req_ready, rsp_valid; logic [31:0] req_addr; logic [WORD_W-1:0] rsp_data;

  ghrr_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .host_we_i(host_we), .host_re_i(host_re), .host_addr_i(host_addr), .host_wdata_i(host_wdata),
    .host_rdata_o(host_rdata), .irq_o(irq),
    .mem_req_valid_o(req_valid), .mem_req_ready_i(req_ready), .mem_req_addr_o(req_addr),
    .mem_rsp_valid_i(rsp_valid), .mem_rsp_data_i(rsp_data));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- data
  int   qre [DIMS][4], qim [DIMS][4];          // unitary transforms, Q1.14
  int   sym [NSYM][DIMS][2];                   // symbol phases
  int   proto [NCLS][L];                       // class prototypes (symbol ids)
  int   qseq [NQ][L];                          // query sequences
  int   cbr [NCLS][DIMS][4], cbi [NCLS][DIMS][4];
  real  hr [DIMS][4], hi [DIMS][4];            // scratch encoding
  int   dcur = DIMS;                           // dimension of the current run

  function automatic int q(real v);
    return (v >= 0.0) ? int'($floor(v * SC + 0.5)) : -int'($floor(-v * SC + 0.5));
  endfunction

  // reference GHRR encoding of a symbol sequence into hr/hi
  task automatic encode_ref(int s [L]);
    real rr[4], ri[4], ur[4], ui[4], tr[4], ti[4], er, ei;
    for (int j = 0; j < dcur; j++) begin
      for (int t = 0; t < L; t++) begin
        for (int i = 0; i < 2; i++)
          for (int k = 0; k < 2; k++) begin
            er = $cos(2.0 * PI * real'(sym[s[t]][j][k]) / real'(1 << PH_W));
            ei = $sin(2.0 * PI * real'(sym[s[t]][j][k]) / real'(1 << PH_W));
            ur[i*2+k] = (real'(qre[j][i*2+k]) * er - real'(qim[j][i*2+k]) * ei) / SC;
            ui[i*2+k] = (real'(qre[j][i*2+k]) * ei + real'(qim[j][i*2+k]) * er) / SC;
          end
        if (t == 0) begin rr = ur; ri = ui; end
        else begin
          for (int i = 0; i < 2; i++)
            for (int k = 0; k < 2; k++) begin
              tr[i*2+k] = 0.0; ti[i*2+k] = 0.0;
              for (int l = 0; l < 2; l++) begin
                tr[i*2+k] += rr[i*2+l] * ur[l*2+k] - ri[i*2+l] * ui[l*2+k];
                ti[i*2+k] += rr[i*2+l] * ui[l*2+k] + ri[i*2+l] * ur[l*2+k];
              end
            end
          rr = tr; ri = ti;
        end
      end
      for (int e = 0; e < 4; e++) begin hr[j][e] = rr[e]; hi[j][e] = ri[e]; end
    end
  endtask

  function automatic real score_ref(int c);
    real dp = 0.0, nq = 0.0, nc = 0.0;
    for (int j = 0; j < dcur; j++)
      for (int e = 0; e < 4; e++) begin
        dp += hr[j][e] * real'(cbr[c][j][e]) + hi[j][e] * real'(cbi[c][j][e]);
        nq += hr[j][e] * hr[j][e] + hi[j][e] * hi[j][e];
        nc += real'(cbr[c][j][e]) ** 2 + real'(cbi[c][j][e]) ** 2;
      end
    return dp / $sqrt(nq * nc) * SC;
  endfunction

  task automatic make_unitary(int j);
    real a, b, d, th;
    a  = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    b  = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    d  = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    th = 0.5 * PI * real'($urandom_range(500, 9500)) / 10000.0;
    qre[j][0] = q($cos(a + d) * $cos(th));  qim[j][0] = q($sin(a + d) * $cos(th));
    qre[j][1] = q($cos(b + d) * $sin(th));  qim[j][1] = q($sin(b + d) * $sin(th));
    qre[j][2] = q(-$cos(d - b) * $sin(th)); qim[j][2] = q(-$sin(d - b) * $sin(th));
    qre[j][3] = q($cos(d - a) * $cos(th));  qim[j][3] = q($sin(d - a) * $cos(th));
  endtask

  // ------------------------------------------------------- memory model
  function automatic logic [WORD_W-1:0] mem_word(logic [31:0] a);
    cplx_t [3:0] w;
    int off, c, j, qi, t;
    w = '0;
    if (a >= IN_BASE) begin
      off = int'(a - IN_BASE);
      qi = off / (L * dcur); off = off % (L * dcur);
      j = off / L; t = off % L;
      w[0].im = DW'(sym[qseq[qi][t]][j][0] | (sym[qseq[qi][t]][j][1] << PH_W));
    end else if (a >= CB_BASE) begin
      off = int'(a - CB_BASE);
      c = off / dcur; j = off % dcur;
      for (int e = 0; e < 4; e++) begin w[e].re = DW'(cbr[c][j][e]); w[e].im = DW'(cbi[c][j][e]); end
    end else begin
      j = int'(a - TM_BASE);
      for (int e = 0; e < 4; e++) begin w[e].re = DW'(qre[j][e]); w[e].im = DW'(qim[j][e]); end
    end
    return WORD_W'(w);
  endfunction

  logic [31:0] pend_a [$];
  int          pend_t [$];
  int          n_mem_stall = 0, n_both_ch = 0, n_prefetch = 0, results_seen = 0;
  int          last_cb_req = -100, last_tm_req = -100;
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (pend_a.size() > 0 && pend_t[0] <= cyc) begin
      rsp_valid <= 1'b1;
      rsp_data  <= mem_word(pend_a[0]);
      void'(pend_a.pop_front());
      void'(pend_t.pop_front());
    end
    if (req_valid && !req_ready) n_mem_stall++;
    if (req_valid && req_ready) begin
      pend_a.push_back(req_addr);
      pend_t.push_back(cyc + $urandom_range(1, 3));
      if (req_addr >= CB_BASE && req_addr < IN_BASE) last_cb_req = cyc;
      if (req_addr < CB_BASE) last_tm_req = cyc;
      // inputs of a later query fetched before the earlier result exists
      if (req_addr >= IN_BASE && int'(req_addr - IN_BASE) / (L * dcur) > results_seen) n_prefetch++;
    end
    if (last_cb_req == cyc - 1 && last_tm_req >= cyc - 3 || last_tm_req == cyc - 1 && last_cb_req >= cyc - 3)
      n_both_ch++;
  end
  always @(negedge clk) req_ready = ($urandom_range(0, 7) != 0);

  // --------------------------------------------------------------- host
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
  task automatic wait_idle(int mask);
    logic [31:0] st;
    do rd(1, st); while ((st & mask) != 0);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pop one result through RESULT and check it against the reference
  task automatic pop_result(int k, int ecls, real esc);
    logic [31:0] v;
    logic signed [23:0] sc;
    int got_cls;
    real s;
    checks++;
    if (!irq) begin failures++; $display("irq low with results queued"); end
    rd(9, v);
    got_cls = int'(v[31:24]);
    sc = v[23:0];
    checks++;
    if (ecls >= 0 && got_cls != ecls) begin
      failures++; $display("query %0d class %0d expected %0d", k, got_cls, ecls);
    end
    encode_ref(qseq[k]);
    s = real'(sc) - score_ref(got_cls);
    checks++;
    if (s > real'(TOL) || s < -real'(TOL)) begin
      failures++; $display("query %0d score %0d expected %f", k, sc, score_ref(got_cls));
    end
    $display("query %0d: class %0d score %0d (reference class %0d score %f)", k, got_cls,
             sc, ecls, esc);
  endtask

  initial begin
    logic [31:0] v;
    int exp_cls [NQ];
    real exp_sc [NQ], best, second, s;
    int t_run, t_done, reversed_q;
    int n_multi_group = 0, n_order = 0, n_queue_wait = 0, nread, nbefore;
    host_we = 0; host_re = 0; host_addr = '0; host_wdata = '0; req_ready = 1; rsp_data = '0; rsp_valid = 0;

    repeat (3) @(negedge clk);
    rst_n = 1;

    foreach (DLIST[di]) begin
    dcur = DLIST[di];
    results_seen = 0;
    $display("run with D = %0d", dcur);
    // build the task: transforms, symbols, prototypes, codebook, queries
    for (int j = 0; j < dcur; j++) make_unitary(j);
    for (int s2 = 0; s2 < NSYM; s2++)
      for (int j = 0; j < dcur; j++) begin
        sym[s2][j][0] = $urandom_range(0, (1 << PH_W) - 1);
        sym[s2][j][1] = $urandom_range(0, (1 << PH_W) - 1);
      end
    for (int c = 0; c < NCLS; c++) begin
      for (int t = 0; t < L; t++) proto[c][t] = $urandom_range(0, NSYM - 1);
      encode_ref(proto[c]);
      for (int j = 0; j < dcur; j++)
        for (int e = 0; e < 4; e++) begin cbr[c][j][e] = q(hr[j][e]); cbi[c][j][e] = q(hi[j][e]); end
    end
    reversed_q = 1;
    for (int k = 0; k < NQ; k++) begin
      for (int t = 0; t < L; t++) qseq[k][t] = proto[(3 * k + 1) % NCLS][t];
      if (k == reversed_q)
        for (int t = 0; t < L; t++) qseq[k][t] = proto[(3 * k + 1) % NCLS][L - 1 - t];
      else if (k % 2 == 1)
        qseq[k][$urandom_range(0, L - 1)] = $urandom_range(0, NSYM - 1);
    end
    for (int k = 0; k < NQ; k++) begin
      encode_ref(qseq[k]);
      best = -1.0e9; second = -1.0e9; exp_cls[k] = 0;
      for (int c = 0; c < NCLS; c++) begin
        s = score_ref(c);
        if (s > best) begin second = best; best = s; exp_cls[k] = c; end
        else if (s > second) second = s;
      end
      exp_sc[k] = best;
      if (best - second < 2.0 * TOL) exp_cls[k] = -1;      // too close to call
    end
    // the reversed prototype must score below the prototype itself
    encode_ref(qseq[reversed_q]);
    if (score_ref((3 * reversed_q + 1) % NCLS) < SC * 0.9) n_order++;

    // configuration
    wr(2, TM_BASE); wr(3, CB_BASE); wr(4, IN_BASE);
    wr(5, dcur); wr(6, L); wr(7, NCLS); wr(8, NQ);
    rd(5, v); checks++; if (v != dcur) begin failures++; $display("DIM readback %0d", v); end
    rd(7, v); checks++; if (v != NCLS) begin failures++; $display("NUM_CLASSES readback"); end
    // transforms and codebook load together on the two DMA channels
    wr(0, 1);
    wr(0, 2);
    wait_idle(3);
    // run the batch; results are popped only when the queue is full, the
    // rest after the run
    wr(0, 4);
    t_run = cyc;
    nread = 0;
    do begin
      rd(1, v);
      nbefore = nread;
      results_seen = nread + int'((v >> 8) & 255);
      if (((v >> 8) & 255) == 16) begin
        n_queue_wait++;
        pop_result(nread, exp_cls[nread], exp_sc[nread]);
        nread++;
      end
    end while ((v & 4) != 0);
    t_done = cyc;
    checks++;
    if (int'((v >> 8) & 255) != NQ - nbefore) begin failures++; $display("queued %0d", (v >> 8) & 255); end
    while (nread < NQ) begin
      pop_result(nread, exp_cls[nread], exp_sc[nread]);
      nread++;
    end
    rd(9, v); checks++; if (v != 32'hFFFF_FFFF) begin failures++; $display("queue not empty"); end
    $display("run took %0d clocks", t_done - t_run);
    end

    if (NCLS > P) n_multi_group++;
    // every mechanism must have happened at least once
    $display("memory stalls %0d, both channels %0d, encode/search overlap %0d, multi-group %0d, order %0d, queue-full %0d",
             n_mem_stall, n_both_ch, n_prefetch, n_multi_group, n_order, n_queue_wait);
    checks++; if (n_mem_stall == 0)   begin failures++; $display("no memory stall"); end
    checks++; if (n_both_ch == 0)     begin failures++; $display("channels never concurrent"); end
    checks++; if (n_prefetch == 0 && NQ > 1) begin failures++; $display("no encode/search overlap"); end
    checks++; if (n_multi_group == 0) begin failures++; $display("single group only"); end
    checks++; if (n_order == 0)       begin failures++; $display("order not encoded"); end
    checks++; if (n_queue_wait == 0 && NQ > 16) begin failures++; $display("queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
