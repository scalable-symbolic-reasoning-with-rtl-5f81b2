// Self-checking testbench for ghrr_inference.
//
// Fills a small codebook and both query banks with random complex vectors
// (one class per query is a noisy copy of it), runs searches over several
// class counts and compares the returned class and score with a reference
// computed here in real arithmetic: score = <q,c> / (|q| |c|) in Q1.14.
// Also checks that classes at or above the class count are ignored, the
// single-pass timing (dim + 2 clocks to qbuf_free) and that passes stall
// when normalisation of the previous pass is still running.
module tb_ghrr_inference;
  import ghrr_pkg::*;

  localparam int unsigned MM = 2, DIMS = 16, PP = 4, NG = 3;
  localparam int unsigned AW = $clog2(DIMS), CW = $clog2(PP * NG + 1);
  localparam int unsigned NC = PP * NG;
  localparam int TOL = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic qb_we, qb_bank; logic [AW-1:0] qb_addr; cplx_t [MM*MM-1:0] qb_wdata;
  logic cb_we; logic [CW-1:0] cb_class; logic [AW-1:0] cb_addr; cplx_t [MM*MM-1:0] cb_wdata;
  logic start, bank; logic [AW:0] dim; logic [CW-1:0] ncls;
  logic ready, busy, qfree, res_valid; logic [CW-1:0] res_class; logic signed [31:0] res_score;

  ghrr_inference #(.MM(MM), .DIMS(DIMS), .PP(PP), .NG(NG)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .qb_we_i(qb_we), .qb_bank_i(qb_bank), .qb_addr_i(qb_addr), .qb_wdata_i(qb_wdata),
    .cb_we_i(cb_we), .cb_class_i(cb_class), .cb_addr_i(cb_addr), .cb_wdata_i(cb_wdata),
    .start_i(start), .bank_i(bank), .dim_i(dim), .ncls_i(ncls),
    .ready_o(ready), .busy_o(busy), .qbuf_free_o(qfree),
    .res_valid_o(res_valid), .res_class_o(res_class), .res_score_o(res_score));

  int checks = 0, failures = 0, cyc = 0, stalls = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int qv [2][DIMS][8];
  int cv [NC][DIMS][8];

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd();
    return $urandom_range(0, 32000) - 16000;
  endfunction

  task automatic write_query(int b, int seedcls, int noise);
    for (int j = 0; j < DIMS; j++) begin
      for (int e = 0; e < 8; e++) begin
        qv[b][j][e] = rnd();
        cv[seedcls][j][e] = qv[b][j][e] + $urandom_range(0, 2 * noise) - noise;
      end
    end
  endtask

  task automatic load_all();
    for (int b = 0; b < 2; b++)
      for (int j = 0; j < DIMS; j++) begin
        @(negedge clk);
        qb_we = 1; qb_bank = b[0]; qb_addr = AW'(j);
        for (int e = 0; e < 4; e++) begin
          qb_wdata[e].re = DW'(qv[b][j][2*e]); qb_wdata[e].im = DW'(qv[b][j][2*e+1]);
        end
      end
    @(negedge clk); qb_we = 0;
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < DIMS; j++) begin
        @(negedge clk);
        cb_we = 1; cb_class = CW'(c); cb_addr = AW'(j);
        for (int e = 0; e < 4; e++) begin
          cb_wdata[e].re = DW'(cv[c][j][2*e]); cb_wdata[e].im = DW'(cv[c][j][2*e+1]);
        end
      end
    @(negedge clk); cb_we = 0;
  endtask

  function automatic real ref_score(int b, int c, int d);
    real dp = 0.0, nq = 0.0, nc = 0.0;
    for (int j = 0; j < d; j++)
      for (int e = 0; e < 8; e++) begin
        dp += real'(qv[b][j][e]) * real'(cv[c][j][e]);
        nq += real'(qv[b][j][e]) * real'(qv[b][j][e]);
        nc += real'(cv[c][j][e]) * real'(cv[c][j][e]);
      end
    return dp / $sqrt(nq * nc) * real'(1 << FRAC);
  endfunction

  task automatic search(int b, int d, int n);
    real best, s, second;
    int bc, t0, tfree;
    best = -1.0e9; second = -1.0e9; bc = 0;
    for (int c = 0; c < n; c++) begin
      s = ref_score(b, c, d);
      if (s > best) begin second = best; best = s; bc = c; end
      else if (s > second) second = s;
    end
    while (!ready) @(negedge clk);
    start = 1; bank = b[0]; dim = (AW+1)'(d); ncls = CW'(n);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    tfree = -1;
    while (!res_valid) begin
      if (qfree) tfree = cyc;
      @(negedge clk);
    end
    checks++;
    if (best - second > 2.0 * TOL && int'(res_class) != bc) begin
      failures++; $display("b%0d d%0d n%0d class %0d exp %0d", b, d, n, res_class, bc);
    end
    checks++;
    s = real'(res_score) - ref_score(b, int'(res_class), d);
    if (s > real'(TOL) || s < -real'(TOL)) begin
      failures++; $display("score %0d exp %f", res_score, ref_score(b, int'(res_class), d));
    end
    // more clocks than the passes themselves need: a pass waited for the normaliser
    if (tfree - t0 > ((n + PP - 1) / PP) * d + 2) stalls++;
    if (n <= PP) begin
      checks++;
      if (tfree - t0 != d + 2) begin failures++; $display("pass time %0d", tfree - t0); end
    end
  endtask

  initial begin
    qb_we = 0; qb_bank = 0; qb_addr = '0; qb_wdata = '0; cb_we = 0; cb_class = '0;
    cb_addr = '0; cb_wdata = '0; start = 0; bank = 0; dim = '0; ncls = '0;
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < DIMS; j++)
        for (int e = 0; e < 8; e++) cv[c][j][e] = rnd();
    write_query(0, 6, 2000);
    write_query(1, 2, 4000);
    // a perfect copy of query 0 in class 11, outside the class count below
    for (int j = 0; j < DIMS; j++) for (int e = 0; e < 8; e++) cv[11][j][e] = qv[0][j][e];
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_all();
    search(0, DIMS, 10);
    search(1, DIMS, 10);
    search(0, DIMS, 12);
    checks++;
    if (res_class != CW'(11)) begin failures++; $display("class 11 not found"); end
    search(1, DIMS, 3);
    search(0, 5, 7);
    search(1, DIMS, 12);
    // random queries and class counts
    for (int k = 0; k < 6; k++) begin
      write_query(k % 2, $urandom_range(0, NC - 1), 3000);
      load_all();
      search(k % 2, $urandom_range(1, DIMS), $urandom_range(1, NC));
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
