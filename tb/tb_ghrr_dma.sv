// Self-checking testbench for ghrr_dma.
//
// A memory model with random request acceptance and random (in-order)
// response latency returns a data word that encodes its address. Both
// channels run at once with random consumer back-pressure; every delivered
// word is checked against the address sequence of its channel, the word
// counts and done pulses are checked, and a single channel with an ideal
// memory and consumer must sustain one word per clock.
module tb_ghrr_dma;
  localparam int unsigned AW = 32, LW = 24, DW = 64;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic [1:0] start, busy, done, st_valid, st_ready;
  logic [1:0][AW-1:0] src; logic [1:0][LW-1:0] len;
  logic req_valid, req_ready, rsp_valid; logic [AW-1:0] req_addr; logic [DW-1:0] rsp_data;
  logic [1:0][DW-1:0] st_data;

  ghrr_dma #(.NCH(2), .ADDR_W(AW), .LEN_W(LW), .DATA_W(DW), .FIFO_D(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .src_i(src), .len_i(len),
    .busy_o(busy), .done_o(done),
    .mem_req_valid_o(req_valid), .mem_req_ready_i(req_ready), .mem_req_addr_o(req_addr),
    .mem_rsp_valid_i(rsp_valid), .mem_rsp_data_i(rsp_data),
    .st_valid_o(st_valid), .st_ready_i(st_ready), .st_data_o(st_data));

  int checks = 0, failures = 0, cyc = 0;
  bit ideal = 0;
  int lat_max = 4;
  int got [2];
  int donec [2];
  logic [AW-1:0] base [2];

  function automatic logic [DW-1:0] word_of(logic [AW-1:0] a);
    return {~a, a ^ 32'h5A5A_1234};
  endfunction

  // memory model
  logic [AW-1:0] pend_a [$];
  int            pend_t [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rsp_valid <= 1'b0;
    if (pend_a.size() > 0 && pend_t[0] <= cyc) begin
      rsp_valid <= 1'b1;
      rsp_data  <= word_of(pend_a[0]);
      void'(pend_a.pop_front());
      void'(pend_t.pop_front());
    end
    if (req_valid && req_ready) begin
      pend_a.push_back(req_addr);
      pend_t.push_back(cyc + (ideal ? 0 : $urandom_range(0, lat_max)));
    end
  end
  always @(negedge clk) begin
    req_ready = ideal ? 1'b1 : ($urandom_range(0, 3) != 0);
    st_ready  = ideal ? 2'b11 : 2'($urandom_range(0, 3));
  end

  // stream checker
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (st_valid[c] && st_ready[c]) begin
        checks++;
        if (st_data[c] != word_of(base[c] + AW'(got[c]))) begin
          failures++;
          $display("ch%0d word %0d wrong", c, got[c]);
        end
        got[c]++;
      end
      if (done[c]) donec[c]++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int l0, int l1);
    int t0;
    got[0] = 0; got[1] = 0; donec[0] = 0; donec[1] = 0;
    base[0] = AW'($urandom); base[1] = AW'($urandom);
    @(negedge clk);
    src[0] = base[0]; src[1] = base[1]; len[0] = LW'(l0); len[1] = LW'(l1);
    start = {l1 != 0, l0 != 0};
    t0 = cyc;
    @(negedge clk);
    start = '0;
    while (busy != 2'b00) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got[0] != l0 || got[1] != l1) begin failures++; $display("counts %0d %0d", got[0], got[1]); end
    checks++;
    if (donec[0] != (l0 != 0) || donec[1] != (l1 != 0)) begin failures++; $display("done pulses"); end
    if (ideal) begin
      checks++;
      if (cyc - t0 > l0 + l1 + 8) begin failures++; $display("rate: %0d clocks for %0d words", cyc - t0, l0 + l1); end
    end
  endtask

  initial begin
    start = '0; src = '0; len = '0; req_ready = 0; st_ready = '0; rsp_data = '0; rsp_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(100, 77);
    run(1, 0);
    run(0, 33);
    for (int k = 0; k < 5; k++) run($urandom_range(1, 200), $urandom_range(1, 200));
    ideal = 1;
    run(300, 0);
    run(0, 250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
