// Self-checking testbench for ghrr_rsqrt: random and corner-case squared
// norms, result compared with an integer reference floor(2**RF/isqrt(n)),
// and the fixed latency NW/2 + RF + 2 clocks from start to done.
module tb_ghrr_rsqrt;
  localparam int unsigned NW = 48;
  localparam int unsigned RF = 40;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  logic start, busy, done; logic [NW-1:0] n; logic [RF:0] r;

  ghrr_rsqrt #(.NW(NW), .RF(RF)) dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .n_i(n), .busy_o(busy), .done_o(done), .r_o(r));

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned isqrt(longint unsigned v);
    longint unsigned lo = 0, hi = 64'd16777216, mid;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  task automatic one(longint unsigned v);
    longint unsigned s, exp_r;
    int lat;
    s = isqrt(v);
    exp_r = (s == 0) ? ((64'd1 << (RF + 1)) - 1) : ((64'd1 << RF) / s);
    @(negedge clk);
    n = NW'(v); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (64'(r) != exp_r) begin failures++; $display("n=%0d r=%0d exp %0d", v, r, exp_r); end
    if (s != 0) begin
      checks++;
      if (lat != NW / 2 + RF + 2) begin failures++; $display("latency %0d", lat); end
    end
  endtask

  initial begin
    start = 0; n = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(4); one(15); one(16);
    one(64'hFFFF_FFFF_FFFF); one(64'd16000 << 28);
    for (int i = 0; i < 200; i++) one({$urandom, $urandom} & 64'hFFFF_FFFF_FFFF >> $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
