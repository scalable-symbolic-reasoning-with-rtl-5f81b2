// Self-checking testbench for ghrr_encoder.
//
// Loads random 2x2 unitary transforms, streams random phase sequences and
// compares every output dimension with a real-valued reference of
// H_j = prod_t Q_j * diag(e^{i*theta_{t,j}}) computed here. Also checks the
// three-clock output latency, the one-input-per-clock rate and that swapping
// two inputs of a sequence changes the result (non-commutative binding).
module tb_ghrr_encoder;
  import ghrr_pkg::*;

  localparam int unsigned MM   = 2;
  localparam int unsigned DIMS = 16;
  localparam int unsigned LMAX = 8;
  localparam int unsigned AW   = $clog2(DIMS);
  localparam int unsigned LW   = $clog2(LMAX + 1);
  localparam real PI = 3.14159265358979323846;
  localparam real SC = real'(1 << FRAC);
  localparam int  TOL = 12;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic tm_we; logic [AW-1:0] tm_addr; cplx_t [MM*MM-1:0] tm_wdata;
  logic start; logic [LW-1:0] seq_len; logic [AW:0] dim;
  logic busy, done, in_valid, in_ready; logic [MM*PH_W-1:0] in_phase;
  logic out_valid; logic [AW-1:0] out_idx; cplx_t [MM*MM-1:0] out_data;

  ghrr_encoder #(.MM(MM), .DIMS(DIMS), .LMAX(LMAX)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .tm_we_i(tm_we), .tm_addr_i(tm_addr), .tm_wdata_i(tm_wdata),
    .start_i(start), .seq_len_i(seq_len), .dim_i(dim), .busy_o(busy), .done_o(done),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_phase_i(in_phase),
    .out_valid_o(out_valid), .out_idx_o(out_idx), .out_data_o(out_data));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stored transforms (quantised) and phases
  int qre [DIMS][4], qim [DIMS][4];
  int ph [LMAX][DIMS][MM];
  // reference results
  real hre [DIMS][4], him [DIMS][4];
  int got_re [DIMS][4], got_im [DIMS][4];
  int outs = 0, last_accept_cyc = 0, done_cyc = 0, accepts = 0, first_accept_cyc = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid) begin
      for (int e = 0; e < 4; e++) begin
        got_re[out_idx][e] = out_data[e].re;
        got_im[out_idx][e] = out_data[e].im;
      end
      outs++;
    end
    if (in_valid && in_ready) begin
      if (accepts == 0) first_accept_cyc = cyc;
      accepts++;
      last_accept_cyc = cyc;
    end
    if (done) done_cyc = cyc;
  end

  function automatic int q(real v);
    return (v >= 0.0) ? int'($floor(v * SC + 0.5)) : -int'($floor(-v * SC + 0.5));
  endfunction

  task automatic make_unitary(int j);
    real a, b, c, d, th;
    a = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    b = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    c = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    th = 0.5 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    d = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    // U = e^{id} [[e^{ia}cos th, e^{ib} sin th], [-e^{-ib} sin th, e^{-ia} cos th]]
    qre[j][0] = q($cos(a + d) * $cos(th));  qim[j][0] = q($sin(a + d) * $cos(th));
    qre[j][1] = q($cos(b + d) * $sin(th));  qim[j][1] = q($sin(b + d) * $sin(th));
    qre[j][2] = q(-$cos(d - b) * $sin(th)); qim[j][2] = q(-$sin(d - b) * $sin(th));
    qre[j][3] = q($cos(d - a) * $cos(th));  qim[j][3] = q($sin(d - a) * $cos(th));
    if (c > 100.0) $display("unused");
  endtask

  task automatic reference(int L, int D);
    real rr[4], ri[4], ur[4], ui[4], tr[4], ti[4], er, ei;
    for (int j = 0; j < D; j++) begin
      for (int t = 0; t < L; t++) begin
        for (int i = 0; i < 2; i++)
          for (int k = 0; k < 2; k++) begin
            er = $cos(2.0 * PI * real'(ph[t][j][k]) / real'(1 << PH_W));
            ei = $sin(2.0 * PI * real'(ph[t][j][k]) / real'(1 << PH_W));
            ur[i*2+k] = (real'(qre[j][i*2+k]) * er - real'(qim[j][i*2+k]) * ei) / SC;
            ui[i*2+k] = (real'(qre[j][i*2+k]) * ei + real'(qim[j][i*2+k]) * er) / SC;
          end
        if (t == 0) begin
          rr = ur; ri = ui;
        end else begin
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
      for (int e = 0; e < 4; e++) begin hre[j][e] = rr[e]; him[j][e] = ri[e]; end
    end
  endtask

  task automatic run_seq(int L, int D, bit gaps);
    int t, j;
    outs = 0; accepts = 0;
    @(negedge clk);
    seq_len = LW'(L); dim = (AW+1)'(D); start = 1;
    @(negedge clk);
    start = 0;
    j = 0; t = 0;
    while (j < D) begin
      in_valid = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      for (int k = 0; k < MM; k++) in_phase[k*PH_W +: PH_W] = PH_W'(ph[t][j][k]);
      @(posedge clk);
      if (in_valid && in_ready) begin
        t++;
        if (t == L) begin t = 0; j++; end
      end
      @(negedge clk);
    end
    in_valid = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic compare(int D, string tag);
    int err;
    for (int j = 0; j < D; j++)
      for (int e = 0; e < 4; e++) begin
        checks++;
        err = got_re[j][e] - q(hre[j][e]);
        if (err < 0) err = -err;
        if (err > TOL) begin failures++; $display("%s j=%0d e=%0d re %0d exp %0d", tag, j, e, got_re[j][e], q(hre[j][e])); end
        checks++;
        err = got_im[j][e] - q(him[j][e]);
        if (err < 0) err = -err;
        if (err > TOL) begin failures++; $display("%s j=%0d e=%0d im %0d exp %0d", tag, j, e, got_im[j][e], q(him[j][e])); end
      end
  endtask

  initial begin
    int save_re, save_im, tmp;
    tm_we = 0; tm_addr = '0; tm_wdata = '0; start = 0; seq_len = '0; dim = '0;
    in_valid = 0; in_phase = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load transforms
    for (int j = 0; j < DIMS; j++) begin
      make_unitary(j);
      tm_we = 1; tm_addr = AW'(j);
      for (int e = 0; e < 4; e++) begin
        tm_wdata[e].re = DW'(qre[j][e]); tm_wdata[e].im = DW'(qim[j][e]);
      end
      @(negedge clk);
    end
    tm_we = 0;

    // 1) sequence length 5 over all dimensions, full rate
    for (int t = 0; t < LMAX; t++)
      for (int j = 0; j < DIMS; j++)
        for (int k = 0; k < MM; k++) ph[t][j][k] = $urandom_range(0, (1 << PH_W) - 1);
    reference(5, DIMS);
    run_seq(5, DIMS, 0);
    compare(DIMS, "L5");
    checks++;
    if (outs != DIMS) begin failures++; $display("outputs %0d", outs); end
    checks++;
    if (done_cyc != last_accept_cyc + 3) begin failures++; $display("latency %0d", done_cyc - last_accept_cyc); end
    checks++;
    if (last_accept_cyc - first_accept_cyc != 5 * DIMS - 1) begin failures++; $display("rate"); end
    save_re = got_re[3][1]; save_im = got_im[3][1];

    // 2) swap inputs 0 and 1: binding is order sensitive
    for (int j = 0; j < DIMS; j++)
      for (int k = 0; k < MM; k++) begin tmp = ph[0][j][k]; ph[0][j][k] = ph[1][j][k]; ph[1][j][k] = tmp; end
    reference(5, DIMS);
    run_seq(5, DIMS, 1);
    compare(DIMS, "swap");
    checks++;
    if (got_re[3][1] == save_re && got_im[3][1] == save_im) begin failures++; $display("order insensitive"); end

    // 3) short run: length 1 and length 8 on fewer dimensions
    reference(1, 7);
    run_seq(1, 7, 1);
    compare(7, "L1");
    reference(8, 9);
    run_seq(8, 9, 0);
    compare(9, "L8");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
