// Self-checking testbench for ghrr_cexp: sweeps every phase code and checks
// cos/sin against real-valued math within one LSB, plus the one-clock latency
// and the hold behaviour when the enable is low.
module tb_ghrr_cexp;
  import ghrr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = real'(1 << FRAC);

  logic clk = 0;
  always #5 clk = ~clk;
  logic en; logic [PH_W-1:0] phase; cplx_t out;

  ghrr_cexp dut (.clk_i(clk), .en_i(en), .phase_i(phase), .out_o(out));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(real v);
    return (v >= 0.0) ? int'($floor(v * SC + 0.5)) : -int'($floor(-v * SC + 0.5));
  endfunction

  task automatic expect_out(int p);
    int er, ei;
    er = int'(out.re) - q($cos(2.0 * PI * real'(p) / real'(1 << PH_W)));
    ei = int'(out.im) - q($sin(2.0 * PI * real'(p) / real'(1 << PH_W)));
    checks++;
    if (er > 1 || er < -1 || ei > 1 || ei < -1) begin
      failures++;
      $display("phase %0d got %0d %0d", p, out.re, out.im);
    end
  endtask

  initial begin
    en = 1; phase = '0;
    for (int p = 0; p < (1 << PH_W); p++) begin
      @(negedge clk);
      phase = PH_W'(p);
      @(posedge clk);
      #1 expect_out(p);
    end
    // hold: enable low, output must keep the last value
    @(negedge clk);
    en = 0; phase = PH_W'(3);
    repeat (3) @(posedge clk);
    #1 expect_out((1 << PH_W) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
