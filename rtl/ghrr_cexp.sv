// Complex exponential stage of the encoder: maps a phase to e^{i*theta}.
//
// The phase is an unsigned PH_W-bit fraction of a full turn
// (theta = 2*pi*phase / 2**PH_W). The output is the unit-magnitude complex
// number cos(theta) + i*sin(theta) in the shared Q1.14 element format. The
// values come from a table of 2**PH_W entries that is filled at elaboration
// by a constant function (a Taylor series in real arithmetic), so the
// hardware is a plain ROM. The table lookup is the stage's only function the
// design takes from the architecture; the table form and the phase width
// are this design's choices.
//
// Timing: one register stage; out follows phase_i by one clock when en_i is
// high, and holds otherwise.
module ghrr_cexp
  import ghrr_pkg::*;
#(
  parameter int unsigned PW = PH_W
) (
  input  logic          clk_i,
  input  logic          en_i,
  input  logic [PW-1:0] phase_i,
  output cplx_t         out_o
);

  localparam int unsigned N   = 1 << PW;
  localparam real         PI  = 3.14159265358979323846;
  localparam real         ONE = real'(1 << FRAC);

  // cos(x) by range reduction to [-pi, pi] and a 16-term Taylor series.
  function automatic real cos_taylor(real x);
    real term, sum;
    while (x > PI)  x = x - 2.0 * PI;
    while (x < -PI) x = x + 2.0 * PI;
    term = 1.0;
    sum  = 1.0;
    for (int n = 1; n < 16; n++) begin
      term = -term * x * x / real'((2 * n - 1) * (2 * n));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic int fx(real v);
    real s;
    s = v * ONE;
    return (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
  endfunction

  cplx_t rom [N];

  for (genvar i = 0; i < N; i++) begin : g_rom
    localparam real TH = 2.0 * PI * real'(i) / real'(N);
    localparam int  C  = fx(cos_taylor(TH));
    localparam int  S  = fx(cos_taylor(TH - PI / 2.0));
    assign rom[i].re = DW'(C);
    assign rom[i].im = DW'(S);
  end

  always_ff @(posedge clk_i) begin
    if (en_i) out_o <= rom[phase_i];
  end

endmodule
