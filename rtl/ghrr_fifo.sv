// Synchronous first-in first-out buffer used by the DMA channels, the DMA's
// response-routing tags and the result queue of the host interface.
//
// A memory of DEPTH words with read and write pointers. push_i writes
// wdata_i at the tail, pop_i drops the head; rdata_o always shows the head
// (combinational read), so a word pushed in one clock is visible the next.
// Pushing when full or popping when empty is a usage error flagged by
// assertions. count_o gives the occupancy.
module ghrr_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          push_i,
  input  logic [W-1:0]  wdata_i,
  input  logic          pop_i,
  output logic [W-1:0]  rdata_o,
  output logic          empty_o,
  output logic          full_o,
  output logic [CW-1:0] count_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [CW-1:0] cnt_q;

  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == CW'(DEPTH));
  assign count_o = cnt_q;
  assign rdata_o = mem[rp_q];

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i) begin
    if (push_i) mem[wp_q] <= wdata_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push_i) wp_q <= nxt(wp_q);
      if (pop_i)  rp_q <= nxt(rp_q);
      cnt_q <= cnt_q + CW'(push_i) - CW'(pop_i);
    end
  end

  a_no_overflow:  assert property (@(posedge clk_i) disable iff (!rst_ni) push_i |-> (!full_o || pop_i));
  a_no_underflow: assert property (@(posedge clk_i) disable iff (!rst_ni) pop_i |-> !empty_o);

endmodule
