// Self-checking testbench for ghrr_fifo: random pushes and pops (never past
// full or empty) against a queue model; checks data order, occupancy and the
// full/empty flags.
module tb_ghrr_fifo;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  logic push, pop, empty, full; logic [15:0] wdata, rdata; logic [3:0] count;

  ghrr_fifo #(.W(16), .DEPTH(5)) dut (.clk_i(clk), .rst_ni(rst_n), .push_i(push), .wdata_i(wdata),
    .pop_i(pop), .rdata_o(rdata), .empty_o(empty), .full_o(full), .count_o(count));

  int checks = 0, failures = 0;
  logic [15:0] model [$];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == 5)) begin
        failures++; $display("flags: count %0d model %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rdata != model[0]) begin failures++; $display("data %h exp %h", rdata, model[0]); end
      end
      pop  = (model.size() > 0) && ($urandom_range(0, 2) != 0);
      push = ((model.size() < 5) || pop) && ($urandom_range(0, 2) != 0);
      wdata = 16'($urandom);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
