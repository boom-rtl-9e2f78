// boom_sync_fifo_tb: random push/pop traffic against a queue model; checks every
// popped word, the count, full and empty, and fills the queue to full once.
module boom_sync_fifo_tb;
  localparam int W = 72, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  boom_sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .wr_data, .pop, .rd_data, .count, .full, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || full != (model.size() == DEPTH) || empty != (model.size() == 0)) begin
        failures++;
        if (failures < 5) $display("count %0d model %0d full %b empty %b", count, model.size(), full, empty);
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data !== model[0]) failures++;
      end
      // phases: fill, drain, random
      if (n < 40)       begin push = (model.size() < DEPTH); pop = 0; end
      else if (n < 80)  begin push = 0; pop = (model.size() > 0); end
      else              begin push = ($urandom_range(1) == 1) && model.size() < DEPTH;
                              pop  = ($urandom_range(1) == 1) && model.size() > 0; end
      wr_data = {$urandom, $urandom, $urandom};
      if (full) saw_full++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
