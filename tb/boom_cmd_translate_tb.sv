// boom_cmd_translate_tb: checks one iABUS translator.
// Commands are pushed faster than the slot rate (every 8 clocks); each must leave
// in order, one per slot, on the first slot after it was accepted, with the rank
// reduced to the bus-local index and burst 8 on reads and writes (two lanes per
// sub-rank), 0 otherwise. NOPs are dropped. in_ready must fall when 4 wait.
module boom_cmd_translate_tb;
  import boom_pkg::*;
  logic clk = 0, rst_n = 0, slot, in_valid = 0, in_ready, out_valid;
  ext_cmd_t in_cmd;
  int_cmd_t out_cmd;
  int checks = 0, failures = 0, stalls = 0;
  int cyc = 0;
  int_cmd_t exp_q [$];
  int acc_q [$];

  boom_cmd_translate #(.RANKS_PER_IABUS(2), .LANES_PER_SR(2)) dut (.clk, .rst_n, .slot, .in_valid, .in_cmd, .in_ready, .out_valid, .out_cmd);

  always #5 clk = ~clk;
  assign slot = (cyc % 8 == 0);
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_slot_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && in_cmd.op != CMD_NOP) begin
      int_cmd_t e;
      e = '{op: in_cmd.op, rank: 3'(in_cmd.rank % 2), subrank: in_cmd.subrank, bank: in_cmd.bank,
            row: in_cmd.row, col: in_cmd.col, burst: (in_cmd.op == CMD_RD || in_cmd.op == CMD_WR) ? (in_cmd.half ? 5'd4 : 5'd8) : 5'd0};
      exp_q.push_back(e);
      acc_q.push_back(cyc);
    end
    if (in_valid && !in_ready) stalls++;
    if (out_valid) begin
      int acc;
      checks += 2;
      if (exp_q.size() == 0) failures++;
      else begin
        if (out_cmd !== exp_q.pop_front()) failures++;
        acc = acc_q.pop_front();
        // out_valid is seen one clock after the slot that issued it; that slot is
        // the first one after acceptance, unless an earlier command held it
        if ((cyc - 1) % 8 != 0 || (cyc - 1 - acc > 8 && cyc - 1 - last_slot_out != 8)) begin
          failures++;
          $display("issue at %0d, accepted %0d", cyc - 1, acc);
        end
      end
      last_slot_out = cyc - 1;
    end
  end

  initial begin
    in_cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = (n < 200) ? ($urandom_range(3) == 0) : 1'b1;
      in_cmd.op = cmd_op_e'($urandom_range(5));
      in_cmd.half = 1'($urandom);
      in_cmd.rank = 3'($urandom_range(1));
      in_cmd.subrank = 2'($urandom_range(1));
      in_cmd.bank = 3'($urandom);
      in_cmd.row = 16'($urandom);
      in_cmd.col = 10'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (80) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
