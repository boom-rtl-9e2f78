// boom_mc_ecc_tx_tb: checks the controller write path.
// Random blocks are sent; the 16 DBUS beats must follow acceptance by one cycle
// with no gap, and must equal the beats built by the reference layout and encoder.
// A second block offered while busy must wait (blk_ready low for 16 cycles).
// Every third block is a 64-byte one: only its first 8 beats may be sent.
module boom_mc_ecc_tx_tb;
  import boom_pkg::*;
  import boom_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic blk_valid = 0, blk_ready, dbus_valid, blk_half = 0;
  logic [1023:0] blk;
  logic [71:0] dbus_data;
  int checks = 0, failures = 0;

  boom_mc_ecc_tx dut (.clk, .rst_n, .blk_valid, .blk, .blk_half, .blk_ready, .dbus_valid, .dbus_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [71:0] want [16];
    blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      int busy, len;
      @(negedge clk);
      blk = rand_block();
      blk_valid = 1;
      blk_half = (n % 3 == 1);
      len = blk_half ? 8 : 16;
      block_to_beats(blk, want);
      checks++;
      if (!blk_ready) failures++;
      @(posedge clk);
      @(negedge clk);
      blk_valid = (n % 2 == 0);   // keep offering on even blocks: must be held off
      busy = 0;
      for (int t = 0; t < len; t++) begin
        checks++;
        if (!dbus_valid || dbus_data !== want[t]) begin
          failures++;
          if (failures < 5) $display("block %0d beat %0d: valid=%b %h want %h", n, t, dbus_valid, dbus_data, want[t]);
        end
        if (!blk_ready) busy++;
        if (t == len - 1) blk_valid = 0;
        @(negedge clk);
      end
      checks++;
      if (busy != len - 1) begin failures++; $display("busy for %0d cycles", busy); end
      checks++;
      if (dbus_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
