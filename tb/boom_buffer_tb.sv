// boom_buffer_tb: checks the buffer chip in three configurations the document
// evaluates: four quarter-rate lanes with two sub-ranks (default), four
// quarter-rate lanes as one rank (burst 4 per lane), and two half-rate lanes
// (burst 8 per lane), plus the default with every third access a 64-byte one.
// Data written through the buffer must read back unchanged and reads must
// stream at the full DBUS rate.
module boom_buffer_tb;
  logic clk = 0, rst_n = 0;
  int c [4], f [4], r [4];
  logic d [4];
  always #5 clk = ~clk;

  boom_buffer_h #(.N_IDBUS(4), .SUBRANKS(2), .RATIO(4), .RANKS(4)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .fullrate(r[0]), .done(d[0]));
  boom_buffer_h #(.N_IDBUS(4), .SUBRANKS(1), .RATIO(4), .RANKS(4)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .fullrate(r[1]), .done(d[1]));
  boom_buffer_h #(.N_IDBUS(2), .SUBRANKS(1), .RATIO(2), .RANKS(4)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .fullrate(r[2]), .done(d[2]));
  boom_buffer_h #(.N_IDBUS(4), .SUBRANKS(2), .RATIO(4), .RANKS(4), .HALF(1)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .fullrate(r[3]), .done(d[3]));

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("full-rate blocks: %0d %0d %0d %0d", r[0], r[1], r[2], r[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
