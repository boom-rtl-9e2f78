// boom_read_merge_tb: checks the read data path in two configurations.
//  * default, 4 lanes at a quarter of the DBUS rate, 2 sub-ranks of 2 lanes
//    (burst 8 per lane): reads alternate between the sub-ranks, one every 16
//    clocks; the DBUS must then be busy at least 95% of the time, which needs the
//    two sub-ranks' transfers to overlap;
//  * 2 lanes at half rate, no sub-ranks: the lanes match the DBUS, so the first
//    DBUS beat must leave two clocks after the first lane word is sampled (plain
//    flip-flop pass-through), and blocks every 16 clocks keep the DBUS fully busy;
//  * the default lanes with 64-byte reads only (burst 4 per lane, 8 DBUS beats),
//    one every 8 clocks: the DBUS must stay busy and a burst waits for 3 of the 4
//    words of each lane;
//  * the default lanes with every third read a 64-byte one (order and framing).
module boom_read_merge_tb;
  logic clk = 0, rst_n = 0;
  int c0, f0, l0, c1, f1, l1, c2, f2, l2, c3, f3, l3;
  real u0, u1, u2, u3;
  logic d0, d1, d2, d3;
  int checks, failures;

  always #5 clk = ~clk;

  boom_read_merge_h #(.N_IDBUS(4), .SUBRANKS(2), .RATIO(4), .NBLK(24), .ISSUE_GAP(16)) h0 (
    .clk, .rst_n, .checks(c0), .failures(f0), .first_latency(l0), .util(u0), .done(d0));
  boom_read_merge_h #(.N_IDBUS(2), .SUBRANKS(1), .RATIO(2), .NBLK(24), .ISSUE_GAP(16)) h1 (
    .clk, .rst_n, .checks(c1), .failures(f1), .first_latency(l1), .util(u1), .done(d1));
  boom_read_merge_h #(.N_IDBUS(4), .SUBRANKS(2), .RATIO(4), .NBLK(24), .ISSUE_GAP(8), .HALF(1)) h2 (
    .clk, .rst_n, .checks(c2), .failures(f2), .first_latency(l2), .util(u2), .done(d2));
  boom_read_merge_h #(.N_IDBUS(4), .SUBRANKS(2), .RATIO(4), .NBLK(24), .ISSUE_GAP(16), .HALF(2)) h3 (
    .clk, .rst_n, .checks(c3), .failures(f3), .first_latency(l3), .util(u3), .done(d3));

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    repeat (5) @(posedge clk);
    checks = c0 + c1 + c2 + c3 + 6;
    failures = f0 + f1 + f2 + f3;
    $display("64-byte reads: first beat after %0d clocks, DBUS utilisation %0.3f", l2, u2);
    if (u2 < 0.95) failures++;
    if (l2 != 2 * 4 + 4) failures++;
    $display("sub-ranked: first beat after %0d clocks, DBUS utilisation %0.3f", l0, u0);
    $display("2x pass-through: first beat after %0d clocks, DBUS utilisation %0.3f", l1, u1);
    if (u0 < 0.95) failures++;
    // latency is counted from the clock that drives a lane word to the clock that
    // sees the DBUS beat: 1 to sample, 2 through queue and output register, 1 to see.
    if (l1 != 4) failures++;
    // sub-ranked: the burst waits for 5 of 8 words per lane, 4 iDBUS beats later
    if (l0 != 4 * 4 + 4) failures++;
    if (u1 < 0.95) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
