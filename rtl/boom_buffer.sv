// boom_buffer: the BOOM buffer chip on the DIMM.
//
// It stands between the memory controller's fast, narrow channel (one 72-bit
// DBUS and one ABUS) and N_IDBUS slow 72-bit internal data buses (iDBUS) that
// together reach the DBUS bandwidth. With the defaults (four lanes at a quarter of
// the DBUS rate, two sub-ranks of two lanes, four ranks on four iABUSes) it is the
// buffer of a DIMM of x16 LPDDR2-400 chips behind a DDR3-1600 channel.
// Parts: the command side splits the ABUS into one iABUS per N_IDBUS, routed by
// rank, with translation of rank and burst length (boom_abus_split); the read side
// gathers the lanes of a sub-rank into one burst of 16 on the DBUS
// (boom_read_merge); the write side deals a DBUS burst out to the lanes
// (boom_write_split). A command with abus_cmd.half set moves a 64-byte block
// (DBUS burst 8, lane burst 8/L) through the same paths. One clock runs at the DBUS beat rate. A free-running divider
// makes the iDBUS beat strobe idbus_ce (every RATIO clocks) and the iABUS command
// slot (every 2*RATIO clocks); both are exported so that the DRAM side can stay
// in step. The DRAM drives idbus_rd_valid with one word per lane on an idbus_ce
// cycle; the buffer drives idbus_wr_valid the same way. The sub-rank structure,
// rates and bus widths follow the document; the single clock with enables, the
// command fields and the queue policies are this design's choices.
module boom_buffer
  import boom_pkg::*;
#(
  parameter int unsigned N_IDBUS  = 4,
  parameter int unsigned SUBRANKS = 2,
  parameter int unsigned RATIO    = 4,
  parameter int unsigned RANKS    = 4,
  parameter int unsigned Q_DEPTH  = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // external address/command bus
  input  logic                             abus_valid,
  input  ext_cmd_t                         abus_cmd,
  output logic                             abus_ready,
  // external data bus, write direction (from the controller)
  input  logic                             dbus_wr_valid,
  input  logic [LANE_W-1:0]                dbus_wr_data,
  // external data bus, read direction (to the controller)
  output logic                             dbus_rd_valid,
  output logic [LANE_W-1:0]                dbus_rd_data,
  output logic                             dbus_rd_last,
  // internal address/command buses
  output logic                             idbus_ce,
  output logic                             iabus_slot,
  output logic     [N_IDBUS-1:0]           iabus_valid,
  output int_cmd_t [N_IDBUS-1:0]           iabus_cmd,
  // internal data buses
  input  logic [N_IDBUS-1:0]               idbus_rd_valid,
  input  logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_rd_data,
  output logic [N_IDBUS-1:0]               idbus_wr_valid,
  output logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_wr_data,
  // status
  output logic                             rd_blk_start,
  output logic                             rd_underflow,
  output logic                             wr_orphan_beat
);
  localparam int unsigned L  = N_IDBUS / SUBRANKS;
  localparam int unsigned DW = $clog2(2 * RATIO);

  logic [DW-1:0] div;
  logic          rd_issue, wr_issue;
  logic [1:0]    issue_sr;
  logic          issue_half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == DW'(2 * RATIO - 1)) ? '0 : div + 1'b1;
  end
  assign idbus_ce   = (int'(div) % RATIO) == 0;
  assign iabus_slot = (div == '0);

  boom_abus_split #(.N_IABUS(N_IDBUS), .RANKS(RANKS), .LANES_PER_SR(L)) u_abus (
    .clk, .rst_n,
    .slot          (iabus_slot),
    .abus_valid    (abus_valid),
    .abus_cmd      (abus_cmd),
    .abus_ready    (abus_ready),
    .iabus_valid   (iabus_valid),
    .iabus_cmd     (iabus_cmd),
    .rd_issue      (rd_issue),
    .wr_issue      (wr_issue),
    .issue_subrank (issue_sr),
    .issue_half    (issue_half)
  );

  boom_read_merge #(.N_IDBUS(N_IDBUS), .SUBRANKS(SUBRANKS), .RATIO(RATIO), .Q_DEPTH(Q_DEPTH)) u_rd (
    .clk, .rst_n,
    .idbus_valid (idbus_rd_valid),
    .idbus_data  (idbus_rd_data),
    .order_push  (rd_issue),
    .order_sr    (issue_sr),
    .order_half  (issue_half),
    .dbus_valid  (dbus_rd_valid),
    .dbus_data   (dbus_rd_data),
    .dbus_last   (dbus_rd_last),
    .blk_start   (rd_blk_start),
    .underflow   (rd_underflow)
  );

  boom_write_split #(.N_IDBUS(N_IDBUS), .SUBRANKS(SUBRANKS), .Q_DEPTH(Q_DEPTH)) u_wr (
    .clk, .rst_n,
    .ce          (idbus_ce),
    .dbus_valid  (dbus_wr_valid),
    .dbus_data   (dbus_wr_data),
    .order_push  (wr_issue),
    .order_sr    (issue_sr),
    .order_half  (issue_half),
    .idbus_valid (idbus_wr_valid),
    .idbus_data  (idbus_wr_data),
    .orphan_beat (wr_orphan_beat)
  );
endmodule
