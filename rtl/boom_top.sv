// boom_top: a BOOM memory channel from the controller's ECC logic to the DRAM pins.
//
// BOOM (buffered output on module) builds a server DIMM out of slow, wide, low-
// power DRAM. A buffer chip on the DIMM joins several slow internal data buses,
// which together match the bandwidth of a fast external DDR3 channel, and because
// a block is spread over many chips the check symbols of several ranks can be
// pooled into a strong chipkill-style code. This top joins:
//   * boom_mc_ecc_tx: the controller's write path, which encodes a 128-byte block
//     into RS(36,32) strips and sends it as a DBUS burst of 16;
//   * boom_buffer: the buffer chip, which relays commands to the iABUSes and data
//     between the DBUS and the iDBUS lanes;
//   * boom_mc_ecc_rx: the controller's read path, which corrects and classifies.
// The DRAM chips and the controller's scheduler are outside: the iABUS/iDBUS ports
// go to the DRAM ranks and the ABUS command port comes from the scheduler, which
// must issue a write command before the write block it belongs to. A 64-byte
// access (abus_cmd.half, with wr_blk_half on its write block) uses the lower half
// of wr_blk / rd_blk and a DBUS burst of 8; rd_blk_half marks such a read. When
// the controller has recorded a failed chip it sets rd_erase_valid/rd_erase_chip
// and the read path rebuilds that chip and only detects further failures. One clock at
// the DBUS beat rate (1600 MT/s in the document's main case) runs everything.
// Defaults are the document's low-power configuration: four x16 LPDDR2-400 lanes
// (RATIO 4), two sub-ranks, four logical ranks per DIMM.
module boom_top
  import boom_pkg::*;
  import boom_ecc_pkg::*;
#(
  parameter int unsigned N_IDBUS  = 4,
  parameter int unsigned SUBRANKS = 2,
  parameter int unsigned RATIO    = 4,
  parameter int unsigned RANKS    = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // from the controller's scheduler
  input  logic                             abus_valid,
  input  ext_cmd_t                         abus_cmd,
  output logic                             abus_ready,
  input  logic                             wr_blk_valid,
  input  logic [BLOCK_BITS-1:0]            wr_blk,
  input  logic                             wr_blk_half,
  output logic                             wr_blk_ready,
  // read blocks, corrected
  output logic                             rd_blk_valid,
  output logic [BLOCK_BITS-1:0]            rd_blk,
  output logic                             rd_blk_half,
  output fail_e                            rd_cls,
  output fail_e [STRIPS-1:0]               rd_strip_cls,
  output logic [4:0]                       rd_fail_chip,
  output logic [6:0]                       rd_fail_pin,
  output logic                             rd_framing_error,
  // erasure mode: a chip reported failed earlier, decoded as known-dead
  input  logic                             rd_erase_valid,
  input  logic [4:0]                       rd_erase_chip,
  // DRAM side of the buffer chip
  output logic                             idbus_ce,
  output logic                             iabus_slot,
  output logic     [N_IDBUS-1:0]           iabus_valid,
  output int_cmd_t [N_IDBUS-1:0]           iabus_cmd,
  input  logic [N_IDBUS-1:0]               idbus_rd_valid,
  input  logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_rd_data,
  output logic [N_IDBUS-1:0]               idbus_wr_valid,
  output logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_wr_data,
  // buffer status
  output logic                             rd_blk_start,
  output logic                             rd_underflow,
  output logic                             wr_orphan_beat
);
  logic                dbus_wr_valid, dbus_rd_valid, dbus_rd_last;
  logic [LANE_W-1:0]   dbus_wr_data, dbus_rd_data;

  boom_mc_ecc_tx u_tx (
    .clk, .rst_n,
    .blk_valid  (wr_blk_valid),
    .blk        (wr_blk),
    .blk_half   (wr_blk_half),
    .blk_ready  (wr_blk_ready),
    .dbus_valid (dbus_wr_valid),
    .dbus_data  (dbus_wr_data)
  );

  boom_buffer #(.N_IDBUS(N_IDBUS), .SUBRANKS(SUBRANKS), .RATIO(RATIO), .RANKS(RANKS)) u_buf (
    .clk, .rst_n,
    .abus_valid, .abus_cmd, .abus_ready,
    .dbus_wr_valid, .dbus_wr_data,
    .dbus_rd_valid, .dbus_rd_data, .dbus_rd_last,
    .idbus_ce, .iabus_slot, .iabus_valid, .iabus_cmd,
    .idbus_rd_valid, .idbus_rd_data, .idbus_wr_valid, .idbus_wr_data,
    .rd_blk_start, .rd_underflow, .wr_orphan_beat
  );

  boom_mc_ecc_rx u_rx (
    .clk, .rst_n,
    .dbus_valid    (dbus_rd_valid),
    .dbus_data     (dbus_rd_data),
    .dbus_last     (dbus_rd_last),
    .erase_valid   (rd_erase_valid),
    .erase_chip    (rd_erase_chip),
    .blk_valid     (rd_blk_valid),
    .blk           (rd_blk),
    .blk_half      (rd_blk_half),
    .strip_cls     (rd_strip_cls),
    .cls           (rd_cls),
    .chip          (rd_fail_chip),
    .pin           (rd_fail_pin),
    .framing_error (rd_framing_error)
  );
endmodule
