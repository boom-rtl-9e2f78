// boom_pkg: types and constants shared by the BOOM buffer chip.
//
// The external side of a BOOM DIMM is a standard 72-bit (64 data + 8 ECC) DDR3
// channel that moves a 128-byte cache block as one burst of 16 beats. Inside the
// DIMM, N internal data buses (iDBUS) of the same 72-bit width run N times slower
// and a sub-rank of N/SUBRANKS lanes supplies the block with a shorter burst
// (16 / lanes). Everything in the RTL is clocked by one clock at the DBUS beat rate;
// the slower internal buses advance on a clock enable (one iDBUS beat every RATIO
// clocks, one iABUS command slot every 2*RATIO clocks). The command encoding is this
// design's own: the document does not fix one.
package boom_pkg;

  localparam int unsigned LANE_W      = 72;  // 64 data + 8 ECC bits per bus beat
  localparam int unsigned BLOCK_BEATS = 16;  // DBUS burst length for a 128B block
  localparam int unsigned BLOCK_BITS  = 1024;
  localparam int unsigned HALF_BEATS  = 8;   // DBUS burst length for a 64B access

  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_RD  = 3'd2,
    CMD_WR  = 3'd3,
    CMD_PRE = 3'd4,
    CMD_REF = 3'd5
  } cmd_op_e;

  // Command as issued by the memory controller on the external ABUS.
  typedef struct packed {
    cmd_op_e     op;
    logic        half;     // RD/WR of a 64-byte block (DBUS burst 8) instead of 128 bytes
    logic [2:0]  rank;     // logical rank on the DIMM
    logic [1:0]  subrank;  // sub-rank inside the logical rank
    logic [2:0]  bank;
    logic [15:0] row;
    logic [9:0]  col;
  } ext_cmd_t;

  // Command as driven on one internal ABUS towards the DRAM chips.
  typedef struct packed {
    cmd_op_e     op;
    logic [2:0]  rank;     // rank index local to this iABUS
    logic [1:0]  subrank;
    logic [2:0]  bank;
    logic [15:0] row;
    logic [9:0]  col;
    logic [4:0]  burst;    // internal burst length of a RD/WR (16 or 8 / lanes per sub-rank)
  } int_cmd_t;

  // Words a lane queue must hold before the DBUS burst of a block may start, so
  // that the burst of BLOCK_BEATS beats never runs dry. Lanes deliver one word every
  // `ratio` clocks; the DBUS takes one word of a given lane every `lanes` clocks.
  // With w words queued at the start, word k is due at
  // k*lanes clocks later, when w + floor(k*lanes/ratio) words have arrived.
  function automatic int unsigned start_words(int unsigned lanes, int unsigned ratio,
                                              int unsigned beats);
    int unsigned w;
    int unsigned need;
    w = 1;
    for (int unsigned k = 0; k < beats; k++) begin
      need = k + 1 - (k * lanes) / ratio;
      if (need > w) w = need;
    end
    if (w > beats) w = beats;
    return w;
  endfunction

endpackage
