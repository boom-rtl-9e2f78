// boom_abus_split: splits the external ABUS into N_IABUS internal command buses.
//
// Each iABUS serves an equal, contiguous share of the DIMM's ranks (iABUS i serves
// ranks i*RANKS/N_IABUS and up), as the document restricts it for simplicity; the
// buses then carry different commands in parallel. A command is routed by its
// rank to that bus's translator (boom_cmd_translate). abus_ready is low when the
// target translator's queue is full, and the memory controller must hold the
// command (a stall). Accepted reads and writes are also reported on rd_issue /
// wr_issue with their sub-rank and size, so the data path knows in which order blocks
// pass the DBUS. Slot timing comes from the caller.
module boom_abus_split
  import boom_pkg::*;
#(
  parameter int unsigned N_IABUS      = 4,
  parameter int unsigned RANKS        = 4,
  parameter int unsigned LANES_PER_SR = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    slot,
  input  logic                    abus_valid,
  input  ext_cmd_t                abus_cmd,
  output logic                    abus_ready,
  output logic     [N_IABUS-1:0]  iabus_valid,
  output int_cmd_t [N_IABUS-1:0]  iabus_cmd,
  output logic                    rd_issue,
  output logic                    wr_issue,
  output logic [1:0]              issue_subrank,
  output logic                    issue_half
);
  localparam int unsigned RPB = RANKS / N_IABUS;

  logic [N_IABUS-1:0] sel, ready;
  logic               accept;

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < N_IABUS; i++)
      sel[i] = abus_valid && (int'(abus_cmd.rank) / RPB == i);
  end

  assign abus_ready = |(sel & ready) || !abus_valid;
  assign accept     = abus_valid && |(sel & ready);

  for (genvar i = 0; i < N_IABUS; i++) begin : g_bus
    boom_cmd_translate #(.RANKS_PER_IABUS(RPB), .LANES_PER_SR(LANES_PER_SR)) u_xlat (
      .clk, .rst_n, .slot,
      .in_valid  (sel[i]),
      .in_cmd    (abus_cmd),
      .in_ready  (ready[i]),
      .out_valid (iabus_valid[i]),
      .out_cmd   (iabus_cmd[i])
    );
  end

  assign rd_issue      = accept && abus_cmd.op == CMD_RD;
  assign wr_issue      = accept && abus_cmd.op == CMD_WR;
  assign issue_subrank = abus_cmd.subrank;
  assign issue_half    = abus_cmd.half;

  a_rank_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    abus_valid |-> int'(abus_cmd.rank) < RANKS);
endmodule
