// boom_dram_model: behavioural model of the DRAM ranks behind a BOOM buffer chip
// (testbench only, not synthesizable).
//
// The ranks' chips are seen per sub-rank: the L = N_IDBUS/SUBRANKS lanes of a
// sub-rank are shared by that sub-rank of every rank. A read command on any iABUS
// queues a job for its sub-rank; TCAS iDBUS beats after the command the lanes of
// the sub-rank return the cmd.burst words at that address, one per iDBUS beat
// (idbus_ce), all lanes together; a later read to the same sub-rank starts after
// the earlier one ends. A write command queues an address; the lane words the
// buffer sends to that sub-rank are stored at the oldest queued address, whether they come before or after the command. Words
// never written read as a pattern made from the address. ACT, PRE, REF are
// accepted and ignored: bank timing is not modelled.
// Faults on read data: fault_kind 1 inverts chip slot fault_bit/8 (8 bits) of
// lane fault_lane; 2 inverts bit fault_bit of every lane (an external DBUS pin);
// 3 inverts chip slots 0, 2 and 5 of lane fault_lane.
module boom_dram_model
  import boom_pkg::*;
#(
  parameter int unsigned N_IDBUS  = 4,
  parameter int unsigned SUBRANKS = 2,
  parameter int unsigned RANKS    = 4,
  parameter int unsigned TCAS     = 3
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             idbus_ce,
  input  logic     [N_IDBUS-1:0]           iabus_valid,
  input  int_cmd_t [N_IDBUS-1:0]           iabus_cmd,
  output logic [N_IDBUS-1:0]               idbus_rd_valid,
  output logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_rd_data,
  input  logic [N_IDBUS-1:0]               idbus_wr_valid,
  input  logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_wr_data,
  input  int                               fault_kind,
  input  int                               fault_lane,
  input  int                               fault_bit
);
  localparam int unsigned L   = N_IDBUS / SUBRANKS;
  localparam int unsigned RPB = RANKS / N_IDBUS > 0 ? RANKS / N_IDBUS : 1;

  typedef struct {
    longint addr;
    int     burst;
    int     start_beat;
  } job_t;

  logic [LANE_W-1:0] mem [longint];
  job_t rd_jobs [SUBRANKS][$];
  job_t wr_jobs [SUBRANKS][$];
  logic [N_IDBUS-1:0][LANE_W-1:0] wr_data_q [SUBRANKS][$];
  int   wr_word [SUBRANKS];
  int   rd_word [SUBRANKS];
  int   beat_no = 0;

  function automatic longint addr_of(int bus, int_cmd_t c);
    return (((longint'(bus * RPB + c.rank) * 8 + c.bank) * 65536 + c.row) * 1024 + c.col) * 64;
  endfunction

  function automatic logic [LANE_W-1:0] fetch(longint a, int lane);
    longint k;
    k = a + lane * 16;
    if (mem.exists(k)) return mem[k];
    return {8'(k), k[31:0] ^ 32'h5a5a_0000, k[63:32]};
  endfunction

  function automatic logic [LANE_W-1:0] inject(logic [LANE_W-1:0] w, int lane);
    case (fault_kind)
      1: if (lane == fault_lane) w[(fault_bit / 8) * 8 +: 8] = ~w[(fault_bit / 8) * 8 +: 8];
      2: w[fault_bit] = ~w[fault_bit];
      3: if (lane == fault_lane) begin
           w[7:0] = ~w[7:0];
           w[23:16] = ~w[23:16];
           w[47:40] = ~w[47:40];
         end
      default: ;
    endcase
    return w;
  endfunction

  initial begin
    for (int s = 0; s < SUBRANKS; s++) begin wr_word[s] = 0; rd_word[s] = 0; end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      idbus_rd_valid <= '0;
      idbus_rd_data  <= '0;
    end else begin
      // commands
      for (int b = 0; b < N_IDBUS; b++) if (iabus_valid[b]) begin
        job_t j;
        int s;
        s = int'(iabus_cmd[b].subrank) % SUBRANKS;
        j.addr = addr_of(b, iabus_cmd[b]) + s * 8;
        j.burst = int'(iabus_cmd[b].burst);
        j.start_beat = beat_no + TCAS;
        if (iabus_cmd[b].op == CMD_RD) rd_jobs[s].push_back(j);
        if (iabus_cmd[b].op == CMD_WR) wr_jobs[s].push_back(j);
      end
      // write data: lane words may come before or after their write command
      for (int s = 0; s < SUBRANKS; s++) begin
        if (idbus_wr_valid[s * L]) wr_data_q[s].push_back(idbus_wr_data);
        while (wr_jobs[s].size() != 0 && wr_data_q[s].size() != 0) begin
          for (int l = 0; l < L; l++)
            mem[wr_jobs[s][0].addr + l * 16 + wr_word[s] * 1024] = wr_data_q[s][0][s * L + l];
          void'(wr_data_q[s].pop_front());
          wr_word[s]++;
          if (wr_word[s] == wr_jobs[s][0].burst) begin
            wr_word[s] = 0;
            void'(wr_jobs[s].pop_front());
          end
        end
      end
      // read data, on iDBUS beats
      idbus_rd_valid <= '0;
      if (idbus_ce) begin
        beat_no <= beat_no + 1;
        for (int s = 0; s < SUBRANKS; s++) begin
          if (rd_jobs[s].size() != 0 && rd_jobs[s][0].start_beat <= beat_no) begin
            for (int l = 0; l < L; l++) begin
              idbus_rd_valid[s * L + l] <= 1'b1;
              idbus_rd_data[s * L + l]  <= inject(fetch(rd_jobs[s][0].addr + rd_word[s] * 1024, l), s * L + l);
            end
            rd_word[s]++;
            if (rd_word[s] == rd_jobs[s][0].burst) begin
              rd_word[s] = 0;
              void'(rd_jobs[s].pop_front());
            end
          end
        end
      end
    end
  end
endmodule
