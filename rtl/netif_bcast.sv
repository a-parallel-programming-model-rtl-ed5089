// Broadcast network interface (NetIf) of the Tier-1 network.
//
// Transmission side: no logic beyond one OR gate. The head word of the
// processing unit's transmit FIFO, its control bit and its `exists` flag are
// fanned out to the N other NetIfs (`bc_out_*`); the FIFO is popped when any
// of them raises its read signal (`bc_rd_in`).
//
// Reception side: each of the N incoming broadcast channels is watched by
// the incoming-message logic, which flags a channel whose head word is a
// packet header (control bit set) with a destination rank inside this
// NetIf's own range [LRN, HRN]. For a computing node the range is its own
// MPI rank; for a gateway node it is the ranks of the remote FPGA. The
// channel-selection logic takes the lowest-numbered flagged channel, the
// choice is held in the channel-select register, and a counter loaded from
// the header's NDW field counts the packet through: each cycle that the
// chosen channel has a word and the host's receive FIFO is not full, the
// word is written to the host FIFO (`h_out_*`) and the read signal for that
// channel (`bc_rd_out`) is raised. Packets for other nodes are never read,
// so they are in effect discarded by every NetIf but the right one.
//
// Timing: one cycle to select a channel, then one word per cycle. The
// structure follows the published design; relying on the control bit to
// spot headers and the FSM encoding are this design's choices.
module netif_bcast
  import tmd_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter logic [RANK_W-1:0] LRN = '0,
  parameter logic [RANK_W-1:0] HRN = '0
) (
  input  logic      clk,
  input  logic      rst,
  // transmit FIFO of the host (its read side)
  input  fsl_word_t h_in_data,
  input  logic      h_in_exists,
  output logic      h_in_read,
  // fan-out of that FIFO to the other NetIfs
  output fsl_word_t bc_out_data,
  output logic      bc_out_exists,
  input  logic [N-1:0] bc_rd_in,
  // fan-in from the other NetIfs
  input  fsl_word_t [N-1:0] bc_in_data,
  input  logic      [N-1:0] bc_in_exists,
  output logic      [N-1:0] bc_rd_out,
  // receive FIFO of the host (its write side)
  output fsl_word_t h_out_data,
  output logic      h_out_write,
  input  logic      h_out_full
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  // ---------------- transmission side ----------------
  assign bc_out_data   = h_in_data;
  assign bc_out_exists = h_in_exists;
  assign h_in_read     = |bc_rd_in;

  // ---------------- reception side ----------------
  logic [N-1:0] match;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      t1_hdr_t h;
      h = t1_hdr_t'(bc_in_data[i].data);
      match[i] = bc_in_exists[i] && bc_in_data[i].ctrl &&
                 h.dest >= LRN && h.dest <= HRN;
    end
  end

  logic [CW-1:0] sel_ch;
  always_comb begin
    sel_ch = '0;
    for (int i = N - 1; i >= 0; i--)
      if (match[i]) sel_ch = CW'(i);
  end

  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA} rx_state_e;
  rx_state_e        state;
  logic [CW-1:0]    ch_q;
  logic [NDW_W-1:0] cnt;
  logic             move;
  t1_hdr_t          hdr;

  assign hdr         = t1_hdr_t'(bc_in_data[ch_q].data);
  assign h_out_data  = bc_in_data[ch_q];
  assign move        = (state != R_IDLE) && bc_in_exists[ch_q] && !h_out_full;
  assign h_out_write = move;
  always_comb begin
    bc_rd_out       = '0;
    bc_rd_out[ch_q] = move;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE;
      ch_q  <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (|match) begin
          ch_q  <= sel_ch;
          state <= R_HDR;
        end
        R_HDR: if (move) begin
          cnt   <= hdr.ndw;
          state <= (hdr.ndw == 0) ? R_IDLE : R_DATA;
        end
        R_DATA: if (move) begin
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
