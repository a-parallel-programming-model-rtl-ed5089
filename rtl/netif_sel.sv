// Selective network interface (NetIf) of the Tier-1 network.
//
// Transmission side: a packet taken from the host FIFO (`h_in_*`) is sent on
// exactly one of N output channels. The address decoder compares the
// destination rank in the header with a table of rank ranges, one
// [LRN, HRN] pair per channel; the first channel whose range holds the rank
// is loaded into the destination register, and the whole packet (header plus
// NDW words) is copied to that channel's FIFO, one word per cycle while the
// FIFO is not full. A header whose rank matches no range is consumed and its
// packet dropped (this design's choice; the routing table is meant to cover
// every rank).
//
// Reception side: packets waiting in the N input channel FIFOs (`ch_in_*`)
// are not filtered, since a packet only arrives where it is meant to go. A
// linear priority decoder picks the lowest-numbered channel with data, the
// choice is held in the source register, and the whole packet is passed to
// the host FIFO (`h_out_*`) before another channel is considered.
//
// Both sides run independently (full duplex). Timing: a packet of NDW data
// words leaves the transmit side in 1 + (NDW + 1) cycles when nothing
// stalls, and likewise for the receive side; the extra cycle is the
// decode/priority step. Range table and priority order follow the published
// design; the FSM encoding and the one-cycle decode step are this design's.
module netif_sel
  import tmd_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter logic [N-1:0][RANK_W-1:0] LRN = '0,
  parameter logic [N-1:0][RANK_W-1:0] HRN = '0
) (
  input  logic      clk,
  input  logic      rst,
  // from the host (processing unit or bridge)
  input  fsl_word_t h_in_data,
  input  logic      h_in_exists,
  output logic      h_in_read,
  // to the host
  output fsl_word_t h_out_data,
  output logic      h_out_write,
  input  logic      h_out_full,
  // output channels towards other NetIfs
  output fsl_word_t [N-1:0] ch_out_data,
  output logic      [N-1:0] ch_out_write,
  input  logic      [N-1:0] ch_out_full,
  // input channels from other NetIfs
  input  fsl_word_t [N-1:0] ch_in_data,
  input  logic      [N-1:0] ch_in_exists,
  output logic      [N-1:0] ch_in_read
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  // ---------------- transmission side ----------------
  typedef enum logic [1:0] {T_IDLE, T_XFER, T_DROP} tx_state_e;
  tx_state_e        tx_state;
  logic [CW-1:0]    dst_q;
  logic [NDW_W:0]   tx_cnt;      // words of the packet still to move
  logic             dec_hit;
  logic [CW-1:0]    dec_ch;
  t1_hdr_t          tx_hdr;

  assign tx_hdr = t1_hdr_t'(h_in_data.data);

  // Address decoder over the destination rank table.
  always_comb begin
    dec_hit = 1'b0;
    dec_ch  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (tx_hdr.dest >= LRN[i] && tx_hdr.dest <= HRN[i]) begin
        dec_hit = 1'b1;
        dec_ch  = CW'(i);
      end
    end
  end

  logic tx_move;
  always_comb begin
    tx_move      = 1'b0;
    ch_out_write = '0;
    h_in_read    = 1'b0;
    for (int i = 0; i < N; i++) ch_out_data[i] = h_in_data;
    unique case (tx_state)
      T_XFER: begin
        tx_move           = h_in_exists && !ch_out_full[dst_q];
        ch_out_write[dst_q] = tx_move;
        h_in_read         = tx_move;
      end
      T_DROP: begin
        tx_move   = h_in_exists;
        h_in_read = tx_move;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_state <= T_IDLE;
      dst_q    <= '0;
      tx_cnt   <= '0;
    end else begin
      unique case (tx_state)
        T_IDLE: if (h_in_exists) begin
          dst_q    <= dec_ch;
          tx_cnt   <= {1'b0, tx_hdr.ndw} + 1'b1;
          tx_state <= dec_hit ? T_XFER : T_DROP;
        end
        default: if (tx_move) begin
          tx_cnt <= tx_cnt - 1'b1;
          if (tx_cnt == 1) tx_state <= T_IDLE;
        end
      endcase
    end
  end

  // ---------------- reception side ----------------
  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA} rx_state_e;
  rx_state_e      rx_state;
  logic [CW-1:0]  src_q;
  logic [NDW_W-1:0] rx_cnt;
  logic [CW-1:0]  prio_ch;

  // Linear priority decoder: channel 0 first.
  always_comb begin
    prio_ch = '0;
    for (int i = N - 1; i >= 0; i--)
      if (ch_in_exists[i]) prio_ch = CW'(i);
  end

  logic rx_move;
  t1_hdr_t rx_hdr;
  assign rx_hdr      = t1_hdr_t'(ch_in_data[src_q].data);
  assign h_out_data  = ch_in_data[src_q];
  assign rx_move     = (rx_state != R_IDLE) && ch_in_exists[src_q] && !h_out_full;
  assign h_out_write = rx_move;
  always_comb begin
    ch_in_read        = '0;
    ch_in_read[src_q] = rx_move;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_state <= R_IDLE;
      src_q    <= '0;
      rx_cnt   <= '0;
    end else begin
      unique case (rx_state)
        R_IDLE: if (|ch_in_exists) begin
          src_q    <= prio_ch;
          rx_state <= R_HDR;
        end
        R_HDR: if (rx_move) begin
          rx_cnt   <= rx_hdr.ndw;
          rx_state <= (rx_hdr.ndw == 0) ? R_IDLE : R_DATA;
        end
        R_DATA: if (rx_move) begin
          rx_cnt <= rx_cnt - 1'b1;
          if (rx_cnt == 1) rx_state <= R_IDLE;
        end
        default: rx_state <= R_IDLE;
      endcase
    end
  end

  a_hdr_ctrl: assert property (@(posedge clk) disable iff (rst)
      (rx_state == R_HDR && rx_move) |-> h_out_data.ctrl)
    else $error("netif_sel: packet header without control bit");
endmodule
