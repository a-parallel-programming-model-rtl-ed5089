// TMD-MPE: hardware message-passing engine between a computing element (a
// hardware engine or a processor) and its network interface.
//
// The computing element starts an operation by writing four words into its
// FIFO (`ce_in_*`): the opcode (1 = send, 2 = receive), the message size in
// 32-bit words, a word holding the local rank in bits 31:24 and the remote
// rank in bits 23:16, and the message tag. A send is followed by the
// message data.
//
// The engine speaks the rendezvous protocol on the network. A send first
// transmits an envelope packet {header, tag} to the remote rank and waits for
// its clear-to-send packet {header, 0xFFFFFFFF}; it then cuts the message
// into data packets of at most MAX_NDW words (the last one holds the
// remainder) and copies the data from the computing element to the network.
// A receive first searches the queue of unexpected envelopes; if no stored
// envelope matches the remote rank and tag it waits for one to arrive. On a
// match it sends clear-to-send, writes {SRC, DEST, 0} and the tag to the
// computing element (`ce_out_*`) and then forwards the data words of all
// data packets from the remote rank, as one message-sized packet.
//
// Any envelope that arrives while the engine waits for something else (a
// clear-to-send, another envelope, or data from the current sender) is an
// unexpected message: its two words are stored in the envelope memory
// (word 2k = {SRC, DEST, NDW}, word 2k+1 = tag, k counting up from 0) and no
// clear-to-send is returned. The memory holds NUM_NODES envelopes, enough
// because a rendezvous sender never has two envelopes outstanding. The
// queue is searched linearly, one entry per cycle; a matched entry is
// removed by moving the last entry into its place.
//
// One state machine drives all datapath pieces, so the engine is
// half-duplex, as published. Throughput: one data word per cycle in each
// phase; each packet header costs one cycle. The command word layout, the
// operation flow and the memory layout follow the published design; the
// placement of ranks within the third command word, the packet size limit
// (MAX_NDW) and the queue compaction are this design's choices.
module tmd_mpe
  import tmd_pkg::*;
#(
  parameter int unsigned NUM_NODES = 45,
  parameter int unsigned MAX_NDW   = 507
) (
  input  logic      clk,
  input  logic      rst,
  // from the computing element
  input  fsl_word_t ce_in_data,
  input  logic      ce_in_exists,
  output logic      ce_in_read,
  // to the computing element
  output fsl_word_t ce_out_data,
  output logic      ce_out_write,
  input  logic      ce_out_full,
  // to the network interface
  output fsl_word_t net_out_data,
  output logic      net_out_write,
  input  logic      net_out_full,
  // from the network interface
  input  fsl_word_t net_in_data,
  input  logic      net_in_exists,
  output logic      net_in_read,
  // status
  output logic      busy,
  output logic [$clog2(NUM_NODES+1)-1:0] queue_level
);
  localparam int unsigned QW = $clog2(NUM_NODES+1);
  localparam int unsigned AW = $clog2(2*NUM_NODES);

  typedef enum logic [4:0] {
    S_OP, S_SIZE, S_RANKS, S_TAG,
    S_ENV_H, S_ENV_T,
    S_PKT_H, S_PKT_D,
    S_QSEARCH, S_QDEL0, S_QDEL1,
    S_CTS_H, S_CTS_T, S_CE_H, S_CE_T,
    S_NET_H, S_NET_W2, S_RXD, S_DRAIN
  } state_e;

  typedef enum logic [1:0] {P_WAIT_CTS, P_WAIT_ENV, P_RX_DATA} phase_e;

  state_e            state;
  phase_e            phase;
  logic              is_send;
  logic [DATA_W-1:0] rem;       // message words still to move
  rank_t             local_rank, remote_rank;
  logic [DATA_W-1:0] tag;
  logic [NDW_W-1:0]  cnt;       // words of the current packet still to move
  t1_hdr_t           rx_hdr;    // header of the packet being received
  logic [QW-1:0]     qcount;
  logic [QW-1:0]     qi;

  // Envelope memory: two 32-bit words per unexpected message.
  logic [DATA_W-1:0] qmem [2*NUM_NODES];
  logic              q_we;
  logic [AW-1:0]     q_wa;
  logic [DATA_W-1:0] q_wd;

  always_ff @(posedge clk) if (q_we) qmem[q_wa] <= q_wd;

  function automatic logic [AW-1:0] hdr_addr(logic [QW-1:0] k);
    return AW'({k, 1'b0});
  endfunction
  function automatic logic [AW-1:0] tag_addr(logic [QW-1:0] k);
    return AW'({k, 1'b1});
  endfunction

  // Message match logic over the queue entry under inspection.
  t1_hdr_t q_hdr;
  logic    q_match;
  assign q_hdr   = t1_hdr_t'(qmem[hdr_addr(qi)]);
  assign q_match = (q_hdr.src == remote_rank) && (qmem[tag_addr(qi)] == tag);

  // Message packetizing logic.
  logic [NDW_W-1:0] pkt_ndw;
  assign pkt_ndw = (rem > DATA_W'(MAX_NDW)) ? NDW_W'(MAX_NDW) : NDW_W'(rem);

  t1_hdr_t in_hdr;
  assign in_hdr = t1_hdr_t'(net_in_data.data);

  logic ce_rd, net_wr, net_rd, ce_wr;
  assign ce_rd  = ce_in_exists;
  assign net_wr = !net_out_full;
  assign net_rd = net_in_exists;
  assign ce_wr  = !ce_out_full;

  // Datapath steering.
  always_comb begin
    ce_in_read    = 1'b0;
    ce_out_write  = 1'b0;
    ce_out_data   = '{ctrl: 1'b0, data: '0};
    net_out_write = 1'b0;
    net_out_data  = '{ctrl: 1'b0, data: '0};
    net_in_read   = 1'b0;
    q_we          = 1'b0;
    q_wa          = hdr_addr(qcount);
    q_wd          = net_in_data.data;
    unique case (state)
      S_OP, S_SIZE, S_RANKS, S_TAG: ce_in_read = ce_rd;
      S_ENV_H: begin
        net_out_data  = '{ctrl: 1'b1, data: mk_hdr(local_rank, remote_rank, 16'd1)};
        net_out_write = net_wr;
      end
      S_ENV_T: begin
        net_out_data  = '{ctrl: 1'b0, data: tag};
        net_out_write = net_wr;
      end
      S_PKT_H: if (rem != 0) begin
        net_out_data  = '{ctrl: 1'b1, data: mk_hdr(local_rank, remote_rank, pkt_ndw)};
        net_out_write = net_wr;
      end
      S_PKT_D: begin
        net_out_data  = '{ctrl: 1'b0, data: ce_in_data.data};
        net_out_write = ce_rd && net_wr;
        ce_in_read    = net_out_write;
      end
      S_QDEL0: begin
        q_we = 1'b1;
        q_wa = hdr_addr(qi);
        q_wd = qmem[hdr_addr(qcount - 1'b1)];
      end
      S_QDEL1: begin
        q_we = 1'b1;
        q_wa = tag_addr(qi);
        q_wd = qmem[tag_addr(qcount - 1'b1)];
      end
      S_CTS_H: begin
        net_out_data  = '{ctrl: 1'b1, data: mk_hdr(local_rank, remote_rank, 16'd1)};
        net_out_write = net_wr;
      end
      S_CTS_T: begin
        net_out_data  = '{ctrl: 1'b0, data: CTS_WORD};
        net_out_write = net_wr;
      end
      S_CE_H: begin
        ce_out_data  = '{ctrl: 1'b1, data: mk_hdr(remote_rank, local_rank, 16'd0)};
        ce_out_write = ce_wr;
      end
      S_CE_T: begin
        ce_out_data  = '{ctrl: 1'b0, data: tag};
        ce_out_write = ce_wr;
      end
      S_NET_H: begin
        net_in_read = net_rd;
        // Provisionally store the header as the next queue entry; it only
        // becomes part of the queue if the packet proves to be an envelope.
        q_we = net_rd && (qcount < QW'(NUM_NODES));
      end
      S_NET_W2: begin
        net_in_read = net_rd;
        q_wa        = tag_addr(qcount);
        q_we        = net_rd && (qcount < QW'(NUM_NODES));
      end
      S_RXD: begin
        ce_out_data  = '{ctrl: 1'b0, data: net_in_data.data};
        ce_out_write = net_rd && ce_wr;
        net_in_read  = ce_out_write;
      end
      S_DRAIN: net_in_read = net_rd;
      default: ;
    endcase
  end

  // Is the two-word packet just completed an envelope to keep?
  logic w2_is_cts, w2_store;
  assign w2_is_cts = (net_in_data.data == CTS_WORD);
  always_comb begin
    w2_store = 1'b0;
    unique case (phase)
      P_WAIT_CTS: w2_store = !(rx_hdr.src == remote_rank && w2_is_cts);
      P_WAIT_ENV: w2_store = !w2_is_cts &&
                             !(rx_hdr.src == remote_rank && net_in_data.data == tag);
      default:    w2_store = !w2_is_cts;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_OP;
      phase       <= P_WAIT_CTS;
      is_send     <= 1'b0;
      rem         <= '0;
      local_rank  <= '0;
      remote_rank <= '0;
      tag         <= '0;
      cnt         <= '0;
      rx_hdr      <= '0;
      qcount      <= '0;
      qi          <= '0;
    end else begin
      unique case (state)
        S_OP: if (ce_rd) begin
          is_send <= (ce_in_data.data == MPE_OP_SEND);
          if (ce_in_data.data == MPE_OP_SEND || ce_in_data.data == MPE_OP_RECV)
            state <= S_SIZE;
        end
        S_SIZE: if (ce_rd) begin
          rem   <= ce_in_data.data;
          state <= S_RANKS;
        end
        S_RANKS: if (ce_rd) begin
          local_rank  <= ce_in_data.data[31:24];
          remote_rank <= ce_in_data.data[23:16];
          state       <= S_TAG;
        end
        S_TAG: if (ce_rd) begin
          tag   <= ce_in_data.data;
          qi    <= '0;
          state <= is_send ? S_ENV_H : S_QSEARCH;
        end
        // ---- send ----
        S_ENV_H: if (net_wr) state <= S_ENV_T;
        S_ENV_T: if (net_wr) begin
          phase <= P_WAIT_CTS;
          state <= S_NET_H;
        end
        S_PKT_H: begin
          if (rem == 0) state <= S_OP;
          else if (net_wr) begin
            cnt   <= pkt_ndw;
            state <= S_PKT_D;
          end
        end
        S_PKT_D: if (net_out_write) begin
          cnt <= cnt - 1'b1;
          rem <= rem - 1'b1;
          if (cnt == 1) state <= S_PKT_H;
        end
        // ---- receive: look in the unexpected-message queue ----
        S_QSEARCH: begin
          if (qi == qcount) begin
            phase <= P_WAIT_ENV;
            state <= S_NET_H;
          end else if (q_match) state <= S_QDEL0;
          else qi <= qi + 1'b1;
        end
        S_QDEL0: state <= S_QDEL1;
        S_QDEL1: begin
          qcount <= qcount - 1'b1;
          state  <= S_CTS_H;
        end
        S_CTS_H: if (net_wr) state <= S_CTS_T;
        S_CTS_T: if (net_wr) state <= S_CE_H;
        S_CE_H:  if (ce_wr) state <= S_CE_T;
        S_CE_T:  if (ce_wr) begin
          phase <= P_RX_DATA;
          state <= (rem == 0) ? S_OP : S_NET_H;
        end
        // ---- reception logic ----
        S_NET_H: if (net_rd) begin
          rx_hdr <= in_hdr;
          cnt    <= in_hdr.ndw;
          if (phase == P_RX_DATA && in_hdr.src == remote_rank)
            state <= (in_hdr.ndw == 0) ? S_NET_H : S_RXD;
          else if (in_hdr.ndw == 1)
            state <= S_NET_W2;
          else if (in_hdr.ndw != 0)
            state <= S_DRAIN;
        end
        S_NET_W2: if (net_rd) begin
          if (w2_store) begin
            if (qcount < QW'(NUM_NODES)) qcount <= qcount + 1'b1;
            state <= S_NET_H;
          end else if (phase == P_WAIT_CTS) state <= S_PKT_H;
          else if (phase == P_WAIT_ENV)     state <= S_CTS_H;
          else                              state <= S_NET_H;
        end
        S_RXD: if (ce_out_write) begin
          cnt <= cnt - 1'b1;
          rem <= rem - 1'b1;
          if (rem == 1) state <= S_OP;
          else if (cnt == 1) state <= S_NET_H;
        end
        S_DRAIN: if (net_rd) begin
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= S_NET_H;
        end
        default: state <= S_OP;
      endcase
    end
  end

  assign busy        = (state != S_OP);
  assign queue_level = qcount;

  // The rendezvous protocol bounds the queue at one envelope per node.
  a_queue_bound: assert property (@(posedge clk) disable iff (rst)
      !(state == S_NET_W2 && net_rd && w2_store && qcount == QW'(NUM_NODES)))
    else $error("tmd_mpe: unexpected-message queue overflow");
endmodule
