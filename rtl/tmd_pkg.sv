// Shared types and constants of the TMD multi-FPGA message-passing network.
//
// Tier-1 (on-chip) packets are a single header word followed by NDW data
// words. The header carries an 8-bit source rank, an 8-bit destination rank
// and a 16-bit word count, packed SRC in the top byte, DEST next and NDW in
// the low half-word (the left-to-right order of the packet drawing). Every
// word travels over a 32-bit FIFO link that also carries one control bit;
// in this design the control bit is set on header words only, which lets a
// broadcast receiver tell a header from payload.
//
// Tier-2 (off-chip) packets wrap a Tier-1 packet with two header words
// (SOP/size/sequence, then 16-bit source and destination channel addresses)
// and two tail words (almost-end-of-packet, end-of-packet/CRC placeholder).
// The field widths are the published ones; the SOP, almost-EOP and EOP code
// values are this design's own choice.
//
// The message-passing engine speaks to its computing element with opcode
// 1 (send) and 2 (receive). A clear-to-send packet carries the single data
// word 0xFFFFFFFF.
package tmd_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned RANK_W = 8;
  localparam int unsigned NDW_W  = 16;

  typedef logic [RANK_W-1:0] rank_t;

  // One word on an FSL-style FIFO link: control bit plus 32-bit data.
  typedef struct packed {
    logic              ctrl;
    logic [DATA_W-1:0] data;
  } fsl_word_t;

  localparam int unsigned FSL_W = $bits(fsl_word_t);

  typedef struct packed {
    rank_t            src;
    rank_t            dest;
    logic [NDW_W-1:0] ndw;
  } t1_hdr_t;

  // Tier-2 header word 1 and word 2.
  typedef struct packed {
    logic [7:0]  sop;
    logic [13:0] size;
    logic [9:0]  seq;
  } t2_hdr1_t;

  typedef struct packed {
    logic [15:0] src_addr;
    logic [15:0] dst_addr;
  } t2_hdr2_t;

  localparam logic [7:0]        T2_SOP        = 8'hA5;
  localparam logic [DATA_W-1:0] T2_ALMOST_EOP = 32'hAEAE_AEAE;
  localparam logic [DATA_W-1:0] T2_EOP        = 32'hE0E0_E0E0;
  // Tier-2 words added around a Tier-1 packet.
  localparam int unsigned T2_OVERHEAD = 4;

  // Message-passing engine.
  localparam logic [DATA_W-1:0] MPE_OP_SEND = 32'h0000_0001;
  localparam logic [DATA_W-1:0] MPE_OP_RECV = 32'h0000_0002;
  localparam logic [DATA_W-1:0] CTS_WORD    = 32'hFFFF_FFFF;

  function automatic logic [DATA_W-1:0] mk_hdr(rank_t src, rank_t dest,
                                               logic [NDW_W-1:0] ndw);
    t1_hdr_t h;
    h.src  = src;
    h.dest = dest;
    h.ndw  = ndw;
    return h;
  endfunction

endpackage
