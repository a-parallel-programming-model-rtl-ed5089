// Network bridge between the on-chip (Tier-1) and off-chip (Tier-2) packet
// formats, sitting in a gateway node between the NetIf and the off-chip
// communication controller.
//
// Internal-to-external half: when a Tier-1 header appears in the
// slave-internal FIFO (`int_in_*`), a counter is loaded with the packet
// length (header + NDW words) and two Tier-2 header words are emitted:
// {SOP, packet size, sequence number} and {source address, destination
// address}. The Tier-1 packet is then copied word by word to the
// master-external FIFO (`ext_out_*`) until the counter runs out, and the
// almost-end-of-packet word and the end-of-packet word (the slot where the
// link inserts its CRC) are appended. The packet size field counts every
// word of the Tier-2 packet, control words included; the sequence number
// increments by one per packet and wraps at 10 bits.
//
// External-to-internal half: the two Tier-2 header words are read from the
// slave-external FIFO (`ext_in_*`) and discarded, the Tier-1 header and its
// NDW words are forwarded to the master-internal FIFO (`int_out_*`) with the
// control bit set on the header, and the two tail words are discarded. A
// first word without the SOP code is dropped so the half can resynchronise.
//
// Both halves move one word per cycle when their FIFOs allow it. The word
// layout follows the published packet formats; the SOP/EOP codes, the size
// field's unit and the resynchronisation rule are this design's choices.
module bridge
  import tmd_pkg::*;
#(
  parameter logic [15:0] SRC_ADDR = 16'h0000,
  parameter logic [15:0] DST_ADDR = 16'h0000
) (
  input  logic      clk,
  input  logic      rst,
  // Tier-1 side
  input  fsl_word_t int_in_data,
  input  logic      int_in_exists,
  output logic      int_in_read,
  output fsl_word_t int_out_data,
  output logic      int_out_write,
  input  logic      int_out_full,
  // Tier-2 side
  output logic [DATA_W-1:0] ext_out_data,
  output logic              ext_out_write,
  input  logic              ext_out_full,
  input  logic [DATA_W-1:0] ext_in_data,
  input  logic              ext_in_exists,
  output logic              ext_in_read
);
  // ---------------- internal to external (FSM1) ----------------
  typedef enum logic [2:0] {O_IDLE, O_H1, O_H2, O_DATA, O_AEOP, O_EOP} out_state_e;
  out_state_e     ostate;
  logic [NDW_W:0] ocnt;
  logic [9:0]     seq;
  t1_hdr_t        ihdr;
  t2_hdr1_t       h1;
  t2_hdr2_t       h2;
  logic [13:0]    t2_size;

  assign ihdr = t1_hdr_t'(int_in_data.data);

  always_comb begin
    h1.sop      = T2_SOP;
    h1.size     = t2_size;
    h1.seq      = seq;
    h2.src_addr = SRC_ADDR;
    h2.dst_addr = DST_ADDR;
  end

  always_comb begin
    ext_out_data  = '0;
    ext_out_write = 1'b0;
    int_in_read   = 1'b0;
    unique case (ostate)
      O_H1:   begin ext_out_data = h1;            ext_out_write = !ext_out_full; end
      O_H2:   begin ext_out_data = h2;            ext_out_write = !ext_out_full; end
      O_DATA: begin
        ext_out_data  = int_in_data.data;
        ext_out_write = int_in_exists && !ext_out_full;
        int_in_read   = ext_out_write;
      end
      O_AEOP: begin ext_out_data = T2_ALMOST_EOP; ext_out_write = !ext_out_full; end
      O_EOP:  begin ext_out_data = T2_EOP;        ext_out_write = !ext_out_full; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ostate  <= O_IDLE;
      ocnt    <= '0;
      seq     <= '0;
      t2_size <= '0;
    end else begin
      unique case (ostate)
        O_IDLE: if (int_in_exists) begin
          ocnt    <= {1'b0, ihdr.ndw} + 1'b1;
          t2_size <= 14'(ihdr.ndw) + 14'(1 + T2_OVERHEAD);
          ostate  <= O_H1;
        end
        O_H1:   if (ext_out_write) ostate <= O_H2;
        O_H2:   if (ext_out_write) ostate <= O_DATA;
        O_DATA: if (ext_out_write) begin
          ocnt <= ocnt - 1'b1;
          if (ocnt == 1) ostate <= O_AEOP;
        end
        O_AEOP: if (ext_out_write) ostate <= O_EOP;
        O_EOP:  if (ext_out_write) begin
          seq    <= seq + 1'b1;
          ostate <= O_IDLE;
        end
        default: ostate <= O_IDLE;
      endcase
    end
  end

  // ---------------- external to internal (FSM2) ----------------
  typedef enum logic [2:0] {I_H1, I_H2, I_T1HDR, I_DATA, I_AEOP, I_EOP} in_state_e;
  in_state_e        istate;
  logic [NDW_W-1:0] icnt;
  t2_hdr1_t         eh1;
  t1_hdr_t          ehdr;

  assign eh1  = t2_hdr1_t'(ext_in_data);
  assign ehdr = t1_hdr_t'(ext_in_data);

  always_comb begin
    int_out_data.data = ext_in_data;
    int_out_data.ctrl = (istate == I_T1HDR);
    int_out_write     = 1'b0;
    ext_in_read       = 1'b0;
    unique case (istate)
      I_T1HDR, I_DATA: begin
        int_out_write = ext_in_exists && !int_out_full;
        ext_in_read   = int_out_write;
      end
      default: ext_in_read = ext_in_exists;   // headers and tails: discard
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      istate <= I_H1;
      icnt   <= '0;
    end else if (ext_in_read) begin
      unique case (istate)
        I_H1:    if (eh1.sop == T2_SOP) istate <= I_H2;
        I_H2:    istate <= I_T1HDR;
        I_T1HDR: begin
          icnt   <= ehdr.ndw;
          istate <= (ehdr.ndw == 0) ? I_AEOP : I_DATA;
        end
        I_DATA: begin
          icnt <= icnt - 1'b1;
          if (icnt == 1) istate <= I_AEOP;
        end
        I_AEOP:  istate <= I_EOP;
        I_EOP:   istate <= I_H1;
        default: istate <= I_H1;
      endcase
    end
  end
endmodule
