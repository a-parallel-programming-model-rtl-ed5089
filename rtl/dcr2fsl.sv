// dcr2fsl: adapter that lets a PowerPC405, which has no FIFO-link ports,
// reach the Tier-1 network through its Device Control Register (DCR) bus.
//
// Two DCR registers are decoded at BASE_ADDR and BASE_ADDR+1:
//   BASE+0  write: push the word to the outgoing FIFO with control bit 0
//           read : pop and return the head word of the incoming FIFO
//   BASE+1  write: push the word to the outgoing FIFO with control bit 1
//                  (a packet header)
//           read : status {29'b0, head control bit, outgoing full,
//                  incoming exists}
// The DCR master holds `dcr_read` or `dcr_write` until `dcr_ack`. The
// adapter acknowledges one cycle after a request to its addresses; a write
// to a full outgoing FIFO is held off (no acknowledge) until space frees
// up, and a data read of an empty incoming FIFO returns 0. `dcr_ack` stays
// high until the request is removed. Requests to other addresses pass the
// read data bus through unchanged, as in a DCR daisy chain.
//
// Only the adapter's purpose is published; the register map and handshake
// details are this design's own choices.
module dcr2fsl
  import tmd_pkg::*;
#(
  parameter logic [9:0] BASE_ADDR = 10'h000
) (
  input  logic              clk,
  input  logic              rst,
  // DCR slave
  input  logic [9:0]        dcr_abus,
  input  logic [DATA_W-1:0] dcr_dbus_in,
  input  logic              dcr_read,
  input  logic              dcr_write,
  output logic              dcr_ack,
  output logic [DATA_W-1:0] dcr_dbus_out,
  // FIFO towards the network
  output fsl_word_t         fsl_out_data,
  output logic              fsl_out_write,
  input  logic              fsl_out_full,
  // FIFO from the network
  input  fsl_word_t         fsl_in_data,
  input  logic              fsl_in_exists,
  output logic              fsl_in_read
);
  logic sel, sel_data, sel_stat, ack_q;
  logic [DATA_W-1:0] rd_q;

  assign sel_data = (dcr_abus == BASE_ADDR);
  assign sel_stat = (dcr_abus == BASE_ADDR + 10'd1);
  assign sel      = sel_data || sel_stat;

  logic do_write, do_read;
  assign do_write = sel && dcr_write && !ack_q && !fsl_out_full;
  assign do_read  = sel && dcr_read && !ack_q;

  assign fsl_out_write     = do_write;
  assign fsl_out_data.ctrl = sel_stat;
  assign fsl_out_data.data = dcr_dbus_in;
  assign fsl_in_read       = do_read && sel_data && fsl_in_exists;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q <= 1'b0;
      rd_q  <= '0;
    end else begin
      if (!(dcr_read || dcr_write) || !sel) ack_q <= 1'b0;
      else if (do_write || do_read)        ack_q <= 1'b1;
      if (do_read) begin
        if (sel_data) rd_q <= fsl_in_exists ? fsl_in_data.data : '0;
        else          rd_q <= {29'b0, fsl_in_exists && fsl_in_data.ctrl, fsl_out_full, fsl_in_exists};
      end
    end
  end

  assign dcr_ack      = ack_q;
  assign dcr_dbus_out = (ack_q && sel && dcr_read) ? rd_q : dcr_dbus_in;
endmodule
