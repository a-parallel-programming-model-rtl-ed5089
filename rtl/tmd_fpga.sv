// One FPGA of the TMD machine: computing nodes and gateway nodes joined by a
// fully connected on-chip (Tier-1) network.
//
// Every node owns a network interface (NetIf). With NUM_PE computing nodes
// and NUM_GW gateway nodes there are M = NUM_PE + NUM_GW NetIfs, each with
// M-1 channels, one to every other NetIf; channel c of NetIf i leads to
// NetIf c (c < i) or c+1 (c >= i). Computing node j has MPI rank
// FIRST_RANK + j, which is also its network address. Gateway g reaches the
// remote FPGA holding ranks GW_LRN[g]..GW_HRN[g].
//
// BCAST selects the NetIf style for the whole FPGA: 0 builds selective
// NetIfs (routing table of rank ranges, one 16-word FIFO per channel),
// 1 builds broadcast NetIfs (each node's transmit FIFO fanned out to all
// other NetIfs, receivers filter on their rank range).
//
// A computing node is attached according to NODE_KIND[j]:
//   KIND_FSL     processor with FIFO links (MicroBlaze running the software
//                message-passing library): its FIFO ports `pe_tx_*` and
//                `pe_rx_*` go straight to the NetIf's host FIFOs;
//   KIND_MPE     hardware engine (or MicroBlaze) behind a TMD-MPE: `pe_*`
//                ports talk to the engine, the engine talks to the NetIf;
//   KIND_DCR     PowerPC405 through a dcr2fsl adapter on `dcr_*`;
//   KIND_DCR_MPE PowerPC405 through dcr2fsl and a TMD-MPE.
// A KIND_MPE node whose JACOBI bit is set holds a Jacobi hardware engine
// (JAC_* parameters) on the element side of its TMD-MPE instead of bringing
// that side out; its `pe_*` ports are then unused.
// Ports of a node that its kind does not use are left unconnected inside
// (outputs driven to 0). The status outputs of the TMD-MPE and the Jacobi
// engine are not used here, so their pins are left open.
//
// A gateway node is a NetIf, a bridge and two external FIFOs; the Tier-2
// side of gateway g appears on `t2_tx_*` (towards the off-chip controller)
// and `t2_rx_*` (from it). The default numbers follow the 9-node FPGAs of
// the 45-processor, 5-FPGA system (4 MicroBlazes, 3 engines, 2 PowerPCs as
// in the heterogeneous experiment, four gateways); the mixing of node kinds
// on every FPGA is this design's choice.
module tmd_fpga
  import tmd_pkg::*;
#(
  parameter int unsigned NUM_PE     = 9,
  parameter int unsigned NUM_GW     = 4,
  parameter int unsigned FIRST_RANK = 0,
  parameter logic [NUM_PE-1:0][1:0] NODE_KIND = {2'd2, 2'd2, 2'd1, 2'd1, 2'd1,
                                                2'd0, 2'd0, 2'd0, 2'd0},
  parameter logic [NUM_GW-1:0][RANK_W-1:0] GW_LRN = {8'd36, 8'd27, 8'd18, 8'd9},
  parameter logic [NUM_GW-1:0][RANK_W-1:0] GW_HRN = {8'd44, 8'd35, 8'd26, 8'd17},
  parameter bit          BCAST      = 1'b0,
  parameter int unsigned MPE_NODES  = 45,
  parameter int unsigned MAX_NDW    = 507,
  parameter int unsigned FSL_DEPTH  = 16,
  parameter logic [NUM_PE-1:0] JACOBI = '0,
  parameter logic [RANK_W-1:0] JAC_MASTER   = 8'd0,
  parameter int unsigned       JAC_COLS     = 60,
  parameter int unsigned       JAC_MAX_ROWS = 60
) (
  input  logic clk,
  input  logic rst,
  // computing-node FIFO ports (KIND_FSL, KIND_MPE)
  input  fsl_word_t   [NUM_PE-1:0] pe_tx_data,
  input  logic        [NUM_PE-1:0] pe_tx_write,
  output logic        [NUM_PE-1:0] pe_tx_full,
  output fsl_word_t   [NUM_PE-1:0] pe_rx_data,
  output logic        [NUM_PE-1:0] pe_rx_exists,
  input  logic        [NUM_PE-1:0] pe_rx_read,
  // computing-node DCR ports (KIND_DCR, KIND_DCR_MPE)
  input  logic [NUM_PE-1:0][9:0]        dcr_abus,
  input  logic [NUM_PE-1:0][DATA_W-1:0] dcr_dbus_in,
  input  logic [NUM_PE-1:0]             dcr_read,
  input  logic [NUM_PE-1:0]             dcr_write,
  output logic [NUM_PE-1:0]             dcr_ack,
  output logic [NUM_PE-1:0][DATA_W-1:0] dcr_dbus_out,
  // Tier-2 side of the gateways
  output logic [NUM_GW-1:0][DATA_W-1:0] t2_tx_data,
  output logic [NUM_GW-1:0]             t2_tx_exists,
  input  logic [NUM_GW-1:0]             t2_tx_read,
  input  logic [NUM_GW-1:0][DATA_W-1:0] t2_rx_data,
  input  logic [NUM_GW-1:0]             t2_rx_write,
  output logic [NUM_GW-1:0]             t2_rx_full
);
  localparam int unsigned M  = NUM_PE + NUM_GW;
  localparam int unsigned NC = M - 1;

  localparam logic [1:0] KIND_FSL     = 2'd0;
  localparam logic [1:0] KIND_MPE     = 2'd1;
  localparam logic [1:0] KIND_DCR     = 2'd2;
  localparam logic [1:0] KIND_DCR_MPE = 2'd3;

  // NetIf reached by channel c of NetIf i, and the channel of NetIf p that
  // leads back to NetIf i.
  function automatic int unsigned peer(int unsigned i, int unsigned c);
    return (c < i) ? c : c + 1;
  endfunction
  function automatic int unsigned back(int unsigned p, int unsigned i);
    return (i < p) ? i : i - 1;
  endfunction
  function automatic logic [RANK_W-1:0] lo_rank(int unsigned i);
    return (i < NUM_PE) ? RANK_W'(FIRST_RANK + i) : GW_LRN[i - NUM_PE];
  endfunction
  function automatic logic [RANK_W-1:0] hi_rank(int unsigned i);
    return (i < NUM_PE) ? RANK_W'(FIRST_RANK + i) : GW_HRN[i - NUM_PE];
  endfunction
  function automatic logic [NC-1:0][RANK_W-1:0] lrn_table(int unsigned i);
    for (int unsigned c = 0; c < NC; c++) lrn_table[c] = lo_rank(peer(i, c));
  endfunction
  function automatic logic [NC-1:0][RANK_W-1:0] hrn_table(int unsigned i);
    for (int unsigned c = 0; c < NC; c++) hrn_table[c] = hi_rank(peer(i, c));
  endfunction

  // Host FIFOs of every NetIf: "up" carries node -> NetIf, "dn" NetIf -> node.
  fsl_word_t [M-1:0] up_din, up_dout, dn_din, dn_dout;
  logic      [M-1:0] up_wr, up_full, up_rd, up_ex;
  logic      [M-1:0] dn_wr, dn_full, dn_rd, dn_ex;

  for (genvar i = 0; i < M; i++) begin : g_host_fifo
    fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_up (
      .clk, .rst, .write(up_wr[i]), .din(up_din[i]), .full(up_full[i]),
      .read(up_rd[i]), .dout(up_dout[i]), .exists(up_ex[i]));
    fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_dn (
      .clk, .rst, .write(dn_wr[i]), .din(dn_din[i]), .full(dn_full[i]),
      .read(dn_rd[i]), .dout(dn_dout[i]), .exists(dn_ex[i]));
  end

  // ---------------- Tier-1 network ----------------
  if (!BCAST) begin : g_sel
    fsl_word_t [M-1:0][NC-1:0] co_data;
    logic      [M-1:0][NC-1:0] co_wr, co_full;
    fsl_word_t [M-1:0][NC-1:0] ci_data;
    logic      [M-1:0][NC-1:0] ci_ex, ci_rd;

    for (genvar i = 0; i < M; i++) begin : g_node
      netif_sel #(.N(NC), .LRN(lrn_table(i)), .HRN(hrn_table(i))) u_netif (
        .clk, .rst,
        .h_in_data(up_dout[i]), .h_in_exists(up_ex[i]), .h_in_read(up_rd[i]),
        .h_out_data(dn_din[i]), .h_out_write(dn_wr[i]), .h_out_full(dn_full[i]),
        .ch_out_data(co_data[i]), .ch_out_write(co_wr[i]), .ch_out_full(co_full[i]),
        .ch_in_data(ci_data[i]), .ch_in_exists(ci_ex[i]), .ch_in_read(ci_rd[i]));
      // One FIFO per channel, from NetIf i to NetIf peer(i,c).
      for (genvar c = 0; c < NC; c++) begin : g_ch
        localparam int unsigned P = peer(i, c);
        localparam int unsigned B = back(P, i);
        fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_ch (
          .clk, .rst, .write(co_wr[i][c]), .din(co_data[i][c]), .full(co_full[i][c]),
          .read(ci_rd[P][B]), .dout(ci_data[P][B]), .exists(ci_ex[P][B]));
      end
    end
  end else begin : g_bcast
    fsl_word_t [M-1:0]         bo_data;
    logic      [M-1:0]         bo_ex;
    logic      [M-1:0][NC-1:0] rd_in, rd_out;
    fsl_word_t [M-1:0][NC-1:0] bi_data;
    logic      [M-1:0][NC-1:0] bi_ex;

    for (genvar i = 0; i < M; i++) begin : g_node
      for (genvar c = 0; c < NC; c++) begin : g_ch
        localparam int unsigned P = peer(i, c);
        localparam int unsigned B = back(P, i);
        assign bi_data[i][c] = bo_data[P];
        assign bi_ex[i][c]   = bo_ex[P];
        assign rd_in[i][c]   = rd_out[P][B];
      end
      netif_bcast #(.N(NC), .LRN(lo_rank(i)), .HRN(hi_rank(i))) u_netif (
        .clk, .rst,
        .h_in_data(up_dout[i]), .h_in_exists(up_ex[i]), .h_in_read(up_rd[i]),
        .bc_out_data(bo_data[i]), .bc_out_exists(bo_ex[i]), .bc_rd_in(rd_in[i]),
        .bc_in_data(bi_data[i]), .bc_in_exists(bi_ex[i]), .bc_rd_out(rd_out[i]),
        .h_out_data(dn_din[i]), .h_out_write(dn_wr[i]), .h_out_full(dn_full[i]));
    end
  end

  // ---------------- computing nodes ----------------
  for (genvar j = 0; j < NUM_PE; j++) begin : g_pe
    // Element-side FIFO pair in front of an engine (used by the MPE kinds).
    fsl_word_t e2m_din, e2m_dout, m2e_din, m2e_dout;
    logic      e2m_wr, e2m_full, e2m_rd, e2m_ex;
    logic      m2e_wr, m2e_full, m2e_rd, m2e_ex;
    // The node's single FIFO interface, whatever drives it.
    fsl_word_t tx_data;
    logic      tx_write, tx_full;
    fsl_word_t rx_data;
    logic      rx_exists, rx_read;

    if (NODE_KIND[j] == KIND_DCR || NODE_KIND[j] == KIND_DCR_MPE) begin : g_dcr
      dcr2fsl u_dcr2fsl (
        .clk, .rst,
        .dcr_abus(dcr_abus[j]), .dcr_dbus_in(dcr_dbus_in[j]),
        .dcr_read(dcr_read[j]), .dcr_write(dcr_write[j]),
        .dcr_ack(dcr_ack[j]), .dcr_dbus_out(dcr_dbus_out[j]),
        .fsl_out_data(tx_data), .fsl_out_write(tx_write), .fsl_out_full(tx_full),
        .fsl_in_data(rx_data), .fsl_in_exists(rx_exists), .fsl_in_read(rx_read));
      assign pe_tx_full[j]   = 1'b0;
      assign pe_rx_data[j]   = '0;
      assign pe_rx_exists[j] = 1'b0;
    end else if (JACOBI[j] && NODE_KIND[j] == KIND_MPE) begin : g_jac
      jacobi_engine #(.RANK(RANK_W'(FIRST_RANK + j)), .MASTER(JAC_MASTER),
                      .COLS(JAC_COLS), .MAX_ROWS(JAC_MAX_ROWS)) u_jac (
        .clk, .rst,
        .to_mpe_data(tx_data), .to_mpe_write(tx_write), .to_mpe_full(tx_full),
        .from_mpe_data(rx_data), .from_mpe_exists(rx_exists), .from_mpe_read(rx_read),
        .iterations(), .computing());
      assign pe_tx_full[j]   = 1'b0;
      assign pe_rx_data[j]   = '0;
      assign pe_rx_exists[j] = 1'b0;
      assign dcr_ack[j]      = 1'b0;
      assign dcr_dbus_out[j] = '0;
    end else begin : g_fsl
      assign tx_data         = pe_tx_data[j];
      assign tx_write        = pe_tx_write[j];
      assign pe_tx_full[j]   = tx_full;
      assign pe_rx_data[j]   = rx_data;
      assign pe_rx_exists[j] = rx_exists;
      assign rx_read         = pe_rx_read[j];
      assign dcr_ack[j]      = 1'b0;
      assign dcr_dbus_out[j] = '0;
    end

    if (NODE_KIND[j] == KIND_MPE || NODE_KIND[j] == KIND_DCR_MPE) begin : g_mpe
      fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_e2m (
        .clk, .rst, .write(tx_write), .din(tx_data), .full(tx_full),
        .read(e2m_rd), .dout(e2m_dout), .exists(e2m_ex));
      fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_m2e (
        .clk, .rst, .write(m2e_wr), .din(m2e_din), .full(m2e_full),
        .read(rx_read), .dout(rx_data), .exists(rx_exists));
      tmd_mpe #(.NUM_NODES(MPE_NODES), .MAX_NDW(MAX_NDW)) u_mpe (
        .clk, .rst,
        .ce_in_data(e2m_dout), .ce_in_exists(e2m_ex), .ce_in_read(e2m_rd),
        .ce_out_data(m2e_din), .ce_out_write(m2e_wr), .ce_out_full(m2e_full),
        .net_out_data(up_din[j]), .net_out_write(up_wr[j]), .net_out_full(up_full[j]),
        .net_in_data(dn_dout[j]), .net_in_exists(dn_ex[j]), .net_in_read(dn_rd[j]),
        .busy(), .queue_level());
    end else begin : g_direct
      assign up_din[j] = tx_data;
      assign up_wr[j]  = tx_write;
      assign tx_full   = up_full[j];
      assign rx_data   = dn_dout[j];
      assign rx_exists = dn_ex[j];
      assign dn_rd[j]  = rx_read;
    end
  end

  // ---------------- gateway nodes ----------------
  for (genvar g = 0; g < NUM_GW; g++) begin : g_gw
    localparam int unsigned I = NUM_PE + g;
    logic [DATA_W-1:0] xo_din, xi_dout;
    logic              xo_wr, xo_full, xi_rd, xi_ex;

    bridge #(.SRC_ADDR(16'(g)), .DST_ADDR(16'(g))) u_bridge (
      .clk, .rst,
      .int_in_data(dn_dout[I]), .int_in_exists(dn_ex[I]), .int_in_read(dn_rd[I]),
      .int_out_data(up_din[I]), .int_out_write(up_wr[I]), .int_out_full(up_full[I]),
      .ext_out_data(xo_din), .ext_out_write(xo_wr), .ext_out_full(xo_full),
      .ext_in_data(xi_dout), .ext_in_exists(xi_ex), .ext_in_read(xi_rd));
    // Master-external FIFO (towards the off-chip controller).
    fsl_fifo #(.WIDTH(DATA_W), .DEPTH(FSL_DEPTH)) u_xo (
      .clk, .rst, .write(xo_wr), .din(xo_din), .full(xo_full),
      .read(t2_tx_read[g]), .dout(t2_tx_data[g]), .exists(t2_tx_exists[g]));
    // Slave-external FIFO (from the off-chip controller).
    fsl_fifo #(.WIDTH(DATA_W), .DEPTH(FSL_DEPTH)) u_xi (
      .clk, .rst, .write(t2_rx_write[g]), .din(t2_rx_data[g]), .full(t2_rx_full[g]),
      .read(xi_rd), .dout(xi_dout), .exists(xi_ex));
  end
endmodule
