// TMD machine: NUM_FPGA FPGAs, each a fully connected on-chip network of
// computing and gateway nodes, joined pairwise by off-chip links (a fully
// connected Tier-2 network).
//
// FPGA f holds the computing nodes with ranks f*PE_PER_FPGA ..
// f*PE_PER_FPGA + PE_PER_FPGA - 1 and NUM_FPGA-1 gateways; its gateway g
// leads to FPGA g (g < f) or g+1 (g >= f), so every off-chip packet makes a
// single off-chip hop. The NetIf routing tables follow from this numbering.
// Bit f of BCAST_MASK gives FPGA f broadcast NetIfs instead of selective
// ones.
//
// The processors and the off-chip communication controllers are not part of
// this RTL. Their connection points are ports, indexed by the global node
// number n = f*PE_PER_FPGA + j (`pe_*`, `dcr_*`) and by the link end
// l = f*(NUM_FPGA-1) + g (`t2_*`). A link end's `t2_tx_*` words are the
// Tier-2 packets to carry to the matching end on the other FPGA, whose
// `t2_rx_*` accepts them.
//
// Defaults: five FPGAs of nine computing nodes, the 45-node system. Each
// FPGA has 4 MicroBlaze-style FIFO nodes, 3 engine nodes behind a
// message-passing engine and 2 PowerPC-style DCR nodes (the mix of the
// heterogeneous experiment); FPGA 4 uses broadcast NetIfs and the others
// selective ones, so that both published NetIf styles are part of one
// machine. Bit n of JACOBI_MASK puts a Jacobi hardware engine on engine
// node n; by default FPGA 1's three engine nodes (ranks 13, 14, 15) are
// Jacobi engines working for the FIFO node at rank 9 (JAC_MASTER), as in
// the experiment with four MicroBlazes, two PowerPCs and three engines;
// the other engine nodes bring their element side out on `pe_*`. All of
// these are this design's choices. Ports of nodes that do not use them are
// driven to 0, so synthesis sees many constant outputs.
module tmd_top
  import tmd_pkg::*;
#(
  parameter int unsigned NUM_FPGA    = 5,
  parameter int unsigned PE_PER_FPGA = 9,
  parameter logic [PE_PER_FPGA-1:0][1:0] NODE_KIND = {2'd2, 2'd2, 2'd1, 2'd1, 2'd1,
                                                     2'd0, 2'd0, 2'd0, 2'd0},
  parameter logic [NUM_FPGA-1:0] BCAST_MASK = 5'b10000,
  parameter int unsigned MAX_NDW     = 507,
  parameter int unsigned FSL_DEPTH   = 16,
  parameter logic [NUM_FPGA*PE_PER_FPGA-1:0] JACOBI_MASK = 45'h0000_0000_E000,
  parameter logic [RANK_W-1:0] JAC_MASTER   = 8'd9,
  parameter int unsigned       JAC_COLS     = 60,
  parameter int unsigned       JAC_MAX_ROWS = 60
) (
  input  logic clk,
  input  logic rst,
  input  fsl_word_t [NUM_FPGA*PE_PER_FPGA-1:0] pe_tx_data,
  input  logic      [NUM_FPGA*PE_PER_FPGA-1:0] pe_tx_write,
  output logic      [NUM_FPGA*PE_PER_FPGA-1:0] pe_tx_full,
  output fsl_word_t [NUM_FPGA*PE_PER_FPGA-1:0] pe_rx_data,
  output logic      [NUM_FPGA*PE_PER_FPGA-1:0] pe_rx_exists,
  input  logic      [NUM_FPGA*PE_PER_FPGA-1:0] pe_rx_read,
  input  logic [NUM_FPGA*PE_PER_FPGA-1:0][9:0]        dcr_abus,
  input  logic [NUM_FPGA*PE_PER_FPGA-1:0][DATA_W-1:0] dcr_dbus_in,
  input  logic [NUM_FPGA*PE_PER_FPGA-1:0]             dcr_read,
  input  logic [NUM_FPGA*PE_PER_FPGA-1:0]             dcr_write,
  output logic [NUM_FPGA*PE_PER_FPGA-1:0]             dcr_ack,
  output logic [NUM_FPGA*PE_PER_FPGA-1:0][DATA_W-1:0] dcr_dbus_out,
  output logic [NUM_FPGA*(NUM_FPGA-1)-1:0][DATA_W-1:0] t2_tx_data,
  output logic [NUM_FPGA*(NUM_FPGA-1)-1:0]             t2_tx_exists,
  input  logic [NUM_FPGA*(NUM_FPGA-1)-1:0]             t2_tx_read,
  input  logic [NUM_FPGA*(NUM_FPGA-1)-1:0][DATA_W-1:0] t2_rx_data,
  input  logic [NUM_FPGA*(NUM_FPGA-1)-1:0]             t2_rx_write,
  output logic [NUM_FPGA*(NUM_FPGA-1)-1:0]             t2_rx_full
);
  localparam int unsigned NG = NUM_FPGA - 1;
  localparam int unsigned NP = PE_PER_FPGA;

  function automatic logic [NG-1:0][RANK_W-1:0] gw_lo(int unsigned f);
    for (int unsigned g = 0; g < NG; g++)
      gw_lo[g] = RANK_W'(((g < f) ? g : g + 1) * NP);
  endfunction
  function automatic logic [NG-1:0][RANK_W-1:0] gw_hi(int unsigned f);
    for (int unsigned g = 0; g < NG; g++)
      gw_hi[g] = RANK_W'(((g < f) ? g : g + 1) * NP + NP - 1);
  endfunction

  for (genvar f = 0; f < NUM_FPGA; f++) begin : g_fpga
    tmd_fpga #(
      .NUM_PE(NP), .NUM_GW(NG), .FIRST_RANK(f * NP), .NODE_KIND(NODE_KIND),
      .GW_LRN(gw_lo(f)), .GW_HRN(gw_hi(f)), .BCAST(BCAST_MASK[f]),
      .MPE_NODES(NUM_FPGA * NP), .MAX_NDW(MAX_NDW), .FSL_DEPTH(FSL_DEPTH),
      .JACOBI(JACOBI_MASK[f * NP +: NP]), .JAC_MASTER(JAC_MASTER),
      .JAC_COLS(JAC_COLS), .JAC_MAX_ROWS(JAC_MAX_ROWS)
    ) u_fpga (
      .clk, .rst,
      .pe_tx_data  (pe_tx_data  [f*NP +: NP]),
      .pe_tx_write (pe_tx_write [f*NP +: NP]),
      .pe_tx_full  (pe_tx_full  [f*NP +: NP]),
      .pe_rx_data  (pe_rx_data  [f*NP +: NP]),
      .pe_rx_exists(pe_rx_exists[f*NP +: NP]),
      .pe_rx_read  (pe_rx_read  [f*NP +: NP]),
      .dcr_abus    (dcr_abus    [f*NP +: NP]),
      .dcr_dbus_in (dcr_dbus_in [f*NP +: NP]),
      .dcr_read    (dcr_read    [f*NP +: NP]),
      .dcr_write   (dcr_write   [f*NP +: NP]),
      .dcr_ack     (dcr_ack     [f*NP +: NP]),
      .dcr_dbus_out(dcr_dbus_out[f*NP +: NP]),
      .t2_tx_data  (t2_tx_data  [f*NG +: NG]),
      .t2_tx_exists(t2_tx_exists[f*NG +: NG]),
      .t2_tx_read  (t2_tx_read  [f*NG +: NG]),
      .t2_rx_data  (t2_rx_data  [f*NG +: NG]),
      .t2_rx_write (t2_rx_write [f*NG +: NG]),
      .t2_rx_full  (t2_rx_full  [f*NG +: NG]));
  end
endmodule
