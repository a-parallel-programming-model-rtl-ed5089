// Self-checking test of one FPGA (tmd_fpga), built twice: once with
// selective NetIfs and once with broadcast NetIfs. Each copy has three
// computing nodes -- rank 0 a FIFO node (processor running the software
// library, played by the testbench), rank 1 an engine behind a TMD-MPE,
// rank 2 a DCR node (PowerPC through dcr2fsl) -- and one gateway leading to
// ranks 3..5. For each copy:
//  1. rank 0 sends a raw packet to rank 2, read back over DCR;
//  2. rank 2 sends a packet over DCR to rank 0;
//  3. rank 0 sends a 4-word message to the engine at rank 1 by hand-played
//     rendezvous (envelope, wait for clear-to-send, data packet);
//  4. rank 0 sends a packet to rank 4, which must leave through the
//     gateway as a Tier-2 packet with the right header and tail words;
//  5. a Tier-2 packet from rank 5 enters through the gateway and reaches
//     rank 0.
module tb_tmd_fpga;
  import tmd_pkg::*;
  localparam int NPE = 3;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  fsl_word_t [1:0][NPE-1:0] pe_tx_data, pe_rx_data;
  logic [1:0][NPE-1:0] pe_tx_write, pe_tx_full, pe_rx_exists, pe_rx_read;
  logic [1:0][NPE-1:0][9:0]  dcr_abus;
  logic [1:0][NPE-1:0][31:0] dcr_dbus_in, dcr_dbus_out;
  logic [1:0][NPE-1:0] dcr_read, dcr_write, dcr_ack;
  logic [1:0][31:0] t2_tx_data, t2_rx_data;
  logic [1:0] t2_tx_exists, t2_tx_read, t2_rx_write, t2_rx_full;

  for (genvar b = 0; b < 2; b++) begin : g_dut
    tmd_fpga #(.NUM_PE(NPE), .NUM_GW(1), .FIRST_RANK(0),
               .NODE_KIND({2'd2, 2'd1, 2'd0}), .GW_LRN(8'd3), .GW_HRN(8'd5),
               .BCAST(b[0]), .MPE_NODES(6)) dut (
      .clk, .rst,
      .pe_tx_data(pe_tx_data[b]), .pe_tx_write(pe_tx_write[b]), .pe_tx_full(pe_tx_full[b]),
      .pe_rx_data(pe_rx_data[b]), .pe_rx_exists(pe_rx_exists[b]), .pe_rx_read(pe_rx_read[b]),
      .dcr_abus(dcr_abus[b]), .dcr_dbus_in(dcr_dbus_in[b]), .dcr_read(dcr_read[b]),
      .dcr_write(dcr_write[b]), .dcr_ack(dcr_ack[b]), .dcr_dbus_out(dcr_dbus_out[b]),
      .t2_tx_data(t2_tx_data[b]), .t2_tx_exists(t2_tx_exists[b]), .t2_tx_read(t2_tx_read[b]),
      .t2_rx_data(t2_rx_data[b]), .t2_rx_write(t2_rx_write[b]), .t2_rx_full(t2_rx_full[b]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FIFO-port traffic of every node, and the Tier-2 side of the gateway.
  fsl_word_t txq[2][NPE][$], rxq[2][NPE][$];
  logic [31:0] t2in[2][$], t2out[2][$];
  always_comb
    for (int b = 0; b < 2; b++) begin
      for (int n = 0; n < NPE; n++) begin
        pe_tx_write[b][n] = txq[b][n].size() != 0 && !pe_tx_full[b][n];
        pe_tx_data[b][n]  = txq[b][n].size() != 0 ? txq[b][n][0] : '0;
        pe_rx_read[b][n]  = pe_rx_exists[b][n];
      end
      t2_rx_write[b] = t2in[b].size() != 0 && !t2_rx_full[b];
      t2_rx_data[b]  = t2in[b].size() != 0 ? t2in[b][0] : '0;
      t2_tx_read[b]  = t2_tx_exists[b];
    end
  always @(posedge clk) if (!rst) begin
    automatic logic [1:0][NPE-1:0] tw = pe_tx_write, rr = pe_rx_read;
    automatic fsl_word_t [1:0][NPE-1:0] rd = pe_rx_data;
    automatic logic [1:0] xw = t2_rx_write, xr = t2_tx_read;
    automatic logic [1:0][31:0] xd = t2_tx_data;
    #1;
    for (int b = 0; b < 2; b++) begin
      for (int n = 0; n < NPE; n++) begin
        if (tw[b][n]) void'(txq[b][n].pop_front());
        if (rr[b][n]) rxq[b][n].push_back(rd[b][n]);
      end
      if (xw[b]) void'(t2in[b].pop_front());
      if (xr[b]) t2out[b].push_back(xd[b]);
    end
  end

  function automatic fsl_word_t H(rank_t s, rank_t d, int n);
    return '{ctrl: 1'b1, data: mk_hdr(s, d, 16'(n))};
  endfunction
  function automatic fsl_word_t D(logic [31:0] v);
    return '{ctrl: 1'b0, data: v};
  endfunction

  // DCR master of node 2.
  task automatic dcr_access(int b, bit wr, logic [9:0] a, input logic [31:0] wd,
                            output logic [31:0] rdat);
    @(negedge clk);
    dcr_abus[b][2] = a; dcr_dbus_in[b][2] = wd;
    dcr_write[b][2] = wr; dcr_read[b][2] = !wr;
    do @(posedge clk); while (!dcr_ack[b][2]);
    #1 rdat = dcr_dbus_out[b][2];
    @(negedge clk);
    dcr_write[b][2] = 0; dcr_read[b][2] = 0; dcr_dbus_in[b][2] = '0;
  endtask

  task automatic dcr_pop(int b, output logic [31:0] w);
    logic [31:0] st;
    int t = 0;
    do begin dcr_access(b, 0, 10'h001, '0, st); t++; end while (!st[0] && t < 500);
    dcr_access(b, 0, 10'h000, '0, w);
  endtask

  task automatic wait_rx(int b, int n, int count);
    int t = 0;
    while (rxq[b][n].size() < count && t < 3000) begin @(negedge clk); t++; end
  endtask

  task automatic expect_rx(int b, int n, fsl_word_t e[$], string what);
    wait_rx(b, n, e.size());
    check(rxq[b][n].size() == e.size(), $sformatf("[%0d] %s: %0d words", b, what, rxq[b][n].size()));
    foreach (e[k]) if (k < rxq[b][n].size() && rxq[b][n][k] != e[k]) begin
      check(0, $sformatf("[%0d] %s word %0d", b, what, k)); break;
    end
    rxq[b][n] = {};
  endtask

  task automatic run(int b);
    fsl_word_t e[$];
    logic [31:0] w;
    // 1. rank 0 -> rank 2 (DCR)
    txq[b][0].push_back(H(0, 2, 2)); txq[b][0].push_back(D(32'hA1)); txq[b][0].push_back(D(32'hA2));
    dcr_pop(b, w); check(w == mk_hdr(0, 2, 2), $sformatf("[%0d] DCR header %h", b, w));
    dcr_pop(b, w); check(w == 32'hA1, "DCR word 1");
    dcr_pop(b, w); check(w == 32'hA2, "DCR word 2");
    // 2. rank 2 (DCR) -> rank 0
    dcr_access(b, 1, 10'h001, mk_hdr(2, 0, 3), w);
    for (int k = 0; k < 3; k++) dcr_access(b, 1, 10'h000, 32'hB0 + k, w);
    e = {H(2, 0, 3), D(32'hB0), D(32'hB1), D(32'hB2)};
    expect_rx(b, 0, e, "DCR to FIFO node");
    // 3. rendezvous with the engine at rank 1
    txq[b][1].push_back(D(MPE_OP_RECV)); txq[b][1].push_back(D(4));
    txq[b][1].push_back(D({8'd1, 8'd0, 16'd0})); txq[b][1].push_back(D(32'h9));
    txq[b][0].push_back(H(0, 1, 1)); txq[b][0].push_back(D(32'h9));
    e = {H(1, 0, 1), D(CTS_WORD)};
    expect_rx(b, 0, e, "clear-to-send from engine");
    txq[b][0].push_back(H(0, 1, 4));
    for (int k = 0; k < 4; k++) txq[b][0].push_back(D(32'hC0 + k));
    e = {H(0, 1, 0), D(32'h9), D(32'hC0), D(32'hC1), D(32'hC2), D(32'hC3)};
    expect_rx(b, 1, e, "message delivered to engine");
    // 4. rank 0 -> rank 4 through the gateway
    txq[b][0].push_back(H(0, 4, 2)); txq[b][0].push_back(D(32'hE0)); txq[b][0].push_back(D(32'hE1));
    begin
      int t = 0;
      while (t2out[b].size() < 7 && t < 2000) begin @(negedge clk); t++; end
    end
    check(t2out[b].size() == 7, $sformatf("[%0d] Tier-2 words %0d", b, t2out[b].size()));
    if (t2out[b].size() == 7) begin
      check(t2out[b][0] == {T2_SOP, 14'd7, 10'd0}, "Tier-2 header 1");
      check(t2out[b][2] == mk_hdr(0, 4, 2), "Tier-1 header inside");
      check(t2out[b][4] == 32'hE1, "payload inside");
      check(t2out[b][5] == T2_ALMOST_EOP && t2out[b][6] == T2_EOP, "Tier-2 tail");
    end
    // 5. Tier-2 packet from rank 5 to rank 0
    t2in[b].push_back({T2_SOP, 14'd6, 10'd0});
    t2in[b].push_back(32'h0);
    t2in[b].push_back(mk_hdr(5, 0, 1));
    t2in[b].push_back(32'hF00D);
    t2in[b].push_back(T2_ALMOST_EOP);
    t2in[b].push_back(T2_EOP);
    e = {H(5, 0, 1), D(32'hF00D)};
    expect_rx(b, 0, e, "packet from the gateway");
  endtask

  initial begin
    dcr_abus = '0; dcr_dbus_in = '0; dcr_read = '0; dcr_write = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    fork
      run(0);
      run(1);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
