// End-to-end test of the whole machine at its default size: five FPGAs of
// nine computing nodes (ranks 0..44), fully connected off-chip links, FPGA 4
// with broadcast NetIfs and the others with selective ones. On every FPGA,
// nodes 0-3 are FIFO nodes (software library, played here), 4-6 are
// engines behind a TMD-MPE (the engine side played here), 7-8 are DCR
// nodes (PowerPC, played here). The off-chip controllers are modelled as
// lossless wires from one gateway's Tier-2 output to the matching gateway
// on the other FPGA.
//
// Traffic, all running at once:
//  A. engine 4 -> engine 41, 1200 words (three packets); 41 is busy with
//     a receive from engine 42, so 4's envelope waits in 41's
//     unexpected-message queue until 41 asks for it;
//  B. engine 22 -> engine 5, 10 words, receive posted first;
//  C. software node 2 -> engine 6 by hand-played rendezvous;
//  D. nodes 0 and 3 send 20-word packets to node 1 at the same moment
//     (reception arbitration);
//  E. node 10 sends 400 words to node 37, which stops reading for a while
//     (back-pressure through both networks);
//  F. DCR node 7 -> node 36, and node 27 -> DCR node 44;
//  G. engine 40 (broadcast FPGA) -> engine 23, 5 words;
//  J. the built-in Jacobi engines at ranks 13, 14 and 15 solve an 8 x 60
//     grid in three strips for 3 iterations, with node 9 as master (played
//     here with hand-coded rendezvous). Every convergence sum and the final
//     grid are compared bit for bit with a single-precision reference.
// Every received word is checked. Each mechanism -- off-chip crossing,
// on-chip delivery, unexpected-envelope store, queue hit, packetizing of a
// long message, arbitration conflict, back-pressure stall, broadcast NetIf
// delivery, DCR access, Jacobi iteration -- is counted and must occur at least once.
module tb_tmd_top;
  import tmd_pkg::*;
  localparam int NF = 5, NP = 9, NG = NF - 1, NN = NF * NP, NL = NF * NG;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  fsl_word_t [NN-1:0] pe_tx_data, pe_rx_data;
  logic [NN-1:0] pe_tx_write, pe_tx_full, pe_rx_exists, pe_rx_read;
  logic [NN-1:0][9:0]  dcr_abus;
  logic [NN-1:0][31:0] dcr_dbus_in, dcr_dbus_out;
  logic [NN-1:0] dcr_read, dcr_write, dcr_ack;
  logic [NL-1:0][31:0] t2_tx_data, t2_rx_data;
  logic [NL-1:0] t2_tx_exists, t2_tx_read, t2_rx_write, t2_rx_full;

  tmd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- off-chip links: gateway g of FPGA f <-> FPGA q ----
  int n_t2_pkts = 0;
  for (genvar f = 0; f < NF; f++) begin : g_lf
    for (genvar g = 0; g < NG; g++) begin : g_lg
      localparam int Q  = (g < f) ? g : g + 1;
      localparam int GP = (f < Q) ? f : f - 1;
      localparam int L  = f * NG + g, L2 = Q * NG + GP;
      assign t2_tx_read[L]   = t2_tx_exists[L] && !t2_rx_full[L2];
      assign t2_rx_write[L2] = t2_tx_read[L];
      assign t2_rx_data[L2]  = t2_tx_data[L];
      always @(posedge clk)
        if (t2_tx_read[L] && t2_tx_data[L][31:24] == T2_SOP) n_t2_pkts++;
    end
  end

  // ---- FIFO-port traffic of every node ----
  fsl_word_t txq[NN][$], rxq[NN][$];
  localparam int JM = 9;        // Jacobi master node
  logic [31:0] jstream[3][$];   // words arriving at the master, per engine
  int j_src = 0;
  logic [NN-1:0] rx_hold = '0;
  always_comb
    for (int n = 0; n < NN; n++) begin
      pe_tx_write[n] = txq[n].size() != 0 && !pe_tx_full[n];
      pe_tx_data[n]  = txq[n].size() != 0 ? txq[n][0] : '0;
      pe_rx_read[n]  = pe_rx_exists[n] && !rx_hold[n];
    end
  int n_stall = 0;
  always @(posedge clk) if (!rst) begin
    automatic logic [NN-1:0] tw = pe_tx_write, rr = pe_rx_read;
    automatic fsl_word_t [NN-1:0] rd = pe_rx_data;
    for (int n = 0; n < NN; n++) if (txq[n].size() != 0 && pe_tx_full[n]) n_stall++;
    #1;
    for (int n = 0; n < NN; n++) begin
      if (tw[n]) void'(txq[n].pop_front());
      if (rr[n] && n == JM) begin
        // node 9 is the Jacobi master: sort its words by sending engine
        if (rd[n].ctrl) j_src = int'(rd[n].data[31:24]) - 13;
        jstream[j_src].push_back(rd[n].data);
      end else if (rr[n]) rxq[n].push_back(rd[n]);
    end
  end

  // ---- mechanism monitors inside the design ----
  int n_unexp = 0, n_qhit = 0, n_maxpkt = 0, n_conflict = 0, n_bcast = 0, n_dcr = 0;
  int n_onchip = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.g_fpga[4].u_fpga.g_pe[5].g_mpe.u_mpe.queue_level != 0) n_unexp++;
    if (dut.g_fpga[4].u_fpga.g_pe[5].g_mpe.u_mpe.state.name() == "S_QDEL0") n_qhit++;
    if (dut.g_fpga[0].u_fpga.g_pe[4].g_mpe.u_mpe.net_out_write &&
        dut.g_fpga[0].u_fpga.g_pe[4].g_mpe.u_mpe.net_out_data.ctrl &&
        dut.g_fpga[0].u_fpga.g_pe[4].g_mpe.u_mpe.net_out_data.data[15:0] == 16'd507) n_maxpkt++;
    if ($countones(dut.g_fpga[0].u_fpga.g_sel.g_node[1].u_netif.ch_in_exists) > 1) n_conflict++;
    if (dut.g_fpga[0].u_fpga.g_sel.g_node[1].u_netif.h_out_write &&
        dut.g_fpga[0].u_fpga.g_sel.g_node[1].u_netif.h_out_data.ctrl) n_onchip++;
    n_dcr += $countones(dcr_ack & (dcr_read | dcr_write));
  end
  for (genvar k = 0; k < NP + NG; k++) begin : g_bmon
    always @(posedge clk)
      if (dut.g_fpga[4].u_fpga.g_bcast.g_node[k].u_netif.h_out_write &&
          dut.g_fpga[4].u_fpga.g_bcast.g_node[k].u_netif.h_out_data.ctrl) n_bcast++;
  end

  function automatic fsl_word_t H(rank_t s, rank_t d, int n);
    return '{ctrl: 1'b1, data: mk_hdr(s, d, 16'(n))};
  endfunction
  function automatic fsl_word_t D(logic [31:0] v);
    return '{ctrl: 1'b0, data: v};
  endfunction

  task automatic mpe_cmd(int n, logic [31:0] op, int size, rank_t remote, logic [31:0] tag);
    txq[n].push_back(D(op));
    txq[n].push_back(D(32'(size)));
    txq[n].push_back(D({8'(n), remote, 16'h0}));
    txq[n].push_back(D(tag));
  endtask

  task automatic expect_rx(int n, fsl_word_t e[$], string what);
    int t = 0;
    while (rxq[n].size() < e.size() && t < 40000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    check(rxq[n].size() == e.size(),
          $sformatf("%s: %0d words, expected %0d", what, rxq[n].size(), e.size()));
    foreach (e[k]) if (k < rxq[n].size() && rxq[n][k] != e[k]) begin
      check(0, $sformatf("%s: word %0d %h expected %h", what, k, rxq[n][k], e[k]));
      break;
    end
    rxq[n] = {};
  endtask

  task automatic dcr_access(int n, bit wr, logic [9:0] a, input logic [31:0] wd,
                            output logic [31:0] rdat);
    @(negedge clk);
    dcr_abus[n] = a; dcr_dbus_in[n] = wd; dcr_write[n] = wr; dcr_read[n] = !wr;
    do @(posedge clk); while (!dcr_ack[n]);
    #1 rdat = dcr_dbus_out[n];
    @(negedge clk);
    dcr_write[n] = 0; dcr_read[n] = 0; dcr_dbus_in[n] = '0;
  endtask

  task automatic dcr_pop(int n, output logic [31:0] w);
    logic [31:0] st;
    int t = 0;
    do begin dcr_access(n, 0, 10'h001, '0, st); t++; end while (!st[0] && t < 2000);
    dcr_access(n, 0, 10'h000, '0, w);
  endtask

  // A. engine 4 -> engine 41. Engine 41 is first busy receiving from
  // engine 42, so 4's envelope lands in its unexpected-message queue; the
  // later receive from 4 then finds it there.
  task automatic flow_a();
    fsl_word_t e[$];
    mpe_cmd(41, MPE_OP_RECV, 3, 42, 32'hAA);
    mpe_cmd(4, MPE_OP_SEND, 1200, 41, 32'hA);
    for (int k = 0; k < 1200; k++) txq[4].push_back(D(32'hA000_0000 + k));
    repeat (600) @(negedge clk);
    mpe_cmd(42, MPE_OP_SEND, 3, 41, 32'hAA);
    for (int k = 0; k < 3; k++) txq[42].push_back(D(32'hAA00 + k));
    e = {H(42, 41, 0), D(32'hAA), D(32'hAA00), D(32'hAA01), D(32'hAA02)};
    expect_rx(41, e, "A: 42 -> 41 while 4's envelope waits");
    mpe_cmd(41, MPE_OP_RECV, 1200, 4, 32'hA);
    e = {H(4, 41, 0), D(32'hA)};
    for (int k = 0; k < 1200; k++) e.push_back(D(32'hA000_0000 + k));
    expect_rx(41, e, "A: 1200 words 4 -> 41");
  endtask

  // B. engine 22 -> engine 5.
  task automatic flow_b();
    fsl_word_t e[$];
    mpe_cmd(5, MPE_OP_RECV, 10, 22, 32'hB);
    repeat (50) @(negedge clk);
    mpe_cmd(22, MPE_OP_SEND, 10, 5, 32'hB);
    for (int k = 0; k < 10; k++) txq[22].push_back(D(32'hB000 + k));
    e = {H(22, 5, 0), D(32'hB)};
    for (int k = 0; k < 10; k++) e.push_back(D(32'hB000 + k));
    expect_rx(5, e, "B: 22 -> 5");
  endtask

  // C. software node 2 -> engine 6.
  task automatic flow_c();
    fsl_word_t e[$];
    mpe_cmd(6, MPE_OP_RECV, 3, 2, 32'hC);
    txq[2].push_back(H(2, 6, 1)); txq[2].push_back(D(32'hC));
    e = {H(6, 2, 1), D(CTS_WORD)};
    expect_rx(2, e, "C: clear-to-send to software node");
    txq[2].push_back(H(2, 6, 3));
    for (int k = 0; k < 3; k++) txq[2].push_back(D(32'hC00 + k));
    e = {H(2, 6, 0), D(32'hC), D(32'hC00), D(32'hC01), D(32'hC02)};
    expect_rx(6, e, "C: software node -> engine 6");
  endtask

  // D. two packets to node 1 at once.
  task automatic flow_d();
    fsl_word_t e[$];
    @(negedge clk);
    txq[0].push_back(H(0, 1, 20));
    for (int k = 0; k < 20; k++) txq[0].push_back(D(32'hD000 + k));
    txq[3].push_back(H(3, 1, 20));
    for (int k = 0; k < 20; k++) txq[3].push_back(D(32'hD300 + k));
    e = {H(0, 1, 20)};
    for (int k = 0; k < 20; k++) e.push_back(D(32'hD000 + k));
    e.push_back(H(3, 1, 20));
    for (int k = 0; k < 20; k++) e.push_back(D(32'hD300 + k));
    expect_rx(1, e, "D: two whole packets, channel priority order");
  endtask

  // E. back-pressure: 37 stops reading.
  task automatic flow_e();
    fsl_word_t e[$];
    rx_hold[37] = 1'b1;
    txq[10].push_back(H(10, 37, 400));
    for (int k = 0; k < 400; k++) txq[10].push_back(D(32'hE000 + k));
    repeat (400) @(negedge clk);
    check(txq[10].size() != 0, "E: sender held back while receiver stalls");
    rx_hold[37] = 1'b0;
    e = {H(10, 37, 400)};
    for (int k = 0; k < 400; k++) e.push_back(D(32'hE000 + k));
    expect_rx(37, e, "E: 400 words 10 -> 37");
  endtask

  // F. DCR nodes.
  task automatic flow_f();
    fsl_word_t e[$];
    logic [31:0] w;
    dcr_access(7, 1, 10'h001, mk_hdr(7, 36, 2), w);
    dcr_access(7, 1, 10'h000, 32'hF7, w);
    dcr_access(7, 1, 10'h000, 32'hF8, w);
    e = {H(7, 36, 2), D(32'hF7), D(32'hF8)};
    expect_rx(36, e, "F: DCR node 7 -> 36");
    txq[27].push_back(H(27, 44, 1)); txq[27].push_back(D(32'hF27));
    dcr_pop(44, w); check(w == mk_hdr(27, 44, 1), "F: header read over DCR at 44");
    dcr_pop(44, w); check(w == 32'hF27, "F: data read over DCR at 44");
  endtask

  // G. engine 40 -> engine 23.
  task automatic flow_g();
    fsl_word_t e[$];
    mpe_cmd(23, MPE_OP_RECV, 5, 40, 32'h6);
    mpe_cmd(40, MPE_OP_SEND, 5, 23, 32'h6);
    for (int k = 0; k < 5; k++) txq[40].push_back(D(32'h6000 + k));
    e = {H(40, 23, 0), D(32'h6)};
    for (int k = 0; k < 5; k++) e.push_back(D(32'h6000 + k));
    expect_rx(23, e, "G: 40 -> 23");
  endtask


  // J. Jacobi engines 13, 14, 15 with node 9 as master.
  function automatic real s2r(logic [31:0] x);
    if (x[30:23] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction
  function automatic logic [31:0] r2s(real r);
    logic [63:0] d; logic [52:0] mt; logic [24:0] m; int e;
    if (r == 0.0) return 0;
    d  = $realtobits(r);
    mt = {1'b1, d[51:0]};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, mt[52:29]} + 25'(mt[28] && ((mt[27:0] != 0) || mt[29]));
    if (m[24]) begin m = m >> 1; e++; end
    if (e <= 0) return 0;
    return {d[63], 8'(e), m[22:0]};
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) + s2r(b));
  endfunction
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction

  localparam int JC = 60, JR = 2;
  int n_jac = 0;

  task automatic jwait(int k, int n);
    while (jstream[k].size() < n) @(negedge clk);
  endtask

  // The master's software send: envelope, wait for clear-to-send, data.
  task automatic jsend(int k, logic [31:0] tag, logic [31:0] w[$]);
    rank_t dst = rank_t'(13 + k);
    txq[JM].push_back(H(JM, dst, 1)); txq[JM].push_back(D(tag));
    jwait(k, 2);
    check(jstream[k][0] == mk_hdr(dst, JM, 1) && jstream[k][1] == CTS_WORD,
          $sformatf("J: clear-to-send from engine %0d: %h %h", dst, jstream[k][0], jstream[k][1]));
    void'(jstream[k].pop_front());
    void'(jstream[k].pop_front());
    for (int b = 0; b < w.size(); b += 507) begin
      int n = (w.size() - b > 507) ? 507 : w.size() - b;
      txq[JM].push_back(H(JM, dst, n));
      for (int i = 0; i < n; i++) txq[JM].push_back(D(w[b + i]));
    end
  endtask

  // The master's software receive: wait for the envelope, answer, collect.
  task automatic jrecv(int k, logic [31:0] tag, int n, ref logic [31:0] w[$]);
    rank_t src = rank_t'(13 + k);
    jwait(k, 2);
    check(jstream[k][0] == mk_hdr(src, JM, 1) && jstream[k][1] == tag,
          $sformatf("J: envelope from engine %0d tag %h", src, tag));
    void'(jstream[k].pop_front());
    void'(jstream[k].pop_front());
    txq[JM].push_back(H(JM, src, 1)); txq[JM].push_back(D(CTS_WORD));
    w = {};
    while (w.size() < n) begin
      int m;
      jwait(k, 1);
      m = int'(jstream[k][0][15:0]);
      jwait(k, m + 1);
      void'(jstream[k].pop_front());
      for (int i = 0; i < m; i++) w.push_back(jstream[k].pop_front());
    end
  endtask

  task automatic flow_j();
    logic [31:0] g[8][JC], nv[8][JC], w[$], conv[3];
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < JC; c++)
        g[r][c] = (r == 0 || r == 7 || c == 0 || c == JC - 1)
                  ? r2s(real'((r * 7 + c * 3) % 50) + 10.0) : r2s(0.0);
    for (int k = 0; k < 3; k++) begin
      w = {};
      w.push_back(32'(JR));
      w.push_back({16'h0, (k == 0) ? 8'hFF : 8'(12 + k), (k == 2) ? 8'hFF : 8'(14 + k)});
      jsend(k, 32'h100, w);
      w = {};
      for (int r = 0; r < JR + 2; r++)
        for (int c = 0; c < JC; c++) w.push_back(g[k * JR + r][c]);
      jsend(k, 32'h101, w);
    end
    for (int it = 0; it < 3; it++) begin
      for (int k = 0; k < 3; k++) begin
        conv[k] = 0;
        for (int r = k * JR + 1; r <= k * JR + JR; r++)
          for (int c = 1; c < JC - 1; c++) begin
            logic [31:0] s, dd;
            s = fadd(fadd(fadd(g[r - 1][c], g[r + 1][c]), g[r][c - 1]), g[r][c + 1]);
            nv[r][c] = fmul(s, 32'h3E80_0000);
            dd = fadd(nv[r][c], {~g[r][c][31], g[r][c][30:0]});
            conv[k] = fadd(conv[k], fmul(dd, dd));
          end
      end
      for (int r = 1; r < 7; r++)
        for (int c = 1; c < JC - 1; c++) g[r][c] = nv[r][c];
      for (int k = 0; k < 3; k++) begin
        jrecv(k, 32'h103, 1, w);
        check(w[0] == conv[k], $sformatf("J: iteration %0d engine %0d sum %h expected %h",
                                         it, 13 + k, w[0], conv[k]));
        if (w[0] == conv[k]) n_jac++;
      end
      for (int k = 0; k < 3; k++) begin
        w = {};
        w.push_back(32'(it == 2));
        jsend(k, 32'h104, w);
      end
    end
    for (int k = 0; k < 3; k++) begin
      int bad = 0;
      jrecv(k, 32'h105, JR * JC, w);
      for (int i = 0; i < JR * JC; i++)
        if (w[i] != g[k * JR + 1 + i / JC][i % JC]) bad++;
      check(w.size() == JR * JC && bad == 0,
            $sformatf("J: final strip of engine %0d, %0d values differ", 13 + k, bad));
    end
  endtask

  int t_start;
  initial begin
    dcr_abus = '0; dcr_dbus_in = '0; dcr_read = '0; dcr_write = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    fork
      flow_a(); flow_b(); flow_c(); flow_d(); flow_e(); flow_f(); flow_g(); flow_j();
    join
    $display("off-chip packets %0d, on-chip deliveries at node 1 %0d, unexpected-queue cycles %0d, queue hits %0d",
             n_t2_pkts, n_onchip, n_unexp, n_qhit);
    $display("full-size packets %0d, arbitration-conflict cycles %0d, stall cycles %0d, broadcast deliveries %0d, DCR accesses %0d",
             n_maxpkt, n_conflict, n_stall, n_bcast, n_dcr);
    $display("Jacobi convergence sums matched %0d", n_jac);
    check(n_t2_pkts > 0, "off-chip crossing happened");
    check(n_onchip >= 2, "on-chip delivery happened");
    check(n_unexp > 0, "unexpected envelope stored");
    check(n_qhit > 0, "receive matched in the queue");
    check(n_maxpkt == 2, "long message cut into full-size packets");
    check(n_conflict > 0, "reception arbitration conflict happened");
    check(n_stall > 0, "back-pressure stall happened");
    check(n_bcast > 0, "broadcast NetIf delivered packets");
    check(n_dcr > 0, "DCR accesses happened");
    check(n_jac == 9, "Jacobi iterations completed by all three engines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
