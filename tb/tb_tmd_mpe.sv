// Self-checking test of the TMD-MPE (local rank 3). The testbench plays both
// the computing element and the rest of the network.
//  1. Send 1100 words to rank 7: envelope out, nothing more until the
//     clear-to-send arrives, then data packets of 507, 507 and 86 words.
//  2. Envelopes from ranks 9 (tag 0x11) and 7 (tag 0x22) wait in the
//     network; a receive from 7 / tag 0x22 stores the first as unexpected
//     and answers the second with clear-to-send. During the data phase an
//     envelope from rank 12 arrives and is stored too.
//  3. A receive from 9 / tag 0x11 of 600 words is matched in the queue
//     without waiting; data arrives in two packets.
//  4. A zero-length send to rank 5, with an envelope from rank 6 arriving
//     before the clear-to-send.
//  5. Receives from 12 and 6 are both served from the queue, which empties.
//  6. Two envelopes from rank 2 with different tags: receives pick them
//     by tag, and a receive for a tag not queued waits for the network.
// Checks every word on both sides and the queue level after each step.
module tb_tmd_mpe;
  import tmd_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  fsl_word_t ce_in_data, ce_out_data, net_out_data, net_in_data;
  logic ce_in_exists, ce_in_read, ce_out_write, ce_out_full;
  logic net_out_write, net_out_full, net_in_exists, net_in_read, busy;
  logic [3:0] queue_level;

  tmd_mpe #(.NUM_NODES(8), .MAX_NDW(507)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  fsl_word_t ceq[$], nq[$], net_got[$], ce_got[$];
  assign ce_in_exists  = ceq.size() != 0;
  assign ce_in_data    = ceq.size() != 0 ? ceq[0] : '0;
  assign net_in_exists = nq.size() != 0;
  assign net_in_data   = nq.size() != 0 ? nq[0] : '0;
  always @(negedge clk) begin
    net_out_full <= ($urandom % 5) == 0;
    ce_out_full  <= ($urandom % 5) == 0;
  end
  // Handshakes are sampled at the clock edge and acted on just after it,
  // so the design never sees the testbench's queues change mid-edge.
  always @(posedge clk) if (!rst) begin
    automatic logic cr = ce_in_read, nr = net_in_read, nw = net_out_write, cw = ce_out_write;
    automatic fsl_word_t nd = net_out_data, cd = ce_out_data;
    #1;
    if (cr) void'(ceq.pop_front());
    if (nr) void'(nq.pop_front());
    if (nw) net_got.push_back(nd);
    if (cw) ce_got.push_back(cd);
  end

  localparam rank_t ME = 3;

  function automatic fsl_word_t H(rank_t s, rank_t d, int n);
    return '{ctrl: 1'b1, data: mk_hdr(s, d, 16'(n))};
  endfunction
  function automatic fsl_word_t D(logic [31:0] v);
    return '{ctrl: 1'b0, data: v};
  endfunction

  task automatic cmd(logic [31:0] op, int size, rank_t remote, logic [31:0] tag);
    ceq.push_back(D(op));
    ceq.push_back(D(32'(size)));
    ceq.push_back(D({ME, remote, 16'h0}));
    ceq.push_back(D(tag));
  endtask

  task automatic wait_words(ref fsl_word_t q[$], input int n);
    int t = 0;
    while (q.size() < n && t < 20000) begin @(negedge clk); t++; end
  endtask

  task automatic expect_q(ref fsl_word_t q[$], input fsl_word_t e[$], input string what);
    wait_words(q, e.size());
    repeat (3) @(negedge clk);
    check(q.size() == e.size(), $sformatf("%s: %0d words, expected %0d", what, q.size(), e.size()));
    foreach (e[k]) if (k < q.size() && q[k] != e[k]) begin
      check(0, $sformatf("%s: word %0d %h expected %h", what, k, q[k], e[k]));
      break;
    end
    check(1, what);
    q = {};
  endtask

  initial begin
    fsl_word_t e[$];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // ---- 1. send 1100 words to rank 7 ----
    cmd(MPE_OP_SEND, 1100, 7, 32'h55);
    for (int k = 0; k < 1100; k++) ceq.push_back(D(32'h7000_0000 + k));
    e = {H(ME, 7, 1), D(32'h55)};
    expect_q(net_got, e, "envelope to 7");
    repeat (50) @(negedge clk);
    check(net_got.size() == 0, "no data before clear-to-send");
    nq.push_back(H(7, ME, 1)); nq.push_back(D(CTS_WORD));
    e = {};
    for (int p = 0; p < 3; p++) begin
      e.push_back(H(ME, 7, (p < 2) ? 507 : 86));
      for (int i = 0; i < ((p < 2) ? 507 : 86); i++) e.push_back(D(32'h7000_0000 + p * 507 + i));
    end
    expect_q(net_got, e, "three data packets 507/507/86");
    wait (!busy);
    // ---- 2. receive from 7 with an unexpected envelope from 9 ----
    nq.push_back(H(9, ME, 1)); nq.push_back(D(32'h11));
    nq.push_back(H(7, ME, 1)); nq.push_back(D(32'h22));
    cmd(MPE_OP_RECV, 5, 7, 32'h22);
    e = {H(ME, 7, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 7");
    check(queue_level == 1, $sformatf("queue holds 9's envelope (%0d)", queue_level));
    nq.push_back(H(12, ME, 1)); nq.push_back(D(32'h33));
    nq.push_back(H(7, ME, 5));
    for (int i = 0; i < 5; i++) nq.push_back(D(32'hD0 + i));
    e = {H(7, ME, 0), D(32'h22)};
    for (int i = 0; i < 5; i++) e.push_back(D(32'hD0 + i));
    expect_q(ce_got, e, "message from 7 to the element");
    wait (!busy);
    check(queue_level == 2, $sformatf("queue holds 9 and 12 (%0d)", queue_level));
    // ---- 3. receive from 9, matched in the queue ----
    cmd(MPE_OP_RECV, 600, 9, 32'h11);
    e = {H(ME, 9, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 9 from the queue");
    check(queue_level == 1, "entry removed");
    nq.push_back(H(9, ME, 507));
    for (int i = 0; i < 507; i++) nq.push_back(D(32'h9000 + i));
    nq.push_back(H(9, ME, 93));
    for (int i = 507; i < 600; i++) nq.push_back(D(32'h9000 + i));
    e = {H(9, ME, 0), D(32'h11)};
    for (int i = 0; i < 600; i++) e.push_back(D(32'h9000 + i));
    expect_q(ce_got, e, "600-word message from 9");
    wait (!busy);
    // ---- 4. zero-length send to 5, envelope from 6 in between ----
    cmd(MPE_OP_SEND, 0, 5, 32'h44);
    e = {H(ME, 5, 1), D(32'h44)};
    expect_q(net_got, e, "envelope to 5");
    nq.push_back(H(6, ME, 1)); nq.push_back(D(32'h66));
    nq.push_back(H(5, ME, 1)); nq.push_back(D(CTS_WORD));
    repeat (40) @(negedge clk);
    check(!busy && net_got.size() == 0, "zero-length send ends with no data packet");
    check(queue_level == 2, "queue holds 12 and 6");
    // ---- 5. drain the queue ----
    cmd(MPE_OP_RECV, 1, 6, 32'h66);
    e = {H(ME, 6, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 6");
    nq.push_back(H(6, ME, 1)); nq.push_back(D(32'h600D));
    e = {H(6, ME, 0), D(32'h66), D(32'h600D)};
    expect_q(ce_got, e, "message from 6");
    cmd(MPE_OP_RECV, 2, 12, 32'h33);
    e = {H(ME, 12, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 12");
    nq.push_back(H(12, ME, 2)); nq.push_back(D(32'hA)); nq.push_back(D(32'hB));
    e = {H(12, ME, 0), D(32'h33), D(32'hA), D(32'hB)};
    expect_q(ce_got, e, "message from 12");
    wait (!busy);
    check(queue_level == 0, "queue empty");
    // ---- 6. same source, different tags ----
    cmd(MPE_OP_RECV, 1, 1, 32'h10);
    nq.push_back(H(2, ME, 1)); nq.push_back(D(32'h71));
    nq.push_back(H(2, ME, 1)); nq.push_back(D(32'h72));
    nq.push_back(H(1, ME, 1)); nq.push_back(D(32'h10));
    e = {H(ME, 1, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 1");
    nq.push_back(H(1, ME, 1)); nq.push_back(D(32'h1D));
    e = {H(1, ME, 0), D(32'h10), D(32'h1D)};
    expect_q(ce_got, e, "message from 1");
    wait (!busy);
    check(queue_level == 2, "queue holds both envelopes from 2");
    cmd(MPE_OP_RECV, 0, 2, 32'h72);
    e = {H(ME, 2, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 2 for tag 0x72");
    e = {H(2, ME, 0), D(32'h72)};
    expect_q(ce_got, e, "zero-length message from 2");
    wait (!busy);
    // A tag that is not queued must not be matched by the source alone.
    cmd(MPE_OP_RECV, 0, 2, 32'h73);
    repeat (60) @(negedge clk);
    check(net_got.size() == 0, "no clear-to-send for an unqueued tag");
    nq.push_back(H(2, ME, 1)); nq.push_back(D(32'h73));
    e = {H(ME, 2, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 2 for tag 0x73");
    e = {H(2, ME, 0), D(32'h73)};
    expect_q(ce_got, e, "message with tag 0x73");
    wait (!busy);
    check(queue_level == 1, "tag 0x71 still queued");
    cmd(MPE_OP_RECV, 0, 2, 32'h71);
    e = {H(ME, 2, 1), D(CTS_WORD)};
    expect_q(net_got, e, "clear-to-send to 2 for tag 0x71");
    e = {H(2, ME, 0), D(32'h71)};
    expect_q(ce_got, e, "message with tag 0x71");
    wait (!busy);
    check(queue_level == 0, "queue empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
