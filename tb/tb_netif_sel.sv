// Self-checking test of netif_sel with three channels.
// Routing table: channel 0 -> rank 5, channel 1 -> ranks 10..20 (a gateway),
// channel 2 -> rank 7. Transmission: packets of several sizes and
// destinations go out on the right channel, whole and in order; a packet to
// an unlisted rank is dropped; a full channel FIFO stalls the transfer.
// Reception: packets queued on all three input channels at once come out
// to the host whole, lowest channel first. Also checks the 1 + (NDW + 1)
// cycle transfer time of an unstalled packet.
module tb_netif_sel;
  import tmd_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  fsl_word_t h_in_data, h_out_data;
  logic h_in_exists, h_in_read, h_out_write, h_out_full;
  fsl_word_t [N-1:0] ch_out_data, ch_in_data;
  logic [N-1:0] ch_out_write, ch_out_full, ch_in_exists, ch_in_read;

  netif_sel #(.N(N), .LRN({8'd7, 8'd10, 8'd5}), .HRN({8'd7, 8'd20, 8'd5})) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Host transmit FIFO (behavioural).
  fsl_word_t hq[$];
  assign h_in_exists = hq.size() != 0;
  assign h_in_data   = hq.size() != 0 ? hq[0] : '0;

  // Output channel sinks with programmable back-pressure.
  fsl_word_t got[N][$];
  logic [N-1:0] block_ch = '0;
  assign ch_out_full = block_ch;

  // Input channel FIFOs (behavioural).
  fsl_word_t iq[N][$];
  for (genvar i = 0; i < N; i++) begin : g_in
    assign ch_in_exists[i] = iq[i].size() != 0;
    assign ch_in_data[i]   = iq[i].size() != 0 ? iq[i][0] : '0;
  end
  fsl_word_t host_got[$];
  assign h_out_full = 1'b0;

  // Handshakes are sampled at the clock edge and acted on just after it.
  always @(posedge clk) if (!rst) begin
    automatic logic hr = h_in_read, hw = h_out_write;
    automatic logic [N-1:0] cw = ch_out_write, cr = ch_in_read;
    automatic fsl_word_t [N-1:0] cd = ch_out_data;
    automatic fsl_word_t hd = h_out_data;
    #1;
    if (hr) void'(hq.pop_front());
    for (int i = 0; i < N; i++) begin
      if (cw[i]) got[i].push_back(cd[i]);
      if (cr[i]) void'(iq[i].pop_front());
    end
    if (hw) host_got.push_back(hd);
  end

  function automatic void mk_pkt(ref fsl_word_t q[$], input rank_t s, input rank_t d,
                                 input int ndw, input int seed);
    q.push_back('{ctrl: 1'b1, data: mk_hdr(s, d, 16'(ndw))});
    for (int k = 0; k < ndw; k++) q.push_back('{ctrl: 1'b0, data: 32'(seed * 1000 + k)});
  endfunction

  fsl_word_t exp_ch[N][$];
  fsl_word_t tmp[$];
  int t0, t1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // Timing of a single unstalled packet: 1 decode cycle + 5 words.
    @(negedge clk);
    tmp = {}; mk_pkt(tmp, 1, 5, 4, 1);
    foreach (tmp[k]) begin hq.push_back(tmp[k]); exp_ch[0].push_back(tmp[k]); end
    t0 = $time;
    wait (hq.size() == 0);
    @(negedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == 1 + 5, $sformatf("tx time %0d cycles", (t1 - t0) / 10));
    // Mixed destinations, one unknown (rank 99, dropped).
    tmp = {}; mk_pkt(tmp, 1, 12, 7, 2); foreach (tmp[k]) exp_ch[1].push_back(tmp[k]);
    foreach (tmp[k]) hq.push_back(tmp[k]);
    tmp = {}; mk_pkt(tmp, 1, 99, 3, 3); foreach (tmp[k]) hq.push_back(tmp[k]);
    tmp = {}; mk_pkt(tmp, 1, 7, 1, 4); foreach (tmp[k]) exp_ch[2].push_back(tmp[k]);
    foreach (tmp[k]) hq.push_back(tmp[k]);
    tmp = {}; mk_pkt(tmp, 1, 20, 0, 5); foreach (tmp[k]) exp_ch[1].push_back(tmp[k]);
    foreach (tmp[k]) hq.push_back(tmp[k]);
    tmp = {}; mk_pkt(tmp, 1, 10, 30, 6); foreach (tmp[k]) exp_ch[1].push_back(tmp[k]);
    foreach (tmp[k]) hq.push_back(tmp[k]);
    // Stall channel 1 for a while in the middle.
    repeat (12) @(negedge clk);
    block_ch[1] = 1'b1;
    repeat (20) @(negedge clk);
    check(hq.size() != 0, "transfer stalls on a full channel");
    block_ch[1] = 1'b0;
    wait (hq.size() == 0);
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(got[i].size() == exp_ch[i].size(),
            $sformatf("channel %0d word count %0d vs %0d", i, got[i].size(), exp_ch[i].size()));
      foreach (exp_ch[i][k])
        if (k < got[i].size()) check(got[i][k] == exp_ch[i][k], $sformatf("ch %0d word %0d", i, k));
    end
    // Reception: three packets arrive together; channel 0 wins, then 1, 2.
    tmp = {}; mk_pkt(tmp, 9, 3, 6, 7);
    @(negedge clk);
    foreach (tmp[k]) iq[2].push_back(tmp[k]);
    tmp = {}; mk_pkt(tmp, 8, 3, 4, 8); foreach (tmp[k]) iq[1].push_back(tmp[k]);
    tmp = {}; mk_pkt(tmp, 6, 3, 5, 9); foreach (tmp[k]) iq[0].push_back(tmp[k]);
    // a second packet behind channel 0's first
    tmp = {}; mk_pkt(tmp, 6, 3, 2, 10); foreach (tmp[k]) iq[0].push_back(tmp[k]);
    wait (iq[0].size() == 0 && iq[1].size() == 0 && iq[2].size() == 0);
    repeat (3) @(negedge clk);
    begin
      fsl_word_t e[$];
      mk_pkt(e, 6, 3, 5, 9); mk_pkt(e, 6, 3, 2, 10); mk_pkt(e, 8, 3, 4, 8); mk_pkt(e, 9, 3, 6, 7);
      check(host_got.size() == e.size(), $sformatf("rx words %0d vs %0d", host_got.size(), e.size()));
      foreach (e[k]) if (k < host_got.size()) check(host_got[k] == e[k], $sformatf("rx word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
