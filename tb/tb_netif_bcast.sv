// Self-checking test of netif_bcast with three incoming broadcast channels,
// acting as the NetIf of rank 4. Each source channel holds a queue of
// packets, some for rank 4 and some for other ranks. Checks: only packets
// for rank 4 are read and delivered, whole and in order per source, the
// lowest-numbered matching channel goes first, a packet for another rank
// at the head of a channel is never read, the host-full flag stalls the
// transfer, and the transmit side is a plain fan-out with an OR of reads.
module tb_netif_bcast;
  import tmd_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  fsl_word_t h_in_data, bc_out_data, h_out_data;
  logic h_in_exists, h_in_read, bc_out_exists, h_out_write, h_out_full;
  logic [N-1:0] bc_rd_in, bc_in_exists, bc_rd_out;
  fsl_word_t [N-1:0] bc_in_data;

  netif_bcast #(.N(N), .LRN(8'd4), .HRN(8'd4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  fsl_word_t sq[N][$];
  for (genvar i = 0; i < N; i++) begin : g_src
    assign bc_in_exists[i] = sq[i].size() != 0;
    assign bc_in_data[i]   = sq[i].size() != 0 ? sq[i][0] : '0;
  end
  fsl_word_t host_got[$];
  logic hold_full = 0;
  assign h_out_full = hold_full;
  // Handshakes are sampled at the clock edge and acted on just after it.
  always @(posedge clk) if (!rst) begin
    automatic logic [N-1:0] rd = bc_rd_out;
    automatic logic hw = h_out_write;
    automatic fsl_word_t hd = h_out_data;
    #1;
    for (int i = 0; i < N; i++) if (rd[i]) void'(sq[i].pop_front());
    if (hw) host_got.push_back(hd);
  end

  function automatic void mk_pkt(ref fsl_word_t q[$], input rank_t s, input rank_t d,
                                 input int ndw, input int seed);
    q.push_back('{ctrl: 1'b1, data: mk_hdr(s, d, 16'(ndw))});
    for (int k = 0; k < ndw; k++) q.push_back('{ctrl: 1'b0, data: 32'(seed * 1000 + k)});
  endfunction

  int stall_seen = 0;
  initial begin
    h_in_data = '{ctrl: 1'b1, data: 32'h1234_5678};
    h_in_exists = 1'b1;
    bc_rd_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // Transmit side: fan-out and OR of reads.
    @(negedge clk);
    check(bc_out_data == h_in_data && bc_out_exists, "fan-out of host FIFO");
    check(!h_in_read, "no read without a reader");
    bc_rd_in = 3'b010; #1;
    check(h_in_read, "read from channel 1 pops");
    bc_rd_in = 3'b100; #1;
    check(h_in_read, "read from channel 2 pops");
    bc_rd_in = '0;
    // Reception. Channel 2: two packets for rank 4. Channel 1: one packet for
    // rank 6 (never read) -- placed after a packet for 4. Channel 0: one
    // packet for rank 4 with 8 words.
    mk_pkt(sq[2], 9, 4, 3, 1);
    mk_pkt(sq[2], 9, 4, 2, 2);
    mk_pkt(sq[1], 8, 4, 1, 3);
    mk_pkt(sq[1], 8, 6, 5, 4);
    mk_pkt(sq[0], 7, 4, 8, 5);
    // Stall the host FIFO for a while at the start.
    hold_full = 1'b1;
    repeat (6) @(negedge clk);
    check(host_got.size() == 0, "no write while host FIFO full");
    hold_full = 1'b0;
    repeat (60) @(negedge clk);
    begin
      fsl_word_t e[$];
      mk_pkt(e, 7, 4, 8, 5); mk_pkt(e, 8, 4, 1, 3); mk_pkt(e, 9, 4, 3, 1); mk_pkt(e, 9, 4, 2, 2);
      check(host_got.size() == e.size(), $sformatf("rx words %0d vs %0d", host_got.size(), e.size()));
      foreach (e[k]) if (k < host_got.size()) check(host_got[k] == e[k], $sformatf("rx word %0d", k));
    end
    check(sq[1].size() == 6, "packet for another rank left unread");
    check(sq[0].size() == 0 && sq[2].size() == 0, "matching channels drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
