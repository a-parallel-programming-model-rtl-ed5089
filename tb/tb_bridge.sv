// Self-checking test of the network bridge.
// Internal-to-external: Tier-1 packets of 0, 1, 5 and 20 data words are
// wrapped; the test checks every Tier-2 word: {SOP, size, sequence},
// {source address, destination address}, the Tier-1 packet, the
// almost-EOP word and the EOP word, with the sequence number counting up.
// External-to-internal: the produced Tier-2 stream (plus one junk word
// before it) is fed back and must come out as the original Tier-1 packets
// with the control bit on each header. Back-pressure is applied on both
// outputs at random.
module tb_bridge;
  import tmd_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  fsl_word_t int_in_data, int_out_data;
  logic int_in_exists, int_in_read, int_out_write, int_out_full;
  logic [31:0] ext_out_data, ext_in_data;
  logic ext_out_write, ext_out_full, ext_in_exists, ext_in_read;

  bridge #(.SRC_ADDR(16'h0102), .DST_ADDR(16'h0304)) dut (.*);

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

  fsl_word_t iq[$];
  logic [31:0] xq[$];
  logic [31:0] ext_got[$];
  fsl_word_t int_got[$];
  assign int_in_exists = iq.size() != 0;
  assign int_in_data   = iq.size() != 0 ? iq[0] : '0;
  assign ext_in_exists = xq.size() != 0;
  assign ext_in_data   = xq.size() != 0 ? xq[0] : '0;
  // Handshakes are sampled at the clock edge and acted on just after it.
  always @(posedge clk) if (!rst) begin
    automatic logic ir = int_in_read, xr = ext_in_read, xw = ext_out_write, iw = int_out_write;
    automatic logic [31:0] xd = ext_out_data;
    automatic fsl_word_t id = int_out_data;
    #1;
    if (ir) void'(iq.pop_front());
    if (xr) void'(xq.pop_front());
    if (xw) ext_got.push_back(xd);
    if (iw) int_got.push_back(id);
  end
  always @(negedge clk) begin
    ext_out_full <= ($urandom % 4) == 0;
    int_out_full <= ($urandom % 4) == 0;
  end

  int sizes[4] = '{0, 1, 5, 20};
  initial begin
    fsl_word_t t1[$];
    logic [31:0] e2[$];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    foreach (sizes[p]) begin
      t1.push_back('{ctrl: 1'b1, data: mk_hdr(8'(p + 1), 8'(30 + p), 16'(sizes[p]))});
      e2.push_back({T2_SOP, 14'(sizes[p] + 5), 10'(p)});
      e2.push_back(32'h0102_0304);
      e2.push_back(mk_hdr(8'(p + 1), 8'(30 + p), 16'(sizes[p])));
      for (int k = 0; k < sizes[p]; k++) begin
        t1.push_back('{ctrl: 1'b0, data: 32'(p * 100 + k)});
        e2.push_back(32'(p * 100 + k));
      end
      e2.push_back(T2_ALMOST_EOP);
      e2.push_back(T2_EOP);
    end
    foreach (t1[k]) iq.push_back(t1[k]);
    wait (iq.size() == 0);
    repeat (20) @(negedge clk);
    check(ext_got.size() == e2.size(), $sformatf("tier-2 words %0d vs %0d", ext_got.size(), e2.size()));
    foreach (e2[k]) if (k < ext_got.size())
      check(ext_got[k] == e2[k], $sformatf("tier-2 word %0d %h vs %h", k, ext_got[k], e2[k]));
    // Feed back, after a junk word that must be skipped.
    xq.push_back(32'h1234_5678);
    foreach (ext_got[k]) xq.push_back(ext_got[k]);
    wait (xq.size() == 0);
    repeat (10) @(negedge clk);
    check(int_got.size() == t1.size(), $sformatf("tier-1 words %0d vs %0d", int_got.size(), t1.size()));
    foreach (t1[k]) if (k < int_got.size())
      check(int_got[k] == t1[k], $sformatf("tier-1 word %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
