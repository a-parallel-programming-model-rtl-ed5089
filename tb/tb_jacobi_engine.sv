// Self-checking test of jacobi_engine. Two engines with 6 columns are
// driven, each by a model of its TMD-MPE and master written here:
//   engine 0: rank 2 (even), neighbours 1 above and 3 below, 3 rows;
//   engine 1: rank 3 (odd), no neighbour above (edge strip), 4 below,
//             2 rows.
// Each engine gets its strip, runs two iterations and returns its result.
// The testbench checks every command word (operation, size, ranks, tag),
// the order of the row exchanges for even and odd ranks, each border row
// sent, the convergence sum of each iteration and the final strip. The
// reference computes the same single-precision operations in the same
// order, rounding through double precision, and must agree bit for bit.
// The output FIFO toward the engine-side MPE is randomly full.
module tb_jacobi_engine;
  import tmd_pkg::*;
  localparam int C = 6, MR = 4;
  localparam logic [31:0] T_INIT = 32'h100, T_DATA = 32'h101, T_ROW = 32'h102,
                          T_CONV = 32'h103, T_STOP = 32'h104, T_RES = 32'h105;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsl_word_t [1:0] to_data, from_data;
  logic [1:0] to_write, to_full, from_exists, from_read, comp;
  logic [1:0][15:0] iters;

  jacobi_engine #(.RANK(8'd2), .MASTER(8'd0), .COLS(C), .MAX_ROWS(MR)) dut0 (
    .clk, .rst, .to_mpe_data(to_data[0]), .to_mpe_write(to_write[0]), .to_mpe_full(to_full[0]),
    .from_mpe_data(from_data[0]), .from_mpe_exists(from_exists[0]), .from_mpe_read(from_read[0]),
    .iterations(iters[0]), .computing(comp[0]));
  jacobi_engine #(.RANK(8'd3), .MASTER(8'd0), .COLS(C), .MAX_ROWS(MR)) dut1 (
    .clk, .rst, .to_mpe_data(to_data[1]), .to_mpe_write(to_write[1]), .to_mpe_full(to_full[1]),
    .from_mpe_data(from_data[1]), .from_mpe_exists(from_exists[1]), .from_mpe_read(from_read[1]),
    .iterations(iters[1]), .computing(comp[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- single-precision reference ----
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
  function automatic logic [31:0] rnd_temp();
    return r2s(real'($urandom % 100000) / 1000.0 + 1.0);
  endfunction

  // ---- MPE model: words from and to each engine ----
  logic [31:0] got[2][$];
  fsl_word_t feed[2][$];
  logic [1:0] stall = '0;
  always_comb
    for (int d = 0; d < 2; d++) begin
      to_full[d]     = stall[d];
      from_exists[d] = feed[d].size() != 0;
      from_data[d]   = feed[d].size() != 0 ? feed[d][0] : '0;
    end
  always @(posedge clk) if (!rst) begin
    automatic logic [1:0] w = to_write, rd = from_read;
    automatic fsl_word_t [1:0] wd = to_data;
    if ((to_write & to_full) != 0) begin failures++; $display("FAIL: write while full"); end
    #1;
    for (int d = 0; d < 2; d++) begin
      if (w[d]) got[d].push_back(wd[d].data);
      if (rd[d]) void'(feed[d].pop_front());
      stall[d] = ($urandom % 4 == 0);
    end
  end

  task automatic take(int d, int n, ref logic [31:0] q[$]);
    q = {};
    while (got[d].size() < n) @(negedge clk);
    for (int k = 0; k < n; k++) q.push_back(got[d].pop_front());
  endtask

  task automatic expect_cmd(int d, bit send, int size, rank_t me, rank_t remote,
                            logic [31:0] tag, string what);
    logic [31:0] q[$];
    take(d, 4, q);
    check(q[0] == (send ? MPE_OP_SEND : MPE_OP_RECV) && q[1] == 32'(size) &&
          q[2] == {me, remote, 16'h0} && q[3] == tag,
          $sformatf("engine %0d %s: command %h %h %h %h", d, what, q[0], q[1], q[2], q[3]));
  endtask

  task automatic give(int d, rank_t src, rank_t me, logic [31:0] tag, logic [31:0] w[$]);
    feed[d].push_back('{ctrl: 1'b1, data: mk_hdr(src, me, 16'h0)});
    feed[d].push_back('{ctrl: 1'b0, data: tag});
    foreach (w[k]) feed[d].push_back('{ctrl: 1'b0, data: w[k]});
  endtask

  task automatic run(int d, rank_t me, rank_t up, rank_t dn, int rows);
    logic [31:0] u[], v[], q[$], w[$];
    logic [31:0] conv;
    u = new[(rows + 2) * C];
    v = new[(rows + 2) * C];
    foreach (u[k]) u[k] = rnd_temp();
    expect_cmd(d, 0, 2, me, 0, T_INIT, "first receive");
    w = {};
    w.push_back(32'(rows));
    w.push_back({16'h0, up, dn});
    give(d, 0, me, T_INIT, w);
    expect_cmd(d, 0, (rows + 2) * C, me, 0, T_DATA, "strip receive");
    w = {};
    foreach (u[k]) w.push_back(u[k]);
    give(d, 0, me, T_DATA, w);
    for (int it = 0; it < 2; it++) begin
      for (int x = 0; x < 4; x++) begin
        case (x ^ int'(me[0]))
          0: if (up != 8'hFF) begin
            expect_cmd(d, 1, C, me, up, T_ROW, "row 1 up");
            take(d, C, q);
            for (int k = 0; k < C; k++) check(q[k] == u[C + k], $sformatf("engine %0d row 1 word %0d", d, k));
          end
          1: if (dn != 8'hFF) begin
            expect_cmd(d, 0, C, me, dn, T_ROW, "row from below");
            w = {};
            for (int k = 0; k < C; k++) begin u[(rows + 1) * C + k] = rnd_temp(); w.push_back(u[(rows + 1) * C + k]); end
            give(d, dn, me, T_ROW, w);
          end
          2: if (dn != 8'hFF) begin
            expect_cmd(d, 1, C, me, dn, T_ROW, "last row down");
            take(d, C, q);
            for (int k = 0; k < C; k++) check(q[k] == u[rows * C + k], $sformatf("engine %0d last row word %0d", d, k));
          end
          default: if (up != 8'hFF) begin
            expect_cmd(d, 0, C, me, up, T_ROW, "row from above");
            w = {};
            for (int k = 0; k < C; k++) begin u[k] = rnd_temp(); w.push_back(u[k]); end
            give(d, up, me, T_ROW, w);
          end
        endcase
      end
      conv = 0;
      for (int r = 1; r <= rows; r++)
        for (int c = 1; c < C - 1; c++) begin
          logic [31:0] s, dd;
          s = fadd(fadd(fadd(u[(r - 1) * C + c], u[(r + 1) * C + c]), u[r * C + c - 1]), u[r * C + c + 1]);
          v[r * C + c] = fmul(s, 32'h3E80_0000);
          dd = fadd(v[r * C + c], {~u[r * C + c][31], u[r * C + c][30:0]});
          conv = fadd(conv, fmul(dd, dd));
        end
      for (int r = 1; r <= rows; r++)
        for (int c = 1; c < C - 1; c++) u[r * C + c] = v[r * C + c];
      expect_cmd(d, 1, 1, me, 0, T_CONV, "convergence send");
      take(d, 1, q);
      check(q[0] == conv, $sformatf("engine %0d iteration %0d sum %h expected %h", d, it, q[0], conv));
      expect_cmd(d, 0, 1, me, 0, T_STOP, "stop receive");
      w = {};
      w.push_back(32'(it));
      give(d, 0, me, T_STOP, w);
    end
    expect_cmd(d, 1, rows * C, me, 0, T_RES, "result send");
    take(d, rows * C, q);
    for (int k = 0; k < rows * C; k++)
      check(q[k] == u[C + k], $sformatf("engine %0d result word %0d %h expected %h", d, k, q[k], u[C + k]));
    expect_cmd(d, 0, 2, me, 0, T_INIT, "back to waiting for a strip");
    check(iters[d] == 16'd2, $sformatf("engine %0d: iteration count %0d", d, iters[d]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    fork
      run(0, 8'd2, 8'd1, 8'd3, 3);
      run(1, 8'd3, 8'hFF, 8'd4, 2);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
