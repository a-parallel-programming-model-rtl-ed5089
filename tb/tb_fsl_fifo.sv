// Self-checking test of fsl_fifo: random pushes and pops against a queue
// model; checks data order, the full flag at DEPTH words, the exists flag
// and simultaneous push/pop.
module tb_fsl_fifo;
  localparam int W = 33, D = 16;
  logic clk = 0, rst = 1;
  logic write, read, full, exists;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  fsl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    write = 0; read = 0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!exists && !full, "empty after reset");
    // Fill to full.
    for (int i = 0; i < D; i++) begin
      write = 1; din = W'(i * 7 + 1);
      @(posedge clk); model.push_back(din);
      @(negedge clk);
    end
    write = 0;
    check(full, "full after DEPTH writes");
    check(exists && dout == model[0], "head word after fill");
    // Random traffic.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      write = ($urandom % 2) && !full;
      read  = ($urandom % 2) && exists;
      din   = {$urandom, 1'b0} ^ W'(n);
      if (exists) check(dout == model[0], "data order");
      check(full == (model.size() == D), "full flag");
      check(exists == (model.size() != 0), "exists flag");
      @(posedge clk);
      if (read) void'(model.pop_front());
      if (write) model.push_back(din);
    end
    @(negedge clk);
    write = 0; read = 0;
    // Drain.
    while (model.size() != 0) begin
      @(negedge clk);
      check(exists && dout == model[0], "drain order");
      read = 1;
      @(posedge clk); void'(model.pop_front());
      @(negedge clk); read = 0;
    end
    check(!exists, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
