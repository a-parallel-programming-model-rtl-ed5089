// Self-checking test of dcr2fsl. A DCR master model writes data and header
// words, reads the status register and pops incoming words. The outgoing
// FIFO is looped back to the incoming one through a 4-word fsl_fifo so that
// a full FIFO holds off the acknowledge. Also checks the daisy-chain pass
// through for other addresses and the one-cycle acknowledge.
module tb_dcr2fsl;
  import tmd_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic [9:0]  dcr_abus;
  logic [31:0] dcr_dbus_in, dcr_dbus_out;
  logic dcr_read, dcr_write, dcr_ack;
  fsl_word_t fsl_out_data, fsl_in_data;
  logic fsl_out_write, fsl_out_full, fsl_in_exists, fsl_in_read;

  dcr2fsl #(.BASE_ADDR(10'h040)) dut (.*);
  fsl_fifo #(.WIDTH(33), .DEPTH(4)) loopback (
    .clk, .rst, .write(fsl_out_write), .din(fsl_out_data), .full(fsl_out_full),
    .read(fsl_in_read), .dout(fsl_in_data), .exists(fsl_in_exists));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dcr_wr(input logic [9:0] a, input logic [31:0] d, output int cyc);
    @(negedge clk);
    dcr_abus = a; dcr_dbus_in = d; dcr_write = 1; cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!dcr_ack && cyc < 200);
    @(negedge clk);
    dcr_write = 0; dcr_dbus_in = '0;
    @(negedge clk);
  endtask

  task automatic dcr_rd(input logic [9:0] a, output logic [31:0] d, output int cyc);
    @(negedge clk);
    dcr_abus = a; dcr_read = 1; dcr_dbus_in = '0; cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!dcr_ack && cyc < 200);
    d = dcr_dbus_out;
    @(negedge clk);
    dcr_read = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    int cyc;
    dcr_abus = '0; dcr_dbus_in = '0; dcr_read = 0; dcr_write = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // Status with nothing queued.
    dcr_rd(10'h041, d, cyc);
    check(d == 32'h0, "status empty");
    check(cyc == 1, $sformatf("acknowledge after %0d cycles", cyc));
    // Header then three data words.
    dcr_wr(10'h041, 32'hAABB_0003, cyc);
    check(cyc == 1, "write acknowledge in one cycle");
    dcr_wr(10'h040, 32'h1111_1111, cyc);
    dcr_wr(10'h040, 32'h2222_2222, cyc);
    dcr_wr(10'h040, 32'h3333_3333, cyc);
    // FIFO now full: a fifth write waits until a read frees space.
    check(fsl_out_full, "loopback FIFO full");
    fork
      dcr_wr(10'h040, 32'h4444_4444, cyc);
      begin
        repeat (5) @(negedge clk);
        check(!dcr_ack, "no acknowledge while full");
        force fsl_in_read = 1'b1;
        @(negedge clk);
        release fsl_in_read;
      end
    join
    check(cyc > 3, $sformatf("write held off %0d cycles", cyc));
    // The forced pop removed the header; status shows data head, ctrl 0.
    dcr_rd(10'h041, d, cyc);
    check(d == 32'h3, $sformatf("status exists+full, data head: %h", d));
    dcr_rd(10'h040, d, cyc); check(d == 32'h1111_1111, "pop word 1");
    dcr_rd(10'h040, d, cyc); check(d == 32'h2222_2222, "pop word 2");
    dcr_rd(10'h040, d, cyc); check(d == 32'h3333_3333, "pop word 3");
    dcr_rd(10'h040, d, cyc); check(d == 32'h4444_4444, "pop word 4");
    dcr_rd(10'h040, d, cyc); check(d == 32'h0, "pop empty gives 0");
    // Header word keeps its control bit.
    dcr_wr(10'h041, 32'h0102_0000, cyc);
    dcr_rd(10'h041, d, cyc);
    check(d == 32'h5, $sformatf("status exists, ctrl head: %h", d));
    dcr_rd(10'h040, d, cyc); check(d == 32'h0102_0000, "pop header");
    // Other address: bus passes through, no acknowledge.
    @(negedge clk);
    dcr_abus = 10'h100; dcr_dbus_in = 32'hCAFE_F00D; dcr_read = 1;
    repeat (3) @(negedge clk);
    check(!dcr_ack && dcr_dbus_out == 32'hCAFE_F00D, "daisy-chain pass-through");
    dcr_read = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
