// Fast Simplex Link (FSL) FIFO: the point-to-point link that joins every
// block of the on-chip (Tier-1) network.
//
// A synchronous first-word-fall-through FIFO, DEPTH words of WIDTH bits
// (default 16 words of 32 data bits plus one control bit, the link size the
// network uses). The writer pushes with `write` while `full` is low; the
// reader sees the head word on `dout` whenever `exists` is high and pops it
// with `read`. A push and a pop may happen in the same cycle. Reset empties
// it. The flag names follow the FSL convention; the storage organisation
// (circular buffer with an occupancy counter) is this design's own.
module fsl_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             write,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             read,
  output logic [WIDTH-1:0] dout,
  output logic             exists
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;

  logic do_wr, do_rd;
  assign do_wr  = write && !full;
  assign do_rd  = read && exists;
  assign full   = (count == (AW+1)'(DEPTH));
  assign exists = (count != '0);
  assign dout   = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  // Writing into a full FIFO or reading an empty one is a protocol error of
  // the attached block: the data would be lost or invented.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(write && full))
    else $error("fsl_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(read && !exists))
    else $error("fsl_fifo: read while empty");
endmodule
