// Jacobi hardware engine for the heat equation, attached to a TMD-MPE.
//
// What it does: holds a horizontal strip of ROWS x COLS temperatures of a
// larger grid (ROWS set at run time, at most MAX_ROWS) plus one ghost row
// above and below, and repeats the Jacobi iteration
//     v[i][j] = (u[i-1][j] + u[i+1][j] + u[i][j-1] + u[i][j+1]) / 4
// on its interior points, together with the convergence sum
//     sum over the strip of (u[i][j] - v[i][j])^2.
// Columns 0 and COLS-1 are fixed boundary values. Numbers are IEEE-754
// single precision, so strips can be exchanged with processors that use a
// floating-point unit.
//
// Message sequence (every message goes through the TMD-MPE, so each is one
// send or receive command of four words: opcode, size, {RANK, remote},
// tag; received messages arrive as header, tag, data):
//   1. receive from MASTER, tag 0x100, 2 words: ROWS, and
//      {16'h0, up neighbour rank, down neighbour rank} (8'hFF = none);
//      receive from MASTER, tag 0x101, (ROWS+2)*COLS words: the strip with
//      its ghost rows (for an edge strip the ghost row is the fixed edge).
//   2. exchange border rows with the neighbours, tag 0x102: row 1 goes up
//      and row ROWS+1 comes from below; row ROWS goes down and row 0 comes
//      from above. Even ranks send before they receive, odd ranks receive
//      first, so neighbouring engines never both wait in a send.
//   3. compute v and the convergence sum, then copy v into u;
//   4./5. send the sum (one word) to MASTER, tag 0x103;
//   6. receive one word from MASTER, tag 0x104: 0 = iterate again (step 2),
//      otherwise send the strip's ROWS*COLS values to MASTER, tag 0x105,
//      and wait for a new step 1.
// The master takes the square root and compares it with the tolerance; the
// engine only forms the sum of squares.
//
// The FIFO control bit of received words is not used: the engine knows
// from the command it issued which words are header and tag.
//
// Timing: one floating-point operation per cycle with one adder and one
// multiplier, 7 cycles per interior point, plus one cycle per value for
// the copy; message words move at one per cycle when the FIFOs allow.
//
// The update rule, the convergence measure and the six steps follow the
// published algorithm. The engine's insides, the message order and tags,
// the first-message layout and the number format details (subnormals
// flushed to zero) are this design's own.
module jacobi_engine
  import tmd_pkg::*;
#(
  parameter logic [RANK_W-1:0] RANK     = 8'd1,
  parameter logic [RANK_W-1:0] MASTER   = 8'd0,
  parameter int unsigned       COLS     = 60,
  parameter int unsigned       MAX_ROWS = 60
) (
  input  logic      clk,
  input  logic      rst,
  // to the TMD-MPE (commands and outgoing data)
  output fsl_word_t to_mpe_data,
  output logic      to_mpe_write,
  input  logic      to_mpe_full,
  // from the TMD-MPE (received messages)
  input  fsl_word_t from_mpe_data,
  input  logic      from_mpe_exists,
  output logic      from_mpe_read,
  // status
  output logic [15:0] iterations,
  output logic        computing
);
  localparam int unsigned UW = (MAX_ROWS + 2) * COLS;
  localparam int unsigned VW = MAX_ROWS * COLS;
  localparam int unsigned AW = $clog2(UW + 1);
  localparam logic [RANK_W-1:0] NONE = '1;
  localparam logic [31:0] QUARTER = 32'h3E80_0000;   // 0.25
  localparam logic [31:0] T_INIT = 32'h100, T_DATA = 32'h101, T_ROW = 32'h102,
                          T_CONV = 32'h103, T_STOP = 32'h104, T_RES = 32'h105;

  logic [31:0] u [UW];
  logic [31:0] v [VW];

  typedef enum logic [3:0] {
    J_LAUNCH, J_CMD, J_SEND, J_RHDR, J_RECV, J_DONE,
    K0, K1, K2, K3, K4, K5, K6, J_COPY
  } state_e;
  typedef enum logic [2:0] {
    P_INIT_HDR, P_INIT_DATA, P_X, P_CALC, P_CONV, P_STOP, P_RES
  } step_e;
  typedef enum logic [1:0] {D_INIT, D_U, D_STOP} dst_e;

  state_e state;
  step_e  step;
  logic [2:0]  x;
  logic [15:0] rows;
  logic [RANK_W-1:0] up_rank, dn_rank;
  logic [31:0] stopw, conv;

  // current message
  logic        c_send, c_conv;
  logic [RANK_W-1:0] c_remote;
  logic [31:0] c_tag;
  logic [AW-1:0] c_size, c_addr, cnt;
  dst_e        c_dst;
  logic [1:0]  ci;

  // computation
  logic [15:0] r, c;
  logic [31:0] t, acc, vv, dd;
  logic [AW-1:0] idx;

  assign idx = AW'(r) * AW'(COLS) + AW'(c);

  // one read port on u
  logic [AW-1:0] u_ra;
  logic [31:0]   u_rd;
  always_comb begin
    unique case (state)
      K0:      u_ra = idx - AW'(COLS);
      K1:      u_ra = idx + AW'(COLS);
      K2:      u_ra = idx - 1'b1;
      K3:      u_ra = idx + 1'b1;
      K5:      u_ra = idx;
      default: u_ra = c_addr;
    endcase
  end
  assign u_rd = u[u_ra];

  // arithmetic units, operands chosen by state
  logic [31:0] add_a, add_b, add_y, mul_a, mul_b, mul_y;
  always_comb begin
    mul_a = acc;
    mul_b = QUARTER;
    if (state == K6) begin
      mul_a = dd;
      mul_b = dd;
    end
    add_a = acc;
    add_b = u_rd;
    unique case (state)
      K1:      add_a = t;
      K5:      begin add_a = vv;   add_b = {~u_rd[31], u_rd[30:0]}; end
      K6:      begin add_a = conv; add_b = mul_y; end
      default: ;
    endcase
  end
  fp_add u_add (.a(add_a), .b(add_b), .y(add_y));
  fp_mul u_mul (.a(mul_a), .b(mul_b), .y(mul_y));

  // MPE port
  logic do_wr, do_rd;
  always_comb begin
    to_mpe_data  = '{ctrl: 1'b0, data: '0};
    to_mpe_write = 1'b0;
    if (state == J_CMD) begin
      to_mpe_write = !to_mpe_full;
      unique case (ci)
        2'd0: to_mpe_data.data = c_send ? MPE_OP_SEND : MPE_OP_RECV;
        2'd1: to_mpe_data.data = 32'(c_size);
        2'd2: to_mpe_data.data = {RANK, c_remote, 16'h0};
        default: to_mpe_data.data = c_tag;
      endcase
    end else if (state == J_SEND) begin
      to_mpe_write      = !to_mpe_full;
      to_mpe_data.data  = c_conv ? conv : u_rd;
    end
  end
  assign do_wr         = to_mpe_write;
  assign from_mpe_read = (state == J_RHDR || state == J_RECV) && from_mpe_exists;
  assign do_rd         = from_mpe_read;

  logic [AW-1:0] vaddr;
  assign vaddr = AW'(r - 1'b1) * AW'(COLS) + AW'(c);

  // memory writes
  always_ff @(posedge clk) begin
    if (state == J_RECV && do_rd && c_dst == D_U) u[c_addr] <= from_mpe_data.data;
    if (state == J_COPY) u[idx] <= v[vaddr];
    if (state == K4) v[vaddr] <= mul_y;
  end

  logic parity;
  assign parity = RANK[0];
  logic [1:0] kind;
  assign kind = x[1:0] ^ {1'b0, parity};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= J_LAUNCH;
      step       <= P_INIT_HDR;
      x          <= '0;
      rows       <= '0;
      up_rank    <= NONE;
      dn_rank    <= NONE;
      stopw      <= '0;
      conv       <= '0;
      c_send     <= 1'b0;
      c_conv     <= 1'b0;
      c_remote   <= '0;
      c_tag      <= '0;
      c_size     <= '0;
      c_addr     <= '0;
      c_dst      <= D_INIT;
      cnt        <= '0;
      ci         <= '0;
      r          <= '0;
      c          <= '0;
      t          <= '0;
      acc        <= '0;
      vv         <= '0;
      dd         <= '0;
      iterations <= '0;
    end else begin
      unique case (state)
        J_LAUNCH: begin
          ci     <= '0;
          c_conv <= 1'b0;
          c_dst  <= D_U;
          unique case (step)
            P_INIT_HDR: begin
              c_send <= 1'b0; c_remote <= MASTER; c_tag <= T_INIT;
              c_size <= AW'(2); c_addr <= '0; c_dst <= D_INIT;
              state  <= J_CMD;
            end
            P_INIT_DATA: begin
              c_send <= 1'b0; c_remote <= MASTER; c_tag <= T_DATA;
              c_size <= AW'(rows + 2) * AW'(COLS); c_addr <= '0;
              state  <= J_CMD;
            end
            P_X: begin
              c_tag  <= T_ROW;
              c_size <= AW'(COLS);
              if (x == 3'd4) step <= P_CALC;
              else unique case (kind)
                2'd0: if (up_rank != NONE) begin      // row 1 up
                  c_send <= 1'b1; c_remote <= up_rank; c_addr <= AW'(COLS);
                  state  <= J_CMD;
                end else x <= x + 1'b1;
                2'd1: if (dn_rank != NONE) begin      // row ROWS+1 from below
                  c_send <= 1'b0; c_remote <= dn_rank;
                  c_addr <= AW'(rows + 1) * AW'(COLS);
                  state  <= J_CMD;
                end else x <= x + 1'b1;
                2'd2: if (dn_rank != NONE) begin      // row ROWS down
                  c_send <= 1'b1; c_remote <= dn_rank;
                  c_addr <= AW'(rows) * AW'(COLS);
                  state  <= J_CMD;
                end else x <= x + 1'b1;
                default: if (up_rank != NONE) begin   // row 0 from above
                  c_send <= 1'b0; c_remote <= up_rank; c_addr <= '0;
                  state  <= J_CMD;
                end else x <= x + 1'b1;
              endcase
            end
            P_CALC: begin
              r     <= 16'd1;
              c     <= 16'd1;
              conv  <= '0;
              state <= K0;
            end
            P_CONV: begin
              c_send <= 1'b1; c_remote <= MASTER; c_tag <= T_CONV;
              c_size <= AW'(1); c_conv <= 1'b1;
              state  <= J_CMD;
            end
            P_STOP: begin
              c_send <= 1'b0; c_remote <= MASTER; c_tag <= T_STOP;
              c_size <= AW'(1); c_dst <= D_STOP;
              state  <= J_CMD;
            end
            default: begin                                // P_RES
              c_send <= 1'b1; c_remote <= MASTER; c_tag <= T_RES;
              c_size <= AW'(rows) * AW'(COLS); c_addr <= AW'(COLS);
              state  <= J_CMD;
            end
          endcase
        end
        J_CMD: if (do_wr) begin
          ci <= ci + 1'b1;
          if (ci == 2'd3) begin
            cnt   <= c_size;
            ci    <= '0;
            state <= c_send ? J_SEND : J_RHDR;
          end
        end
        J_SEND: if (do_wr) begin
          c_addr <= c_addr + 1'b1;
          cnt    <= cnt - 1'b1;
          if (cnt == AW'(1)) state <= J_DONE;
        end
        J_RHDR: if (do_rd) begin
          ci <= ci + 1'b1;
          if (ci == 2'd1) state <= J_RECV;
        end
        J_RECV: if (do_rd) begin
          c_addr <= c_addr + 1'b1;
          cnt    <= cnt - 1'b1;
          if (c_dst == D_INIT) begin
            if (c_addr == '0) rows <= from_mpe_data.data[15:0];
            else begin
              up_rank <= from_mpe_data.data[15:8];
              dn_rank <= from_mpe_data.data[7:0];
            end
          end
          if (c_dst == D_STOP) stopw <= from_mpe_data.data;
          if (cnt == AW'(1)) state <= J_DONE;
        end
        J_DONE: begin
          state <= J_LAUNCH;
          unique case (step)
            P_INIT_HDR:  step <= P_INIT_DATA;
            P_INIT_DATA: begin step <= P_X; x <= '0; end
            P_X:         x <= x + 1'b1;
            P_CONV:      step <= P_STOP;
            P_STOP: begin
              iterations <= iterations + 1'b1;
              if (stopw == '0) begin step <= P_X; x <= '0; end
              else step <= P_RES;
            end
            default:     step <= P_INIT_HDR;               // P_RES
          endcase
        end
        // ---- one interior point ----
        K0: begin t <= u_rd; state <= K1; end
        K1: begin acc <= add_y; state <= K2; end
        K2: begin acc <= add_y; state <= K3; end
        K3: begin acc <= add_y; state <= K4; end
        K4: begin vv <= mul_y; state <= K5; end
        K5: begin dd <= add_y; state <= K6; end
        K6: begin
          conv <= add_y;
          state <= K0;
          if (c == 16'(COLS - 2)) begin
            c <= 16'd1;
            r <= r + 1'b1;
            if (r == rows) begin
              r     <= 16'd1;
              state <= J_COPY;
            end
          end else c <= c + 1'b1;
        end
        J_COPY: begin
          if (c == 16'(COLS - 2)) begin
            c <= 16'd1;
            r <= r + 1'b1;
            if (r == rows) begin
              step  <= P_CONV;
              state <= J_LAUNCH;
            end
          end else c <= c + 1'b1;
        end
        default: state <= J_LAUNCH;
      endcase
    end
  end

  assign computing = (state inside {K0, K1, K2, K3, K4, K5, K6, J_COPY});

  a_rows: assert property (@(posedge clk) disable iff (rst)
    !(state == J_LAUNCH && step == P_INIT_DATA && (rows == 0 || rows > 16'(MAX_ROWS))))
    else $error("jacobi_engine: strip of %0d rows does not fit", rows);
endmodule
