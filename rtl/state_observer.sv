// state_observer: offset-free state and disturbance observer of the MPC.
//
// The estimate s = [x; d] holds NX plant states and NY output disturbances.
// The observer of the document,
//   x+ = A x + B u + Lx (y - C x - d),   d+ = d + Ld (y - C x - d),
// is affine in [x; d; u; y], so it is computed as one matrix-vector product
//   s+ = M * [x; d; u; y; 1]
// with M = [A-LxC, -Lx, B, Lx, cx; -LdC, I-Ld, 0, Ld, cd] formed offline; the
// last column carries the offsets of the linearisation point. M is an
// NS x NV matrix (NS = NX+NY, NV = NS+NU+NY+1) of Q5.12 words, stored row by
// row in a small RAM that is written through the cfg port while idle.
// One `start` pulse latches s_in, u_in and y_in; a single multiplier then
// walks through M one coefficient per clock (read, multiply-accumulate), and
// each row is truncated to Q8.8 and saturated. `done` pulses, with s_out
// valid, NS*NV + 1 clock edges after the edge that samples `start` (67 at the
// default sizes). `busy` is high meanwhile.
// The observer structure follows the document; folding it into one matrix,
// the serial schedule and the number formats are this design's choices.
module state_observer
  import mpc_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NU = 2,
  parameter int unsigned NY = 2,
  localparam int unsigned NS = NX + NY,
  localparam int unsigned NV = NS + NU + NY + 1,
  localparam int unsigned MW = NS * NV,
  localparam int unsigned AW = $clog2(MW)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  q88_t          s_in [NS],
  input  q88_t          u_in [NU],
  input  q88_t          y_in [NY],
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  coef_t         cfg_data,
  output q88_t          s_out [NS],
  output logic          done,
  output logic          busy
);

  coef_t mem [MW];
  q88_t  vec [NV];

  // issue stage
  logic                    run;
  logic [AW-1:0]           addr;
  localparam int unsigned RW = $clog2(NS);
  localparam int unsigned CW = $clog2(NV);
  logic [RW-1:0]           row_i;
  logic [CW-1:0]           col_i;
  // read stage
  logic                    val_d, first_d, last_d;
  logic [RW-1:0]           row_d;
  coef_t                   coef_d;
  q88_t                    v_d;
  // accumulate stage
  acc_t                    acc, acc_next;

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run   <= 1'b0;
      addr  <= '0;
      row_i <= '0;
      col_i <= '0;
      for (int k = 0; k < NV; k++) vec[k] <= '0;
    end else if (!run) begin
      if (start) begin
        run   <= 1'b1;
        addr  <= '0;
        row_i <= '0;
        col_i <= '0;
        for (int k = 0; k < NS; k++) vec[k]         <= s_in[k];
        for (int k = 0; k < NU; k++) vec[NS+k]      <= u_in[k];
        for (int k = 0; k < NY; k++) vec[NS+NU+k]   <= y_in[k];
        vec[NV-1] <= Q88_ONE;
      end
    end else begin
      addr <= addr + 1'b1;
      if (col_i == CW'(NV - 1)) begin
        col_i <= '0;
        row_i <= row_i + 1'b1;
        if (row_i == RW'(NS - 1)) run <= 1'b0;
      end else begin
        col_i <= col_i + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    coef_d  <= mem[addr];
    v_d     <= vec[col_i];
    first_d <= (col_i == '0);
    last_d  <= (col_i == CW'(NV - 1));
    row_d   <= row_i;
  end

  always_ff @(posedge clk) begin
    if (rst) val_d <= 1'b0;
    else     val_d <= run;
  end

  always_comb begin
    acc_next = (first_d ? acc_t'(0) : acc) + acc_t'(coef_d) * acc_t'(v_d);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      done <= 1'b0;
      for (int k = 0; k < NS; k++) s_out[k] <= '0;
    end else begin
      done <= 1'b0;
      if (val_d) begin
        acc <= acc_next;
        if (last_d) begin
          s_out[row_d] <= acc_to_q88(acc_next);
          if (row_d == RW'(NS - 1)) done <= 1'b1;
        end
      end
    end
  end

  assign busy = run | val_d;

  assert property (@(posedge clk) disable iff (rst) cfg_we |-> !busy);

endmodule
