// pd_qp_solver: primal-dual solver for the condensed-free MPC quadratic program
//   min 1/2 z'Hz + z'q   s.t.  Ez = e,  z_lo <= z <= z_hi
// with z = [u0; x1; u1; x2; ...; u(N-1); xN] (NZ = (NU+NX)*N unknowns) and one
// multiplier per model equation (NL = NX*N).
//
// Each solve runs the projected primal-descent / dual-ascent iteration
//   z  <- clip( z - aD^-1 (H z + E' l + q) )         (all rows from the old z)
//   l  <- l + wW^-1 (E z - e)                          (with the new z)
// for ITER iterations, from z = 0 and l = 0. All scaling by the conditioning
// matrices D, W and the relaxation factors a, w is folded offline into the
// stored data:
//   G  = [aD^-1 H | aD^-1 E']   NZ x (NZ+NL), rows contiguous, base 0
//   Ew = wW^-1 E                NL x NZ,                        base G_WORDS
//   F  = [aD^-1 Fq; wW^-1 Fe]   (NZ+NL) x NP,                   base G_WORDS+EW_WORDS
// where q = Fq*th and e = Fe*th are the affine maps from the parameter vector
// th = [x; d; r; 1] (estimate, disturbance, setpoint, constant) to the QP's
// linear term and equality right-hand side; they include the steady-state
// target of the offset-free formulation. The bounds follow at MEM_WORDS
// (z_lo, NZ words) and MEM_WORDS+NZ (z_hi), Q8.8 in the low 16 bits.
// All data is written through the cfg port while the solver is idle.
//
// Datapath: one coefficient RAM read and one multiply-accumulate per clock.
// Because every phase walks its matrix row by row, the RAM address simply
// increments. A setup phase forms aD^-1 q and wW^-1 e; then each iteration is
// a z phase (NZ*(NZ+NL) clocks) and a lambda phase (NL*NZ clocks). Between
// phases the two-stage pipeline drains and, after a z phase, the new z is
// committed (2 clocks per phase). `done` pulses, with u_out valid,
//   (NZ+NL)*NP + 2 + ITER*(NZ*(NZ+NL) + NL*NZ + 4)
// clock edges after the edge that samples `start` (841,302 for the default
// N=10, NX=4, NU=2, NY=2, ITER=100: 8.4 ms at 100 MHz).
// The iteration and its Gauss-Seidel order between z and l follow the
// document; the dense storage, fixed iteration count, cold start and number
// formats are this design's choices.
module pd_qp_solver
  import mpc_pkg::*;
#(
  parameter int unsigned N    = 10,   // prediction horizon
  parameter int unsigned NX   = 4,
  parameter int unsigned NU   = 2,
  parameter int unsigned NY   = 2,
  parameter int unsigned ITER = 100,  // iterations per solve
  localparam int unsigned NZ  = (NU + NX) * N,
  localparam int unsigned NL  = NX * N,
  localparam int unsigned NTH = NX + 2 * NY,
  localparam int unsigned NP  = NTH + 1,
  localparam int unsigned G_WORDS   = NZ * (NZ + NL),
  localparam int unsigned EW_WORDS  = NL * NZ,
  localparam int unsigned F_WORDS   = (NZ + NL) * NP,
  localparam int unsigned MEM_WORDS = G_WORDS + EW_WORDS + F_WORDS,
  localparam int unsigned AW  = $clog2(MEM_WORDS + 2 * NZ)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  q88_t          theta [NTH],
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  coef_t         cfg_data,
  output q88_t          u_out [NU],
  output logic          done,
  output logic          busy
);

  localparam int unsigned RW = $clog2(NZ + NL);      // row index width
  localparam int unsigned CW = $clog2(NZ + NL + 1);  // column index width
  localparam int unsigned MAW = $clog2(MEM_WORDS);
  localparam int unsigned ZW  = $clog2(NZ);          // z index width
  localparam int unsigned LW  = $clog2(NL);          // lambda index width
  localparam int unsigned PW  = $clog2(NP);          // theta index width
  localparam int unsigned IW  = $clog2(ITER + 1);

  typedef enum logic [1:0] {PH_SETUP, PH_Z, PH_L} phase_e;
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  coef_t mem [MEM_WORDS];
  q88_t  z [NZ], zn [NZ], lam [NL], qv [NZ], ev [NL], zlo [NZ], zhi [NZ];
  q88_t  th [NP];

  state_e st;
  phase_e ph;
  logic [IW-1:0] iter;
  logic [MAW-1:0] addr;
  logic [RW-1:0]  row_i;
  logic [CW-1:0]  col_i;
  logic [RW-1:0]  n_rows;
  logic [CW-1:0]  n_cols;

  // read stage
  logic       val_d, first_d, last_d, neg_d;
  phase_e     ph_d;
  logic [RW-1:0] row_d;
  coef_t      coef_d;
  q88_t       v_d;
  acc_t       init_d;
  // accumulate stage
  acc_t       acc, acc_next, prod;
  q88_t       res;

  always_comb begin
    unique case (ph)
      PH_SETUP: begin n_rows = RW'(NZ + NL); n_cols = CW'(NP);      end
      PH_Z:     begin n_rows = RW'(NZ);      n_cols = CW'(NZ + NL); end
      default:  begin n_rows = RW'(NL);      n_cols = CW'(NZ);      end
    endcase
  end

  // ---------------------------------------------------------------- config
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr < AW'(MEM_WORDS)) mem[MAW'(cfg_addr)] <= cfg_data;
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      for (int k = 0; k < NZ; k++) begin
        if (cfg_addr == AW'(MEM_WORDS + k))      zlo[k] <= q88_t'(cfg_data[DATA_W-1:0]);
        if (cfg_addr == AW'(MEM_WORDS + NZ + k)) zhi[k] <= q88_t'(cfg_data[DATA_W-1:0]);
      end
    end
  end

  // ---------------------------------------------------------- issue / FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      ph    <= PH_SETUP;
      iter  <= '0;
      addr  <= '0;
      row_i <= '0;
      col_i <= '0;
      done  <= 1'b0;
      for (int k = 0; k < NP; k++) th[k] <= '0;
      for (int k = 0; k < NU; k++) u_out[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int k = 0; k < NTH; k++) th[k] <= theta[k];
          th[NP-1] <= Q88_ONE;
          st    <= S_RUN;
          ph    <= PH_SETUP;
          iter  <= '0;
          addr  <= MAW'(G_WORDS + EW_WORDS);
          row_i <= '0;
          col_i <= '0;
        end
        S_RUN: begin
          addr <= addr + 1'b1;
          if (col_i == n_cols - 1'b1) begin
            col_i <= '0;
            row_i <= row_i + 1'b1;
            if (row_i == n_rows - 1'b1) st <= S_DRAIN;
          end else begin
            col_i <= col_i + 1'b1;
          end
        end
        S_DRAIN: if (!val_d) begin
          row_i <= '0;
          col_i <= '0;
          unique case (ph)
            PH_SETUP: begin
              ph <= PH_Z; addr <= '0; st <= S_RUN;
            end
            PH_Z: begin
              ph <= PH_L; addr <= MAW'(G_WORDS); st <= S_RUN;
            end
            default: begin
              if (iter == IW'(ITER - 1)) begin
                st   <= S_IDLE;
                done <= 1'b1;
                for (int k = 0; k < NU; k++) u_out[k] <= z[k];
              end else begin
                iter <= iter + 1'b1;
                ph   <= PH_Z; addr <= '0; st <= S_RUN;
              end
            end
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // ------------------------------------------------------------ read stage
  always_ff @(posedge clk) begin
    coef_d  <= mem[addr];
    first_d <= (col_i == '0);
    last_d  <= (col_i == n_cols - 1'b1);
    row_d   <= row_i;
    ph_d    <= ph;
    neg_d   <= (ph == PH_Z);
    unique case (ph)
      PH_SETUP: begin
        v_d    <= th[PW'(col_i)];
        init_d <= '0;
      end
      PH_Z: begin
        v_d    <= (col_i < CW'(NZ)) ? z[ZW'(col_i)] : lam[LW'(col_i - CW'(NZ))];
        init_d <= q88_to_acc(z[ZW'(row_i)]) - q88_to_acc(qv[ZW'(row_i)]);
      end
      default: begin
        v_d    <= z[ZW'(col_i)];
        init_d <= q88_to_acc(lam[LW'(row_i)]) - q88_to_acc(ev[LW'(row_i)]);
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) val_d <= 1'b0;
    else     val_d <= (st == S_RUN);
  end

  // ------------------------------------------------------ accumulate stage
  always_comb begin
    prod     = acc_t'(coef_d) * acc_t'(v_d);
    acc_next = (first_d ? init_d : acc) + (neg_d ? -prod : prod);
    res      = acc_to_q88(acc_next);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      for (int k = 0; k < NZ; k++) begin z[k] <= '0; zn[k] <= '0; qv[k] <= '0; end
      for (int k = 0; k < NL; k++) begin lam[k] <= '0; ev[k] <= '0; end
    end else begin
      if (st == S_IDLE && start) begin
        // cold start of every solve
        for (int k = 0; k < NZ; k++) z[k]   <= '0;
        for (int k = 0; k < NL; k++) lam[k] <= '0;
      end
      if (st == S_DRAIN && !val_d && ph == PH_Z) begin
        for (int k = 0; k < NZ; k++) z[k] <= zn[k];
      end
      if (val_d) begin
        acc <= acc_next;
        if (last_d) begin
          unique case (ph_d)
            PH_SETUP:
              if (row_d < RW'(NZ)) qv[ZW'(row_d)] <= res;
              else                 ev[LW'(row_d - RW'(NZ))] <= res;
            PH_Z:
              // projection onto the box of eq. (8b)
              if (res < zlo[ZW'(row_d)])      zn[ZW'(row_d)] <= zlo[ZW'(row_d)];
              else if (res > zhi[ZW'(row_d)]) zn[ZW'(row_d)] <= zhi[ZW'(row_d)];
              else                            zn[ZW'(row_d)] <= res;
            default:
              lam[LW'(row_d)] <= res;
          endcase
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) cfg_we |-> !busy);
  assert property (@(posedge clk) disable iff (rst) start |-> !busy);

endmodule
