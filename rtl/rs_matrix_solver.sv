// rs_matrix_solver: the unit shared by stages 2 and 4 of the RS decoder.
//
// Both stages solve a small linear system over GF(2^8):
//   stage 2 (Peterson):   Hankel matrix of syndromes * lambda = syndromes,
//     row i: s(nu-1+i) l0 + s(nu-2+i) l1 + ... + s(i) l(nu-1) = s(nu+i)
//   stage 4 (magnitudes): Vandermonde matrix of locators * e = syndromes,
//     row i: X1^i e1 + ... + Xnu^i enu = s(i)
// Because the two systems have the same form one solver serves both, as in
// the source design. The system is held in a matrix register of t x (t+1)
// words (the right-hand side in column t) and reduced in place, LU style:
// for each column a non-zero pivot row is chosen and swapped up, the pivot is
// inverted (one-cycle inverse) and its row scaled through the division
// multiplier, the rows below are cleared with a multiply-accumulate, one word
// per cycle, and back substitution (also on the multiply-accumulate) leaves
// the solution in column t. For t = 4 the datapath is one multiply-
// accumulate, one inverse and a second multiplier behind the inverse, as in
// the source design's t = 4 matrix solver; for t = 2 and 3 it shrinks to the
// source design's ALU of one adder, one multiplier and one inverse (the
// scaling then goes through the multiply-accumulate's multiplier). The state
// machine, the pivot search and the cycle schedule are this design's own.
//
// Peterson mode: if all syndromes are zero there is no error (nu = 0). Else the
// system is tried with nu = t; when it is singular nu is lowered by one and the
// matrix reloaded, down to nu = 1; singular at nu = 1 means uncorrectable.
// Magnitude mode: nu = nu_in; row 0 is loaded at start, rows 1..nu-1 are built
// by multiplying the row above by the locators on the multiply-accumulate.
//
// Interface: pulse `start` with `mode` (0 Peterson, 1 magnitude). `synd` must
// hold during the whole job in Peterson mode and in the start cycle in
// magnitude mode; `nu_in` and `loc_x` during the job. `done` pulses when the
// job ends; `sol`, `nu_out`, `fail` then hold until the next job ends.
// `cycles` is the length of the last job. For t = 4 the worst Peterson job
// (three singular attempts) plus the worst magnitude job take well under the
// 255 cycles of a pipeline stage.
module rs_matrix_solver
  import rs_pkg::*;
#(
  parameter int T = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              mode,
  input  gf_t [2*T-1:0]     synd,
  input  logic [2:0]        nu_in,
  input  gf_t [T-1:0]       loc_x,
  output logic              busy,
  output logic              done,
  output gf_t [T-1:0]       sol,
  output logic [2:0]        nu_out,
  output logic              fail,
  output logic [8:0]        cycles
);

  localparam int IW = 3;   // index width, t <= 4 plus the right-hand column
  localparam logic [IW-1:0] RHS = IW'(T);

  typedef enum logic [2:0] {S_IDLE, S_LOADP, S_LOADV, S_PIVOT, S_NORM, S_ELIM, S_BACK, S_FIN} state_e;

  state_e           state;
  logic             mode_r;
  gf_t              a [T][T+1];   // matrix register
  logic [IW-1:0]    dim, k, i, j;
  gf_t              inv_r;
  logic [8:0]       cyc;

  // shared arithmetic
  gf_t mac_a, mac_b, mac_c, mac_out;
  gf_t div_out;
  // pivot search
  logic             piv_found;
  logic [IW-1:0]    piv;
  // next column in the order t, dim-1, dim-2, ..., k
  logic [IW-1:0]    j_next;
  logic             j_last;

  always_comb begin
    mac_a = '0; mac_b = '0; mac_c = '0;
    unique case (state)
      S_ELIM:  begin mac_a = a[i][k];    mac_b = a[k][j];   mac_c = a[i][j];   end
      S_BACK:  begin mac_a = a[j][i];    mac_b = a[i][RHS]; mac_c = a[j][RHS]; end
      S_LOADV: begin mac_a = a[i-1][j];  mac_b = loc_x[j];  mac_c = 8'h00;     end
      S_NORM:  begin mac_a = a[k][j];    mac_b = inv_r;     mac_c = 8'h00;     end
      default: ;
    endcase
    mac_out = mac_c ^ gf_mul(mac_a, mac_b);
    // t = 4: a second multiplier behind the inverse (division path);
    // t = 2, 3: the single multiplier of the ALU does the division too
    if (T >= 4) div_out = gf_mul(a[k][j], inv_r);
    else        div_out = mac_out;

    piv_found = 1'b0;
    piv       = k;
    for (int r = T - 1; r >= 0; r--) begin
      if (IW'(r) >= k && IW'(r) < dim && a[r][k] != 8'h00) begin
        piv_found = 1'b1;
        piv       = IW'(r);
      end
    end

    j_last = (j == k);
    j_next = (j == RHS) ? dim - 1'b1 : j - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_r <= 1'b0;
      dim    <= '0; k <= '0; i <= '0; j <= '0;
      inv_r  <= '0;
      cyc    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      sol    <= '0;
      nu_out <= '0;
      fail   <= 1'b0;
      cycles <= '0;
      for (int r = 0; r < T; r++)
        for (int c = 0; c <= T; c++) a[r][c] <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cyc <= cyc + 9'd1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode_r <= mode;
            cyc    <= 9'd1;
            if (!mode) begin
              if (synd == '0) begin
                sol <= '0; nu_out <= '0; fail <= 1'b0; done <= 1'b1; cycles <= 9'd1;
              end else begin
                dim <= IW'(T); busy <= 1'b1; state <= S_LOADP;
              end
            end else if (nu_in == 3'd0) begin
              sol <= '0; nu_out <= '0; fail <= 1'b0; done <= 1'b1; cycles <= 9'd1;
            end else begin
              dim  <= nu_in;
              busy <= 1'b1;
              for (int r = 0; r < T; r++) begin
                for (int c = 0; c < T; c++)
                  a[r][c] <= (r == 0 && 3'(c) < nu_in) ? 8'h01 : 8'h00;
                a[r][T] <= (3'(r) < nu_in) ? synd[r] : 8'h00;
              end
              k <= '0; i <= IW'(1); j <= '0;
              state <= (nu_in == 3'd1) ? S_PIVOT : S_LOADV;
            end
          end
        end

        S_LOADP: begin
          for (int r = 0; r < T; r++) begin
            for (int c = 0; c < T; c++)
              a[r][c] <= (3'(r) < dim && 3'(c) < dim) ? synd[int'(dim) - 1 + r - c] : 8'h00;
            a[r][T] <= (3'(r) < dim) ? synd[int'(dim) + r] : 8'h00;
          end
          k <= '0;
          state <= S_PIVOT;
        end

        S_LOADV: begin
          a[i][j] <= mac_out;
          if (j == dim - 1'b1) begin
            j <= '0;
            if (i == dim - 1'b1) state <= S_PIVOT;
            else i <= i + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end

        S_PIVOT: begin
          if (!piv_found) begin
            if (mode_r || dim == IW'(1)) begin
              sol <= '0; nu_out <= '0; fail <= 1'b1; done <= 1'b1;
              busy <= 1'b0; cycles <= cyc; state <= S_IDLE;
            end else begin
              dim   <= dim - 1'b1;
              state <= S_LOADP;
            end
          end else begin
            if (piv != k) begin
              for (int c = 0; c <= T; c++) begin
                a[k][c]   <= a[piv][c];
                a[piv][c] <= a[k][c];
              end
            end
            inv_r <= gf_inv(a[piv][k]);
            j     <= RHS;
            state <= S_NORM;
          end
        end

        S_NORM: begin
          a[k][j] <= div_out;
          j <= j_next;
          if (j_last) begin
            j <= RHS;
            if (k == dim - 1'b1) begin
              i <= dim - 1'b1; j <= '0;
              state <= (dim == IW'(1)) ? S_FIN : S_BACK;
            end else begin
              i <= k + 1'b1;
              state <= S_ELIM;
            end
          end
        end

        S_ELIM: begin
          a[i][j] <= mac_out;
          j <= j_next;
          if (j_last) begin
            j <= RHS;
            if (i == dim - 1'b1) begin
              k <= k + 1'b1;
              state <= S_PIVOT;
            end else begin
              i <= i + 1'b1;
            end
          end
        end

        S_BACK: begin
          // row j (above i) loses its term in x_i
          a[j][RHS] <= mac_out;
          if (j == i - 1'b1) begin
            j <= '0;
            if (i == IW'(1)) state <= S_FIN;
            else i <= i - 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end

        S_FIN: begin
          for (int r = 0; r < T; r++) sol[r] <= (3'(r) < dim) ? a[r][T] : 8'h00;
          nu_out <= dim;
          fail   <= 1'b0;
          done   <= 1'b1;
          busy   <= 1'b0;
          cycles <= cyc;
          state  <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
