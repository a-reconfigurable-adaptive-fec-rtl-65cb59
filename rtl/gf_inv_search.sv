// gf_inv_search: GF(2^8) divider q = b / a built from one multiplier and an
// LFSR, used as the whole of stage 2 when t = 1 (there lambda0 = s1 / s0).
//
// Instead of a one-cycle inverse, the LFSR steps through alpha^0, alpha^1, ...
// alpha^254, one element per cycle, and the multiplier tests a * alpha^j == 1.
// The element that passes is the inverse; a second multiply gives b * a^-1.
// This trades up to 255 cycles for a much smaller circuit, which fits because
// each decoder stage has 255 cycles anyway.
//
// Interface: pulse `start` with `a` and `b` valid in that cycle; candidate
// alpha^0 is tested in the start cycle itself, alpha^j in cycle j after it.
// `found` is a one-cycle pulse in the cycle the inverse is met (q_now is the
// quotient then); `q` holds the quotient from the next cycle until the next
// start. `a` and `b` need to stay valid only in the start cycle. `div_zero`
// is set at start when a = 0 (no inverse exists) and no search runs.
// Worst-case latency: found in cycle 254 after start.
module gf_inv_search
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  a,
  input  gf_t  b,
  output logic busy,
  output logic found,
  output gf_t  q_now,
  output gf_t  q,
  output logic div_zero
);

  gf_t  lfsr;    // current candidate alpha^j
  gf_t  a_r, b_r;
  gf_t  cand, a_cur, b_cur;
  logic active;

  always_comb begin
    active = start || busy;
    cand   = start ? 8'h01 : lfsr;
    a_cur  = start ? a : a_r;
    b_cur  = start ? b : b_r;
    found  = active && (a_cur != 8'h00) && (gf_mul(a_cur, cand) == 8'h01);
    q_now  = gf_mul(b_cur, cand);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      lfsr     <= 8'h01;
      a_r      <= '0;
      b_r      <= '0;
      q        <= '0;
      div_zero <= 1'b0;
    end else begin
      if (start) begin
        a_r      <= a;
        b_r      <= b;
        div_zero <= (a == 8'h00);
      end
      if (found) begin
        q    <= q_now;
        busy <= 1'b0;
      end else if (start) begin
        busy <= (a != 8'h00);
      end
      if (active) lfsr <= gf_xtime(cand);  // LFSR step: multiply by alpha
    end
  end

endmodule
