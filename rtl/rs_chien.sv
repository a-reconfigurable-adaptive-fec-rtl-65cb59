// rs_chien: stage 3 of the RS decoder, the Chien search for error locations.
//
// The error locator is Lambda(x) = 1 + L1 x + ... + Lt x^t, with
// L(k) = lambda[k-1] from the Peterson solver. Position p (coefficient of x^p)
// is in error when Lambda(alpha^-p) = 0. Positions are visited in stream
// order, p = 254 down to 0, one per cycle, so the search takes 255 cycles.
// Register c_k holds L(k) * alpha^(-k*p); going from p to p-1 multiplies it by
// the constant alpha^k, so only constant multipliers are needed, as the source
// design's operation count for this stage assumes.
//
// Interface: pulse `start` with `lambda` and `nu` (number of errors Peterson
// found) valid in that cycle; position 254 is tested in the start cycle.
// 255 cycles after start, `done` pulses and the outputs hold until the next
// search ends: `cnt` roots, their positions `loc_pos` and locators
// `loc_x` = alpha^p (first found in entry 0). `fail` is set when the number of
// roots differs from `nu` or exceeds t: the codeword is uncorrectable.
module rs_chien
  import rs_pkg::*;
#(
  parameter int T = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  gf_t [T-1:0]           lambda,
  input  logic [2:0]            nu,
  output logic                  busy,
  output logic                  done,
  output logic [2:0]            cnt,
  output gf_t [T-1:0]           loc_x,
  output logic [T-1:0][7:0]     loc_pos,
  output logic                  fail
);

  gf_t [T-1:0]       c, c_cur;
  gf_t               xp, x_cur;
  logic [7:0]        pos, p_cur;
  logic [2:0]        wcnt, wcnt_cur, nu_r, nu_cur;
  logic              ovf, ovf_cur;
  gf_t [T-1:0]       wx, wx_cur;
  logic [T-1:0][7:0] wpos, wpos_cur;
  gf_t               sum;
  logic              active, root;
  // results including the current cycle's test
  logic [2:0]        wcnt_n;
  logic              ovf_n;
  gf_t [T-1:0]       wx_n;
  logic [T-1:0][7:0] wpos_n;

  always_comb begin
    active   = start || busy;
    x_cur    = start ? gf_alpha_pow(RS_N - 1) : xp;
    p_cur    = start ? 8'(RS_N - 1) : pos;
    wcnt_cur = start ? 3'd0 : wcnt;
    ovf_cur  = start ? 1'b0 : ovf;
    nu_cur   = start ? nu : nu_r;
    wx_cur   = start ? '0 : wx;
    wpos_cur = start ? '0 : wpos;
    sum = 8'h01;
    for (int k = 0; k < T; k++) begin
      // start value L(k+1) * alpha^(-(k+1)*254) = L(k+1) * alpha^(k+1)
      c_cur[k] = start ? gf_mul(lambda[k], gf_alpha_pow(k + 1)) : c[k];
      sum ^= c_cur[k];
    end
    root   = active && (sum == 8'h00);
    wcnt_n = wcnt_cur;
    ovf_n  = ovf_cur;
    wx_n   = wx_cur;
    wpos_n = wpos_cur;
    if (root) begin
      if (wcnt_cur < 3'(T)) begin
        for (int l = 0; l < T; l++) begin
          if (3'(l) == wcnt_cur) begin
            wx_n[l]   = x_cur;
            wpos_n[l] = p_cur;
          end
        end
        wcnt_n = wcnt_cur + 3'd1;
      end else begin
        ovf_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      c <= '0; xp <= '0; pos <= '0; wcnt <= '0; nu_r <= '0; ovf <= 1'b0;
      wx <= '0; wpos <= '0;
      cnt <= '0; loc_x <= '0; loc_pos <= '0; fail <= 1'b0;
    end else begin
      done <= 1'b0;
      if (active) begin
        for (int k = 0; k < T; k++) c[k] <= gf_mul(c_cur[k], gf_alpha_pow(k + 1));
        xp   <= gf_mul(x_cur, gf_alpha_pow(RS_N - 1));  // times alpha^-1
        pos  <= p_cur - 8'd1;
        wcnt <= wcnt_n;
        ovf  <= ovf_n;
        wx   <= wx_n;
        wpos <= wpos_n;
        nu_r <= nu_cur;
        busy <= (p_cur != 8'd0);
        if (p_cur == 8'd0) begin
          done    <= 1'b1;
          cnt     <= wcnt_n;
          loc_x   <= wx_n;
          loc_pos <= wpos_n;
          fail    <= ovf_n || (wcnt_n != nu_cur);
        end
      end
    end
  end

endmodule
