// rs_syndrome: stage 1 of the RS decoder, the 2t syndromes of a codeword.
//
// s_i = r(alpha^i), i = 0 .. 2t-1, evaluated by Horner's rule while the
// codeword streams in highest degree first, one symbol per cycle: each
// accumulator is multiplied by the constant alpha^i and the new symbol added.
// A codeword takes exactly 255 cycles, as the source design states for this
// stage. The 2t constant multipliers are the only arithmetic.
//
// Interface: `in_valid` qualifies `in_sym`; `in_first` marks the first symbol
// of a codeword and restarts the accumulators. After the 255th symbol `done`
// pulses for one cycle and `synd` holds the result until the next codeword
// ends (synd[i] = s_i).
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int T = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  gf_t               in_sym,
  output logic              done,
  output gf_t [2*T-1:0]     synd
);

  gf_t [2*T-1:0] acc;
  gf_t [2*T-1:0] acc_next;
  logic [7:0]    cnt;

  always_comb begin
    for (int i = 0; i < 2*T; i++) begin
      acc_next[i] = (in_first ? 8'h00 : gf_mul(acc[i], gf_alpha_pow(i))) ^ in_sym;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      synd <= '0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        acc <= acc_next;
        cnt <= in_first ? 8'd1 : cnt + 8'd1;
        if (!in_first && cnt == 8'(RS_N - 1)) begin
          synd <= acc_next;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
