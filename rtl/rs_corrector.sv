// rs_corrector: stage 5 of the RS decoder, error correction.
//
// While the stored codeword is read back symbol by symbol (index i is position
// p = 254 - i), the position is compared with the up to t error positions
// found by the Chien search and the matching error magnitude is added
// (XOR in GF(2^8)). Stream in, stream out, 255 cycles per codeword.
//
// Timing: the decoder presents index `idx` and issues the delay-RAM read in
// the same cycle; the RAM returns `rd_data` one cycle later, when this unit
// emits the corrected symbol. `out_sop`/`out_eop` mark the first and last
// symbol; with `out_eop` come `out_ok` (decoded) or `out_fail` (uncorrectable,
// data passed on uncorrected) and the packet's tag throughout.
module rs_corrector
  import rs_pkg::*;
#(
  parameter int T     = 4,
  parameter int TAG_W = rs_pkg::TAG_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 active,   // a codeword is in stage 5 this cycle
  input  logic [7:0]           idx,      // symbol index 0..254
  input  logic [2:0]           err_cnt,
  input  logic [T-1:0][7:0]    err_pos,
  input  gf_t  [T-1:0]         err_val,
  input  logic                 fail,
  input  logic [TAG_W-1:0]     tag,
  input  gf_t                  rd_data,
  output logic                 out_valid,
  output logic                 out_sop,
  output logic                 out_eop,
  output gf_t                  out_sym,
  output logic [TAG_W-1:0]     out_tag,
  output logic                 out_ok,
  output logic                 out_fail
);

  gf_t  e_cur, e_d;
  logic fail_d;

  always_comb begin
    e_cur = 8'h00;
    for (int l = 0; l < T; l++) begin
      if (3'(l) < err_cnt && err_pos[l] == 8'(RS_N - 1) - idx) e_cur ^= err_val[l];
    end
    if (fail) e_cur = 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sop <= 1'b0; out_eop <= 1'b0;
      e_d <= '0; fail_d <= 1'b0; out_tag <= '0;
    end else begin
      out_valid <= active;
      out_sop   <= active && idx == 8'd0;
      out_eop   <= active && idx == 8'(RS_N - 1);
      e_d       <= e_cur;
      fail_d    <= fail;
      if (active) out_tag <= tag;
    end
  end

  assign out_sym  = rd_data ^ e_d;
  assign out_ok   = out_eop && !fail_d;
  assign out_fail = out_eop && fail_d;

endmodule
