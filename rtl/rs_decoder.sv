// rs_decoder: a five-stage pipelined RS(255, 255-2t) decoder built for one
// fixed error correction capability t (parameter T = 1..4).
//
// Stages, each 255 cycles long (one stage period), working on five codewords
// at once:
//   1  syndromes (rs_syndrome), codeword written into rs_delay_ram
//   2  error locator polynomial by the Peterson method
//   3  error locations by Chien search (rs_chien)
//   4  error magnitudes from the locator (Vandermonde) system
//   5  correction while the codeword is read back (rs_corrector)
// For t >= 2 stages 2 and 4 share one rs_matrix_solver: in every stage period
// it first solves the Peterson system of the codeword in stage 2 and then the
// magnitude system of the codeword in stage 4; together they take far less
// than 255 cycles. For t = 1 stage 2 is a single division lambda0 = s1/s0 done
// by the LFSR divider (gf_inv_search) and stage 4 needs no arithmetic
// (e = s0). This split, and the 255-cycle stage period, follow the source
// design; the hand-over registers between stages are this design's own.
//
// Interface: a codeword may start when `in_ready` is high (first cycle of a
// stage period, or any cycle when the decoder is empty); it then arrives with
// `in_valid` high on 255 consecutive cycles, highest-degree symbol first, and
// `in_tag` is sampled with its first symbol. The corrected codeword leaves on
// out_* 4*255+1 cycles after its first symbol went in, one symbol per cycle,
// with out_sop/out_eop, the tag, and out_ok or out_fail with the last symbol.
// A codeword that fails to decode is passed on unchanged. Throughput is one
// codeword per 255 cycles. `busy` is high while any stage holds a codeword.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int T     = 4,
  parameter int TAG_W = rs_pkg::TAG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  gf_t               in_sym,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              in_ready,
  output logic              out_valid,
  output logic              out_sop,
  output logic              out_eop,
  output gf_t               out_sym,
  output logic [TAG_W-1:0]  out_tag,
  output logic              out_ok,
  output logic              out_fail,
  output logic              busy
);

  localparam logic [7:0] LAST = 8'(RS_N - 1);

  // ---------------------------------------------------------------- framing
  logic [7:0]       fc;        // cycle within the stage period
  logic             run, advance, pkt_start;
  logic             s1_v, s2_v, s3_v, s4_v, s5_v;
  logic [TAG_W-1:0] s1_tag, s2_tag, s3_tag, s4_tag, s5_tag;
  logic [2:0]       wslot;     // delay-RAM slot written by stage 1

  assign in_ready  = (fc == 8'd0);
  assign pkt_start = in_valid && in_ready;
  assign run       = (fc != 8'd0) || pkt_start || s2_v || s3_v || s4_v || s5_v;
  assign advance   = run && (fc == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fc <= '0;
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; s4_v <= 1'b0; s5_v <= 1'b0;
      s1_tag <= '0; s2_tag <= '0; s3_tag <= '0; s4_tag <= '0; s5_tag <= '0;
      wslot <= '0;
    end else begin
      if (run) fc <= advance ? 8'd0 : fc + 8'd1;
      if (run && fc == 8'd0) begin
        s1_v <= pkt_start;
        if (pkt_start) s1_tag <= in_tag;
      end
      if (advance) begin
        s2_v <= s1_v; s3_v <= s2_v; s4_v <= s3_v; s5_v <= s4_v;
        s2_tag <= s1_tag; s3_tag <= s2_tag; s4_tag <= s3_tag; s5_tag <= s4_tag;
        wslot <= (wslot == 3'd4) ? 3'd0 : wslot + 3'd1;
      end
    end
  end

  assign busy = s1_v || s2_v || s3_v || s4_v || s5_v || out_valid;

  // ---------------------------------------------------------------- stage 1
  logic          s1_in;
  gf_t [2*T-1:0] synd;
  logic          syn_done;

  assign s1_in = (fc == 8'd0) ? pkt_start : (s1_v && in_valid);

  rs_syndrome #(.T(T)) u_syndrome (
    .clk, .rst_n,
    .in_valid (s1_in),
    .in_first (fc == 8'd0),
    .in_sym,
    .done     (syn_done),
    .synd
  );

  logic [2:0] rslot;
  assign rslot = (wslot == 3'd4) ? 3'd0 : wslot + 3'd1;  // written 4 periods ago

  gf_t rd_data;
  rs_delay_ram #(.SLOTS(5), .N(RS_N)) u_ram (
    .clk,
    .wr_en   (s1_in),
    .wr_slot (wslot),
    .wr_idx  (fc),
    .wr_data (in_sym),
    .rd_en   (s5_v),
    .rd_slot (rslot),
    .rd_idx  (fc),
    .rd_data
  );

  // ------------------------------------------------- stages 2 and 4 results
  gf_t [T-1:0]       lam_r;       // locator of the codeword leaving stage 2
  logic [2:0]        nu_r;
  logic              pfail_r;
  gf_t [T-1:0]       e_r;         // magnitudes of the codeword leaving stage 4
  logic              mfail_r;

  // stage 3 / 4 hand-over
  logic [2:0]        s3_nu;
  logic              s3_fail, s4_fail, s5_fail;
  gf_t [T-1:0]       s3_synd, s4_synd;
  logic [2:0]        s5_cnt;
  logic [T-1:0][7:0] s5_pos;
  gf_t [T-1:0]       s5_val;

  // Chien outputs (hold for the whole of stage 4)
  logic              ch_busy, ch_done, ch_fail;
  logic [2:0]        ch_cnt;
  gf_t [T-1:0]       ch_x;
  logic [T-1:0][7:0] ch_pos;

  generate
    if (T == 1) begin : g_t1
      // Stage 2: lambda0 = s1 / s0 by the LFSR divider; stage 4: e = s0.
      logic dv_busy, dv_found, dv_zero;
      gf_t  dv_qnow, dv_q;
      logic dv_start;
      assign dv_start = run && fc == 8'd0 && s2_v && synd[0] != 8'h00 && synd[1] != 8'h00;
      gf_inv_search u_div (
        .clk, .rst_n,
        .start    (dv_start),
        .a        (synd[0]),
        .b        (synd[1]),
        .busy     (dv_busy),
        .found    (dv_found),
        .q_now    (dv_qnow),
        .q        (dv_q),
        .div_zero (dv_zero)
      );
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          lam_r <= '0; nu_r <= '0; pfail_r <= 1'b0;
        end else begin
          if (run && fc == 8'd0 && s2_v) begin
            // one error needs both syndromes non-zero; exactly one zero is uncorrectable
            nu_r    <= (synd[0] != 8'h00 || synd[1] != 8'h00) ? 3'd1 : 3'd0;
            pfail_r <= (synd[0] == 8'h00) != (synd[1] == 8'h00);
            lam_r   <= '0;
          end
          if (dv_found) lam_r[0] <= dv_qnow;
        end
      end
      assign e_r     = s4_synd;
      assign mfail_r = 1'b0;
    end else begin : g_solver
      logic          sv_start, sv_mode, sv_busy, sv_done, sv_fail;
      logic          job_mag, mag_pend;
      gf_t [2*T-1:0] sv_synd;
      gf_t [T-1:0]   sv_sol;
      logic [2:0]    sv_nu;
      logic [8:0]    sv_cycles;
      logic          start_pet, start_mag;

      assign start_pet = run && fc == 8'd0 && s2_v;
      assign start_mag = !start_pet && !sv_busy && mag_pend && fc != 8'd0;
      assign sv_start  = start_pet || start_mag;
      assign sv_mode   = start_mag;
      always_comb begin
        sv_synd = synd;
        if (start_mag || (job_mag && !start_pet)) begin
          sv_synd = '0;
          for (int q = 0; q < T; q++) sv_synd[q] = s4_synd[q];
        end
      end

      rs_matrix_solver #(.T(T)) u_solver (
        .clk, .rst_n,
        .start  (sv_start),
        .mode   (sv_mode),
        .synd   (sv_synd),
        .nu_in  (ch_cnt),
        .loc_x  (ch_x),
        .busy   (sv_busy),
        .done   (sv_done),
        .sol    (sv_sol),
        .nu_out (sv_nu),
        .fail   (sv_fail),
        .cycles (sv_cycles)
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          job_mag <= 1'b0; mag_pend <= 1'b0;
          lam_r <= '0; nu_r <= '0; pfail_r <= 1'b0; e_r <= '0; mfail_r <= 1'b0;
        end else begin
          if (run && fc == 8'd0) mag_pend <= s4_v;
          if (start_mag) mag_pend <= 1'b0;
          if (sv_start) job_mag <= sv_mode;
          if (sv_done && !job_mag) begin
            lam_r <= sv_sol; nu_r <= sv_nu; pfail_r <= sv_fail;
          end
          if (sv_done && job_mag) begin
            e_r <= sv_sol; mfail_r <= sv_fail;
          end
        end
      end

      // Both solver jobs of a stage period must be over before it ends.
      a_solver_in_time: assert property (@(posedge clk) disable iff (!rst_n)
        advance |-> !sv_busy && !mag_pend);
    end
  endgenerate

  // ---------------------------------------------------------------- stage 3
  rs_chien #(.T(T)) u_chien (
    .clk, .rst_n,
    .start   (run && fc == 8'd0 && s3_v),
    .lambda  (lam_r),
    .nu      (s3_nu),
    .busy    (ch_busy),
    .done    (ch_done),
    .cnt     (ch_cnt),
    .loc_x   (ch_x),
    .loc_pos (ch_pos),
    .fail    (ch_fail)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_nu <= '0; s3_fail <= 1'b0; s4_fail <= 1'b0; s5_fail <= 1'b0;
      s3_synd <= '0; s4_synd <= '0;
      s5_cnt <= '0; s5_pos <= '0; s5_val <= '0;
    end else if (advance) begin
      s3_nu   <= nu_r;
      s3_fail <= pfail_r;
      for (int q = 0; q < T; q++) s3_synd[q] <= synd[q];
      s4_synd <= s3_synd;
      // the Chien result of the codeword now in stage 4 appeared at the
      // previous advance, so it is picked up here together with stage 4's
      s4_fail <= s3_fail;
      s5_fail <= s4_fail || ch_fail || mfail_r;
      s5_cnt  <= ch_cnt;
      s5_pos  <= ch_pos;
      s5_val  <= e_r;
    end
  end

  // ---------------------------------------------------------------- stage 5
  rs_corrector #(.T(T), .TAG_W(TAG_W)) u_corrector (
    .clk, .rst_n,
    .active    (s5_v),
    .idx       (fc),
    .err_cnt   (s5_cnt),
    .err_pos   (s5_pos),
    .err_val   (s5_val),
    .fail      (s5_fail),
    .tag       (s5_tag),
    .rd_data,
    .out_valid, .out_sop, .out_eop, .out_sym, .out_tag, .out_ok, .out_fail
  );

  // A codeword, once started, arrives on consecutive cycles.
  a_in_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (s1_v && fc != 8'd0) |-> in_valid);

endmodule
