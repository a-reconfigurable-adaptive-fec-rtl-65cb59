// packet_sequencer: hands packets from the received buffer to the parallel RS
// decoders and keeps the ARQ bookkeeping.
//
// Each decoder lane has a one-packet staging register. When the lane is free
// and a packet is available it is loaded from the buffer head (or from the
// retransmission slot, which is served first) and streamed into the lane, one
// byte per cycle, as soon as the lane accepts a codeword. The tag sent along
// is {retx, sequence number}.
//
// ARQ: every packet a decoder cannot correct is NAKed; from then on, until as
// many retransmissions have been decoded correctly as packets have failed,
// no new packets are taken from the buffer, so arrivals pile up there (and are
// dropped when it is full), as the source design describes. Sequence numbers
// of first transmissions are checked for continuity and gaps counted.
//
// Reconfiguration: each packet carries the t it was encoded with. When the
// next packet's t differs from the current configuration, dispatching stops
// until all lanes are empty and then `reconf_req` asks for the new t; the
// packet goes out once the new configuration is ready. Only the first `lanes`
// lanes are used. The hold rule, the staging registers and the sequence check
// are this design's reading of the source design's short description.
module packet_sequencer
  import rs_pkg::*;
#(
  parameter int P_MAX = 14,
  parameter int N     = RS_N
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // received buffer
  input  logic                        head_valid,
  input  logic [8*N-1:0]              head_pkt,
  input  pkt_hdr_t                    head_hdr,
  output logic                        pop,
  input  logic                        retx_valid,
  input  logic [8*N-1:0]              retx_pkt,
  input  pkt_hdr_t                    retx_hdr,
  output logic                        retx_take,
  // configuration
  input  logic [2:0]                  cur_t,
  input  logic                        cfg_ready,
  input  logic [4:0]                  lanes,
  output logic                        reconf_req,
  output logic [2:0]                  reconf_t,
  // decoder lanes
  input  logic [P_MAX-1:0]            lane_ready,
  input  logic [P_MAX-1:0]            lane_busy,
  output logic [P_MAX-1:0]            lane_valid,
  output gf_t  [P_MAX-1:0]            lane_sym,
  output logic [P_MAX-1:0][TAG_W-1:0] lane_tag,
  // decoder results
  input  logic [P_MAX-1:0]            res_ok,
  input  logic [P_MAX-1:0]            res_fail,
  input  logic [P_MAX-1:0][TAG_W-1:0] res_tag,
  // status
  output logic                        hold,
  output logic [7:0]                  outstanding,
  output logic [31:0]                 gap_cnt,
  output logic [31:0]                 dispatch_cnt
);

  logic [P_MAX-1:0]            stg_valid, stg_run;
  logic [P_MAX-1:0][8*N-1:0]   stg_data;
  logic [P_MAX-1:0][7:0]       stg_cnt;
  logic [SEQ_W-1:0]            exp_seq;

  logic                        use_retx, cand_valid, t_match, all_idle, free_any, dispatch;
  pkt_hdr_t                    cand_hdr;
  logic [8*N-1:0]              cand_pkt;
  logic [$clog2(P_MAX)-1:0]    free_l;
  logic [7:0]                  n_fail, n_retx_ok;

  always_comb begin
    use_retx   = retx_valid;
    cand_valid = retx_valid || (head_valid && !hold);
    cand_hdr   = use_retx ? retx_hdr : head_hdr;
    cand_pkt   = use_retx ? retx_pkt : head_pkt;
    t_match    = (cand_hdr.t == cur_t);

    free_any = 1'b0;
    free_l   = '0;
    for (int l = P_MAX - 1; l >= 0; l--) begin
      if (5'(l) < lanes && !stg_valid[l]) begin
        free_any = 1'b1;
        free_l   = ($clog2(P_MAX))'(l);
      end
    end
    all_idle = (stg_valid == '0) && (lane_busy == '0);

    dispatch   = cand_valid && cfg_ready && t_match && free_any;
    pop        = dispatch && !use_retx;
    retx_take  = dispatch && use_retx;
    reconf_req = cand_valid && cfg_ready && !t_match && all_idle;
    reconf_t   = cand_hdr.t;

    for (int l = 0; l < P_MAX; l++) begin
      lane_valid[l] = stg_valid[l] && (stg_run[l] || lane_ready[l]);
      lane_sym[l]   = stg_data[l][7:0];
    end

    n_fail    = '0;
    n_retx_ok = '0;
    for (int l = 0; l < P_MAX; l++) begin
      n_fail    += 8'(res_fail[l]);
      n_retx_ok += 8'(res_ok[l] && res_tag[l][TAG_W-1]);
    end
  end

  assign hold = (outstanding != 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stg_valid <= '0; stg_run <= '0; stg_data <= '0; stg_cnt <= '0; lane_tag <= '0;
      exp_seq <= '0; outstanding <= '0; gap_cnt <= '0; dispatch_cnt <= '0;
    end else begin
      for (int l = 0; l < P_MAX; l++) begin
        if (lane_valid[l]) begin
          stg_data[l] <= stg_data[l] >> 8;
          stg_run[l]  <= 1'b1;
          stg_cnt[l]  <= stg_cnt[l] + 8'd1;
          if (stg_cnt[l] == 8'(N - 1)) begin
            stg_valid[l] <= 1'b0;
            stg_run[l]   <= 1'b0;
          end
        end
      end
      if (dispatch) begin
        stg_valid[free_l] <= 1'b1;
        stg_run[free_l]   <= 1'b0;
        stg_cnt[free_l]   <= '0;
        stg_data[free_l]  <= cand_pkt;
        lane_tag[free_l]  <= {cand_hdr.retx, cand_hdr.seq};
        dispatch_cnt      <= dispatch_cnt + 32'd1;
        if (!use_retx) begin
          if (cand_hdr.seq != exp_seq) gap_cnt <= gap_cnt + 32'd1;
          exp_seq <= cand_hdr.seq + 1'b1;
        end
      end
      outstanding <= outstanding + n_fail - ((outstanding + n_fail >= n_retx_ok) ? n_retx_ok : outstanding + n_fail);
    end
  end

endmodule
