// control_packet_gen: builds the control packets the receiver sends back to
// the transmitter on the feedback channel.
//
// A decoder that delivers a packet without uncorrectable errors raises its
// receiving signal (ev_ok) and an ACK is sent; one that cannot correct a
// packet raises its error signal (ev_fail) and a NAK asks for a
// retransmission; a request from the PER monitor (chg_req) produces a packet
// asking the transmitter to change t. These three packet kinds are the source
// design's; their format is this design's choice: 4 bytes
// {type, seq[15:8], seq[7:0], t}, type 'A', 'N' or 'T'.
//
// Events are latched per decoder lane (a lane finishes at most one packet per
// 255 cycles, far longer than the 4*P_MAX cycles needed to send all pending
// packets) and sent one at a time, change-t requests first, then the lowest
// lane. `overflow` flags an event that found its lane's previous one unsent.
// Output: one byte per cycle with cp_sop/cp_eop.
module control_packet_gen
  import rs_pkg::*;
#(
  parameter int P_MAX = 14
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [P_MAX-1:0]            ev_ok,
  input  logic [P_MAX-1:0]            ev_fail,
  input  logic [P_MAX-1:0][TAG_W-1:0] ev_tag,
  input  logic                        chg_req,
  input  logic [2:0]                  chg_t,
  input  logic [2:0]                  cur_t,
  output logic                        cp_valid,
  output logic                        cp_sop,
  output logic                        cp_eop,
  output logic [7:0]                  cp_byte,
  output logic [31:0]                 ack_cnt,
  output logic [31:0]                 nak_cnt,
  output logic [31:0]                 chg_cnt,
  output logic                        overflow
);

  logic [P_MAX-1:0]            pend, pend_nak;
  logic [P_MAX-1:0][SEQ_W-1:0] pend_seq;
  logic                        pend_chg;
  logic [2:0]                  pend_chg_t;

  logic [CP_LEN*8-1:0]         shreg;
  logic [1:0]                  bcnt;
  logic                        sending;

  logic                        pick_any;
  logic [$clog2(P_MAX)-1:0]    pick;
  logic [P_MAX-1:0]            clr;

  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int l = P_MAX - 1; l >= 0; l--) begin
      if (pend[l]) begin
        pick_any = 1'b1;
        pick     = ($clog2(P_MAX))'(l);
      end
    end
    clr = '0;
    if (!sending && !pend_chg && pick_any) clr[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0; pend_nak <= '0; pend_seq <= '0; pend_chg <= 1'b0; pend_chg_t <= '0;
      shreg <= '0; bcnt <= '0; sending <= 1'b0;
      cp_valid <= 1'b0; cp_sop <= 1'b0; cp_eop <= 1'b0; cp_byte <= '0;
      ack_cnt <= '0; nak_cnt <= '0; chg_cnt <= '0; overflow <= 1'b0;
    end else begin
      // capture
      for (int l = 0; l < P_MAX; l++) begin
        if (ev_ok[l] || ev_fail[l]) begin
          if (pend[l] && !clr[l]) overflow <= 1'b1;
          pend[l]     <= 1'b1;
          pend_nak[l] <= ev_fail[l];
          pend_seq[l] <= ev_tag[l][SEQ_W-1:0];
        end else if (clr[l]) begin
          pend[l] <= 1'b0;
        end
      end
      if (chg_req) begin
        pend_chg   <= 1'b1;
        pend_chg_t <= chg_t;
      end

      // serialise
      cp_valid <= 1'b0; cp_sop <= 1'b0; cp_eop <= 1'b0;
      if (sending) begin
        cp_valid <= 1'b1;
        cp_byte  <= shreg[CP_LEN*8-1 -: 8];
        cp_sop   <= (bcnt == 2'd0);
        cp_eop   <= (bcnt == 2'(CP_LEN - 1));
        shreg    <= shreg << 8;
        bcnt     <= bcnt + 2'd1;
        if (bcnt == 2'(CP_LEN - 1)) sending <= 1'b0;
      end else if (pend_chg && !chg_req) begin
        shreg    <= {CP_CHG_T, 16'h0000, 5'b0, pend_chg_t};
        pend_chg <= 1'b0;
        sending  <= 1'b1;
        bcnt     <= '0;
        chg_cnt  <= chg_cnt + 32'd1;
      end else if (pick_any && !pend_chg) begin
        shreg   <= {pend_nak[pick] ? CP_NAK : CP_ACK, pend_seq[pick], 5'b0, cur_t};
        sending <= 1'b1;
        bcnt    <= '0;
        if (pend_nak[pick]) nak_cnt <= nak_cnt + 32'd1;
        else                ack_cnt <= ack_cnt + 32'd1;
      end
    end
  end

endmodule
