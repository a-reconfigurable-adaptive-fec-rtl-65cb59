// rafec_tx_model: transmitter and channel model for the system testbenches.
//
// Sends NPKT packets with sequence numbers 0..NPKT-1, each a random RS
// codeword encoded with the transmitter's current t, one byte per cycle with
// GAP idle cycles between packets (with POISSON = 1 the idle gap is drawn
// from an exponential distribution of mean GAP instead, so arrivals approach
// a Poisson process at low load). Packets with sequence numbers in
// [bad_from, bad_to] are made uncorrectable with probability bad_permille/1000
// (t+1..t+2 symbol errors); all others get 0..t errors. It listens on the
// feedback channel: a NAK schedules a retransmission (re-encoded with the
// current t, correctable errors only) RTT cycles later, a change-t packet
// switches the t used for the following packets, ACKs are counted.
// sent_cw[seq] is the codeword of the latest transmission of seq and
// correctable[seq] whether that transmission had at most t errors.
module rafec_tx_model
  import rs_pkg::*;
  import rs_tb_pkg::*;
#(
  parameter int NPKT   = 64,
  parameter int RTT    = 2000,
  parameter int GAP    = 0,
  parameter bit POISSON = 1'b0,
  parameter int INIT_T = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  int        bad_from,
  input  int        bad_to,
  input  int        bad_permille,
  output logic      in_valid,
  output logic      in_sop,
  output logic [7:0] in_sym,
  output pkt_hdr_t  in_hdr,
  input  logic      cp_valid,
  input  logic      cp_sop,
  input  logic      cp_eop,
  input  logic [7:0] cp_byte,
  output int        sent_new,
  output int        sent_retx,
  output int        n_ack,
  output int        n_nak,
  output int        n_chg,
  output logic      done
);

  cw_t    sent_cw     [NPKT];
  bit     correctable [NPKT];
  logic [2:0] tx_t;
  longint now;

  int     rq_seq [$];
  longint rq_due [$];

  always @(posedge clk) now <= now + 1;

  // feedback channel
  logic [7:0] cpb [4];
  int         cpn;
  always @(posedge clk) begin
    if (rst_n && cp_valid) begin
      if (cp_sop) cpn = 0;
      cpb[cpn] = cp_byte;
      cpn++;
      if (cp_eop) begin
        case (cpb[0])
          8'h41: n_ack++;
          8'h4E: begin
            n_nak++;
            rq_seq.push_back(int'({cpb[1], cpb[2]}));
            rq_due.push_back(now + RTT);
          end
          8'h54: begin
            n_chg++;
            tx_t <= cpb[3][2:0];
          end
          default: $display("tx model: unknown control packet %h", cpb[0]);
        endcase
      end
    end
  end

  task automatic send(int seq, bit retx);
    cw_t cw, rx;
    int pos [8];
    sym_t val [8];
    int t, ne;
    t = int'(tx_t);
    random_codeword(t, cw);
    rx = cw;
    if (!retx && seq >= bad_from && seq <= bad_to && $urandom_range(0, 999) < bad_permille)
      ne = t + 1 + $urandom_range(0, 1);
    else
      ne = $urandom_range(0, t);
    inject(ne, rx, pos, val);
    sent_cw[seq]     = cw;
    correctable[seq] = (ne <= t);
    for (int i = 0; i < 255; i++) begin
      in_valid   = 1'b1;
      in_sop     = (i == 0);
      in_sym     = rx[i];
      in_hdr.seq = SEQ_W'(seq);
      in_hdr.t   = 3'(t);
      in_hdr.retx = retx;
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_sop   = 1'b0;
    if (POISSON) begin
      real u;
      u = (real'($urandom_range(0, 999999)) + 1.0) / 1000000.0;
      repeat (int'(-real'(GAP) * $ln(u))) @(negedge clk);
    end else begin
      repeat (GAP) @(negedge clk);
    end
  endtask

  initial begin
    int next;
    now = 0; cpn = 0;
    n_ack = 0; n_nak = 0; n_chg = 0; sent_new = 0; sent_retx = 0;
    tx_t = 3'(INIT_T);
    done = 1'b0;
    in_valid = 1'b0; in_sop = 1'b0; in_sym = '0; in_hdr = '0;
    next = 0;
    @(posedge rst_n);
    @(negedge clk);
    forever begin
      if (rq_seq.size() > 0 && rq_due[0] <= now) begin
        int s;
        s = rq_seq.pop_front();
        void'(rq_due.pop_front());
        send(s, 1'b1);
        sent_retx++;
      end else if (next < NPKT) begin
        send(next, 1'b0);
        next++;
        sent_new++;
      end else begin
        done = (rq_seq.size() == 0);
        @(negedge clk);
      end
    end
  end

endmodule
