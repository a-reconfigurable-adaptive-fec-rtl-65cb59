// per_monitor: chooses the error correction capability t from the measured
// packet error rate (PER).
//
// The source design adapts t to the channel with the PER as threshold value
// but gives no thresholds; this block is the simplest rule of that kind.
// Decoded packets are counted in windows of WINDOW packets. At the end of a
// window with at least HI_FAILS uncorrectable packets t is raised by one (up
// to 4); after a window with at most LO_FAILS it is lowered by one (down to
// 1). A change is announced with a one-cycle `chg_req` and the new `req_t`,
// which the control packet generator sends to the transmitter.
//
// Interface: ev_ok / ev_fail carry one bit per decoder lane for the packets
// finished this cycle. `req_t` is the t currently requested.
module per_monitor #(
  parameter int P_MAX    = 14,
  parameter int WINDOW   = 64,
  parameter int HI_FAILS = 4,
  parameter int LO_FAILS = 0,
  parameter int INIT_T   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [P_MAX-1:0] ev_ok,
  input  logic [P_MAX-1:0] ev_fail,
  output logic             chg_req,
  output logic [2:0]       req_t
);

  localparam int CW = $clog2(WINDOW + P_MAX + 1);

  logic [CW-1:0] n_pkt, n_fail, n_pkt_next, n_fail_next;

  always_comb begin
    n_pkt_next  = n_pkt;
    n_fail_next = n_fail;
    for (int l = 0; l < P_MAX; l++) begin
      n_pkt_next  += CW'(ev_ok[l] | ev_fail[l]);
      n_fail_next += CW'(ev_fail[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_pkt <= '0; n_fail <= '0; chg_req <= 1'b0; req_t <= 3'(INIT_T);
    end else begin
      chg_req <= 1'b0;
      if (n_pkt_next >= CW'(WINDOW)) begin
        n_pkt  <= '0;
        n_fail <= '0;
        if (n_fail_next >= CW'(HI_FAILS) && req_t < 3'd4) begin
          req_t <= req_t + 3'd1; chg_req <= 1'b1;
        end else if (n_fail_next <= CW'(LO_FAILS) && req_t > 3'd1) begin
          req_t <= req_t - 3'd1; chg_req <= 1'b1;
        end
      end else begin
        n_pkt  <= n_pkt_next;
        n_fail <= n_fail_next;
      end
    end
  end

endmodule
