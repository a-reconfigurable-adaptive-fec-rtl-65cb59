// tb_rafec_rtt: the adaptive FEC receiver at its default size under the
// heaviest load point of its intended operating range: 24 Mbit/s of 255-byte
// packets (one every 850 cycles on average at 10 MHz, exponential idle gaps)
// and a round trip time of 100 ms (1,000,000 cycles).
//
// Some of packets 10..40 are made uncorrectable. Each one is NAKed, and the
// receiver then holds every later arrival in the received buffer until the
// retransmission comes back one round trip later. About 1,000,000 / 850 =
// 1176 packets pile up per round trip (more when NAKs follow each other and
// the holds chain), well inside the 6000-packet buffer. The test
// checks that:
//   * the arrival rate is 24 Mbit/s within 10 %;
//   * the buffer peaks above 900 packets and drops nothing;
//   * NAKs, retransmissions and holds happen;
//   * every packet is delivered exactly once;
//   * every correctable transmission arrives with the data that was sent.
// Adaptation of t runs freely and is not checked here.
module tb_rafec_rtt;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  localparam int NPKT     = 1600;
  localparam int RTT      = 1_000_000;
  localparam int MEAN_GAP = 850 - 255;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic in_valid, in_sop; logic [7:0] in_sym; pkt_hdr_t in_hdr;
  logic [13:0] app_valid, app_sop, app_eop, app_ok, app_fail;
  gf_t [13:0] app_sym; logic [13:0][TAG_W-1:0] app_tag;
  logic cp_valid, cp_sop, cp_eop; logic [7:0] cp_byte;
  logic [2:0] cur_t, req_t; logic cfg_ready, buf_full, hold;
  logic [12:0] buf_count;
  logic [31:0] drop_cnt, arrive_cnt, reconf_cnt, ack_cnt, nak_cnt, chg_cnt, gap_cnt;
  int sent_new, sent_retx, n_ack, n_nak, n_chg; logic tx_done;

  rafec_system dut (.*);

  rafec_tx_model #(.NPKT(NPKT), .RTT(RTT), .GAP(MEAN_GAP), .POISSON(1'b1), .INIT_T(4)) tx (
    .clk, .rst_n, .bad_from (10), .bad_to (40), .bad_permille (150),
    .in_valid, .in_sop, .in_sym, .in_hdr,
    .cp_valid, .cp_sop, .cp_eop, .cp_byte,
    .sent_new, .sent_retx, .n_ack, .n_nak, .n_chg, .done (tx_done)
  );

  cw_t got [14];
  int  gi  [14];
  int  delivered [NPKT];
  int  n_ok = 0, peak = 0;
  longint last_act = 0, cyc = 0, hold_cycles = 0, arrive_end = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (hold) hold_cycles++;
      if (int'(buf_count) > peak) peak = int'(buf_count);
      if (in_valid && in_sop && !in_hdr.retx && int'(in_hdr.seq) == NPKT - 1) arrive_end = cyc;
    end
    if (app_valid != '0 || in_valid || !cfg_ready) last_act = cyc;
    for (int l = 0; l < 14; l++) begin
      if (app_valid[l]) begin
        if (app_sop[l]) gi[l] = 0;
        got[l][gi[l]] = app_sym[l];
        gi[l]++;
        if (app_eop[l] && app_ok[l]) begin
          int s;
          s = int'(app_tag[l][SEQ_W-1:0]);
          n_ok++;
          if (tx.correctable[s]) begin
            checks++;
            if (got[l] != tx.sent_cw[s] || gi[l] != 255) begin
              failures++;
              $display("seq %0d lane %0d: wrong data delivered", s, l);
            end
          end
          delivered[s]++;
        end
      end
    end
  end

  task automatic expect_seen(string what, longint n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    real mbps;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    wait (tx_done);
    wait (cyc - last_act > 3000 && !hold && buf_count == 0);
    expect_seen("NAK packets", n_nak);
    expect_seen("retransmissions", sent_retx);
    expect_seen("cycles with the buffer held", hold_cycles);
    // new packets only: 255 bytes x 8 bits each, 10 MHz clock
    mbps = real'(NPKT - 1) * 255.0 * 8.0 * 10.0 / real'(arrive_end);
    $display("arrival rate %0.2f Mbit/s, buffer peak %0d packets, %0d drops, t=%0d",
             mbps, peak, drop_cnt, cur_t);
    checks++;
    if (mbps < 21.6 || mbps > 26.4) begin failures++; $display("arrival rate is not 24 Mbit/s"); end
    checks++;
    if (peak <= 900) begin failures++; $display("buffer never filled over one round trip"); end
    checks++;
    if (drop_cnt != 0) begin failures++; $display("%0d drops in a 6000-packet buffer", drop_cnt); end
    for (int s = 0; s < NPKT; s++) begin
      checks++;
      if (delivered[s] != 1) begin failures++; $display("seq %0d delivered %0d times", s, delivered[s]); end
    end
    $display("finished after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d new %0d retx, ok %0d, t=%0d hold=%b buf=%0d",
             sent_new, sent_retx, n_ok, cur_t, hold, buf_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
