// tb_rafec_full: the adaptive FEC receiver at its full default size
// (6000-packet buffer, 93,600-cycle reconfiguration, 64-packet PER window,
// 14/6/4/3 decoders for t = 1..4).
//
// One complete adaptation step: 150 packets, starting at t = 4. Some of
// packets 10..40 are made uncorrectable; they must be NAKed, retransmitted
// after a 2000-cycle round trip and then delivered. The first 64-packet PER
// window therefore holds failures and t stays; the next, clean, window lowers
// t to 3: the transmitter switches and the receiver reconfigures (93,600
// cycles) before decoding the t = 3 packets on its 4-decoder bank. All
// correctable packets must arrive intact, every packet exactly once, and the
// 6000-packet buffer must not overflow.
module tb_rafec_full;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  localparam int NPKT = 150;

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

  rafec_tx_model #(.NPKT(NPKT), .RTT(2000), .GAP(0), .INIT_T(4)) tx (
    .clk, .rst_n, .bad_from (10), .bad_to (40), .bad_permille (100),
    .in_valid, .in_sop, .in_sym, .in_hdr,
    .cp_valid, .cp_sop, .cp_eop, .cp_byte,
    .sent_new, .sent_retx, .n_ack, .n_nak, .n_chg, .done (tx_done)
  );

  cw_t got [14];
  int  gi  [14];
  int  delivered [NPKT];
  int  n_ok = 0, n_fail = 0, hold_cycles = 0, ok_t3 = 0;
  longint last_act = 0, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (hold) hold_cycles++;
    if (app_valid != '0 || in_valid || !cfg_ready) last_act = cyc;
    for (int l = 0; l < 14; l++) begin
      if (app_valid[l]) begin
        if (app_sop[l]) gi[l] = 0;
        got[l][gi[l]] = app_sym[l];
        gi[l]++;
        if (app_eop[l]) begin
          int s;
          s = int'(app_tag[l][SEQ_W-1:0]);
          if (app_ok[l]) begin
            n_ok++;
            if (cur_t == 3'd3) ok_t3++;
            if (tx.correctable[s]) begin
              checks++;
              if (got[l] != tx.sent_cw[s] || gi[l] != 255) begin
                failures++;
                $display("seq %0d lane %0d: wrong data delivered", s, l);
              end
            end
            delivered[s]++;
          end else begin
            n_fail++;
          end
        end
      end
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    wait (tx_done);
    wait (cyc - last_act > 3000 && !hold && buf_count == 0);
    expect_seen("packets delivered ok", n_ok);
    expect_seen("NAK packets", n_nak);
    expect_seen("retransmissions", sent_retx);
    expect_seen("change-t packets", n_chg);
    expect_seen("reconfigurations", int'(reconf_cnt));
    expect_seen("packets decoded at t=3", ok_t3);
    checks++;
    if (cur_t != 3'd3) begin failures++; $display("t is %0d, expected 3", cur_t); end
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d new %0d retx, ok %0d, t=%0d hold=%b buf=%0d", sent_new, sent_retx, n_ok, cur_t, hold, buf_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
