// tb_rafec_system: end-to-end test of the adaptive FEC receiver at reduced
// size (8-packet buffer, 400-cycle reconfiguration, 8-packet PER window).
//
// The transmitter model sends 80 packets. The first 16 are clean, so the PER
// monitor lowers t step by step (4 -> 3 -> 2 ...), each step producing a
// change-t control packet and a reconfiguration. Later packets are often
// uncorrectable, giving NAKs, retransmissions after a 3000-cycle round trip,
// a held buffer that overflows and drops packets, and PER-driven increases
// of t. Every packet delivered with ok whose transmission had at most t errors
// must equal the transmitted codeword; every mechanism must occur.
module tb_rafec_system;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  localparam int NPKT = 80;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic in_valid, in_sop; logic [7:0] in_sym; pkt_hdr_t in_hdr;
  logic [13:0] app_valid, app_sop, app_eop, app_ok, app_fail;
  gf_t [13:0] app_sym; logic [13:0][TAG_W-1:0] app_tag;
  logic cp_valid, cp_sop, cp_eop; logic [7:0] cp_byte;
  logic [2:0] cur_t, req_t; logic cfg_ready, buf_full, hold;
  logic [3:0] buf_count;
  logic [31:0] drop_cnt, arrive_cnt, reconf_cnt, ack_cnt, nak_cnt, chg_cnt, gap_cnt;
  int sent_new, sent_retx, n_ack, n_nak, n_chg; logic tx_done;

  rafec_system #(
    .BUF_DEPTH (8), .RECONFIG_CYCLES (400), .PER_WINDOW (8),
    .PER_HI_FAILS (2), .PER_LO_FAILS (0)
  ) dut (.*);

  rafec_tx_model #(.NPKT(NPKT), .RTT(3000), .GAP(0), .INIT_T(4)) tx (
    .clk, .rst_n, .bad_from (16), .bad_to (NPKT), .bad_permille (250),
    .in_valid, .in_sop, .in_sym, .in_hdr,
    .cp_valid, .cp_sop, .cp_eop, .cp_byte,
    .sent_new, .sent_retx, .n_ack, .n_nak, .n_chg, .done (tx_done)
  );

  // collect the application streams
  cw_t got [14];
  int  gi  [14];
  bit  delivered [NPKT];
  int  n_ok = 0, n_fail = 0, hold_cycles = 0, t_up = 0, t_down = 0, drops = 0;
  longint last_act = 0, cyc = 0;
  logic [2:0] t_prev;
  bit seen_t [5];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (hold) hold_cycles++;
    if (rst_n && cur_t != t_prev) begin
      if (cur_t > t_prev) t_up++; else t_down++;
    end
    t_prev <= cur_t;
    seen_t[cur_t] = 1;
    if (app_valid != '0 || in_valid) last_act = cyc;
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
            if (tx.correctable[s]) begin
              checks++;
              if (got[l] != tx.sent_cw[s] || gi[l] != 255) begin
                failures++;
                $display("seq %0d lane %0d: wrong data delivered", s, l);
              end
            end
            if (delivered[s]) $display("note: seq %0d delivered twice", s);
            delivered[s] = 1;
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
    t_prev = 3'd4;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    wait (tx_done);
    wait (cyc - last_act > 6000 && !hold && buf_count == 0);
    expect_seen("packets delivered ok", n_ok);
    expect_seen("uncorrectable packets (error signal)", n_fail);
    expect_seen("ACK packets", n_ack);
    expect_seen("NAK packets", n_nak);
    expect_seen("retransmissions", sent_retx);
    expect_seen("change-t packets", n_chg);
    expect_seen("reconfigurations", int'(reconf_cnt));
    expect_seen("t lowered", t_down);
    expect_seen("t raised", t_up);
    expect_seen("cycles with buffer held", hold_cycles);
    expect_seen("dropped packets (buffer full)", int'(drop_cnt));
    expect_seen("sequence gaps seen by sequencer", int'(gap_cnt));
    // every packet not dropped is eventually delivered
    begin
      int nd;
      nd = 0;
      for (int s = 0; s < NPKT; s++) if (delivered[s]) nd++;
      checks++;
      if (nd + int'(drop_cnt) < NPKT) begin
        failures++; $display("only %0d delivered, %0d dropped of %0d", nd, drop_cnt, NPKT);
      end
    end
    checks++;
    if (int'(ack_cnt) != n_ack || int'(nak_cnt) != n_nak) begin
      failures++; $display("control packet counts differ");
    end
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
