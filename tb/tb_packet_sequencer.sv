// tb_packet_sequencer: a model buffer and model decoder lanes (ready every
// 255 cycles, results reported by the testbench) around the sequencer.
// Checked: packets go to free lanes in order, each byte stream is the packet,
// tags carry {retx, seq}; a failure holds the buffer until a retransmission
// decodes ok; a retransmission is served before the buffer head; a packet
// with another t waits for all lanes to empty and then requests a
// reconfiguration; sequence gaps are counted.
module tb_packet_sequencer;
  import rs_pkg::*;
  localparam int P = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic head_valid, pop, retx_valid, retx_take, cfg_ready, reconf_req, hold;
  logic [8*255-1:0] head_pkt, retx_pkt;
  pkt_hdr_t head_hdr, retx_hdr;
  logic [2:0] cur_t, reconf_t;
  logic [4:0] lanes;
  logic [P-1:0] lane_ready, lane_busy, lane_valid, res_ok, res_fail;
  gf_t [P-1:0] lane_sym;
  logic [P-1:0][TAG_W-1:0] lane_tag, res_tag;
  logic [7:0] outstanding;
  logic [31:0] gap_cnt, dispatch_cnt;
  int checks = 0, failures = 0;

  packet_sequencer #(.P_MAX(P), .N(255)) dut (.*);

  // model queue
  logic [8*255-1:0] q_pkt [$];
  pkt_hdr_t         q_hdr [$];
  assign head_valid = q_pkt.size() > 0;
  assign head_pkt   = head_valid ? q_pkt[0] : '0;
  assign head_hdr   = head_valid ? q_hdr[0] : '0;
  always @(posedge clk) if (pop) begin void'(q_pkt.pop_front()); void'(q_hdr.pop_front()); end
  always @(posedge clk) if (retx_take) retx_valid <= 1'b0;

  // model lanes: accept a packet whenever idle, take 255 bytes, stay busy a while
  int  lane_cnt [P];
  int  lane_idle [P];
  logic [8*255-1:0] lane_got [P];
  int  got_seq [$];
  bit  got_retx [$];
  int  got_lane [$];
  bit  bad_data = 0;
  logic [8*255-1:0] pkt_of [int];
  for (genvar l = 0; l < P; l++) begin : g_lane
    assign lane_ready[l] = (lane_cnt[l] == 0) && (lane_idle[l] == 0);
    assign lane_busy[l]  = (lane_cnt[l] != 0) || (lane_idle[l] != 0);
    always @(posedge clk) begin
      if (rst_n && lane_valid[l]) begin
        lane_got[l][8*lane_cnt[l] +: 8] = lane_sym[l];
        lane_cnt[l]++;
        if (lane_cnt[l] == 255) begin
          lane_cnt[l]  = 0;
          lane_idle[l] = 20;
          got_seq.push_back(int'(lane_tag[l][15:0]));
          got_retx.push_back(lane_tag[l][16]);
          got_lane.push_back(l);
          if (lane_got[l] != pkt_of[int'(lane_tag[l])]) bad_data = 1;
        end
      end else if (lane_idle[l] > 0) lane_idle[l]--;
    end
  end

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("failed: %s", what); end
  endtask

  task automatic push(int seq, int t);
    logic [8*255-1:0] p;
    for (int i = 0; i < 255; i++) p[8*i +: 8] = 8'($urandom);
    q_pkt.push_back(p);
    q_hdr.push_back('{seq: 16'(seq), t: 3'(t), retx: 1'b0});
    pkt_of[seq] = p;
  endtask

  task automatic result(int seq, bit retx, bit ok);
    @(negedge clk);
    res_ok[0] = ok; res_fail[0] = !ok; res_tag[0] = {retx, 16'(seq)};
    @(negedge clk);
    res_ok = 0; res_fail = 0;
  endtask

  initial begin
    logic [8*255-1:0] rp;
    int n;
    cfg_ready = 1; cur_t = 3'd2; lanes = 5'd2; retx_valid = 0; retx_pkt = '0; retx_hdr = '0;
    res_ok = 0; res_fail = 0; res_tag = '0;
    for (int l = 0; l < P; l++) begin lane_cnt[l] = 0; lane_idle[l] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) push(s, 2);
    wait (got_seq.size() == 4);
    chk("lanes 0 and 1 only", got_lane[0] != got_lane[1] && got_lane[0] < 2 && got_lane[1] < 2 && got_lane[2] < 2);
    chk("in order", got_seq[0] == 0 && got_seq[1] == 1 && got_seq[2] == 2 && got_seq[3] == 3);
    // seq 1 failed: hold
    result(1, 0, 0);
    chk("hold after failure", hold && outstanding == 1);
    push(5, 2);   // gap: 4 missing
    n = got_seq.size();
    repeat (600) @(negedge clk);
    chk("buffer held", got_seq.size() == n && q_pkt.size() == 1);
    // retransmission of seq 1
    for (int i = 0; i < 255; i++) rp[8*i +: 8] = 8'($urandom);
    pkt_of[32'h10001] = rp;
    retx_pkt = rp; retx_hdr = '{seq: 16'd1, t: 3'd2, retx: 1'b1}; retx_valid = 1;
    wait (got_seq.size() == n + 1);
    chk("retx dispatched while holding", got_seq[n] == 1 && got_retx[n] == 1);
    result(1, 1, 1);
    chk("hold released", !hold);
    wait (got_seq.size() == n + 2);
    chk("buffer resumes", got_seq[n+1] == 5);
    chk("gap counted", gap_cnt == 1);
    // a t = 3 packet needs a reconfiguration once all lanes are idle
    push(6, 3);
    n = 0;
    while (!reconf_req && n < 2000) begin @(negedge clk); n++; end
    chk("reconfiguration requested for t=3", reconf_req && reconf_t == 3 && lane_busy == 0);
    cfg_ready = 0;
    repeat (50) @(negedge clk);
    chk("nothing dispatched during reconfiguration", q_pkt.size() == 1);
    cur_t = 3'd3; lanes = 5'd3; cfg_ready = 1;
    wait (got_seq.size() == 7);
    chk("t=3 packet decoded after reconfiguration", got_seq[6] == 6);
    chk("byte streams intact", !bad_data);
    chk("dispatch count", dispatch_cnt == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
