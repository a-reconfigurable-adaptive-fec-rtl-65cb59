// tb_control_packet_gen: events from several lanes in the same cycle and a
// change-t request must all come out as 4-byte control packets
// {type, seq hi, seq lo, t}: change-t first, then lanes in ascending order,
// ACK for ok and NAK for fail, with sop/eop framing and matching counters.
module tb_control_packet_gen;
  import rs_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0] ev_ok, ev_fail;
  logic [P-1:0][TAG_W-1:0] ev_tag;
  logic chg_req, cp_valid, cp_sop, cp_eop, overflow;
  logic [2:0] chg_t, cur_t;
  logic [7:0] cp_byte;
  logic [31:0] ack_cnt, nak_cnt, chg_cnt;
  int checks = 0, failures = 0;
  logic [31:0] got [$];
  logic [31:0] cur;
  int nb;

  control_packet_gen #(.P_MAX(P)) dut (.*);

  always @(posedge clk) if (rst_n && cp_valid) begin
    if (cp_sop) nb = 0;
    cur = {cur[23:0], cp_byte};
    nb++;
    if (cp_eop) begin
      checks++;
      if (nb != 4) begin failures++; $display("packet of %0d bytes", nb); end
      got.push_back(cur);
    end
  end

  initial begin
    logic [31:0] expv [5];
    ev_ok = 0; ev_fail = 0; ev_tag = '0; chg_req = 0; chg_t = 0; cur_t = 3'd2;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    ev_ok   = 4'b1001; ev_fail = 4'b0100;
    ev_tag[0] = 17'h00102; ev_tag[2] = 17'h10A0B; ev_tag[3] = 17'h0FFFF;
    chg_req = 1; chg_t = 3'd3;
    @(negedge clk);
    ev_ok = 0; ev_fail = 0; chg_req = 0;
    repeat (3) @(negedge clk);
    ev_fail = 4'b0010; ev_tag[1] = 17'h00005;
    @(negedge clk);
    ev_fail = 0;
    repeat (40) @(negedge clk);
    expv[0] = {8'h54, 16'h0000, 8'h03};
    expv[1] = {8'h41, 16'h0102, 8'h02};
    expv[2] = {8'h4E, 16'h0005, 8'h02};
    expv[3] = {8'h4E, 16'h0A0B, 8'h02};
    expv[4] = {8'h41, 16'hFFFF, 8'h02};
    checks++;
    if (got.size() != 5) begin failures++; $display("%0d packets", got.size()); end
    for (int i = 0; i < 5 && i < got.size(); i++) begin
      checks++;
      if (got[i] != expv[i]) begin failures++; $display("packet %0d: %h expected %h", i, got[i], expv[i]); end
    end
    checks++;
    if (ack_cnt != 2 || nak_cnt != 2 || chg_cnt != 1 || overflow) begin failures++; $display("counters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
