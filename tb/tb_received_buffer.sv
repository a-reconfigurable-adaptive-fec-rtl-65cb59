// tb_received_buffer: a 4-packet buffer. Packets are written byte by byte;
// the head must show them in order with their headers, a fifth packet while
// four wait must be dropped and counted, retransmissions must bypass the
// queue into their own FIFO, and popping must free space again.
module tb_received_buffer;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_sop, head_valid, pop, retx_valid, retx_take, full, drop;
  gf_t in_sym;
  pkt_hdr_t in_hdr, head_hdr, retx_hdr;
  logic [8*255-1:0] head_pkt, retx_pkt;
  logic [2:0] count;
  logic [31:0] drop_cnt, arrive_cnt;
  int checks = 0, failures = 0;
  logic [8*255-1:0] sent [16];

  received_buffer #(.DEPTH(4), .RETX_DEPTH(2), .N(255)) dut (.*);

  task automatic send(int id, bit retx);
    for (int i = 0; i < 255; i++) begin
      @(negedge clk);
      in_valid = 1; in_sop = (i == 0); in_sym = gf_t'($urandom);
      sent[id][8*i +: 8] = in_sym;
      in_hdr = '{seq: 16'(id), t: 3'd2, retx: retx};
    end
    @(negedge clk);
    in_valid = 0; in_sop = 0;
  endtask

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("failed: %s", what); end
  endtask

  initial begin
    in_valid = 0; in_sop = 0; in_sym = 0; in_hdr = '0; pop = 0; retx_take = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk("empty after reset", !head_valid && !retx_valid && count == 0);
    for (int p = 0; p < 4; p++) send(p, 0);
    chk("four queued", count == 4 && full && head_valid);
    send(4, 0);
    chk("fifth dropped", drop_cnt == 1 && count == 4);
    send(10, 1);
    chk("retx bypasses queue", retx_valid && retx_hdr.seq == 10 && retx_hdr.retx && retx_pkt == sent[10] && count == 4);
    for (int p = 0; p < 4; p++) begin
      chk("head in order", head_valid && head_hdr.seq == 16'(p) && head_pkt == sent[p] && head_hdr.t == 3'd2);
      @(negedge clk); pop = 1;
      @(negedge clk); pop = 0;
    end
    chk("empty again", !head_valid && count == 0 && !full);
    @(negedge clk); retx_take = 1;
    @(negedge clk); retx_take = 0;
    chk("retx taken", !retx_valid);
    send(5, 0);
    chk("accepts after drain", head_valid && head_hdr.seq == 5 && head_pkt == sent[5]);
    chk("arrivals counted", arrive_cnt == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
