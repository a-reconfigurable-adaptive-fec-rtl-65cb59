// tb_rs_delay_ram: fills the five slots with random codewords through the
// write port, then reads every symbol back (one cycle read latency) while new
// data are written into another slot, and compares with a model array.
module tb_rs_delay_ram;
  import rs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [2:0] wr_slot, rd_slot;
  logic [7:0] wr_idx, rd_idx;
  gf_t wr_data, rd_data;
  gf_t model [5][255];
  int checks = 0, failures = 0;

  rs_delay_ram #(.SLOTS(5), .N(255)) dut (.*);

  initial begin
    wr_en = 0; rd_en = 0; wr_slot = 0; rd_slot = 0; wr_idx = 0; rd_idx = 0; wr_data = 0;
    for (int s = 0; s < 5; s++)
      for (int i = 0; i < 255; i++) begin
        @(negedge clk);
        wr_en = 1; wr_slot = 3'(s); wr_idx = 8'(i); wr_data = gf_t'($urandom);
        model[s][i] = wr_data;
      end
    for (int r = 0; r < 5; r++) begin
      for (int i = 0; i < 255; i++) begin
        @(negedge clk);
        rd_en = 1; rd_slot = 3'(r); rd_idx = 8'(i);
        // write into the slot read last time, as the decoder does
        wr_en = 1; wr_slot = 3'((r + 4) % 5); wr_idx = 8'(i); wr_data = gf_t'($urandom);
        @(negedge clk);
        rd_en = 0; wr_en = 0;
        checks++;
        if (rd_data != model[r][i]) begin failures++; $display("slot %0d idx %0d", r, i); end
        model[(r + 4) % 5][i] = wr_data;
      end
    end
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
