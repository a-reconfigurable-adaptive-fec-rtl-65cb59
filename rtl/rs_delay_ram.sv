// rs_delay_ram: codeword store of one RS decoder.
//
// A codeword must wait while its syndromes, locator, locations and magnitudes
// are worked out: it is written during stage 1 and read back during stage 5,
// four stage periods later. The store therefore holds SLOTS = 5 codewords of
// N symbols; the write slot advances once per stage period and the read slot
// is the one written four periods earlier. One write port, one read port with
// a registered output (read data appear the cycle after the address), which
// maps onto a block RAM. Slot sequencing is done by the decoder.
module rs_delay_ram
  import rs_pkg::*;
#(
  parameter int SLOTS = 5,
  parameter int N     = RS_N
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(SLOTS)-1:0] wr_slot,
  input  logic [7:0]               wr_idx,
  input  gf_t                      wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(SLOTS)-1:0] rd_slot,
  input  logic [7:0]               rd_idx,
  output gf_t                      rd_data
);

  gf_t mem [SLOTS*N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_slot) * N + int'(wr_idx)] <= wr_data;
    if (rd_en) rd_data <= mem[int'(rd_slot) * N + int'(rd_idx)];
  end

endmodule
