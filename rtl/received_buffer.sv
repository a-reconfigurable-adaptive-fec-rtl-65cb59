// received_buffer: the receiver's packet buffer in front of the decoders.
//
// Packets of N = 255 bytes (one RS codeword each) arrive byte by byte from the
// wireless channel and are assembled in a shift register; the completed
// packet is written as one wide word into a FIFO of DEPTH packets (6000 in the
// source design, 1.53 Mbyte). When the FIFO is full the arriving packet is
// dropped and counted: this is the packet dropping rate the source design
// evaluates. The packet sequencer takes whole packets from the head.
//
// Retransmissions answering a NAK (header flag `retx`) are not queued behind
// the packets that piled up while waiting for them; they go into a separate
// small FIFO of RETX_DEPTH packets that the sequencer serves first. A
// retransmission finding that FIFO full is dropped and counted as well. The
// retransmission FIFO, the sideband header and the wide-word organisation are
// this design's choices; the source design only says that arrivals wait in
// the buffer while a retransmission is outstanding and are dropped once it is
// full.
//
// Interface: in_valid qualifies in_sym; in_sop marks byte 0 and samples
// in_hdr. Packets must arrive whole (255 bytes, gaps allowed). head_* is
// first-word-fall-through: valid while not empty, removed by `pop`. A packet
// is visible the cycle after its last byte. Byte i of a packet is
// head_pkt[8*i +: 8]. The retx_* outputs show the oldest waiting
// retransmission, removed by `retx_take`.
module received_buffer
  import rs_pkg::*;
#(
  parameter int DEPTH      = 6000,
  parameter int RETX_DEPTH = 8,
  parameter int N          = RS_N
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       in_sop,
  input  gf_t                        in_sym,
  input  pkt_hdr_t                   in_hdr,
  output logic                       head_valid,
  output logic [8*N-1:0]             head_pkt,
  output pkt_hdr_t                   head_hdr,
  input  logic                       pop,
  output logic                       retx_valid,
  output logic [8*N-1:0]             retx_pkt,
  output pkt_hdr_t                   retx_hdr,
  input  logic                       retx_take,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       drop,
  output logic [31:0]                drop_cnt,
  output logic [31:0]                arrive_cnt
);

  localparam int AW = $clog2(DEPTH);

  logic [8*N-1:0] mem [DEPTH];
  pkt_hdr_t       hmem [DEPTH];
  logic [AW-1:0]  wp, rp;

  localparam int RW = $clog2(RETX_DEPTH);
  logic [8*N-1:0] rmem [RETX_DEPTH];
  pkt_hdr_t       rhmem [RETX_DEPTH];
  logic [RW-1:0]  rwp, rrp;
  logic [RW:0]    rcount;
  logic           rwr, rfull;

  logic [8*N-1:0] asm_r;
  logic [7:0]     asm_cnt;
  pkt_hdr_t       asm_hdr, hdr_cur;
  logic           last, wr, do_pop;
  logic [8*N-1:0] pkt_done;

  assign hdr_cur  = in_sop ? in_hdr : asm_hdr;
  assign last     = in_valid && ((in_sop ? 8'd0 : asm_cnt) == 8'(N - 1));
  assign pkt_done = {in_sym, asm_r[8*N-1:8]};
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign wr       = last && !hdr_cur.retx && !full;
  assign do_pop   = pop && head_valid;

  assign head_valid = (count != '0);
  assign head_pkt   = mem[rp];
  assign head_hdr   = hmem[rp];

  assign rfull      = (rcount == (RW+1)'(RETX_DEPTH));
  assign rwr        = last && hdr_cur.retx && !rfull;
  assign retx_valid = (rcount != '0);
  assign retx_pkt   = rmem[rrp];
  assign retx_hdr   = rhmem[rrp];

  always_ff @(posedge clk) begin
    if (wr) begin
      mem[wp]  <= pkt_done;
      hmem[wp] <= hdr_cur;
    end
    if (rwr) begin
      rmem[rwp]  <= pkt_done;
      rhmem[rwp] <= hdr_cur;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_r <= '0; asm_cnt <= '0; asm_hdr <= '0;
      wp <= '0; rp <= '0; count <= '0;
      rwp <= '0; rrp <= '0; rcount <= '0;
      drop <= 1'b0; drop_cnt <= '0; arrive_cnt <= '0;
    end else begin
      drop <= 1'b0;
      if (in_valid) begin
        asm_r   <= pkt_done;
        asm_cnt <= in_sop ? 8'd1 : asm_cnt + 8'd1;
        if (in_sop) asm_hdr <= in_hdr;
      end
      if (last) begin
        arrive_cnt <= arrive_cnt + 32'd1;
        if (hdr_cur.retx) begin
          if (rfull) begin
            drop <= 1'b1; drop_cnt <= drop_cnt + 32'd1;
          end
        end else if (full) begin
          drop <= 1'b1; drop_cnt <= drop_cnt + 32'd1;
        end
      end
      if (wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      if (rwr) rwp <= (rwp == RW'(RETX_DEPTH - 1)) ? '0 : rwp + 1'b1;
      if (retx_take && retx_valid) rrp <= (rrp == RW'(RETX_DEPTH - 1)) ? '0 : rrp + 1'b1;
      rcount <= rcount + (rwr ? 1'b1 : 1'b0) - ((retx_take && retx_valid) ? 1'b1 : 1'b0);
      count <= count + (wr ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

endmodule
